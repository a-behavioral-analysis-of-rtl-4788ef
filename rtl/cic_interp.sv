// cic_interp: comb (CIC, "sinc") interpolator by R with ORDER stages, no multipliers.
//
// Transfer function at the output rate:
//   H(z) = (1 - z^-R)^ORDER * (z^-1 / (1 - z^-1))^ORDER
// implemented the usual way: ORDER first-difference combs run at the input rate
// (a delay of one input sample equals R output samples), then each comb result is
// followed by R-1 zeros (rate increase), then ORDER delaying integrators run at
// the output rate. The DC gain is R^ORDER / R = R^(ORDER-1); for R = 8, ORDER = 4
// it is 512, a power of two, removed at the output by an arithmetic shift with
// rounding and saturation to the 14-bit word, so the block has unity DC gain.
//
// The internal word is DATA_W + ORDER*log2(R) bits (26 bits at the defaults).
// Additions wrap in two's complement; the true result always fits the word, so
// the wrap-around inside the integrators cancels, as in any CIC filter.
//
// Interface and timing. clk runs at the output rate. A sample is taken on each
// cycle with in_valid high, which must come exactly every R cycles. The
// integrators run on every cycle, and out_data is a new output sample on every
// cycle (out_valid is high from the first input sample on). The impulse response
// of in_data to out_data, in output-rate cycles, is the order-ORDER box-car
// convolution (1 + z^-1 + ... + z^-(R-1))^ORDER / R^(ORDER-1); the first output
// that a sample taken at clock edge e affects is registered at edge e+ORDER+1.
// Because that response is never negative, the output never exceeds the input
// range; the saturation only guards the rounding.
//
// The factor R = 8, the order 4 (four combs and four integrators) and the
// structure follow the specification; placing all the gain in one final shift,
// instead of a gain after each integrator, is this design's choice.
module cic_interp
  import adsl_dac_pkg::*;
#(
  parameter int R     = M3,
  parameter int ORDER = CIC_ORDER
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_data
);

  localparam int LOG2R = $clog2(R);
  localparam int W     = DATA_W + ORDER * LOG2R;
  localparam int SHIFT = (ORDER - 1) * LOG2R;   // log2 of the DC gain

  typedef logic signed [W-1:0] acc_t;

  acc_t comb_dly [ORDER];   // previous input of each comb stage
  acc_t comb_res;           // latest comb chain output
  logic stuff;              // high on the one output cycle that carries comb_res
  acc_t integ [ORDER];      // integrator states

  acc_t comb_val [ORDER+1];
  always_comb begin
    comb_val[0] = acc_t'(in_data);
    for (int k = 0; k < ORDER; k++) comb_val[k+1] = comb_val[k] - comb_dly[k];
  end

  acc_t rounded;
  always_comb rounded = (integ[ORDER-1] + acc_t'(1 << (SHIFT - 1))) >>> SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < ORDER; k++) begin
        comb_dly[k] <= '0;
        integ[k]    <= '0;
      end
      comb_res  <= '0;
      stuff     <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      // low-rate comb section
      stuff <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < ORDER; k++) comb_dly[k] <= comb_val[k];
        comb_res <= comb_val[ORDER];
      end
      // zero insertion and high-rate integrators
      integ[0] <= integ[0] + (stuff ? comb_res : acc_t'(0));
      for (int k = 1; k < ORDER; k++) integ[k] <= integ[k] + integ[k-1];
      // output scaling
      if (in_valid) out_valid <= 1'b1;
      if (rounded > acc_t'((1 << (DATA_W - 1)) - 1))
        out_data <= {1'b0, {(DATA_W-1){1'b1}}};
      else if (rounded < -acc_t'(1 << (DATA_W - 1)))
        out_data <= {1'b1, {(DATA_W-1){1'b0}}};
      else
        out_data <= rounded[DATA_W-1:0];
    end
  end

  initial assert (R == (1 << LOG2R)) else $error("cic_interp: R must be a power of two");

endmodule
