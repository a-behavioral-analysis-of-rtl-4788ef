// halfband_interp: 2x interpolator built from a halfband lowpass, in polyphase form.
//
// Interpolating by two means inserting a zero after every input sample and
// lowpass filtering at the doubled rate to remove the image. With a halfband
// filter of TAPS = 4K+3 taps, all taps at an even distance from the centre are
// zero apart from the centre one, so the work splits into two phases computed at
// the input rate:
//   y[2n]   = sum_{i=0}^{P-1} c[i] * x[n-i]      (P = (TAPS+1)/2, symmetric taps)
//   y[2n+1] = x[n-D]                              (D = (TAPS-3)/4, centre tap)
// The FIR phase uses the symmetry: P/2 pre-adds and P/2 multipliers, all in
// parallel, with taps from adsl_dac_pkg::hb_tap. The sum is rounded to nearest
// and saturated to the 14-bit output word.
//
// Interface and timing. One sample is taken on each cycle with in_valid high;
// those cycles must be at least 2*OUT_GAP apart. One cycle after in_valid the
// block emits y[2n] with out_valid high, and OUT_GAP cycles later y[2n+1], so a
// stream of inputs every 2*OUT_GAP cycles becomes an evenly spaced output stream
// every OUT_GAP cycles. TAPS = 71 with OUT_GAP = 16 is the first stage of the
// interpolation chain, TAPS = 19 with OUT_GAP = 8 the second.
//
// The tap counts, the halfband type and the 14-bit word follow the
// specification; the polyphase structure, the tap values (see adsl_dac_pkg), the
// rounding and the saturation are this design's choices.
module halfband_interp
  import adsl_dac_pkg::*;
#(
  parameter int TAPS    = HB1_TAPS,
  parameter int OUT_GAP = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_data,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_data
);

  localparam int P     = (TAPS + 1) / 2;      // taps of the FIR phase
  localparam int D     = (TAPS - 3) / 4;      // delay of the centre-tap phase
  localparam int ACC_W = DATA_W + 1 + COEF_W + $clog2(P);
  localparam int CNT_W = $clog2(OUT_GAP + 2);

  logic signed [DATA_W-1:0] dl [P];           // x[n] .. x[n-P+1]
  logic        [CNT_W-1:0]  phase_cnt;        // 0: idle, 1..OUT_GAP+1: emitting

  logic signed [ACC_W-1:0]  acc;
  logic signed [DATA_W-1:0] fir_out;

  // Symmetric FIR phase, evaluated from the delay line after it has shifted.
  always_comb begin
    acc = '0;
    for (int i = 0; i < P / 2; i++) begin
      acc += ACC_W'((DATA_W + 1)'(dl[i]) + (DATA_W + 1)'(dl[P-1-i])) * ACC_W'(hb_tap(TAPS, i));
    end
  end

  // Round half up at the Q15 boundary and saturate to the data word.
  always_comb begin
    logic signed [ACC_W-1:0] r;
    r = (acc + ACC_W'(1 << (COEF_FRAC - 1))) >>> COEF_FRAC;
    if (r > ACC_W'((1 << (DATA_W - 1)) - 1))
      fir_out = {1'b0, {(DATA_W-1){1'b1}}};
    else if (r < -ACC_W'(1 << (DATA_W - 1)))
      fir_out = {1'b1, {(DATA_W-1){1'b0}}};
    else
      fir_out = r[DATA_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < P; i++) dl[i] <= '0;
      phase_cnt <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        dl[0] <= in_data;
        for (int i = 1; i < P; i++) dl[i] <= dl[i-1];
        phase_cnt <= CNT_W'(1);
      end else if (phase_cnt != '0) begin
        if (phase_cnt == CNT_W'(1)) begin
          out_data  <= fir_out;
          out_valid <= 1'b1;
        end
        if (phase_cnt == CNT_W'(OUT_GAP + 1)) begin
          out_data  <= dl[D];
          out_valid <= 1'b1;
          phase_cnt <= '0;
        end else begin
          phase_cnt <= phase_cnt + CNT_W'(1);
        end
      end
    end
  end

  // A new sample may only arrive once both outputs of the previous one are out.
  a_input_spacing: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> phase_cnt == '0);

  initial begin
    assert (TAPS % 4 == 3) else $error("halfband_interp: TAPS must be 4K+3");
    assert (TAPS == HB1_TAPS || TAPS == HB2_TAPS)
      else $error("halfband_interp: no tap table for TAPS = %0d", TAPS);
    assert (OUT_GAP >= 2) else $error("halfband_interp: OUT_GAP must be at least 2");
  end

endmodule
