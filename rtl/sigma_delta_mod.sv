// sigma_delta_mod: fifth-order, 5-bit digital sigma-delta modulator (noise shaper).
//
// The modulator turns the 14-bit, 32x oversampled signal into a 5-bit code whose
// quantization error is pushed out of the signal band. The loop filter is a
// chain of five delaying integrators 1/(z-1) in feed-forward form:
//   u  = x - v                       (v: fed-back quantizer level, code/16)
//   s1 <= s1 + u
//   s2 <= s2 + s1 - b1*s3            (resonator 1: stages 2-3)
//   s3 <= s3 + s2
//   s4 <= s4 + s3 - b2*s5            (resonator 2: stages 4-5)
//   s5 <= s5 + s4
//   y  = a1*s1 + a2*s2 + a3*s3 + a4*s4 + a5*s5
//   code = clamp(round(16*y), -16, 15)
// The two resonators place the noise-transfer-function zeros at DC and at two
// frequency pairs near the band edge; a1..a5 set its poles to those of the
// specified NTF. The coefficients and their derivation are in adsl_dac_pkg.
//
// Number format. x is Q1.13. The states are SW-bit words with SF = 20 fraction
// bits (13 integer bits); each state update saturates at the word limits, which
// bounds the states if the loop is overdriven. Products with the Q16
// coefficients are truncated (arithmetic shift). With a sine input the loop is
// stable up to about 0.9 of full scale, with a constant input up to about 0.5.
//
// Interface and timing. One step per cycle with in_valid high. The code is
// computed from the states before the step, so it reflects inputs up to the
// previous valid sample; it is registered and appears on code with out_valid
// one cycle after the in_valid cycle.
//
// The order, the 5-bit quantizer, the integrator chain with the a1..a5 taps and
// the b1, b2 feedbacks, and the NTF follow the specification. The number
// formats, the quantizer levels (code/16, mid-tread, 32 levels), the truncation
// and the state saturation are this design's choices.
module sigma_delta_mod
  import adsl_dac_pkg::*;
#(
  parameter int SW = 34,   // state word
  parameter int SF = 20    // state fraction bits
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       in_valid,
  input  logic signed [DATA_W-1:0]   in_data,
  output logic                       out_valid,
  output logic signed [SDM_BITS-1:0] code,
  output logic                       overload   // quantizer clipped this step
);

  localparam int PW    = SW + SDM_COEF_W;          // product / sum word
  localparam int YW    = PW + 3;                   // sum of five products
  localparam int QSH   = SF + SDM_COEF_FRAC - (SDM_BITS - 1);  // y*16 scaling
  localparam int CMAX  = (1 << (SDM_BITS - 1)) - 1;
  localparam int CMIN  = -(1 << (SDM_BITS - 1));

  typedef logic signed [SW-1:0] state_t;

  state_t s [5];

  // Saturating state update: the argument has two extra bits of headroom.
  localparam logic signed [SW+1:0] SMAX = (SW+2)'((64'sd1 <<< (SW - 1)) - 64'sd1);
  localparam logic signed [SW+1:0] SMIN = -SMAX - (SW+2)'(1);

  function automatic state_t sat(input logic signed [SW+1:0] v);
    if (v > SMAX)      return state_t'(SMAX);
    else if (v < SMIN) return state_t'(SMIN);
    else               return v[SW-1:0];
  endfunction

  // Product of a state with a Q16 coefficient, truncated back to the state format.
  function automatic logic signed [SW+1:0] mulq(input state_t st, input sdm_coef_t c);
    logic signed [PW-1:0] p;
    p = PW'(st) * PW'(c);
    return (SW+2)'(p >>> SDM_COEF_FRAC);
  endfunction

  // feed-forward sum and quantizer
  logic signed [YW-1:0]         y;
  logic signed [YW-1:0]         yq;
  logic signed [SDM_BITS-1:0]   q_code;
  logic                         q_clip;
  always_comb begin
    y = '0;
    for (int i = 0; i < 5; i++) y += YW'(PW'(s[i]) * PW'(SDM_A[i]));
    yq = (y + (YW'(1) <<< (QSH - 1))) >>> QSH;
    q_clip = 1'b0;
    if (yq > YW'(CMAX)) begin
      q_code = SDM_BITS'(CMAX);
      q_clip = 1'b1;
    end else if (yq < YW'(CMIN)) begin
      q_code = SDM_BITS'(CMIN);
      q_clip = 1'b1;
    end else begin
      q_code = yq[SDM_BITS-1:0];
    end
  end

  // loop update
  logic signed [SW+1:0] x_s, v_s;
  always_comb begin
    x_s = (SW+2)'(in_data) <<< (SF - (DATA_W - 1));
    v_s = (SW+2)'(q_code)  <<< (SF - (SDM_BITS - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 5; i++) s[i] <= '0;
      code      <= '0;
      out_valid <= 1'b0;
      overload  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        s[0] <= sat((SW+2)'(s[0]) + x_s - v_s);
        s[1] <= sat((SW+2)'(s[1]) + (SW+2)'(s[0]) - mulq(s[2], SDM_B1));
        s[2] <= sat((SW+2)'(s[2]) + (SW+2)'(s[1]));
        s[3] <= sat((SW+2)'(s[3]) + (SW+2)'(s[2]) - mulq(s[4], SDM_B2));
        s[4] <= sat((SW+2)'(s[4]) + (SW+2)'(s[3]));
        code     <= q_code;
        overload <= q_clip;
      end
    end
  end

endmodule
