// adsl_sd_dac_core: synthesizable digital part of the ADSL transmit path.
//
// Input samples (Q1.13, fN = fclk/32) are interpolated 32 times by a 71-tap
// halfband stage (x2), a 19-tap halfband stage (x2) and an order-4 comb stage
// (x8), then noise-shaped to a 5-bit code by a fifth-order sigma-delta
// modulator, and decoded into the thermometer word that drives 31 unit current
// cells. Everything runs on one clock at the final rate. A modulo-32 counter
// asks for an input sample every 32 cycles (in_take); each stage passes its
// output on with a valid strobe, so stage 1 emits every 16 cycles, stage 2 every
// 8, and the comb filter and the modulator on every cycle.
//
// Interface and timing. in_data must hold the next input sample in every cycle
// in which in_take is high; it is captured at that clock edge. code and
// overload are registered modulator outputs, valid when code_valid is high
// (on every cycle once the chain is running); therm decodes code combinationally.
//
// The block order, the rates, the factors and the word widths follow the
// specification; the single clock with valid strobes is this design's choice.
module adsl_sd_dac_core
  import adsl_dac_pkg::*;
(
  input  logic                       clk,        // 8.832 MHz output-rate clock
  input  logic                       rst_n,
  input  logic signed [DATA_W-1:0]   in_data,
  output logic                       in_take,
  output logic signed [SDM_BITS-1:0] code,
  output logic [(1<<SDM_BITS)-2:0]   therm,
  output logic                       overload,
  output logic                       code_valid
);

  // input-rate strobe: one cycle in OSR
  logic [$clog2(OSR)-1:0] phase;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + 1'b1;
  end
  assign in_take = rst_n && (phase == '0);

  logic                     hb1_valid, hb2_valid, cic_valid;
  logic signed [DATA_W-1:0] hb1_data, hb2_data, cic_data;

  halfband_interp #(.TAPS(HB1_TAPS), .OUT_GAP(OSR / M1)) u_hb1 (
    .clk, .rst_n,
    .in_valid (in_take),   .in_data  (in_data),
    .out_valid(hb1_valid), .out_data (hb1_data)
  );

  halfband_interp #(.TAPS(HB2_TAPS), .OUT_GAP(OSR / (M1 * M2))) u_hb2 (
    .clk, .rst_n,
    .in_valid (hb1_valid), .in_data  (hb1_data),
    .out_valid(hb2_valid), .out_data (hb2_data)
  );

  cic_interp #(.R(M3), .ORDER(CIC_ORDER)) u_cic (
    .clk, .rst_n,
    .in_valid (hb2_valid), .in_data  (hb2_data),
    .out_valid(cic_valid), .out_data (cic_data)
  );

  sigma_delta_mod u_sdm (
    .clk, .rst_n,
    .in_valid (cic_valid), .in_data (cic_data),
    .out_valid(code_valid), .code    (code),
    .overload (overload)
  );

  therm_encoder #(.M(SDM_BITS), .TWOS_COMP(1'b1)) u_enc (
    .code (code),
    .therm(therm)
  );

endmodule
