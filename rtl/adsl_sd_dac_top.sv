// adsl_sd_dac_top: ADSL transmit path from 14-bit samples to the analog output.
//
// The chain raises the sample rate 32 times in three steps and then converts to
// analog with a 5-bit oversampling converter:
//   in (fN = 276 kHz) -> 2x halfband, 71 taps -> 2x halfband, 19 taps
//   -> 8x comb, order 4 (8.832 MHz) -> fifth-order 5-bit sigma-delta modulator
//   -> two's complement to thermometer encoder -> 31-cell current-steering DAC
//   -> analog reconstruction filter -> out
// The digital part (adsl_sd_dac_core) runs on one clock at the final rate,
// 8.832 MHz. A modulo-32 counter asks for an input sample every 32 cycles
// (in_take); each stage passes its output on with a valid strobe, so stage 1
// emits every 16 cycles, stage 2 every 8, and the comb filter and the modulator
// on every cycle.
//
// Interface. in_data must hold the next input sample (Q1.13) in every cycle in
// which in_take is high; it is captured at that clock edge. code is the
// modulator output (valid when code_valid is high), therm the thermometer word
// that drives the cells, and overload flags a quantizer clip. dac_iout is the held differential DAC current
// and vout the filtered analog output (both behavioural models, real-valued).
// The digital chain delays the signal by the group delays of its filters: 35
// samples at 552 kHz for the 71-tap stage (560 clocks), 9 samples at 1104 kHz
// for the 19-tap stage (72 clocks) and 14 clocks for the comb, plus a few
// register stages.
//
// The block order, the rates, the factors and the word widths follow the
// specification; the single clock with valid strobes is this design's choice.
module adsl_sd_dac_top
  import adsl_dac_pkg::*;
#(
  parameter real DAC_MISMATCH = 0.0,
  parameter real FILTER_FC_HZ = 276.0e3
) (
  input  logic                       clk,        // 8.832 MHz output-rate clock
  input  logic                       rst_n,
  input  logic signed [DATA_W-1:0]   in_data,
  output logic                       in_take,
  output logic signed [SDM_BITS-1:0] code,
  output logic [(1<<SDM_BITS)-2:0]   therm,
  output logic                       overload,
  output logic                       code_valid,
  output real                        dac_iout,
  output real                        vout
);

  localparam int NCELL = (1 << SDM_BITS) - 1;

  adsl_sd_dac_core u_core (
    .clk, .rst_n,
    .in_data, .in_take, .code, .therm, .overload, .code_valid
  );

  current_steering_dac #(.N(NCELL), .MISMATCH(DAC_MISMATCH)) u_dac (
    .clk,
    .therm(therm),
    .i_p  (),
    .i_n  (),
    .iout (dac_iout)
  );

  // Code c gives a differential current of 2c+1 cells; scaling by 1/(NCELL+1)
  // maps it to c/16 + 1/32, i.e. the modulator level plus half a level offset.
  real filt_in;
  always_comb filt_in = dac_iout / real'(NCELL + 1);

  recon_filter #(.FC_HZ(FILTER_FC_HZ)) u_filt (
    .clk,
    .vin (filt_in),
    .vout(vout)
  );

endmodule
