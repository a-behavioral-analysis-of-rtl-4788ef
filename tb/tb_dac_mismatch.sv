// tb_dac_mismatch: effect of unit-cell mismatch on the converter output.
//
// Two copies of the whole transmit path get the same half-scale 11.86 kHz sine:
// one with ideal current cells, one with a static cell error of up to +-0.5 %
// (DAC_MISMATCH = 0.005). The DAC output current of each is recorded for 8192
// cycles and its in-band signal-to-noise-and-distortion ratio (bins 1..128 of a
// Hann-windowed DFT, 0-138 kHz) is computed. Without mismatch the DAC output is
// an exact affine function of the code, so its SNDR must equal that of the codes
// (above 75 dB). With mismatch, and no dynamic element matching, the cell errors
// fold into the band and the SNDR must drop by more than 6 dB.
module tb_dac_mismatch;
  import adsl_dac_pkg::*;

  localparam int  NFFT    = 8192;
  localparam int  NSETTLE = 2048;
  localparam int  KSIG    = 11;
  localparam real AMP     = 0.5;
  localparam real PI      = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic signed [DATA_W-1:0] in_data = '0;
  logic in_take_a, in_take_b;
  logic signed [SDM_BITS-1:0] code_a, code_b;
  logic [(1<<SDM_BITS)-2:0] therm_a, therm_b;
  logic ovl_a, ovl_b, cv_a, cv_b;
  real  iout_a, iout_b, vout_a, vout_b;

  adsl_sd_dac_top #(.DAC_MISMATCH(0.0)) ideal (
    .clk, .rst_n, .in_data, .in_take(in_take_a), .code(code_a), .therm(therm_a),
    .overload(ovl_a), .code_valid(cv_a), .dac_iout(iout_a), .vout(vout_a));
  adsl_sd_dac_top #(.DAC_MISMATCH(0.005)) mism (
    .clk, .rst_n, .in_data, .in_take(in_take_b), .code(code_b), .therm(therm_b),
    .overload(ovl_b), .code_valid(cv_b), .dac_iout(iout_b), .vout(vout_b));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  int nin = 0;
  always @(posedge clk) begin
    if (rst_n && in_take_a) begin
      nin = nin + 1;
      in_data <= DATA_W'(int'($rtoi(AMP * 8192.0 * $sin(2.0 * PI * real'(KSIG * nin * OSR) / real'(NFFT)) + 8192.5)) - 8192);
    end
  end

  real ra [NFFT];
  real rb [NFFT];
  real ctab [NFFT];
  real stab [NFFT];

  function automatic real sndr(input real r [NFFT]);
    real ps, pn, re, im, w, mean;
    int idx;
    mean = 0.0;
    for (int n = 0; n < NFFT; n++) mean += r[n];
    mean /= real'(NFFT);
    ps = 0.0;
    pn = 0.0;
    for (int k = 1; k <= NFFT / 64; k++) begin
      re = 0.0;
      im = 0.0;
      for (int n = 0; n < NFFT; n++) begin
        idx = (k * n) % NFFT;
        w = 0.5 - 0.5 * ctab[n];
        re += w * (r[n] - mean) * ctab[idx];
        im -= w * (r[n] - mean) * stab[idx];
      end
      if (k >= KSIG - 2 && k <= KSIG + 2) ps += re * re + im * im;
      else                                pn += re * re + im * im;
    end
    return 10.0 * $log10(ps / pn);
  endfunction

  initial begin
    real sa, sb;
    for (int n = 0; n < NFFT; n++) begin
      ctab[n] = $cos(2.0 * PI * real'(n) / real'(NFFT));
      stab[n] = $sin(2.0 * PI * real'(n) / real'(NFFT));
    end
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (NSETTLE) @(posedge clk);
    for (int n = 0; n < NFFT; n++) begin
      @(posedge clk);
      #1;
      ra[n] = iout_a;
      rb[n] = iout_b;
      checks++;
      if (code_a !== code_b) begin
        failures++;
        if (failures < 5) $display("FAIL: the two digital paths differ");
      end
    end
    sa = sndr(ra);
    sb = sndr(rb);
    $display("in-band SNDR of the DAC output: ideal cells %0.2f dB, 0.5 %% mismatch %0.2f dB", sa, sb);
    checks += 2;
    if (sa < 75.0) begin
      failures++;
      $display("FAIL: ideal DAC SNDR %0.2f dB below 75 dB", sa);
    end
    if (sb > sa - 6.0) begin
      failures++;
      $display("FAIL: mismatch did not degrade the SNDR (%0.2f vs %0.2f dB)", sb, sa);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSETTLE + NFFT + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
