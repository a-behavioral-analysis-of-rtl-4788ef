// tb_adsl_sd_dac_top: end-to-end testbench of the whole ADSL transmit path.
//
// The top runs with all parameters at their defaults. A 14-bit sine of half
// full scale is fed at the input rate (one sample per in_take strobe, i.e.
// every 32 clocks); its frequency, 11/8192 of the clock (11.86 kHz at
// 8.832 MHz), is chosen so that an 8192-sample record of the modulator output
// holds a whole number of periods. After a settling time covering the filter
// delays the testbench
//  - checks the rates of the interpolation chain: in_take every 32 cycles, the
//    first halfband stage output every 16, the second every 8, the comb output
//    and the modulator code on every cycle;
//  - checks that therm always has exactly code + 16 ones, filled from bit 0;
//  - takes the Hann-windowed DFT of the 8192 codes over the signal band
//    (bins 1..128, fs/64 = 138 kHz) and requires an in-band SNR above 75 dB
//    and a recovered amplitude within 1 % of the input's (flat passband). The
//    14-bit input word alone limits a half-scale sine to about 80 dB, since all
//    of its quantization noise lies in the band; the modulator by itself does
//    better (see tb_sigma_delta_mod);
//  - correlates the analog output with the input frequency and requires the
//    amplitude expected from the reconstruction filter's response, within 2 %;
//  - counts how often each mechanism happened (samples taken, outputs of each
//    stage, distinct modulator levels, DAC output changes) and fails any count
//    that stays at zero or below its minimum.
module tb_adsl_sd_dac_top;
  import adsl_dac_pkg::*;

  localparam int  NFFT    = 8192;
  localparam int  NSETTLE = 2048;
  localparam int  KSIG    = 11;
  localparam real AMP     = 0.5;
  localparam real PI      = 3.14159265358979323846;
  localparam real FC      = 276.0e3;
  localparam real FS      = 8.832e6;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic signed [DATA_W-1:0] in_data = '0;
  logic in_take;
  logic signed [SDM_BITS-1:0] code;
  logic [(1<<SDM_BITS)-2:0] therm;
  logic overload;
  logic code_valid;
  real  dac_iout;
  real  vout;

  adsl_sd_dac_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  // ---- input source: next sample ready whenever in_take is high ----
  int nin = 0;
  always @(posedge clk) begin
    if (rst_n && in_take) begin
      nin = nin + 1;
      in_data <= DATA_W'(int'($rtoi(AMP * 8192.0 * $sin(2.0 * PI * real'(KSIG * nin * OSR) / real'(NFFT)) + 8192.5)) - 8192);
    end
  end
  initial in_data = '0;

  // ---- rate and mechanism monitors ----
  int cyc = 0;
  int last_take = -1, last_hb1 = -1, last_hb2 = -1;
  int n_take = 0, n_hb1 = 0, n_hb2 = 0, n_cic = 0, n_code = 0, n_dac_change = 0, n_overload = 0;
  int rate_err = 0;
  bit level_seen [32];
  real last_iout = 0.0;
  bit  running = 1'b0;
  always @(posedge clk) begin
    cyc = cyc + 1;
    if (rst_n) begin
      if (in_take) begin
        if (last_take >= 0 && cyc - last_take != OSR) rate_err++;
        last_take = cyc;
        n_take++;
      end
      if (dut.u_core.hb1_valid) begin
        if (last_hb1 >= 0 && cyc - last_hb1 != OSR / M1) rate_err++;
        last_hb1 = cyc;
        n_hb1++;
      end
      if (dut.u_core.hb2_valid) begin
        if (last_hb2 >= 0 && cyc - last_hb2 != OSR / (M1 * M2)) rate_err++;
        last_hb2 = cyc;
        n_hb2++;
      end
      if (dut.u_core.cic_valid) n_cic++;
      else if (running) rate_err++;
      if (code_valid) begin
        n_code++;
        running = 1'b1;
        level_seen[int'(code) + 16] = 1'b1;
      end
      if (overload) n_overload++;
      if (dac_iout != last_iout) n_dac_change++;
      last_iout = dac_iout;
      // thermometer word consistent with the code
      begin
        logic [(1<<SDM_BITS)-2:0] want;
        want = '0;
        for (int k = 0; k < int'(code) + 16; k++) want[k] = 1'b1;
        checks++;
        if (therm !== want) begin
          failures++;
          if (failures < 10) $display("FAIL: therm %b for code %0d", therm, code);
        end
      end
    end
  end

  int  codes [NFFT];
  real vsamp [NFFT];

  initial begin
    real ps, pn, re, im, w, snr, amp_est, vc, vs, vamp, h2;
    int nlev;
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (NSETTLE) @(posedge clk);
    for (int n = 0; n < NFFT; n++) begin
      @(posedge clk);
      #1;
      codes[n] = int'(code);
      vsamp[n] = vout;
    end
    // in-band spectrum of the codes
    ps = 0.0;
    pn = 0.0;
    for (int k = 1; k <= NFFT / (2 * OSR); k++) begin
      re = 0.0;
      im = 0.0;
      for (int n = 0; n < NFFT; n++) begin
        w = 0.5 - 0.5 * $cos(2.0 * PI * real'(n) / real'(NFFT));
        re += w * real'(codes[n]) * $cos(2.0 * PI * real'(k * n) / real'(NFFT));
        im -= w * real'(codes[n]) * $sin(2.0 * PI * real'(k * n) / real'(NFFT));
      end
      if (k >= KSIG - 2 && k <= KSIG + 2) ps += re * re + im * im;
      else                                pn += re * re + im * im;
    end
    snr = 10.0 * $log10(ps / pn);
    amp_est = $sqrt(ps * 32.0 / (3.0 * real'(NFFT) * real'(NFFT))) / 16.0;
    $display("in-band SNR = %0.2f dB, recovered amplitude %0.5f (input %0.5f)", snr, amp_est, AMP);
    checks += 2;
    if (snr < 75.0) begin
      failures++;
      $display("FAIL: in-band SNR %0.2f dB below 75 dB", snr);
    end
    if (amp_est < 0.99 * AMP || amp_est > 1.01 * AMP) begin
      failures++;
      $display("FAIL: amplitude %0.5f, expected %0.5f", amp_est, AMP);
    end
    // analog output: single-bin correlation at the signal frequency
    vc = 0.0;
    vs = 0.0;
    for (int n = 0; n < NFFT; n++) begin
      vc += vsamp[n] * $cos(2.0 * PI * real'(KSIG * n) / real'(NFFT));
      vs += vsamp[n] * $sin(2.0 * PI * real'(KSIG * n) / real'(NFFT));
    end
    vamp = 2.0 / real'(NFFT) * $sqrt(vc * vc + vs * vs);
    h2 = 1.0 / (1.0 + (real'(KSIG) / real'(NFFT) * FS / FC) ** 2);
    $display("analog output amplitude %0.5f, expected %0.5f", vamp, AMP * h2);
    checks++;
    if (vamp < 0.98 * AMP * h2 || vamp > 1.02 * AMP * h2) begin
      failures++;
      $display("FAIL: analog amplitude %0.5f, expected %0.5f", vamp, AMP * h2);
    end
    // rates and mechanisms
    nlev = 0;
    foreach (level_seen[l]) if (level_seen[l]) nlev++;
    $display("samples taken %0d, halfband-1 outputs %0d, halfband-2 outputs %0d, comb outputs %0d, codes %0d",
             n_take, n_hb1, n_hb2, n_cic, n_code);
    $display("distinct modulator levels %0d, DAC output changes %0d, quantizer clips %0d, rate errors %0d",
             nlev, n_dac_change, n_overload, rate_err);
    checks += 7;
    if (rate_err != 0)                      begin failures++; $display("FAIL: %0d rate errors", rate_err); end
    if (n_take == 0)                        begin failures++; $display("FAIL: no input taken"); end
    if (n_hb1 < 2 * n_take - 2)             begin failures++; $display("FAIL: halfband-1 is not doubling the rate"); end
    if (n_hb2 < 2 * n_hb1 - 2)              begin failures++; $display("FAIL: halfband-2 is not doubling the rate"); end
    if (n_cic < 8 * n_hb2 - 16)             begin failures++; $display("FAIL: comb filter is not interpolating by 8"); end
    if (nlev < 16)                          begin failures++; $display("FAIL: only %0d modulator levels used", nlev); end
    if (n_dac_change < NFFT / 2)            begin failures++; $display("FAIL: DAC output rarely changes"); end
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
