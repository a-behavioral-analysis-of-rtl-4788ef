// tb_sdm_snr_sweep: in-band SNR of the modulator versus input level.
//
// The modulator is driven with a coherent sine (bin 11 of an 8192-point record
// at the 8.832 MHz output rate) at five amplitudes from 0.9 of full scale down
// to 0.001 (-60 dBFS; below that the 14-bit input word itself dominates). For each level, the 8192 codes after a 1024-sample settling time
// are Hann-windowed and the DFT over the signal band (bins 1..128, i.e.
// 0-138 kHz at an oversampling ratio of 32) splits signal (bins 9..13) from
// noise. Checks: the SNR exceeds 85 dB at half scale; below that it falls by
// 20 dB per decade of amplitude (within 4 dB), which shows a level-independent
// noise floor; no level overloads the quantizer except possibly the top one.
// The dynamic range is reported as the level span from SNR = 0 dB (extrapolated
// from the 0.001 point) up to the largest level that stays stable.
module tb_sdm_snr_sweep;
  import adsl_dac_pkg::*;

  localparam int  NFFT    = 8192;
  localparam int  NSETTLE = 1024;
  localparam int  NBAND   = NFFT / 64;
  localparam int  KSIG    = 11;
  localparam int  NLEV    = 5;
  localparam real PI      = 3.14159265358979323846;
  localparam real LEVELS [NLEV] = '{0.9, 0.5, 0.1, 0.01, 0.001};

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [SDM_BITS-1:0] code;
  logic overload;

  int checks = 0;
  int failures = 0;

  sigma_delta_mod dut (.*);

  always #5 clk = ~clk;

  int  codes [NFFT];
  real snr [NLEV];
  int  nclip [NLEV];
  real ctab [NFFT];
  real stab [NFFT];
  real win [NFFT];

  initial begin
    real ps, pn, re, im, dr;
    int x, idx;
    for (int n = 0; n < NFFT; n++) begin
      ctab[n] = $cos(2.0 * PI * real'(n) / real'(NFFT));
      stab[n] = $sin(2.0 * PI * real'(n) / real'(NFFT));
      win[n]  = 0.5 - 0.5 * ctab[n];
    end
    #1;
    for (int l = 0; l < NLEV; l++) begin
      rst_n = 1'b0;
      in_valid <= 1'b0;
      repeat (2) @(posedge clk);
      rst_n <= 1'b1;
      @(posedge clk);
      nclip[l] = 0;
      for (int n = 0; n < NSETTLE + NFFT; n++) begin
        x = int'($rtoi(LEVELS[l] * 8192.0 * stab[(KSIG * n) % NFFT] + 8192.5)) - 8192;
        if (x > 8191) x = 8191;
        in_valid <= 1'b1;
        in_data  <= DATA_W'(x);
        @(posedge clk);
        #1;
        if (overload) nclip[l]++;
        if (n >= NSETTLE) codes[n - NSETTLE] = int'(code);
      end
      ps = 0.0;
      pn = 0.0;
      for (int k = 1; k <= NBAND; k++) begin
        re = 0.0;
        im = 0.0;
        for (int n = 0; n < NFFT; n++) begin
          idx = (k * n) % NFFT;
          re += win[n] * real'(codes[n]) * ctab[idx];
          im -= win[n] * real'(codes[n]) * stab[idx];
        end
        if (k >= KSIG - 2 && k <= KSIG + 2) ps += re * re + im * im;
        else                                pn += re * re + im * im;
      end
      snr[l] = 10.0 * $log10(ps / pn);
      $display("level %8.5f (%7.2f dBFS): in-band SNR %6.2f dB, quantizer clips %0d",
               LEVELS[l], 20.0 * $log10(LEVELS[l]), snr[l], nclip[l]);
    end
    in_valid <= 1'b0;
    checks++;
    if (snr[1] < 85.0) begin
      failures++;
      $display("FAIL: half-scale SNR %0.2f dB below 85 dB", snr[1]);
    end
    for (int l = 2; l < NLEV; l++) begin
      real want;
      want = snr[l-1] + 20.0 * $log10(LEVELS[l] / LEVELS[l-1]);
      checks++;
      if (snr[l] < want - 4.0 || snr[l] > want + 4.0) begin
        failures++;
        $display("FAIL: SNR at %f is %0.2f dB, expected %0.2f +- 4 dB", LEVELS[l], snr[l], want);
      end
    end
    for (int l = 1; l < NLEV; l++) begin
      checks++;
      if (nclip[l] != 0) begin
        failures++;
        $display("FAIL: level %f clipped the quantizer %0d times", LEVELS[l], nclip[l]);
      end
    end
    dr = snr[4] - 20.0 * $log10(LEVELS[4]) + 20.0 * $log10(LEVELS[0]);
    $display("dynamic range (SNR = 0 dB to %0.2f of full scale): %0.2f dB", LEVELS[0], dr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NLEV * (NSETTLE + NFFT + 10)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
