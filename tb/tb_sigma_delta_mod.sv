// tb_sigma_delta_mod: self-checking testbench of the fifth-order, 5-bit modulator.
//
// Three parts:
//  1. Bit-exact check. A reference loop, written here with 64-bit integers,
//     runs the difference equations of the modulator (integrators, resonator
//     feedbacks, feed-forward sum, rounding quantizer) on the same input, a
//     random-walk signal plus a sine, with some idle cycles (in_valid low) mixed
//     in. Every code and its one-cycle latency are compared.
//  2. In-band SNR. A 0.5-of-full-scale sine at bin 11 of an 8192-point record is
//     applied; after 1024 settling samples the 8192 codes are Hann-windowed and
//     the DFT is taken over the signal band (bins 1..128, that is fs/64 for an
//     oversampling ratio of 32). Signal is bins 9..13, noise the rest of the
//     band. The SNR must exceed 85 dB.
//  3. Overload. A constant input of 0.95 of full scale overdrives the loop; the
//     overload flag must rise and the output must then stay at the extreme codes
//     without wrapping around to the other sign.
module tb_sigma_delta_mod;
  import adsl_dac_pkg::*;

  localparam int    NEXACT = 6000;
  localparam int    NFFT   = 8192;
  localparam int    NSETTLE = 1024;
  localparam int    NBAND  = NFFT / 64;
  localparam int    KSIG   = 11;
  localparam real   PI     = 3.14159265358979323846;

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

  // ---- reference loop (states in units of 2^-20) ----
  longint rs [5];
  longint ra [5] = '{61624, 27248, 6841, 963, 30};
  longint rb1 = 197;
  longint rb2 = 527;

  function automatic int ref_step(input int x);
    longint y;
    longint q;
    longint n [5];
    y = 0;
    for (int i = 0; i < 5; i++) y += rs[i] * ra[i];
    q = (y + (64'sd1 <<< 31)) >>> 32;
    if (q > 15) q = 15;
    if (q < -16) q = -16;
    n[0] = rs[0] + (longint'(x) <<< 7) - (q <<< 16);
    n[1] = rs[1] + rs[0] - ((rs[2] * rb1) >>> 16);
    n[2] = rs[2] + rs[1];
    n[3] = rs[3] + rs[2] - ((rs[4] * rb2) >>> 16);
    n[4] = rs[4] + rs[3];
    rs = n;
    return int'(q);
  endfunction

  task automatic do_reset();
    in_valid <= 1'b0;
    rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 5; i++) rs[i] = 0;
  endtask

  int codes [NFFT];
  int n_overload = 0;

  initial begin
    int walk;
    int x;
    int want;
    real ps, pn, re, im, w, snr;
    #1;
    // ---- 1. bit-exact ----
    do_reset();
    walk = 0;
    for (int n = 0; n < NEXACT; n++) begin
      if (n % 37 == 5) begin
        in_valid <= 1'b0;
        @(posedge clk);
        #1;
        checks++;
        if (out_valid) begin
          failures++;
          $display("FAIL: out_valid after an idle cycle");
        end
      end
      walk += int'($urandom_range(200)) - 100;
      if (walk > 2000) walk = 2000;
      if (walk < -2000) walk = -2000;
      x = walk + int'($rtoi(2500.0 * $sin(2.0 * PI * real'(n) / 500.0)));
      in_valid <= 1'b1;
      in_data  <= DATA_W'(x);
      @(posedge clk);
      want = ref_step(x);
      #1;
      checks++;
      if (!out_valid || int'(code) !== want) begin
        failures++;
        if (failures < 10) $display("FAIL: step %0d code %0d valid %0b, expected %0d", n, code, out_valid, want);
      end
    end

    // ---- 2. in-band SNR ----
    do_reset();
    for (int n = 0; n < NSETTLE + NFFT; n++) begin
      x = int'($rtoi(4096.0 * $sin(2.0 * PI * real'(KSIG * n) / real'(NFFT)) + 8192.5)) - 8192;
      in_valid <= 1'b1;
      in_data  <= DATA_W'(x);
      @(posedge clk);
      #1;
      if (n >= NSETTLE) codes[n - NSETTLE] = int'(code);
    end
    in_valid <= 1'b0;
    ps = 0.0;
    pn = 0.0;
    for (int k = 1; k <= NBAND; k++) begin
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
    $display("in-band SNR = %0.2f dB (signal band bins 1..%0d)", snr, NBAND);
    checks++;
    if (snr < 85.0) begin
      failures++;
      $display("FAIL: in-band SNR %0.2f dB below 85 dB", snr);
    end

    // ---- 3. overload ----
    do_reset();
    for (int n = 0; n < 3000; n++) begin
      in_valid <= 1'b1;
      in_data  <= DATA_W'(7782);
      @(posedge clk);
      #1;
      if (overload) n_overload++;
    end
    checks++;
    if (n_overload == 0) begin
      failures++;
      $display("FAIL: overload never flagged");
    end
    // saturated states keep the output pinned near the top instead of wrapping
    checks++;
    begin
      int npos;
      npos = 0;
      for (int n = 0; n < 200; n++) begin
        @(posedge clk);
        #1;
        if (code > 0) npos++;
      end
      if (npos < 150) begin
        failures++;
        $display("FAIL: overloaded output not held positive (%0d of 200)", npos);
      end
    end
    $display("overload flagged on %0d of 3000 cycles", n_overload);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NEXACT + NEXACT / 30 + NSETTLE + NFFT + 4000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
