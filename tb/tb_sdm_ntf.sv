// tb_sdm_ntf: shape of the modulator's quantization-noise spectrum against the
// target noise transfer function.
//
// The target NTF is
//   NTF(z) = (z-1)(z^2-1.997z+1)(z^2-1.992z+1)
//          / ((z-0.7477)(z^2-1.556z+0.6233)(z^2-1.756z+0.8336)).
// The modulator is driven with a quarter-scale sine at bin 11 of an 8192-point
// record. Eight Hann-windowed 8192-point records are transformed with a radix-2
// FFT written here, and their power spectra are averaged. Outside the signal
// band the spectrum is quantization noise shaped by |NTF|^2. Its power is
// summed over five octave-wide bands from 138 kHz to 4.4 MHz, and so is
// |NTF(e^jw)|^2 evaluated directly from the expression above. Each band's
// measured power, relative to the top band, must match the predicted ratio
// within 3 dB. (With a linear noise source in place of the quantizer the match
// is within 0.2 dB; the real 32-level quantizer's error is slightly coloured
// and lowers the lower bands by up to 2 dB.)
module tb_sdm_ntf;
  import adsl_dac_pkg::*;

  localparam int  LOGN    = 13;
  localparam int  NFFT    = 1 << LOGN;
  localparam int  NREC    = 8;
  localparam int  NSETTLE = 1024;
  localparam int  KSIG    = 11;
  localparam int  NB      = 5;
  localparam real PI      = 3.14159265358979323846;
  // band edges in FFT bins (bin = 8.832 MHz / 8192 = 1078 Hz)
  localparam int  BLO [NB] = '{128, 256, 512, 1024, 2048};
  localparam int  BHI [NB] = '{255, 511, 1023, 2047, 4095};

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

  real xr [NFFT];
  real xi [NFFT];
  real psd [NFFT/2];
  real ctab [NFFT];
  real stab [NFFT];

  // in-place iterative radix-2 FFT of xr + j*xi
  task automatic fft();
    int j;
    real tr, ti, wr, wi;
    j = 0;
    for (int i = 0; i < NFFT; i++) begin
      if (i < j) begin
        tr = xr[i]; xr[i] = xr[j]; xr[j] = tr;
        ti = xi[i]; xi[i] = xi[j]; xi[j] = ti;
      end
      begin
        int m;
        m = NFFT >> 1;
        while (m >= 1 && (j & m) != 0) begin
          j = j ^ m;
          m = m >> 1;
        end
        j = j | m;
      end
    end
    for (int len = 2; len <= NFFT; len = len << 1) begin
      int step;
      step = NFFT / len;
      for (int i = 0; i < NFFT; i += len) begin
        for (int k = 0; k < len / 2; k++) begin
          wr = ctab[k * step];
          wi = -stab[k * step];
          tr = xr[i+k+len/2] * wr - xi[i+k+len/2] * wi;
          ti = xr[i+k+len/2] * wi + xi[i+k+len/2] * wr;
          xr[i+k+len/2] = xr[i+k] - tr;
          xi[i+k+len/2] = xi[i+k] - ti;
          xr[i+k] = xr[i+k] + tr;
          xi[i+k] = xi[i+k] + ti;
        end
      end
    end
  endtask

  // |NTF(e^jw)|^2 from the factored target
  function automatic real ntf2(input real w);
    real c1, s1, c2, s2;
    real nr, ni, dr, di, ar, ai, br, bi, t;
    c1 = $cos(w);  s1 = $sin(w);
    c2 = $cos(2.0 * w); s2 = $sin(2.0 * w);
    // numerator (z-1)(z^2-1.997z+1)(z^2-1.992z+1)
    nr = c1 - 1.0; ni = s1;
    ar = c2 - 1.997 * c1 + 1.0; ai = s2 - 1.997 * s1;
    t = nr * ar - ni * ai; ni = nr * ai + ni * ar; nr = t;
    ar = c2 - 1.992 * c1 + 1.0; ai = s2 - 1.992 * s1;
    t = nr * ar - ni * ai; ni = nr * ai + ni * ar; nr = t;
    // denominator (z-0.7477)(z^2-1.556z+0.6233)(z^2-1.756z+0.8336)
    dr = c1 - 0.7477; di = s1;
    br = c2 - 1.556 * c1 + 0.6233; bi = s2 - 1.556 * s1;
    t = dr * br - di * bi; di = dr * bi + di * br; dr = t;
    br = c2 - 1.756 * c1 + 0.8336; bi = s2 - 1.756 * s1;
    t = dr * br - di * bi; di = dr * bi + di * br; dr = t;
    return (nr * nr + ni * ni) / (dr * dr + di * di);
  endfunction

  initial begin
    real meas [NB];
    real pred [NB];
    real dmeas, dpred;
    int x;
    for (int n = 0; n < NFFT; n++) begin
      ctab[n] = $cos(2.0 * PI * real'(n) / real'(NFFT));
      stab[n] = $sin(2.0 * PI * real'(n) / real'(NFFT));
    end
    for (int k = 0; k < NFFT / 2; k++) psd[k] = 0.0;
    #1 rst_n = 1'b0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int n = 0; n < NSETTLE + NREC * NFFT; n++) begin
      x = int'($rtoi(2048.0 * stab[(KSIG * n) % NFFT] + 8192.5)) - 8192;
      in_valid <= 1'b1;
      in_data  <= DATA_W'(x);
      @(posedge clk);
      #1;
      if (n >= NSETTLE) begin
        int m;
        m = (n - NSETTLE) % NFFT;
        xr[m] = (0.5 - 0.5 * ctab[m]) * real'(code) / 16.0;
        xi[m] = 0.0;
        if (m == NFFT - 1) begin
          fft();
          for (int k = 0; k < NFFT / 2; k++) psd[k] += xr[k] * xr[k] + xi[k] * xi[k];
        end
      end
    end
    in_valid <= 1'b0;
    for (int b = 0; b < NB; b++) begin
      meas[b] = 0.0;
      pred[b] = 0.0;
      for (int k = BLO[b]; k <= BHI[b]; k++) begin
        meas[b] += psd[k];
        pred[b] += ntf2(2.0 * PI * real'(k) / real'(NFFT));
      end
    end
    for (int b = 0; b < NB; b++) begin
      dmeas = 10.0 * $log10(meas[b] / meas[NB-1]);
      dpred = 10.0 * $log10(pred[b] / pred[NB-1]);
      $display("band %4.0f-%4.0f kHz: measured %7.2f dB, NTF predicts %7.2f dB (relative to top band)",
               real'(BLO[b]) * 8832.0 / real'(NFFT), real'(BHI[b] + 1) * 8832.0 / real'(NFFT), dmeas, dpred);
      checks++;
      if (dmeas < dpred - 3.0 || dmeas > dpred + 3.0) begin
        failures++;
        $display("FAIL: band %0d off the NTF by %0.2f dB", b, dmeas - dpred);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSETTLE + NREC * NFFT + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
