// tb_halfband1: self-checking testbench of the 71-tap, 2x halfband interpolator.
//
// Random 14-bit samples (mostly within half scale, every 7th one at a full-scale
// extreme so that the output saturation is exercised) are fed every 2*OUT_GAP
// cycles. The reference zero-stuffs the input to the output rate and convolves
// it with the full TAPS-long impulse response (zeros, centre tap 1.0 and the
// mirrored table taps), then rounds and saturates like the hardware. Every
// output value is compared, and so is its timing: the even output must be registered
// at the clock edge after the input strobe and the odd one OUT_GAP cycles later.
module tb_halfband1;
  import adsl_dac_pkg::*;

  localparam int TAPS    = HB1_TAPS;
  localparam int OUT_GAP = 16;
  localparam int NIN     = 400;
  localparam int C       = (TAPS - 1) / 2;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [DATA_W-1:0] out_data;

  int checks = 0;
  int failures = 0;
  int sat_seen = 0;

  halfband_interp #(.TAPS(TAPS), .OUT_GAP(OUT_GAP)) dut (.*);

  always #5 clk = ~clk;

  // full-length impulse response h[0..TAPS-1], scaled by 2^15
  longint h [TAPS];
  int     xin [NIN];
  longint exp_out [2*NIN];

  function automatic longint ref_sample(input int m);
    longint acc;
    acc = 0;
    for (int j = 0; j < TAPS; j++) begin
      int k;
      k = m - j;
      if (k >= 0 && k % 2 == 0 && k / 2 < NIN) acc += h[j] * longint'(xin[k/2]);
    end
    acc = (acc + 16384) >>> 15;
    if (acc > 8191) acc = 8191;
    if (acc < -8192) acc = -8192;
    return acc;
  endfunction

  initial begin
    for (int j = 0; j < TAPS; j++) begin
      int off;
      off = (j > C) ? j - C : C - j;
      if (j == C)            h[j] = 32768;
      else if (off % 2 == 0) h[j] = 0;
      else                   h[j] = longint'(hb_tap(TAPS, j / 2));
    end
    for (int n = 0; n < NIN; n++) begin
      if (n % 7 == 3)  xin[n] = (n % 14 == 3) ? 8191 : -8192;
      else             xin[n] = int'($urandom_range(8192)) - 4096;
    end
    // a run of extremes with alternating sign drives the FIR phase past full scale
    for (int n = 200; n < 240; n++) xin[n] = ((n / 2) % 2 == 0) ? 8191 : -8192;
    for (int m = 0; m < 2*NIN; m++) exp_out[m] = ref_sample(m);
  end

  // stimulus
  int cyc = 0;
  int in_cyc [NIN];
  initial begin
    #1 rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int n = 0; n < NIN; n++) begin
      in_valid <= 1'b1;
      in_data  <= DATA_W'(xin[n]);
      @(posedge clk);
      in_valid <= 1'b0;
      repeat (2*OUT_GAP - 1) @(posedge clk);
    end
    repeat (2*OUT_GAP) @(posedge clk);
    if (nout != 2*NIN) begin
      failures++;
      $display("FAIL: %0d outputs, expected %0d", nout, 2*NIN);
    end
    checks++;
    if (sat_seen == 0) begin
      failures++;
      $display("FAIL: output saturation never exercised");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // checker
  // Edges are counted here; an input taken at edge e must show its outputs
  // (registered at edges e+1 and e+1+OUT_GAP) at edges e+2 and e+2+OUT_GAP.
  int nout = 0;
  int nin = 0;
  always @(posedge clk) begin
    cyc = cyc + 1;
    if (rst_n && in_valid) begin
      in_cyc[nin] = cyc;
      nin = nin + 1;
    end
    if (rst_n && out_valid) begin
      int n;
      int want_cyc;
      n = nout / 2;
      want_cyc = in_cyc[n] + 2 + (nout % 2) * OUT_GAP;
      checks += 2;
      if (longint'(out_data) !== exp_out[nout]) begin
        failures++;
        if (failures < 10) $display("FAIL: out %0d = %0d, expected %0d", nout, out_data, exp_out[nout]);
      end
      if (cyc != want_cyc) begin
        failures++;
        if (failures < 10) $display("FAIL: out %0d at cycle %0d, expected %0d", nout, cyc, want_cyc);
      end
      if (out_data == 14'sh1fff || out_data == -14'sh2000) sat_seen++;
      nout = nout + 1;
    end
  end

  initial begin
    repeat (2*OUT_GAP*NIN + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
