// tb_cic_interp: self-checking testbench of the 8x, order-4 comb interpolator.
//
// Random 14-bit samples, including runs of both full-scale extremes, are fed
// every R cycles. The reference zero-stuffs them to the output rate, convolves
// with the box-car kernel (1 + z^-1 + ... + z^-7)^4 (29 taps, built here by
// repeated convolution) and divides by 512 with rounding. Each output sample is
// compared on every cycle, at a fixed latency: a sample taken at edge e must
// first show up on out_data at edge e+ORDER+2 (registered at e+ORDER+1).
module tb_cic_interp;
  import adsl_dac_pkg::*;

  localparam int R     = 8;
  localparam int ORDER = 4;
  localparam int NIN   = 300;
  localparam int KLEN  = ORDER * (R - 1) + 1;
  localparam int LAT   = ORDER + 2;

  logic clk = 1'b0;
  logic rst_n = 1'b1;
  logic in_valid = 1'b0;
  logic signed [DATA_W-1:0] in_data = '0;
  logic out_valid;
  logic signed [DATA_W-1:0] out_data;

  int checks = 0;
  int failures = 0;

  cic_interp #(.R(R), .ORDER(ORDER)) dut (.*);

  always #5 clk = ~clk;

  longint g [KLEN];
  int     xin [NIN];

  function automatic longint ref_sample(input int m);
    longint acc;
    acc = 0;
    for (int j = 0; j < KLEN; j++) begin
      int k;
      k = m - j;
      if (k >= 0 && k % R == 0 && k / R < NIN) acc += g[j] * longint'(xin[k/R]);
    end
    return (acc + 256) >>> 9;
  endfunction

  initial begin
    longint t [KLEN];
    for (int j = 0; j < KLEN; j++) g[j] = (j < R) ? 1 : 0;
    for (int o = 1; o < ORDER; o++) begin
      for (int j = 0; j < KLEN; j++) begin
        t[j] = 0;
        for (int i = 0; i < R; i++) if (j - i >= 0) t[j] += g[j-i];
      end
      g = t;
    end
    for (int n = 0; n < NIN; n++) xin[n] = int'($urandom_range(16383)) - 8192;
    for (int n = 100; n < 130; n++) xin[n] = 8191;
    for (int n = 130; n < 160; n++) xin[n] = -8192;
  end

  int cyc = 0;
  int e0 = -1;
  int n_out_valid = 0;
  always @(posedge clk) begin
    cyc = cyc + 1;
    if (rst_n && in_valid && e0 < 0) e0 = cyc;
    if (rst_n && e0 >= 0 && cyc >= e0 + LAT && cyc < e0 + LAT + R * NIN) begin
      longint want;
      want = ref_sample(cyc - e0 - LAT);
      checks++;
      if (longint'(out_data) !== want) begin
        failures++;
        if (failures < 10) $display("FAIL: output %0d = %0d, expected %0d", cyc - e0 - LAT, out_data, want);
      end
      if (out_valid) n_out_valid++;
    end
  end

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
      repeat (R - 1) @(posedge clk);
    end
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (n_out_valid != R * NIN) begin
      failures++;
      $display("FAIL: out_valid high on %0d of %0d checked cycles", n_out_valid, R * NIN);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (R * NIN + 100) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
