// tb_recon_filter: self-checking testbench of the reconstruction filter model.
//
// Three measurements against the closed-form response of two cascaded
// first-order sections with poles at FC:
//  - the first 60 samples of the step response must match the closed form
//    1 - p^n - n*a*p^(n-1) (a = 1 - exp(-2*pi*FC/FS), p = 1 - a, n edges after
//    the step), and the settled DC gain must be 1;
//  - a 50 kHz sine (in band) must pass with the gain |H| = 1/(1 + (f/FC)^2)
//    within 2 %;
//  - a signal toggling at fs/2 (the highest image) must be attenuated by more
//    than 40 dB.
module tb_recon_filter;

  localparam real FS = 8.832e6;
  localparam real FC = 276.0e3;
  localparam real PI = 3.14159265358979323846;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  real vin = 0.0;
  real vout;

  recon_filter #(.FS_HZ(FS), .FC_HZ(FC)) dut (.clk, .vin, .vout);

  always #5 clk = ~clk;

  initial begin
    real a, p, want, peak, g;
    int n;
    a = 1.0 - $exp(-2.0 * PI * FC / FS);
    p = 1.0 - a;
    @(negedge clk);
    vin = 1.0;
    n = 0;
    repeat (60) begin
      @(posedge clk);
      n++;
      #1;
      want = 1.0 - $pow(p, real'(n)) - real'(n) * a * $pow(p, real'(n - 1));
      checks++;
      if ((vout - want) > 1e-9 || (want - vout) > 1e-9) begin
        failures++;
        if (failures < 5) $display("FAIL: step sample %0d = %f, expected %f", n, vout, want);
      end
    end
    repeat (400) @(posedge clk);
    #1;
    checks++;
    if (vout < 0.999999 || vout > 1.000001) begin
      failures++;
      $display("FAIL: DC gain %f", vout);
    end
    // in-band sine
    peak = 0.0;
    for (int k = 0; k < 4000; k++) begin
      @(negedge clk);
      vin = $sin(2.0 * PI * 50.0e3 * real'(k) / FS);
      if (k > 2000 && vout > peak) peak = vout;
    end
    g = 1.0 / (1.0 + (50.0e3 / FC) * (50.0e3 / FC));
    checks++;
    if (peak < 0.98 * g || peak > 1.02 * g) begin
      failures++;
      $display("FAIL: 50 kHz gain %f, expected %f", peak, g);
    end
    // fs/2 toggling
    peak = 0.0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      vin = (k % 2 == 0) ? 1.0 : -1.0;
      if (k > 1000 && (vout > peak || -vout > peak)) peak = (vout > 0.0) ? vout : -vout;
    end
    checks++;
    if (peak > 0.01) begin
      failures++;
      $display("FAIL: fs/2 leaks through with %f", peak);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
