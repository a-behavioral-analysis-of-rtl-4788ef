// tb_current_steering_dac: self-checking testbench of the current-steering DAC model.
//
// An ideal 31-cell instance and one with 1 % peak cell mismatch are driven with
// every thermometer level 0..31 and with random non-thermometer words. After
// each clock edge the ideal model must give i_p = ones, i_n = 31 - ones and
// iout = i_p - i_n exactly (in units of the unit current), and the outputs must
// hold between edges. For the mismatched instance the sum of i_p and i_n must
// stay the total of all cells, and every level must stay within 1 % of ideal.
module tb_current_steering_dac;

  localparam int N = 31;

  int checks = 0;
  int failures = 0;

  logic clk = 1'b0;
  logic [N-1:0] therm = '0;
  real ip, in_, io, mp, mn, mo;

  current_steering_dac #(.N(N)) dut (.clk, .therm, .i_p(ip), .i_n(in_), .iout(io));
  current_steering_dac #(.N(N), .MISMATCH(0.01)) dutm (.clk, .therm, .i_p(mp), .i_n(mn), .iout(mo));

  always #5 clk = ~clk;

  task automatic check_word(input logic [N-1:0] w);
    int ones;
    real tot;
    ones = $countones(w);
    therm <= w;
    @(posedge clk);
    #1;
    therm <= ~w;   // a change between edges must not reach the output
    #2;
    checks += 4;
    if (ip != real'(ones))       begin failures++; $display("FAIL: i_p %f for %0d ones", ip, ones); end
    if (in_ != real'(N - ones))  begin failures++; $display("FAIL: i_n %f for %0d ones", in_, ones); end
    if (io != real'(2*ones - N)) begin failures++; $display("FAIL: iout %f for %0d ones", io, ones); end
    tot = mp + mn;
    if (tot < 0.99 * N || tot > 1.01 * N || mo < real'(2*ones - N) - 0.01 * N ||
        mo > real'(2*ones - N) + 0.01 * N) begin
      failures++;
      $display("FAIL: mismatched DAC out of range: %f (total %f)", mo, tot);
    end
  endtask

  initial begin
    @(posedge clk);
    for (int l = 0; l <= N; l++) check_word(N'((64'd1 << l) - 1));
    for (int r = 0; r < 50; r++) check_word(N'({$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
