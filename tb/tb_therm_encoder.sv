// tb_therm_encoder: exhaustive self-checking testbench of the thermometer encoder.
//
// Part 1 applies all eight 3-bit unsigned codes and compares with the 3-bit
// binary-to-thermometer decoding table (element k on for level >= k). Part 2
// applies all 32 codes of the 5-bit two's complement encoder used in the
// converter and checks that the word is a contiguous run of ones from bit 0
// whose length is code + 16.
module tb_therm_encoder;

  int checks = 0;
  int failures = 0;

  logic [2:0] code3;
  logic [6:0] therm3;
  logic [4:0] code5;
  logic [30:0] therm5;

  therm_encoder #(.M(3), .TWOS_COMP(1'b0)) dut3 (.code(code3), .therm(therm3));
  therm_encoder #(.M(5), .TWOS_COMP(1'b1)) dut5 (.code(code5), .therm(therm5));

  // decoding table, rows for M2 M1 M0 = 000 .. 111, columns T7 .. T1
  logic [6:0] table3 [8] = '{7'b0000000, 7'b0000001, 7'b0000011, 7'b0000111,
                             7'b0001111, 7'b0011111, 7'b0111111, 7'b1111111};

  initial begin
    for (int c = 0; c < 8; c++) begin
      code3 = 3'(c);
      #1;
      checks++;
      if (therm3 !== table3[c]) begin
        failures++;
        $display("FAIL: 3-bit code %0d -> %b, expected %b", c, therm3, table3[c]);
      end
    end
    for (int c = -16; c < 16; c++) begin
      logic [30:0] want;
      code5 = 5'(c);
      #1;
      want = '0;
      for (int k = 0; k < c + 16; k++) want[k] = 1'b1;
      checks++;
      if (therm5 !== want) begin
        failures++;
        $display("FAIL: 5-bit code %0d -> %b, expected %b", c, therm5, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
