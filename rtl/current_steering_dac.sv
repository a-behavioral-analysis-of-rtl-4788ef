// current_steering_dac: behavioural model of a thermometer-coded current-steering DAC.
//
// This is a behavioural model of an analog block, not synthesizable logic. The
// converter has N unit current cells, one per thermometer line. On each rising
// clock edge every cell whose line is 1 steers its current to the positive
// output and every other cell to the negative output; the sums are held until
// the next edge, which is the sample-and-hold behaviour of the real converter.
// iout = i_p - i_n is the differential output current.
//
// Each cell carries I_UNIT times (1 + e_k), where e_k is a static mismatch drawn
// once at start-up from a fixed pseudo-random sequence, uniform in
// [-MISMATCH, +MISMATCH]. MISMATCH = 0 (the default) gives an ideal converter;
// a non-zero value shows how cell mismatch turns into in-band distortion.
//
// The unit-cell structure and the summing output follow the specification; the
// differential output, the units and the mismatch model are this model's own.
module current_steering_dac #(
  parameter int  N        = 31,     // number of unit cells (2^m - 1)
  parameter real I_UNIT   = 1.0,    // nominal cell current (arbitrary unit)
  parameter real MISMATCH = 0.0     // peak relative cell error
) (
  input  logic         clk,
  input  logic [N-1:0] therm,
  output real          i_p,
  output real          i_n,
  output real          iout
);

  real cell_i [N];

  initial begin
    int unsigned lcg;
    lcg = 32'd12345;
    for (int k = 0; k < N; k++) begin
      lcg     = lcg * 32'd1664525 + 32'd1013904223;
      cell_i[k] = I_UNIT * (1.0 + MISMATCH * (2.0 * real'(lcg >> 8) / 16777216.0 - 1.0));
    end
    i_p  = 0.0;
    i_n  = 0.0;
    iout = 0.0;
  end

  always @(posedge clk) begin
    real sp;
    real sn;
    sp = 0.0;
    sn = 0.0;
    for (int k = 0; k < N; k++) begin
      if (therm[k]) sp += cell_i[k];
      else          sn += cell_i[k];
    end
    i_p  <= sp;
    i_n  <= sn;
    iout <= sp - sn;
  end

endmodule
