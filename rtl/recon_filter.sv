// recon_filter: behavioural model of the analog reconstruction lowpass filter.
//
// This is a behavioural model of a continuous-time analog filter, not
// synthesizable logic. It is two identical first-order RC sections in cascade
// (both poles at FC_HZ). Its input is the sample-and-held DAC current, which is
// constant between clock edges, so the response can be computed exactly once
// per sample period T = 1/FS_HZ: each section steps as
//   y <= y + alpha * (x - y),   alpha = 1 - exp(-2*pi*FC_HZ*T).
// vout is the filter output sampled at the clock edges, with DC gain GAIN.
//
// The block's purpose (remove the DAC images and the shaped quantization noise
// above the signal band) follows the specification; the order, the pole
// frequency and the gain are this model's own choices.
module recon_filter #(
  parameter real FS_HZ = 8.832e6,   // sample rate of the held input
  parameter real FC_HZ = 276.0e3,   // pole frequency of each section
  parameter real GAIN  = 1.0
) (
  input  logic clk,
  input  real  vin,
  output real  vout
);

  localparam real PI = 3.14159265358979323846;

  real alpha;
  real y1;

  initial begin
    alpha = 1.0 - $exp(-2.0 * PI * FC_HZ / FS_HZ);
    y1    = 0.0;
    vout  = 0.0;
  end

  always @(posedge clk) begin
    y1   <= y1 + alpha * (GAIN * vin - y1);
    vout <= vout + alpha * (y1 - vout);
  end

endmodule
