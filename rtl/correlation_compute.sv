// correlation_compute: the un-normalized correlation datapath of the matcher,
// a 25-bit subtractor feeding an accumulator.
//
// For every pixel of the newer frame's window that arrives (en), the stored
// pixel of the older frame's window is subtracted from it and the magnitude of
// the difference is added to the accumulator; 'clear' starts a new window.
// The result is therefore the sum of absolute differences over the window:
// the lower it is, the better the two windows agree. The datapath size does
// not depend on the window size. Taking the magnitude of the difference is
// this design's reading of "subtractor connected to an accumulator", where a
// lower value means a better match.
// Timing: acc includes a pixel one clock after it is presented.
module correlation_compute
  import femip_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                en,
  input  logic [FPIX_W-1:0]   a,
  input  logic [FPIX_W-1:0]   b,
  output logic [SAD_W-1:0]    acc
);
  logic [FPIX_W:0]   diff;
  logic [FPIX_W-1:0] mag;

  assign diff = {1'b0, b} - {1'b0, a};
  assign mag  = diff[FPIX_W] ? FPIX_W'(-diff) : diff[FPIX_W-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (clear) acc <= '0;
    else if (en)    acc <= acc + SAD_W'(mag);
  end
endmodule
