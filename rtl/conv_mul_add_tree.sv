// conv_mul_add_tree: the computation stage of the Gaussian filter.
//
// Multiplies the 49 window pixels by the 49 kernel coefficients in parallel
// (49 multipliers, 10-bit integer pixel times 0.15 coefficient) and adds the
// 49 products in a binary tree of 6 adder levels (25, 13, 7, 4, 2 and 1
// additions: 48 adders; an odd operand passes a level unchanged). The result
// is a 10.15 fixed-point filtered pixel. Each multiplier and adder level is
// registered, so one pixel is produced per clock with a latency of LAT = 7
// clocks; position and frame parity are delayed to match. The sum saturates
// at 25 bits, which a kernel summing to at most 1.0 never reaches. The
// registering of every level is this design's choice.
module conv_mul_add_tree
  import femip_pkg::*;
#(
  parameter int N = KSIZE
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           in_valid,
  input  logic [N-1:0][N-1:0][PIX_W-1:0] win,
  input  logic [N*N-1:0][KER_W-1:0]      kernel,
  input  logic [COORD_W-1:0]             in_x,
  input  logic [COORD_W-1:0]             in_y,
  input  logic                           in_frame,
  output logic                           out_valid,
  output logic [FPIX_W-1:0]              out_pix,
  output logic [COORD_W-1:0]             out_x,
  output logic [COORD_W-1:0]             out_y,
  output logic                           out_frame
);
  localparam int NN     = N * N;
  localparam int LEVELS = $clog2(NN);
  localparam int ACC_W  = PIX_W + KER_W + LEVELS;
  localparam int LAT    = LEVELS + 1;
  localparam int SB_W   = 1 + 2 * COORD_W + 1;

  // level 0 holds the products, level l holds ceil(n/2) partial sums
  logic [ACC_W-1:0] lvl [LEVELS+1][NN];

  function automatic int count_at(input int l);
    int n;
    n = NN;
    for (int i = 0; i < l; i++) n = (n + 1) / 2;
    return n;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l <= LEVELS; l++)
        for (int k = 0; k < NN; k++) lvl[l][k] <= '0;
    end else begin
      for (int k = 0; k < NN; k++)
        lvl[0][k] <= ACC_W'(win[k / N][k % N]) * ACC_W'(kernel[k]);
      for (int l = 1; l <= LEVELS; l++) begin
        for (int k = 0; k < NN; k++) begin
          if (k < count_at(l)) begin
            if (2 * k + 1 < count_at(l - 1))
              lvl[l][k] <= lvl[l-1][2*k] + lvl[l-1][2*k+1];
            else
              lvl[l][k] <= lvl[l-1][2*k];
          end else begin
            lvl[l][k] <= '0;
          end
        end
      end
    end
  end

  // sideband delay line matching the tree latency
  logic [SB_W-1:0] sb [LAT];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) sb[i] <= '0;
    end else begin
      sb[0] <= {in_valid, in_x, in_y, in_frame};
      for (int i = 1; i < LAT; i++) sb[i] <= sb[i-1];
    end
  end

  logic [ACC_W-1:0] sum;
  assign sum = lvl[LEVELS][0];
  assign out_pix = (sum > ACC_W'({FPIX_W{1'b1}})) ? {FPIX_W{1'b1}} : sum[FPIX_W-1:0];
  assign {out_valid, out_x, out_y, out_frame} = sb[LAT-1];
endmodule
