// features_buffer (FB): block-RAM store for the features of one frame, in the
// order the Harris extractor finds them (row by row).
//
// Writes append at an internal counter that 'clear' resets; 'count' is the
// number of stored features. Features beyond DEPTH are dropped and raise
// 'overflow' until the next clear. One synchronous read port serves the
// non-maximum suppressor: rd_data is valid one clock after rd_addr.
// DEPTH is this design's choice; the adaptive threshold aims to keep the
// per-frame feature count below it.
module features_buffer
  import femip_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       wr_valid,
  input  feature_t                   wr_data,
  output logic [$clog2(DEPTH):0]     count,
  output logic                       overflow,
  input  logic [$clog2(DEPTH)-1:0]   rd_addr,
  output feature_t                   rd_data
);
  localparam int A_W = $clog2(DEPTH);

  feature_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_valid && !clear && count < (A_W+1)'(DEPTH)) mem[count[A_W-1:0]] <= wr_data;
    rd_data <= mem[rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      count <= '0;
      overflow <= 1'b0;
    end else if (wr_valid) begin
      if (count < (A_W+1)'(DEPTH)) count <= count + 1'b1;
      else overflow <= 1'b1;
    end
  end
endmodule
