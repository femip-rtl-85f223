// nms_buffer: the two feature sub-buffers ("frame 1" and "frame 2") that hold
// the suppressed feature lists of two consecutive frames.
//
// Bank b is written through the single write port when wr_bank == b. The
// frame parity selects the bank, so consecutive frames alternate between the
// two banks and the older list survives while the newer one is written. Two
// independent synchronous read ports (rd_data_a/b valid one clock after the
// address) let the correlation controller read one feature of each frame in
// the same clock.
module nms_buffer
  import femip_pkg::*;
#(
  parameter int DEPTH = 1024
) (
  input  logic                      clk,
  input  logic                      wr_en,
  input  logic                      wr_bank,
  input  logic [$clog2(DEPTH)-1:0]  wr_addr,
  input  point_t                    wr_data,
  input  logic                      rd_bank_a,
  input  logic [$clog2(DEPTH)-1:0]  rd_addr_a,
  output point_t                    rd_data_a,
  input  logic                      rd_bank_b,
  input  logic [$clog2(DEPTH)-1:0]  rd_addr_b,
  output point_t                    rd_data_b
);
  point_t bank0 [DEPTH];
  point_t bank1 [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en && !wr_bank) bank0[wr_addr] <= wr_data;
    if (wr_en &&  wr_bank) bank1[wr_addr] <= wr_data;
    rd_data_a <= rd_bank_a ? bank1[rd_addr_a] : bank0[rd_addr_a];
    rd_data_b <= rd_bank_b ? bank1[rd_addr_b] : bank0[rd_addr_b];
  end
endmodule
