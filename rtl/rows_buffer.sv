// rows_buffer (RB): seven block RAMs, each holding one full image row of
// 10-bit pixels.
//
// Bank b is written when wr_en[b] is set, at wr_addr. All banks share one
// read address and return their word one clock later (synchronous read, as a
// block RAM does), giving the smart read dispatcher a whole buffered column per
// clock. A read of the address being written in the same clock returns the old
// word; the read dispatcher takes the new pixel from its bypass instead.
module rows_buffer
  import femip_pkg::*;
#(
  parameter int ROWS  = KSIZE,
  parameter int DEPTH = 1024
) (
  input  logic                         clk,
  input  logic [ROWS-1:0]              wr_en,
  input  logic [$clog2(DEPTH)-1:0]     wr_addr,
  input  logic [PIX_W-1:0]             wr_data,
  input  logic [$clog2(DEPTH)-1:0]     rd_addr,
  output logic [ROWS-1:0][PIX_W-1:0]   rd_data
);
  for (genvar b = 0; b < ROWS; b++) begin : g_bank
    logic [PIX_W-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (wr_en[b]) mem[wr_addr] <= wr_data;
      rd_data[b] <= mem[rd_addr];
    end
  end
endmodule
