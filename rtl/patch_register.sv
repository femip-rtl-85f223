// patch_register: holds the 11x11 window of filtered pixels (10.15 fixed
// point) around the feature of the older frame.
//
// The window is loaded one pixel per write, in raster order (index
// row*11+column), while the correlation controller fetches it from external
// memory. The read port is combinational, so the computation module can
// compare the stored pixel with each arriving pixel of the newer frame in the
// clock it arrives.
module patch_register
  import femip_pkg::*;
#(
  parameter int N = WIN * WIN
) (
  input  logic                   clk,
  input  logic                   wr_en,
  input  logic [$clog2(N)-1:0]   wr_idx,
  input  logic [FPIX_W-1:0]      wr_data,
  input  logic [$clog2(N)-1:0]   rd_idx,
  output logic [FPIX_W-1:0]      rd_data
);
  logic [FPIX_W-1:0] patch [N];

  always_ff @(posedge clk) begin
    if (wr_en) patch[wr_idx] <= wr_data;
  end
  assign rd_data = patch[rd_idx];
endmodule
