// gaussian_filter: 7x7 Gaussian smoothing of a packed 10-bit pixel stream.
//
// The chain follows the design's filter architecture: the splitter unpacks
// the 32-bit bus into pixels, the smart write dispatcher stores them row by
// row into the seven-bank rows buffer with a circular policy, the smart read
// dispatcher reads back a full, correctly ordered 7-pixel column per clock into
// the 7x7 sliding window buffer, and the computation stage convolves the
// window with the kernel mask. Filtering starts as soon as the seventh row
// begins to arrive and then yields one filtered pixel per input pixel, except
// for the 3-pixel border, which is discarded.
//
// Each filtered pixel (10.15 fixed point) leaves on two ports: the stream to
// the Harris extractor (fp_*) and the 32-bit external-memory write port
// (em_*), whose word holds the pixel zero-extended and whose address is the
// pixel position plus the frame parity. The external memory is assumed to take
// one word per clock. Latency from the pixel leaving the splitter to the
// filtered output is 9 clocks (1 for the rows-buffer read and the read
// dispatcher, 1 for the window shift, 7 in the MUL/ADD tree).
module gaussian_filter
  import femip_pkg::*;
#(
  parameter int      IMG_W  = 1024,
  parameter int      IMG_H  = 1024,
  parameter kernel_t KERNEL = binomial_kernel()
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [31:0]         in_data,
  input  logic                in_valid,
  output logic                in_ready,
  output logic                fp_valid,
  output logic [FPIX_W-1:0]   fp_pix,
  output logic [COORD_W-1:0]  fp_x,
  output logic [COORD_W-1:0]  fp_y,
  output logic                fp_frame,
  output logic                em_wr_valid,
  output logic [31:0]         em_wr_data,
  output logic                em_wr_frame,
  output logic [COORD_W-1:0]  em_wr_x,
  output logic [COORD_W-1:0]  em_wr_y
);
  localparam int ROWS   = KSIZE;
  localparam int SLOT_W = $clog2(ROWS);
  localparam int A_W    = $clog2(IMG_W);

  logic             pix_valid;
  logic [PIX_W-1:0] pix_data;

  splitter #(.BUS_W(32)) u_splitter (
    .clk, .rst_n, .in_data, .in_valid, .in_ready, .pix_data, .pix_valid
  );

  logic [ROWS-1:0]    wr_en;
  logic [COORD_W-1:0] wr_addr;
  logic [PIX_W-1:0]   wr_data;
  logic               fwd_valid, fwd_frame;
  logic [PIX_W-1:0]   fwd_pix;
  logic [COORD_W-1:0] fwd_x, fwd_y;
  logic [SLOT_W-1:0]  fwd_slot;

  smart_write_dispatcher #(.IMG_W(IMG_W), .IMG_H(IMG_H), .ROWS(ROWS)) u_swd (
    .clk, .rst_n, .pix_valid, .pix_data, .wr_en, .wr_addr, .wr_data,
    .fwd_valid, .fwd_pix, .fwd_x, .fwd_y, .fwd_slot, .fwd_frame
  );

  logic [A_W-1:0]                rd_addr;
  logic [ROWS-1:0][PIX_W-1:0]    rd_data;

  rows_buffer #(.ROWS(ROWS), .DEPTH(IMG_W)) u_rb (
    .clk, .wr_en, .wr_addr(wr_addr[A_W-1:0]), .wr_data, .rd_addr, .rd_data
  );

  logic                         col_valid, col_frame;
  logic [ROWS-1:0][PIX_W-1:0]   col_out;
  logic [COORD_W-1:0]           col_x, col_y;

  smart_read_dispatcher #(.ROWS(ROWS), .DEPTH(IMG_W)) u_srd (
    .clk, .rst_n, .fwd_valid, .fwd_pix, .fwd_x, .fwd_y, .fwd_slot, .fwd_frame,
    .rd_addr, .rd_data, .col_valid, .col_out, .col_x, .col_y, .col_frame
  );

  logic [ROWS-1:0][ROWS-1:0][PIX_W-1:0] win;
  logic                                 win_valid, win_frame;
  logic [COORD_W-1:0]                   ctr_x, ctr_y;

  sliding_window_buffer #(.N(ROWS)) u_swb (
    .clk, .rst_n, .col_valid, .col_in(col_out), .col_x, .col_y, .col_frame,
    .win, .win_valid, .ctr_x, .ctr_y, .win_frame
  );

  conv_mul_add_tree #(.N(ROWS)) u_cs (
    .clk, .rst_n, .in_valid(win_valid), .win, .kernel(KERNEL),
    .in_x(ctr_x), .in_y(ctr_y), .in_frame(win_frame),
    .out_valid(fp_valid), .out_pix(fp_pix), .out_x(fp_x), .out_y(fp_y), .out_frame(fp_frame)
  );

  assign em_wr_valid = fp_valid;
  assign em_wr_data  = 32'(fp_pix);
  assign em_wr_frame = fp_frame;
  assign em_wr_x     = fp_x;
  assign em_wr_y     = fp_y;
endmodule
