// smart_write_dispatcher (SWD): writes the incoming pixel flow into the rows
// buffer with a circular row policy.
//
// Image row y is stored in rows-buffer bank (y mod 7), at address x, so the
// eighth row overwrites the bank that held the first one, as the design's
// row buffering prescribes. The SWD keeps the raster position (x, y) and a
// frame-parity bit that toggles after the last pixel of each IMG_W x IMG_H
// frame, since the input stream carries no framing. Alongside the bank write
// it forwards the pixel and its position to the smart read dispatcher, which
// reads the same column of all banks in the same clock.
// Timing: purely combinational from pix_valid to the write strobes; the
// position counters advance at the clock edge.
module smart_write_dispatcher
  import femip_pkg::*;
#(
  parameter int IMG_W = 1024,
  parameter int IMG_H = 1024,
  parameter int ROWS  = KSIZE
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pix_valid,
  input  logic [PIX_W-1:0]         pix_data,
  // rows buffer write port
  output logic [ROWS-1:0]          wr_en,
  output logic [COORD_W-1:0]       wr_addr,
  output logic [PIX_W-1:0]         wr_data,
  // forwarded to the smart read dispatcher
  output logic                     fwd_valid,
  output logic [PIX_W-1:0]         fwd_pix,
  output logic [COORD_W-1:0]       fwd_x,
  output logic [COORD_W-1:0]       fwd_y,
  output logic [$clog2(ROWS)-1:0]  fwd_slot,
  output logic                     fwd_frame
);
  localparam int SLOT_W = $clog2(ROWS);

  logic [COORD_W-1:0] x_q, y_q;
  logic [SLOT_W-1:0]  slot_q;
  logic               frame_q;

  always_comb begin
    wr_en     = '0;
    wr_en[slot_q] = pix_valid;
    wr_addr   = x_q;
    wr_data   = pix_data;
    fwd_valid = pix_valid;
    fwd_pix   = pix_data;
    fwd_x     = x_q;
    fwd_y     = y_q;
    fwd_slot  = slot_q;
    fwd_frame = frame_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0; y_q <= '0; slot_q <= '0; frame_q <= 1'b0;
    end else if (pix_valid) begin
      if (x_q == COORD_W'(IMG_W - 1)) begin
        x_q <= '0;
        slot_q <= (slot_q == SLOT_W'(ROWS - 1)) ? '0 : slot_q + 1'b1;
        if (y_q == COORD_W'(IMG_H - 1)) begin
          y_q     <= '0;
          slot_q  <= '0;
          frame_q <= ~frame_q;
        end else begin
          y_q <= y_q + 1'b1;
        end
      end else begin
        x_q <= x_q + 1'b1;
      end
    end
  end
endmodule
