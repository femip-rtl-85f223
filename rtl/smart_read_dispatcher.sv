// smart_read_dispatcher (SRD): turns the circularly stored rows back into an
// ordered pixel column for the sliding window buffer.
//
// In the clock the write dispatcher stores pixel (y, x) in bank (y mod 7), the
// same address x is read from every bank. One clock later the seven words
// return; bank (y mod 7) still holds its old word, so the just-written pixel is
// taken from a one-clock bypass register instead. The dynamic connection
// network then rotates the banks so that col_out[0] is row y-6 (the oldest)
// and col_out[6] is row y (the newest), whatever bank each row landed in:
// ordered row k comes from bank (slot + 1 + k) mod 7. Position and frame
// parity travel with the column.
// Timing: col_valid follows fwd_valid by one clock.
module smart_read_dispatcher
  import femip_pkg::*;
#(
  parameter int ROWS  = KSIZE,
  parameter int DEPTH = 1024
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        fwd_valid,
  input  logic [PIX_W-1:0]            fwd_pix,
  input  logic [COORD_W-1:0]          fwd_x,
  input  logic [COORD_W-1:0]          fwd_y,
  input  logic [$clog2(ROWS)-1:0]     fwd_slot,
  input  logic                        fwd_frame,
  output logic [$clog2(DEPTH)-1:0]    rd_addr,
  input  logic [ROWS-1:0][PIX_W-1:0]  rd_data,
  output logic                        col_valid,
  output logic [ROWS-1:0][PIX_W-1:0]  col_out,
  output logic [COORD_W-1:0]          col_x,
  output logic [COORD_W-1:0]          col_y,
  output logic                        col_frame
);
  localparam int SLOT_W = $clog2(ROWS);

  logic [PIX_W-1:0]  pix_q;
  logic [SLOT_W-1:0] slot_q;

  assign rd_addr = fwd_x[$clog2(DEPTH)-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_valid <= 1'b0;
      pix_q <= '0; slot_q <= '0; col_x <= '0; col_y <= '0; col_frame <= 1'b0;
    end else begin
      col_valid <= fwd_valid;
      if (fwd_valid) begin
        pix_q     <= fwd_pix;
        slot_q    <= fwd_slot;
        col_x     <= fwd_x;
        col_y     <= fwd_y;
        col_frame <= fwd_frame;
      end
    end
  end

  // dynamic connection network
  always_comb begin
    for (int k = 0; k < ROWS; k++) begin
      int b;
      b = (int'(slot_q) + 1 + k) % ROWS;
      col_out[k] = (k == ROWS - 1) ? pix_q : rd_data[b];
    end
  end
endmodule
