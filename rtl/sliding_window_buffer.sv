// sliding_window_buffer (SWB): 7x7 array of 10-bit registers holding the image
// block to be convolved.
//
// Every valid column from the read dispatcher shifts the window by one
// column: win[i][j] holds the pixel at row (y-6+i), column (x-6+j) once column
// x of rows y-6..y has entered. The window is complete, and win_valid is
// raised, only when y >= 6 and x >= 6, so the 3-pixel border of the image is
// never filtered. The centre of the window, (y-3, x-3), is output with it,
// together with the frame parity.
// Timing: win_valid follows col_valid by one clock.
module sliding_window_buffer
  import femip_pkg::*;
#(
  parameter int N = KSIZE
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          col_valid,
  input  logic [N-1:0][PIX_W-1:0]       col_in,
  input  logic [COORD_W-1:0]            col_x,
  input  logic [COORD_W-1:0]            col_y,
  input  logic                          col_frame,
  output logic [N-1:0][N-1:0][PIX_W-1:0] win,
  output logic                          win_valid,
  output logic [COORD_W-1:0]            ctr_x,
  output logic [COORD_W-1:0]            ctr_y,
  output logic                          win_frame
);
  localparam int H = N / 2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win <= '0;
      win_valid <= 1'b0;
      ctr_x <= '0; ctr_y <= '0; win_frame <= 1'b0;
    end else begin
      win_valid <= col_valid && (col_x >= COORD_W'(N - 1)) && (col_y >= COORD_W'(N - 1));
      if (col_valid) begin
        for (int i = 0; i < N; i++) begin
          for (int j = 0; j < N - 1; j++) win[i][j] <= win[i][j+1];
          win[i][N-1] <= col_in[i];
        end
        ctr_x     <= col_x - COORD_W'(H);
        ctr_y     <= col_y - COORD_W'(H);
        win_frame <= col_frame;
      end
    end
  end
endmodule
