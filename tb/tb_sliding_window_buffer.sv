// tb_sliding_window_buffer: shifts the columns of a random 12x12 image into
// the window in raster order, with gaps, and checks the whole 7x7 window,
// its centre position and the valid flag against the image.
module tb_sliding_window_buffer;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int S = 12;
  logic col_valid, col_frame, win_valid, win_frame;
  logic [6:0][PIX_W-1:0] col_in;
  logic [COORD_W-1:0] col_x, col_y, ctr_x, ctr_y;
  logic [6:0][6:0][PIX_W-1:0] win;
  logic [PIX_W-1:0] img [S][S];
  int nvalid = 0;

  sliding_window_buffer dut (.*);

  initial begin
    for (int y = 0; y < S; y++) for (int x = 0; x < S; x++) img[y][x] = PIX_W'($urandom);
    col_valid = 0; col_frame = 0; col_in = '0; col_x = 0; col_y = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int y = 0; y < S; y++)
      for (int x = 0; x < S; x++) begin
        @(negedge clk);
        col_valid = 1; col_x = COORD_W'(x); col_y = COORD_W'(y); col_frame = 1;
        for (int k = 0; k < 7; k++) col_in[k] = (y - 6 + k >= 0) ? img[y-6+k][x] : '0;
        @(negedge clk);
        col_valid = 0;
        checks++;
        if (win_valid !== (x >= 6 && y >= 6)) begin failures++; $display("valid at %0d,%0d", y, x); end
        if (win_valid) begin
          nvalid++;
          checks++;
          if (ctr_x != COORD_W'(x - 3) || ctr_y != COORD_W'(y - 3) || !win_frame) begin
            failures++; $display("centre at %0d,%0d", y, x);
          end
          for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++) begin
            checks++;
            if (win[i][j] !== img[y-6+i][x-6+j]) begin
              failures++; $display("win[%0d][%0d] at %0d,%0d", i, j, y, x);
            end
          end
        end
      end
    checks++;
    if (nvalid != (S-6)*(S-6)) begin failures++; $display("nvalid %0d", nvalid); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
