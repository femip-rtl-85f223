// tb_window3x3: streams two random 9-column rasters with random gaps through
// the window generator and checks every 3x3 window, its centre and the valid
// flag against the raster.
module tb_window3x3;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int L = 9, R = 7, W = 12;
  logic in_valid, in_frame, out_valid, out_frame;
  logic [W-1:0] in_data;
  logic [COORD_W-1:0] in_c, in_r, out_c, out_r;
  logic [2:0][2:0][W-1:0] win;
  logic [W-1:0] img [2][R][L];
  int nv = 0;

  window3x3 #(.W(W), .LINE(L)) dut (.*);

  initial begin
    in_valid = 0; in_frame = 0; in_data = 0; in_c = 0; in_r = 0;
    for (int f = 0; f < 2; f++) for (int r = 0; r < R; r++) for (int c = 0; c < L; c++)
      img[f][r][c] = W'($urandom);
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 2; f++) for (int r = 0; r < R; r++) for (int c = 0; c < L; c++) begin
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1; in_data = img[f][r][c]; in_c = COORD_W'(c); in_r = COORD_W'(r); in_frame = 1'(f);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (out_valid !== (r >= 2 && c >= 2)) begin failures++; $display("valid at %0d,%0d", r, c); end
      if (out_valid) begin
        nv++;
        checks++;
        if (out_c != COORD_W'(c-1) || out_r != COORD_W'(r-1) || out_frame != 1'(f)) begin
          failures++; $display("centre at %0d,%0d", r, c);
        end
        for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
          checks++;
          if (win[i][j] !== img[f][r-2+i][c-2+j]) begin
            failures++; $display("f%0d win[%0d][%0d] at %0d,%0d", f, i, j, r, c);
          end
        end
      end
    end
    checks++;
    if (nv != 2 * (R-2) * (L-2)) begin failures++; $display("windows %0d", nv); end
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
