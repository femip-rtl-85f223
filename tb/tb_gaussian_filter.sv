// tb_gaussian_filter: sends two random 16x12 frames through the packed bus
// (the first with random bus gaps, the second at full rate) and checks every
// filtered pixel, its position and frame parity against a direct 7x7
// convolution with the binomial kernel, on both output ports. With the bus
// always valid, the filter must produce one filtered pixel per input pixel:
// the outputs of a frame must span exactly as many clocks as the input pixels
// from (6,6) to the last one.
module tb_gaussian_filter;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 16, H = 12, NF = 2;
  localparam int NW = W * H * PIX_W / 32;
  logic [31:0] in_data, em_wr_data;
  logic in_valid, in_ready, fp_valid, fp_frame, em_wr_valid, em_wr_frame;
  logic [FPIX_W-1:0] fp_pix;
  logic [COORD_W-1:0] fp_x, fp_y, em_wr_x, em_wr_y;

  gaussian_filter #(.IMG_W(W), .IMG_H(H)) dut (.*);

  int img [NF][H][W];
  logic [31:0] words [NF][NW];
  int nout [NF];
  int first_c [NF], last_c [NF];
  int cyc = 0, oy = 3, ox = 3, of = 0;

  function automatic int expected(int f, int y, int x);
    int s = 0;
    for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++)
      s += img[f][y-3+i][x-3+j] * binom6(i) * binom6(j) * 8;
    return s;
  endfunction

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && fp_valid) begin
    int e;
    e = expected(of, oy, ox);
    checks++;
    if (fp_pix != FPIX_W'(e) || fp_x != COORD_W'(ox) || fp_y != COORD_W'(oy) || fp_frame != 1'(of)) begin
      failures++;
      $display("f%0d (%0d,%0d): got %0d at (%0d,%0d) f%0d exp %0d", of, oy, ox, fp_pix, fp_y, fp_x, fp_frame, e);
    end
    checks++;
    if (!em_wr_valid || em_wr_data != 32'(fp_pix) || em_wr_x != fp_x || em_wr_y != fp_y ||
        em_wr_frame != fp_frame) begin
      failures++; $display("external memory port mismatch");
    end
    if (nout[of] == 0) first_c[of] = cyc;
    last_c[of] = cyc;
    nout[of]++;
    ox++;
    if (ox == W - 3) begin ox = 3; oy++; end
    if (oy == H - 3) begin oy = 3; of++; end
  end

  initial begin
    for (int f = 0; f < NF; f++) begin
      logic [W*H*PIX_W-1:0] bits;
      for (int y = 0; y < H; y++) for (int x = 0; x < W; x++) begin
        img[f][y][x] = $urandom_range(0, 1023);
        bits[(y*W+x)*PIX_W +: PIX_W] = PIX_W'(img[f][y][x]);
      end
      for (int w = 0; w < NW; w++) words[f][w] = bits[w*32 +: 32];
      nout[f] = 0;
    end
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      int w;
      w = 0;
      while (w < NW) begin
        in_valid = (f == 1) ? 1'b1 : ($urandom_range(0, 4) != 0);
        in_data = words[f][w];
        @(posedge clk);
        if (in_valid && in_ready) w++;
        #1;
      end
      in_valid = 0;
      repeat (40) @(posedge clk);
      #1;
    end
    for (int f = 0; f < NF; f++) begin
      checks++;
      if (nout[f] != (W-6)*(H-6)) begin failures++; $display("frame %0d: %0d outputs", f, nout[f]); end
    end
    checks++;
    if (last_c[1] - first_c[1] != (H-7)*W + (W-7)) begin
      failures++; $display("frame 1 output span %0d clocks", last_c[1] - first_c[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
