// tb_conv_mul_add_tree: feeds one random window per clock with a random
// kernel and checks each output against a directly computed dot product
// (saturated to 25 bits), and that the result appears exactly 7 clocks after
// its window.
module tb_conv_mul_add_tree;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NT = 64;
  logic in_valid, in_frame, out_valid, out_frame;
  logic [6:0][6:0][PIX_W-1:0] win;
  kernel_t kernel;
  logic [COORD_W-1:0] in_x, in_y, out_x, out_y;
  logic [FPIX_W-1:0] out_pix;
  longint exp_q [$];
  int     exp_t [$];
  int cyc = 0, nout = 0;

  conv_mul_add_tree dut (.*);

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n && out_valid) begin
    longint e; int t;
    e = exp_q.pop_front(); t = exp_t.pop_front();
    nout++;
    checks++;
    if (longint'(out_pix) != e || out_x != COORD_W'(t) || out_y != COORD_W'(t + 1)) begin
      failures++; $display("out %0d: %0d vs %0d", t, out_pix, e);
    end
    checks++;
    if (cyc - t != 7) begin failures++; $display("latency %0d", cyc - t); end
  end

  initial begin
    in_valid = 0; in_frame = 0; win = '0; in_x = 0; in_y = 0;
    kernel = binomial_kernel();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk);
    for (int t = 0; t < NT; t++) begin
      longint s;
      @(negedge clk);
      // the last quarter uses large random kernels to exercise saturation
      if (t >= 3 * NT / 4) for (int k = 0; k < 49; k++) kernel[k] = KER_W'($urandom);
      else if (t >= NT / 2) for (int k = 0; k < 49; k++) kernel[k] = KER_W'($urandom_range(0, 1200));
      for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++) win[i][j] = PIX_W'($urandom);
      s = 0;
      for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++)
        s += longint'(win[i][j]) * longint'(kernel[i*7+j]);
      if (s > 64'h1FFFFFF) s = 64'h1FFFFFF;
      exp_q.push_back(s); exp_t.push_back(cyc);
      in_valid = 1; in_x = COORD_W'(cyc); in_y = COORD_W'(cyc + 1); in_frame = 0;
    end
    @(negedge clk) in_valid = 0;
    repeat (12) @(posedge clk);
    checks++;
    if (nout != NT) begin failures++; $display("outputs %0d", nout); end
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
