// tb_smart_read_dispatcher: the testbench models the seven row banks, feeds
// the dispatcher random pixels, rows and slots, and checks that the column
// comes out ordered from the oldest row (top) to the just-written pixel
// (bottom), one clock after the forwarded pixel.
module tb_smart_read_dispatcher;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 16;
  logic fwd_valid, fwd_frame, col_valid, col_frame;
  logic [PIX_W-1:0] fwd_pix;
  logic [COORD_W-1:0] fwd_x, fwd_y, col_x, col_y;
  logic [2:0] fwd_slot;
  logic [3:0] rd_addr;
  logic [6:0][PIX_W-1:0] rd_data, col_out;
  logic [PIX_W-1:0] bank [7][D];

  smart_read_dispatcher #(.DEPTH(D)) dut (.*);

  // bank model with one-clock read latency
  always_ff @(posedge clk)
    for (int b = 0; b < 7; b++) rd_data[b] <= bank[b][rd_addr];

  initial begin
    for (int b = 0; b < 7; b++) for (int a = 0; a < D; a++) bank[b][a] = PIX_W'($urandom);
    fwd_valid = 0; fwd_frame = 0; fwd_pix = 0; fwd_x = 0; fwd_y = 0; fwd_slot = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int s, x;
      @(negedge clk);
      s = $urandom_range(0, 6); x = $urandom_range(0, D - 1);
      fwd_valid = 1; fwd_slot = 3'(s); fwd_x = COORD_W'(x); fwd_y = COORD_W'(t);
      fwd_pix = PIX_W'($urandom); fwd_frame = 1'(t / 50);
      @(negedge clk);
      fwd_valid = 0;
      checks++;
      if (!col_valid || col_x != COORD_W'(x) || col_y != COORD_W'(t) || col_frame != 1'(t / 50)) begin
        failures++; $display("sideband t=%0d", t);
      end
      for (int k = 0; k < 7; k++) begin
        logic [PIX_W-1:0] e;
        e = (k == 6) ? fwd_pix : bank[(s + 1 + k) % 7][x];
        checks++;
        if (col_out[k] !== e) begin
          failures++; $display("t=%0d slot %0d row %0d: %h vs %h", t, s, k, col_out[k], e);
        end
      end
    end
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
