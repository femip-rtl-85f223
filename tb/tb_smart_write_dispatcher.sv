// tb_smart_write_dispatcher: streams two small frames with random gaps and
// checks that pixel (y, x) goes to bank y mod 7 at address x, that the
// forwarded position and slot agree, and that the frame parity toggles at
// each frame boundary.
module tb_smart_write_dispatcher;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 9, H = 10;
  logic pix_valid;
  logic [PIX_W-1:0] pix_data;
  logic [6:0] wr_en;
  logic [COORD_W-1:0] wr_addr, fwd_x, fwd_y;
  logic [PIX_W-1:0] wr_data, fwd_pix;
  logic fwd_valid, fwd_frame;
  logic [2:0] fwd_slot;

  smart_write_dispatcher #(.IMG_W(W), .IMG_H(H)) dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    pix_valid = 0; pix_data = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(0, 2) == 0) begin pix_valid = 0; @(posedge clk); #1; end
          pix_valid = 1; pix_data = PIX_W'($urandom);
          #1;
          chk(wr_en == 7'(1 << (y % 7)), $sformatf("wr_en %b at y=%0d", wr_en, y));
          chk(wr_addr == COORD_W'(x) && wr_data == pix_data, "write addr/data");
          chk(fwd_valid && fwd_x == COORD_W'(x) && fwd_y == COORD_W'(y) &&
              fwd_slot == 3'(y % 7) && fwd_pix == pix_data, "forward");
          chk(fwd_frame == 1'(f), "frame parity");
          @(posedge clk); #1;
        end
    pix_valid = 0; #1;
    chk(wr_en == '0 && !fwd_valid, "idle");
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
