// tb_correlation_compute: accumulates several random 121-pixel window pairs
// (with idle clocks in between) and checks the running sum of absolute
// differences after every clock, including windows where one side is always
// larger and a window of full-scale differences (121 * (2^25 - 1), which must
// fit the 32-bit accumulator without wrapping).
module tb_correlation_compute;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear, en;
  logic [FPIX_W-1:0] a, b;
  logic [SAD_W-1:0] acc;

  correlation_compute dut (.*);

  initial begin
    clear = 0; en = 0; a = 0; b = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int w = 0; w < 8; w++) begin
      longint s;
      s = 0;
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      for (int k = 0; k < 121; k++) begin
        a = FPIX_W'($urandom); b = FPIX_W'($urandom);
        if (w == 1 && a < b) {a, b} = {b, a};
        if (w == 2 && a > b) {a, b} = {b, a};
        if (w == 3) begin a = (k % 2 == 0) ? '1 : '0; b = ~a; end
        s += (a > b) ? longint'(a - b) : longint'(b - a);
        en = (w == 3) || ($urandom_range(0, 3) != 0);
        if (!en) begin
          s -= (a > b) ? longint'(a - b) : longint'(b - a);
        end
        @(negedge clk);
        en = 0;
        checks++;
        if (longint'(acc) != s) begin
          failures++;
          if (failures < 5) $display("window %0d pixel %0d: %0d vs %0d", w, k, acc, s);
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
