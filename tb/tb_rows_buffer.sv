// tb_rows_buffer: fills the seven banks with random rows through the banked
// write port and reads every address back, checking the one-clock read
// latency and that a write to one bank leaves the others untouched.
module tb_rows_buffer;
  import femip_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 32;
  logic [6:0] wr_en;
  logic [4:0] wr_addr, rd_addr;
  logic [PIX_W-1:0] wr_data;
  logic [6:0][PIX_W-1:0] rd_data;
  logic [PIX_W-1:0] model [7][D];

  rows_buffer #(.DEPTH(D)) dut (.*);

  initial begin
    wr_en = 0; wr_addr = 0; rd_addr = 0; wr_data = 0;
    for (int b = 0; b < 7; b++)
      for (int a = 0; a < D; a++) begin
        @(negedge clk);
        wr_en = 7'(1 << b); wr_addr = 5'(a); wr_data = PIX_W'($urandom);
        model[b][a] = wr_data;
      end
    @(negedge clk) wr_en = 0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk) rd_addr = 5'(a);
      @(negedge clk);
      for (int b = 0; b < 7; b++) begin
        checks++;
        if (rd_data[b] !== model[b][a]) begin
          failures++; $display("bank %0d addr %0d: %h vs %h", b, a, rd_data[b], model[b][a]);
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
