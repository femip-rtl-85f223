// tb_nms_buffer: writes different random point lists into the two banks and
// reads them back on both read ports at once, from the same and from opposite
// banks, checking the one-clock latency and that the banks are independent.
module tb_nms_buffer;
  import femip_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 16;
  logic wr_en, wr_bank, rd_bank_a, rd_bank_b;
  logic [3:0] wr_addr, rd_addr_a, rd_addr_b;
  point_t wr_data, rd_data_a, rd_data_b;
  point_t model [2][D];

  nms_buffer #(.DEPTH(D)) dut (.*);

  initial begin
    wr_en = 0; wr_bank = 0; wr_addr = 0; wr_data = '0;
    rd_bank_a = 0; rd_bank_b = 0; rd_addr_a = 0; rd_addr_b = 0;
    for (int b = 0; b < 2; b++) for (int a = 0; a < D; a++) begin
      @(negedge clk);
      wr_en = 1; wr_bank = 1'(b); wr_addr = 4'(a);
      wr_data = '{x: COORD_W'($urandom), y: COORD_W'($urandom)};
      model[b][a] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int t = 0; t < 64; t++) begin
      int ba, bb, aa, ab;
      ba = $urandom_range(0, 1); bb = $urandom_range(0, 1);
      aa = $urandom_range(0, D - 1); ab = $urandom_range(0, D - 1);
      rd_bank_a = 1'(ba); rd_bank_b = 1'(bb); rd_addr_a = 4'(aa); rd_addr_b = 4'(ab);
      @(negedge clk);
      checks += 2;
      if (rd_data_a != model[ba][aa]) begin failures++; $display("port a %0d/%0d", ba, aa); end
      if (rd_data_b != model[bb][ab]) begin failures++; $display("port b %0d/%0d", bb, ab); end
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
