// tb_patch_register: loads a random 11x11 window and reads every entry back
// in random order through the combinational read port.
module tb_patch_register;
  import femip_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_en;
  logic [6:0] wr_idx, rd_idx;
  logic [FPIX_W-1:0] wr_data, rd_data;
  logic [FPIX_W-1:0] model [121];

  patch_register dut (.*);

  initial begin
    wr_en = 0; wr_idx = 0; rd_idx = 0; wr_data = 0;
    for (int i = 0; i < 121; i++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = 7'(i); wr_data = FPIX_W'($urandom); model[i] = wr_data;
    end
    @(negedge clk) wr_en = 0;
    for (int t = 0; t < 300; t++) begin
      int i;
      i = $urandom_range(0, 120);
      rd_idx = 7'(i);
      #1;
      checks++;
      if (rd_data != model[i]) begin failures++; $display("entry %0d", i); end
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
