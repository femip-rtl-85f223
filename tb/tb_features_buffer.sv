// tb_features_buffer: appends random features (with gaps), reads them all
// back through the one-clock read port, overflows the buffer and checks that
// the extra features are dropped and flagged, then checks that clear empties it.
module tb_features_buffer;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 16;
  logic clear, wr_valid, overflow;
  feature_t wr_data, rd_data;
  logic [4:0] count;
  logic [3:0] rd_addr;
  feature_t model [D];

  features_buffer #(.DEPTH(D)) dut (.*);

  task automatic chk(input bit c, input string m);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", m); end
  endtask

  initial begin
    clear = 0; wr_valid = 0; wr_data = '0; rd_addr = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < D + 3; i++) begin
      @(negedge clk);
      wr_valid = 0;
      if ($urandom_range(0, 1)) @(negedge clk);
      wr_valid = 1;
      wr_data = '{x: COORD_W'($urandom), y: COORD_W'($urandom), r: R_W'({$urandom, $urandom})};
      if (i < D) model[i] = wr_data;
    end
    @(negedge clk) wr_valid = 0;
    chk(count == 5'(D), "count at capacity");
    chk(overflow, "overflow flagged");
    for (int i = 0; i < D; i++) begin
      rd_addr = 4'(i);
      @(negedge clk);
      chk(rd_data == model[i], $sformatf("entry %0d", i));
    end
    clear = 1; @(negedge clk); clear = 0;
    chk(count == 0 && !overflow, "clear");
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
