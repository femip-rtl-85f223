// tb_matched_buffer: pushes and pops random matched pairs with a random
// consumer, checks FIFO order against a queue model, then fills the buffer
// past its depth and checks that the extra pair is dropped and flagged.
module tb_matched_buffer;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 8;
  logic push, out_valid, out_ready, overflow;
  match_t push_data, out_data;
  logic [3:0] count;
  match_t q [$];

  matched_buffer #(.DEPTH(D)) dut (.*);

  function automatic match_t rnd();
    return '{p1: '{x: COORD_W'($urandom), y: COORD_W'($urandom)},
             p2: '{x: COORD_W'($urandom), y: COORD_W'($urandom)}, score: $urandom};
  endfunction

  initial begin
    push = 0; push_data = '0; out_ready = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      push = ($urandom_range(0, 1) == 1) && q.size() < D;
      push_data = rnd();
      out_ready = ($urandom_range(0, 2) != 0);
      #1;
      checks++;
      if (out_valid != (q.size() != 0) || 32'(count) != q.size()) begin
        failures++; $display("t=%0d valid/count", t);
      end
      if (out_valid && out_ready) begin
        match_t e;
        e = q.pop_front();
        checks++;
        if (out_data != e) begin failures++; $display("t=%0d order", t); end
      end
      if (push) q.push_back(push_data);
    end
    @(negedge clk) out_ready = 0; push = 0;
    checks++;
    if (overflow) begin failures++; $display("early overflow"); end
    while (q.size() <= D) begin
      @(negedge clk);
      push = 1; push_data = rnd();
      if (q.size() < D) q.push_back(push_data); else q.push_back('0);
    end
    @(negedge clk) push = 0;
    checks++;
    if (!overflow || count != 4'(D)) begin failures++; $display("overflow %b count %0d", overflow, count); end
    out_ready = 1;
    for (int i = 0; i < D; i++) begin
      #1;
      checks++;
      if (!out_valid || out_data != q[i]) begin failures++; $display("drain %0d", i); end
      @(negedge clk);
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
