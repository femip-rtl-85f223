// tb_adaptive_threshold: runs a sequence of frames with chosen feature
// counts and checks the threshold rule (double above the band, halve below
// it, keep inside it) and the stable flag, frame by frame.
module tb_adaptive_threshold;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int LO = 4, HI = 8;
  logic feat_pass, frame_end, stable;
  logic signed [R_W-1:0] thr;

  adaptive_threshold #(.TARGET_LO(LO), .TARGET_HI(HI), .THR_INIT(R_W'(1024))) dut (.*);

  int counts [10] = '{20, 20, 6, 6, 0, 5, 9, 8, 4, 3};
  longint exp_thr;
  bit prev_changed, seen;

  initial begin
    feat_pass = 0; frame_end = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    exp_thr = 1024; prev_changed = 1; seen = 0;
    for (int f = 0; f < 10; f++) begin
      bit ch;
      @(negedge clk);
      checks++;
      if (thr != R_W'(exp_thr) || stable != (seen && !prev_changed)) begin
        failures++; $display("frame %0d: thr %0d exp %0d stable %b", f, thr, exp_thr, stable);
      end
      // the last feature arrives together with the frame end
      for (int k = 0; k < counts[f]; k++) begin
        feat_pass = 1;
        frame_end = (k == counts[f] - 1);
        @(negedge clk);
      end
      if (counts[f] == 0) begin frame_end = 1; @(negedge clk); end
      feat_pass = 0; frame_end = 0;
      ch = 1;
      if (counts[f] > HI) exp_thr = exp_thr * 2;
      else if (counts[f] < LO) exp_thr = exp_thr / 2;
      else ch = 0;
      prev_changed = ch; seen = 1;
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
