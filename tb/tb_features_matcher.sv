// tb_features_matcher: drives the matcher with five frames of feature lists
// as the Harris extractor would present them, and serves filtered pixels from
// the external-memory model. Frame 1 holds the frame-0 points shifted by
// (+2, +3); every point comes with a weaker touching neighbour that non-max
// suppression must remove, and some with a decoy within reach.
//   frame 0: threshold not yet stable  -> suppression only
//   frame 1: stable                    -> frames 0/1 matched
//   frames 2, 3: empty, sent while 0/1 are matched -> collected in the other
//                features bank, matched later against an empty list
//   frame 4: starts while frame 2 still waits for suppression -> skipped
//   frame 5: stable, but frame 4 lost  -> suppression only
//   frame 6: stable                    -> frames 5/6 matched
// The decoys are real features of both frames, so the matched pairs drained
// from the output stream must be exactly the shifted pairs of every surviving
// point and decoy, in list order; each point also has a decoy of the other
// frame within reach, which must lose.
module tb_features_matcher;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int S = 64, DX = 2, DY = 3, NP = 5;
  logic feat_valid, feat_frame, frame_start, frame_end, thr_stable;
  feature_t feat;
  logic [SAD_W-1:0] cc_thr;
  logic mem_req_valid, mem_req_ready, mem_req_frame, mem_rsp_valid;
  logic [COORD_W-1:0] mem_req_x, mem_req_y;
  logic [31:0] mem_rsp_data;
  logic match_valid, match_ready, fb_overflow, mb_overflow, frame_missed, match_done;
  match_t match_data;
  logic [4:0] match_count;
  logic em_wr_valid, em_wr_frame;
  logic [31:0] em_wr_data;
  logic [9:0] em_wr_x, em_wr_y;

  features_matcher #(.FB_DEPTH(64), .MB_DEPTH(16)) dut (.*);

  ext_frame_memory #(.IMG_W(S), .IMG_H(S)) u_mem (
    .clk, .wr_valid(em_wr_valid), .wr_data(em_wr_data), .wr_frame(em_wr_frame),
    .wr_x(em_wr_x), .wr_y(em_wr_y), .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_frame(mem_req_frame), .req_x(mem_req_x), .req_y(mem_req_y),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data)
  );

  int img [2][S][S];
  point_t pts [NP];
  match_t got [$];
  point_t surv [$];
  int nmissed = 0, ndone = 0;

  always @(negedge clk) if (rst_n) begin
    if (match_valid && match_ready) got.push_back(match_data);
    if (frame_missed) nmissed++;
    if (match_done) ndone++;
  end

  task automatic send_frame(input int f, input bit stable, input bit shifted);
    @(negedge clk);
    frame_start = 1; feat_frame = 1'(f % 2);
    @(negedge clk) frame_start = 0;
    for (int i = 0; i < NP; i++) begin
      int x, y;
      x = pts[i].x + (shifted ? DX : 0); y = pts[i].y + (shifted ? DY : 0);
      // strong feature, its weak right neighbour, and a decoy for even points
      feat_valid = 1; feat = '{x: COORD_W'(x), y: COORD_W'(y), r: R_W'(1000 + i)};
      @(negedge clk);
      feat = '{x: COORD_W'(x + 1), y: COORD_W'(y), r: R_W'(10)};
      @(negedge clk);
      if (i % 2 == 0) begin
        feat = '{x: COORD_W'(x + 6), y: COORD_W'(y + 1), r: R_W'(50)};
        @(negedge clk);
      end
      feat_valid = 0;
      repeat (3) @(negedge clk);
    end
    thr_stable = stable;
    frame_end = 1;
    @(negedge clk);
    frame_end = 0;
  endtask

  initial begin
    feat_valid = 0; feat_frame = 0; frame_start = 0; frame_end = 0; thr_stable = 0;
    feat = '0; cc_thr = 32'd400000; match_ready = 1;
    em_wr_valid = 0; em_wr_data = 0; em_wr_frame = 0; em_wr_x = 0; em_wr_y = 0;
    for (int y = 0; y < S; y++) for (int x = 0; x < S; x++) img[0][y][x] = $urandom_range(0, 1 << 24);
    for (int y = 0; y < S; y++) for (int x = 0; x < S; x++)
      img[1][y][x] = (y >= DY && x >= DX) ? img[0][y-DY][x-DX] + $urandom_range(0, 500) : 0;
    for (int i = 0; i < NP; i++) pts[i] = '{x: COORD_W'(10 + 8 * i), y: COORD_W'(10 + 7 * i)};
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 2; f++) for (int y = 0; y < S; y++) for (int x = 0; x < S; x++) begin
      @(negedge clk);
      em_wr_valid = 1; em_wr_frame = 1'(f); em_wr_x = 10'(x); em_wr_y = 10'(y);
      em_wr_data = 32'(img[f][y][x]);
    end
    @(negedge clk) em_wr_valid = 0;

    send_frame(0, 0, 0);
    repeat (400) @(negedge clk);
    send_frame(1, 1, 1);
    repeat (5) @(negedge clk);
    // frames 2, 3 and 4 begin while frames 0/1 are still being matched
    while (dut.state != 3'd4) @(negedge clk);   // correlation of 0/1 running
    for (int f = 2; f <= 4; f++) begin
      frame_start = 1; feat_frame = 1'(f % 2);
      @(negedge clk) frame_start = 0;
      repeat (3) @(negedge clk);
      thr_stable = 1;
      frame_end = 1; @(negedge clk) frame_end = 0;
      repeat (5) @(negedge clk);
    end
    checks++;
    if (ndone != 0) begin failures++; $display("frames 0/1 matched too early"); end
    while (ndone < 3) @(negedge clk);
    send_frame(5, 1, 1);
    repeat (400) @(negedge clk);
    send_frame(6, 1, 0);
    while (ndone < 4) @(negedge clk);
    repeat (5) @(negedge clk);

    checks++;
    if (nmissed != 1) begin failures++; $display("missed frames %0d", nmissed); end
    for (int i = 0; i < NP; i++) begin
      surv.push_back(pts[i]);
      if (i % 2 == 0) surv.push_back('{x: pts[i].x + 10'd6, y: pts[i].y + 10'd1});
    end
    checks++;
    if (got.size() != 2 * surv.size()) begin failures++; $display("%0d pairs", got.size()); end
    for (int i = 0; i < got.size() && i < 2 * surv.size(); i++) begin
      point_t a, b;
      a = surv[i % surv.size()];
      b = '{x: a.x + COORD_W'(DX), y: a.y + COORD_W'(DY)};
      checks++;
      if (i < surv.size() ? (got[i].p1 != a || got[i].p2 != b) : (got[i].p1 != b || got[i].p2 != a)) begin
        failures++;
        $display("pair %0d: (%0d,%0d)->(%0d,%0d)", i, got[i].p1.x, got[i].p1.y, got[i].p2.x, got[i].p2.y);
      end
    end
    checks++;
    if (fb_overflow || mb_overflow) begin failures++; $display("overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
