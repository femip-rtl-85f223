// femip_bench: end-to-end bench for femip_top, shared by the reduced-size and
// the full-size testbench.
//
// The scene is a set of bright squares on a dark background with a fixed
// pseudo-random texture (a hash of the scene coordinates), and it moves by
// (+1, +1) pixel per frame. Smoothing, corner detection and correlation are
// all shift invariant, so every correct match links a feature at p in one
// frame to the feature at p + (1, 1) in the next, with a SAD of exactly 0;
// with cc_thr = 1 only such pairs are accepted. The bench packs the frames on
// the 32-bit bus, keeps the filtered pixels in the external-memory model,
// drains the matched pairs and checks each one. The reduced-size run waits
// for the matcher to go idle between frames, except around one point where
// three frames follow each other directly so that one is skipped; the
// full-size run streams all frames back to back and must skip none.
// Mechanisms counted (each must happen at least once): bus backpressure,
// threshold change, stable threshold, features removed by non-max
// suppression, more than one candidate for a feature, a candidate rejected by
// SAD, patch reuse, accepted matches, a skipped frame. The matched pairs are
// drained with a randomly stalling ready, and two assertions check that the
// core holds a stalled read request or matched pair unchanged.
module femip_bench #(
  parameter bit     FULL    = 0,
  parameter int     W       = 64,
  parameter int     H       = 64,
  parameter int     TLO     = 256,
  parameter int     THI     = 1024,
  parameter longint THR0    = 64'd1 << 30,
  parameter int     NSQ     = 3,       // squares per row and column
  parameter int     NFRAMES = 6,
  parameter int     SKIP_AT = 3,       // frame sent without waiting (-1: none)
  parameter longint WDOG    = 64'd2000000
);
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [31:0] in_data, em_wr_data, mem_rsp_data;
  logic in_valid, in_ready, em_wr_valid, em_wr_frame;
  logic [COORD_W-1:0] em_wr_x, em_wr_y, mem_req_x, mem_req_y;
  logic mem_req_valid, mem_req_ready, mem_req_frame, mem_rsp_valid;
  logic [SAD_W-1:0] cc_thr;
  logic match_valid, match_ready;
  match_t match_data;
  logic signed [R_W-1:0] harris_thr;
  logic harris_thr_stable, fb_overflow, mb_overflow, frame_missed, match_done;
  logic [9:0] match_count;

  // internal probes, for the mechanism counters only
  logic       nms_done_p, loaded_p, push_p, found_p;
  int         nms_in_p, nms_out_p;
  logic [2:0] mstate_p;
  logic [3:0] ccstate_p;
  point_t     fa_p, fb_p;

  if (FULL) begin : g_full
    femip_top dut (.*);
    assign nms_done_p = dut.u_matcher.u_nms.done;
    assign nms_in_p   = int'(dut.u_matcher.u_nms.n_q);
    assign nms_out_p  = int'(dut.u_matcher.u_nms.out_count);
    assign mstate_p   = dut.u_matcher.state;
    assign ccstate_p  = dut.u_matcher.u_cc.state;
    assign loaded_p   = dut.u_matcher.u_cc.loaded_q;
    assign found_p    = dut.u_matcher.u_cc.found_q;
    assign push_p     = dut.u_matcher.u_cc.match_push;
    assign fa_p       = dut.u_matcher.u_cc.fa_q;
    assign fb_p       = dut.u_matcher.u_cc.rd_data_b;
  end else begin : g_small
    femip_top #(.IMG_W(W), .IMG_H(H), .TARGET_LO(TLO), .TARGET_HI(THI),
                .THR_INIT(R_W'(THR0)), .FB_DEPTH(1024), .MB_DEPTH(512)) dut (.*);
    assign nms_done_p = dut.u_matcher.u_nms.done;
    assign nms_in_p   = int'(dut.u_matcher.u_nms.n_q);
    assign nms_out_p  = int'(dut.u_matcher.u_nms.out_count);
    assign mstate_p   = dut.u_matcher.state;
    assign ccstate_p  = dut.u_matcher.u_cc.state;
    assign loaded_p   = dut.u_matcher.u_cc.loaded_q;
    assign found_p    = dut.u_matcher.u_cc.found_q;
    assign push_p     = dut.u_matcher.u_cc.match_push;
    assign fa_p       = dut.u_matcher.u_cc.fa_q;
    assign fb_p       = dut.u_matcher.u_cc.rd_data_b;
  end

  // The consumer of the matched pairs is not always ready.
  always @(posedge clk) match_ready <= ($urandom_range(0, 3) != 0);

  // Handshake rules on the core's outputs: a stalled request or pair must be
  // held unchanged until it is taken.
  a_req_hold: assert property (@(posedge clk) disable iff (!rst_n)
      mem_req_valid && !mem_req_ready |=> mem_req_valid && $stable({mem_req_frame, mem_req_x, mem_req_y}))
    else begin failures++; $display("read request changed while stalled"); end
  a_match_hold: assert property (@(posedge clk) disable iff (!rst_n)
      match_valid && !match_ready |=> match_valid && $stable(match_data))
    else begin failures++; $display("matched pair changed while stalled"); end

  ext_frame_memory #(.IMG_W(W), .IMG_H(H), .STALLS(1)) u_mem (
    .clk, .wr_valid(em_wr_valid), .wr_data(em_wr_data), .wr_frame(em_wr_frame),
    .wr_x(em_wr_x), .wr_y(em_wr_y), .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_frame(mem_req_frame), .req_x(mem_req_x), .req_y(mem_req_y),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data)
  );

  function automatic int scene(int x, int y);
    int v, h, pitch;
    pitch = W / NSQ;
    v = 100;
    if ((x % pitch) >= pitch / 4 && (x % pitch) < 3 * pitch / 4 &&
        (y % pitch) >= pitch / 4 && (y % pitch) < 3 * pitch / 4 && x >= 0 && y >= 0)
      v = 700;
    // on large frames, small squares whose corners cross the right-hand
    // border band over the frames, so some features lose their partner
    if (H >= 512)
      for (int i = 0; i < 7; i++)
        if (y >= 40 + 30 * i && y < 50 + 30 * i && x >= W - 24 + i && x < W - 14 + i) v = 700;
    h = (x * 73856093) ^ (y * 19349663);
    h = h ^ (h >>> 13);
    return v + (h & 63);
  endfunction

  // filtered pixels written to external memory, checked against a direct
  // 7x7 convolution of the scene
  int em_frame = -1, n_em_bad = 0;
  always @(negedge clk) if (rst_n && em_wr_valid) begin
    int e;
    if (em_wr_x == 10'd3 && em_wr_y == 10'd3) em_frame++;
    e = 0;
    for (int i = 0; i < 7; i++) for (int j = 0; j < 7; j++)
      e += scene(int'(em_wr_x) - 3 + j - em_frame, int'(em_wr_y) - 3 + i - em_frame) * binom6(i) * binom6(j) * 8;
    if (em_wr_data != 32'(e) || em_wr_frame != 1'(em_frame)) begin
      n_em_bad++;
      if (n_em_bad < 5) $display("filtered pixel (%0d,%0d) of frame %0d: %0d expected %0d",
                                 em_wr_x, em_wr_y, em_frame, em_wr_data, e);
    end
  end

  // counters
  int n_stall = 0, n_thr_change = 0, n_stable = 0, n_suppressed = 0, n_multi = 0;
  int n_sad_reject = 0, n_patch_reuse = 0, n_match = 0, n_missed = 0, n_done = 0;
  int cand_this_a = 0;
  int pass_cyc = 0, pass_cyc_max = 0;
  logic signed [R_W-1:0] thr_prev;

  always @(negedge clk) if (rst_n) begin
    if (in_valid && !in_ready) n_stall++;
    if (harris_thr != thr_prev) n_thr_change++;
    thr_prev = harris_thr;
    if (frame_missed) n_missed++;
    if (match_done) n_done++;
    // length of the suppression + correlation phases, for the report only
    if (mstate_p != 3'd0) pass_cyc++;
    if (match_done || frame_missed) begin
      if (pass_cyc > pass_cyc_max) pass_cyc_max = pass_cyc;
      pass_cyc = 0;
    end
    if (nms_done_p) n_suppressed += nms_in_p - nms_out_p;
    if (match_valid && match_ready) begin
      n_match++;
      checks++;
      if (match_data.p2.x != match_data.p1.x + 1'b1 || match_data.p2.y != match_data.p1.y + 1'b1 ||
          match_data.score != 0) begin
        failures++;
        $display("bad match (%0d,%0d)->(%0d,%0d) score %0d", match_data.p1.x, match_data.p1.y,
                 match_data.p2.x, match_data.p2.y, match_data.score);
      end
    end
  end

  // correlation controller events (state encoding of correlation_controller)
  function automatic bit near17(logic [9:0] a, logic [9:0] b);
    return (a >= b) ? (a - b <= 10'd17) : (b - a <= 10'd17);
  endfunction
  always @(negedge clk) if (rst_n)
    probe(ccstate_p == 4'd7, ccstate_p == 4'd4 && loaded_p && near17(fb_p.x, fa_p.x) && near17(fb_p.y, fa_p.y),
          ccstate_p == 4'd2, ccstate_p == 4'd9, found_p, push_p);

  // cmp: a candidate was scored; reuse: a later candidate found the patch loaded;
  // new_a: next frame-1 feature; end_a: its scan is over
  task automatic probe(bit cmp, bit reuse, bit new_a, bit end_a, bit found, bit push);
    if (cmp) cand_this_a++;
    if (reuse) n_patch_reuse++;
    if (new_a) cand_this_a = 0;
    if (end_a) begin
      if (cand_this_a > 1) n_multi++;
      if (found && !push) n_sad_reject++;
    end
  endtask

  task automatic send_frame(int f);
    int npix, nw, w, bitpos;
    logic [63:0] acc;
    npix = W * H; nw = npix * PIX_W / 32;
    acc = '0; bitpos = 0; w = 0;
    @(negedge clk);
    for (int p = 0; p < npix; p++) begin
      acc |= 64'(scene(p % W - f, p / W - f)) << bitpos;
      bitpos += PIX_W;
      if (bitpos >= 32) begin
        in_data = acc[31:0]; in_valid = 1;
        #1;
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        #1;
        acc >>= 32; bitpos -= 32; w++;
      end
    end
    in_valid = 0;
  endtask

  initial begin
    cc_thr = 32'd1; in_valid = 0; in_data = 0; thr_prev = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < NFRAMES; f++) begin
      send_frame(f);
      if (harris_thr_stable) n_stable++;
      // The full-size run streams all frames back to back. The reduced run
      // waits for the matcher to go idle after each frame, except that
      // frames SKIP_AT .. SKIP_AT+2 follow each other directly, so the third
      // arrives while the first still waits for suppression and is skipped.
      if (!FULL && (SKIP_AT < 0 || f < SKIP_AT || f > SKIP_AT + 1)) begin
        repeat (2 * W + 40) @(posedge clk);
        while (mstate_p != 3'd0) @(posedge clk);
      end
      $display("frame %0d sent: thr %0d stable %b matches %0d", f, harris_thr, harris_thr_stable, n_match);
    end
    repeat (2 * W + 40) @(posedge clk);
    while (mstate_p != 3'd0) @(posedge clk);
    repeat (2000) @(posedge clk);
    $display("longest suppression + matching pass: %0d clocks (one frame: %0d clocks)",
             pass_cyc_max, W * H);
    begin
      automatic string names [10] = '{"bus backpressure", "threshold change", "stable threshold",
                            "non-max suppression", "several candidates", "SAD rejection",
                            "patch reuse", "accepted match", "skipped frame", "matching pass"};
      int cnt [10];
      cnt = '{n_stall, n_thr_change, n_stable, n_suppressed, n_multi, n_sad_reject,
              n_patch_reuse, n_match, n_missed, n_done};
      for (int i = 0; i < 10; i++) begin
        $display("  %-22s %0d", names[i], cnt[i]);
        checks++;
        if (cnt[i] == 0 && !((SKIP_AT < 0 || FULL) && i == 8)) begin
          failures++; $display("mechanism never exercised: %s", names[i]);
        end
      end
    end
    checks++;
    if (n_em_bad != 0 || em_frame != NFRAMES - 1) begin
      failures++; $display("%0d wrong filtered pixels, %0d frames filtered", n_em_bad, em_frame + 1);
    end
    checks++;
    if (FULL && n_missed != 0) begin failures++; $display("frames skipped at full size"); end
    checks++;
    if (fb_overflow || mb_overflow) begin failures++; $display("buffer overflow"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (int'(WDOG)) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
