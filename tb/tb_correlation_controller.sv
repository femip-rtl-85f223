// tb_correlation_controller: frame 2 is frame 1 shifted by (+3, -2) plus
// noise. The frame-1 list holds textured points; the frame-2 list holds their
// shifted copies, decoys inside the 35x35 search area, and points far away.
// The testbench serves both lists from an NMS-buffer model and the pixels
// from the external-memory model (random stalls and latency), computes for
// every frame-1 point the lowest-SAD candidate itself, and checks the pushed
// pairs, their scores and their order. It also checks that exactly 121
// memory reads are made per patch load (one per frame-1 point that has a
// candidate) and per candidate, i.e. that the patch is fetched only once.
// The search runs twice: with a loose SAD threshold, and with a tight one
// that rejects some of the best candidates.
module tb_correlation_controller;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int S = 64, D = 32;
  localparam int DX = 3, DY = -2;
  logic start, bank1, rd_bank_a, rd_bank_b, busy, done, match_push;
  logic [5:0] count1, count2;
  logic [SAD_W-1:0] cc_thr;
  logic [4:0] rd_addr_a, rd_addr_b;
  point_t rd_data_a, rd_data_b;
  logic mem_req_valid, mem_req_ready, mem_req_frame, mem_rsp_valid;
  logic [COORD_W-1:0] mem_req_x, mem_req_y;
  logic [31:0] mem_rsp_data;
  match_t match_data;
  logic em_wr_valid, em_wr_frame;
  logic [31:0] em_wr_data;
  logic [9:0] em_wr_x, em_wr_y;

  correlation_controller #(.DEPTH(D)) dut (.*);

  ext_frame_memory #(.IMG_W(S), .IMG_H(S)) u_mem (
    .clk, .wr_valid(em_wr_valid), .wr_data(em_wr_data), .wr_frame(em_wr_frame),
    .wr_x(em_wr_x), .wr_y(em_wr_y), .req_valid(mem_req_valid), .req_ready(mem_req_ready),
    .req_frame(mem_req_frame), .req_x(mem_req_x), .req_y(mem_req_y),
    .rsp_valid(mem_rsp_valid), .rsp_data(mem_rsp_data)
  );

  point_t lst [2][D];
  int img [2][S][S];
  match_t exp_q [$];
  int nmatch = 0;

  always_ff @(posedge clk) begin
    rd_data_a <= lst[rd_bank_a][rd_addr_a];
    rd_data_b <= lst[rd_bank_b][rd_addr_b];
  end

  always @(negedge clk) if (rst_n && match_push) begin
    nmatch++;
    checks++;
    if (exp_q.size() == 0 || match_data != exp_q[0]) begin
      failures++;
      $display("match (%0d,%0d)->(%0d,%0d) score %0d unexpected", match_data.p1.x, match_data.p1.y,
               match_data.p2.x, match_data.p2.y, match_data.score);
    end
    if (exp_q.size() != 0) void'(exp_q.pop_front());
  end

  function automatic longint sad(int b1, point_t a, point_t b);
    longint s = 0;
    for (int r = -5; r <= 5; r++) for (int c = -5; c <= 5; c++) begin
      int d;
      d = img[b1][a.y + r][a.x + c] - img[1 - b1][b.y + r][b.x + c];
      s += (d < 0) ? -d : d;
    end
    return s;
  endfunction

  initial begin
    int n1, n2, loads, cands, b1, nreq0, nrej, nexp;
    longint thr;
    start = 0; bank1 = 0; count1 = 0; count2 = 0; cc_thr = 0;
    em_wr_valid = 0; em_wr_data = 0; em_wr_frame = 0; em_wr_x = 0; em_wr_y = 0;
    b1 = 1;                                    // frame 1 in bank 1, frame 2 in bank 0
    for (int y = 0; y < S; y++) for (int x = 0; x < S; x++)
      img[b1][y][x] = $urandom_range(0, 1 << 24);
    for (int y = 0; y < S; y++) for (int x = 0; x < S; x++) begin
      int sy, sx;
      sy = y - DY; sx = x - DX;
      img[1-b1][y][x] = (sy >= 0 && sy < S && sx >= 0 && sx < S) ?
                        img[b1][sy][sx] + $urandom_range(0, 1000) : $urandom_range(0, 1 << 24);
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 2; f++) for (int y = 0; y < S; y++) for (int x = 0; x < S; x++) begin
      @(negedge clk);
      em_wr_valid = 1; em_wr_frame = 1'(f); em_wr_x = 10'(x); em_wr_y = 10'(y);
      em_wr_data = 32'(img[f][y][x]);
    end
    @(negedge clk) em_wr_valid = 0;
    for (int pass = 0; pass < 2; pass++) begin
    // lists
    n1 = 6; n2 = 0;
    for (int i = 0; i < n1; i++) begin
      lst[b1][i] = '{x: COORD_W'(12 + 7 * i), y: COORD_W'(14 + 5 * i)};
      lst[1-b1][n2++] = '{x: COORD_W'(12 + 7 * i + DX), y: COORD_W'(14 + 5 * i + DY)};
      if (i % 2 == 0) lst[1-b1][n2++] = '{x: COORD_W'(12 + 7 * i + 9), y: COORD_W'(14 + 5 * i + 4)};
    end
    lst[b1][n1++] = '{x: 10'd50, y: 10'd10};   // no candidate within reach
    lst[1-b1][n2++] = '{x: 10'd10, y: 10'd52};
    loads = 0; cands = 0;
    thr = (pass == 0) ? 200000 : 60500;
    nmatch = 0; nrej = 0; nreq0 = u_mem.nreq;
    for (int i = 0; i < n1; i++) begin
      longint best; point_t bp; bit found;
      best = 64'hFFFFFFFF; found = 0; bp = '0;
      for (int j = 0; j < n2; j++) begin
        int dx, dy;
        dx = int'(lst[1-b1][j].x) - int'(lst[b1][i].x);
        dy = int'(lst[1-b1][j].y) - int'(lst[b1][i].y);
        if (dx >= -17 && dx <= 17 && dy >= -17 && dy <= 17) begin
          longint s;
          s = sad(b1, lst[b1][i], lst[1-b1][j]);
          cands++;
          if (!found) loads++;
          found = 1;
          if (s < best) begin best = s; bp = lst[1-b1][j]; end
        end
      end
      if (found && best < thr) exp_q.push_back('{p1: lst[b1][i], p2: bp, score: SAD_W'(best)});
      if (found && best >= thr) nrej++;
    end
    nexp = exp_q.size();
    @(negedge clk);
    start = 1; bank1 = 1'(b1); count1 = 6'(n1); count2 = 6'(n2); cc_thr = SAD_W'(thr);
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (exp_q.size() != 0 || nmatch != nexp || nexp + nrej != n1 || nrej < pass + 1) begin
      failures++;
      $display("pass %0d: %0d expected matches left, %0d pushed, %0d rejected", pass, exp_q.size(),
               nmatch, nrej);
    end
    checks++;
    if (u_mem.nreq - nreq0 != 121 * (loads + cands)) begin
      failures++;
      $display("memory reads %0d expected %0d", u_mem.nreq - nreq0, 121 * (loads + cands));
    end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (120000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
