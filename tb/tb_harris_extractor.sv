// tb_harris_extractor: streams the filtered pixels of a 24x24 frame (one per
// clock, random integer parts and fractions) twice through the extractor and
// compares the reported features, in order, with a Harris model computed in
// the testbench: central-difference gradients, 3x3 sums, R = det - 3/64*tr^2,
// 8-pixel border. The feature count of frame 0 is above the target band, so
// the threshold for frame 1 must be twice the initial one. Also checks that
// frame_start/frame_end pulse once per frame and that frame_end follows the
// last filtered pixel by exactly 7 clocks (one R-factor per clock, no stall).
module tb_harris_extractor;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int S = 24, B = 8, LO = 2, HI = 6;
  localparam longint THR0 = 64'd20000000;
  logic fp_valid, fp_frame, feat_valid, feat_frame, frame_start, frame_end, thr_stable;
  logic [FPIX_W-1:0] fp_pix;
  logic [COORD_W-1:0] fp_x, fp_y;
  feature_t feat;
  logic signed [R_W-1:0] thr;

  harris_extractor #(.IMG_W(S), .IMG_H(S), .TARGET_LO(LO), .TARGET_HI(HI),
                     .THR_INIT(R_W'(THR0))) dut (.*);

  int v [S][S];
  int ex_x [$], ex_y [$];
  longint ex_r [$];
  int nstart = 0, nend = 0, cyc = 0, last_in = 0, end_cyc = 0, nfeat = 0;

  function automatic longint rfac(int y, int x);
    longint sxx = 0, syy = 0, sxy = 0, tr;
    for (int i = -1; i <= 1; i++) for (int j = -1; j <= 1; j++) begin
      longint ix, iy;
      ix = v[y+i][x+j+1] - v[y+i][x+j-1];
      iy = v[y+i+1][x+j] - v[y+i-1][x+j];
      sxx += ix * ix; syy += iy * iy; sxy += ix * iy;
    end
    tr = sxx + syy;
    return sxx * syy - sxy * sxy - ((3 * tr * tr) >>> 6);
  endfunction

  task automatic build_expect(longint t);
    ex_x.delete(); ex_y.delete(); ex_r.delete();
    for (int y = B; y <= S - 1 - B; y++) for (int x = B; x <= S - 1 - B; x++) begin
      longint r;
      r = rfac(y, x);
      if (r > t) begin ex_x.push_back(x); ex_y.push_back(y); ex_r.push_back(r); end
    end
  endtask

  always @(posedge clk) cyc++;

  always @(negedge clk) if (rst_n) begin
    if (frame_start) nstart++;
    if (frame_end) begin nend++; end_cyc = cyc; end
    if (feat_valid) begin
      nfeat++;
      checks++;
      if (ex_x.size() == 0) begin
        failures++; $display("unexpected feature (%0d,%0d)", feat.y, feat.x);
      end else begin
        int x, y; longint r;
        x = ex_x.pop_front(); y = ex_y.pop_front(); r = ex_r.pop_front();
        if (feat.x != COORD_W'(x) || feat.y != COORD_W'(y) || longint'(feat.r) != r) begin
          failures++;
          $display("feature (%0d,%0d) R=%0d, expected (%0d,%0d) R=%0d", feat.y, feat.x, feat.r, y, x, r);
        end
      end
    end
  end

  initial begin
    int n0;
    for (int y = 0; y < S; y++) for (int x = 0; x < S; x++)
      v[y][x] = ((x / 4 + y / 5) % 2) * 600 + $urandom_range(0, 150);
    fp_valid = 0; fp_pix = 0; fp_x = 0; fp_y = 0; fp_frame = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int f = 0; f < 2; f++) begin
      build_expect(f == 0 ? THR0 : 2 * THR0);
      if (f == 0) n0 = ex_x.size();
      if (f == 1) begin
        checks++;
        if (n0 <= HI || longint'(thr) != 2 * THR0) begin
          failures++; $display("threshold %0d after %0d features", thr, n0);
        end
      end
      for (int y = 3; y < S - 3; y++) begin
        for (int x = 3; x < S - 3; x++) begin
          @(negedge clk);
          fp_valid = 1; fp_x = COORD_W'(x); fp_y = COORD_W'(y); fp_frame = 1'(f);
          fp_pix = {PIX_W'(v[y][x]), 15'($urandom)};
          last_in = cyc;
        end
        @(negedge clk) fp_valid = 0;
        repeat (3) @(negedge clk);
      end
      repeat (12) @(negedge clk);
      checks++;
      if (ex_x.size() != 0) begin failures++; $display("frame %0d: %0d features missing", f, ex_x.size()); end
      checks++;
      if (end_cyc - last_in != 7) begin failures++; $display("frame end latency %0d", end_cyc - last_in); end
    end
    checks++;
    if (nstart != 2 || nend != 2 || nfeat == 0) begin
      failures++; $display("starts %0d ends %0d features %0d", nstart, nend, nfeat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
