// tb_nms_3x3: builds row-ordered feature lists with clusters of touching
// features, serves them from a features-buffer model (one-clock read), and
// checks the written survivors, their order, bank and count against a full
// pairwise search. Also checks the cycle count (4 clocks per feature plus
// one per buffer position in its +/-RANGE search slice) and an empty list.
module tb_nms_3x3;
  import femip_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int D = 64, RG = 20;
  logic start, bank, nb_wr_en, nb_wr_bank, busy, done;
  logic [6:0] count, out_count;
  logic [5:0] fb_rd_addr, nb_wr_addr;
  feature_t fb_rd_data;
  point_t nb_wr_data;
  feature_t fb [D];
  int n, cyc = 0;
  point_t got [$];

  nms_3x3 #(.DEPTH(D), .RANGE(RG)) dut (.*);

  always_ff @(posedge clk) fb_rd_data <= fb[fb_rd_addr];
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n && nb_wr_en) begin
    got.push_back(nb_wr_data);
    checks++;
    if (nb_wr_bank != bank || 32'(nb_wr_addr) != got.size() - 1) begin
      failures++; $display("write bank/address");
    end
  end

  function automatic bit kept(int i);
    for (int j = 0; j < n; j++) begin
      int dx, dy;
      dx = int'(fb[j].x) - int'(fb[i].x); dy = int'(fb[j].y) - int'(fb[i].y);
      if (j != i && dx >= -1 && dx <= 1 && dy >= -1 && dy <= 1 &&
          (fb[j].r > fb[i].r || (fb[j].r == fb[i].r && j < i))) return 0;
    end
    return 1;
  endfunction

  task automatic run(input int nfeat, input bit b);
    point_t exp_q [$];
    int t0, expc;
    n = nfeat; got.delete(); expc = 2;
    for (int i = 0; i < n; i++) begin
      if (kept(i)) exp_q.push_back('{x: fb[i].x, y: fb[i].y});
      expc += ((i + RG < n) ? i + RG : n - 1) - ((i >= RG) ? i - RG : 0) + 5;
    end
    if (n == 0) expc = 2;
    @(negedge clk);
    start = 1; bank = b; count = 7'(n); t0 = cyc;
    @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cyc - t0 != expc) begin failures++; $display("n=%0d: %0d clocks, expected %0d", n, cyc - t0, expc); end
    checks++;
    if (32'(out_count) != exp_q.size() || got.size() != exp_q.size()) begin
      failures++; $display("n=%0d: kept %0d/%0d expected %0d", n, out_count, got.size(), exp_q.size());
    end else
      for (int i = 0; i < got.size(); i++) begin
        checks++;
        if (got[i] != exp_q[i]) begin failures++; $display("survivor %0d", i); end
      end
  endtask

  initial begin
    int k;
    start = 0; bank = 0; count = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int pass = 0; pass < 3; pass++) begin
      int y;
      k = 0; y = 10;
      while (k < D - 4) begin
        int per;
        per = $urandom_range(0, 4);
        for (int m = 0; m < per && k < D; m++) begin
          fb[k].y = COORD_W'(y);
          // features in a row are sorted by x; many touch their neighbours
          fb[k].x = (m == 0) ? COORD_W'($urandom_range(20, 30)) : fb[k-1].x + COORD_W'($urandom_range(1, 3));
          fb[k].r = R_W'($urandom_range(1, 8));
          k++;
        end
        y++;
      end
      run(k, 1'(pass));
    end
    run(0, 0);
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
