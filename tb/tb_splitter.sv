// tb_splitter: packs random 10-bit pixels into 32-bit words (first pixel in
// the least significant bits) and checks that the splitter returns the same
// pixels in order, with random gaps on the input bus. Also checks that the
// splitter sustains one pixel per clock when the bus is always valid.
module tb_splitter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NPIX = 160;   // 50 words
  logic [9:0]  pix [NPIX];
  logic [31:0] words [NPIX*10/32];
  logic [31:0] in_data;
  logic in_valid, in_ready, pix_valid;
  logic [9:0] pix_data;

  splitter dut (.clk, .rst_n, .in_data, .in_valid, .in_ready, .pix_data, .pix_valid);

  int got = 0;
  int first_cyc = -1, last_cyc = 0, cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (rst_n && pix_valid) begin
      checks++;
      if (got < NPIX && pix_data !== pix[got]) begin
        failures++;
        $display("pixel %0d: got %h exp %h", got, pix_data, pix[got]);
      end
      if (first_cyc < 0) first_cyc = cyc;
      last_cyc = cyc;
      got++;
    end
  end

  task automatic send(input bit gaps);
    int w = 0;
    while (w < NPIX*10/32) begin
      in_valid = gaps ? ($urandom_range(0, 3) != 0) : 1'b1;
      in_data  = words[w];
      @(posedge clk);
      if (in_valid && in_ready) w++;
      #1;
    end
    in_valid = 0;
  endtask

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      logic [NPIX*10-1:0] bits;
      for (int i = 0; i < NPIX; i++) begin
        pix[i] = 10'($urandom);
        bits[i*10 +: 10] = pix[i];
      end
      for (int w = 0; w < NPIX*10/32; w++) words[w] = bits[w*32 +: 32];
      rst_n = 0; in_valid = 0; in_data = 0; got = 0; first_cyc = -1;
      repeat (3) @(posedge clk);
      #1 rst_n = 1;
      send(pass == 0);
      repeat (20) @(posedge clk);
      checks++;
      if (got != NPIX) begin failures++; $display("pass %0d: %0d pixels", pass, got); end
      if (pass == 1) begin
        checks++;
        if (last_cyc - first_cyc + 1 != NPIX) begin
          failures++;
          $display("rate: %0d pixels over %0d clocks", NPIX, last_cyc - first_cyc + 1);
        end
      end
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
