// splitter: unpacks the 32-bit input bus into the original 10-bit pixel flow.
//
// Pixels arrive tightly packed with no padding or control bits, so 16 pixels
// occupy exactly 5 bus words and a pixel may straddle two words. The splitter
// keeps a 64-bit bit reservoir: a bus word is accepted (in_ready) whenever at
// most 32 bits are waiting, and a pixel is emitted whenever at least 10 bits
// are waiting, one pixel per clock. The first pixel of the stream sits in the
// least significant bits of the first word (this bit order is this design's
// choice). The pixel output has no backpressure: the downstream filter takes
// one pixel every clock, and the splitter is the rate limiter of the core.
// Timing: a pixel appears one clock after the word that completes it.
module splitter
  import femip_pkg::*;
#(
  parameter int BUS_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [BUS_W-1:0] in_data,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [PIX_W-1:0] pix_data,
  output logic             pix_valid
);
  localparam int RES_W = 2 * BUS_W;
  localparam int CNT_W = $clog2(RES_W + 1);

  logic [RES_W-1:0] res_q;
  logic [CNT_W-1:0] cnt_q;

  assign in_ready = (cnt_q <= CNT_W'(BUS_W));

  logic             emit;
  logic [RES_W-1:0] res_d;
  logic [CNT_W-1:0] cnt_d;

  // emit a pixel from the bottom of the reservoir, then append the new word
  // above the bits that remain
  always_comb begin
    emit  = (cnt_q >= CNT_W'(PIX_W));
    res_d = emit ? res_q >> PIX_W : res_q;
    cnt_d = emit ? cnt_q - CNT_W'(PIX_W) : cnt_q;
    if (in_valid && in_ready) begin
      res_d = res_d | (RES_W'(in_data) << cnt_d);
      cnt_d = cnt_d + CNT_W'(BUS_W);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_q     <= '0;
      cnt_q     <= '0;
      pix_valid <= 1'b0;
      pix_data  <= '0;
    end else begin
      res_q     <= res_d;
      cnt_q     <= cnt_d;
      pix_valid <= emit;
      if (emit) pix_data <= res_q[PIX_W-1:0];
    end
  end
endmodule
