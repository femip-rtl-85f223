// adaptive_threshold: frame-by-frame self-adaptive threshold for the Harris
// R-factor.
//
// The threshold used for a frame is derived from the frame before it. During
// a frame the block counts the features that passed the threshold; at the
// frame end it doubles the threshold if more than TARGET_HI features passed,
// halves it (not below 1) if fewer than TARGET_LO passed, and otherwise keeps
// it. Because each step is a factor of two, a start value that is off by a
// factor of 2^k settles in about k frames. 'stable' is high while the
// threshold used for the current frame equals the one used for the previous
// frame; the matcher only trusts features from such frame pairs. The doubling
// and halving rule and the target band are this design's choice: the design
// states only that the threshold is computed for the next frame from
// information about the current one.
// Timing: thr and stable change in the clock after frame_end.
module adaptive_threshold
  import femip_pkg::*;
#(
  parameter int             TARGET_LO = 256,
  parameter int             TARGET_HI = 1024,
  parameter logic [R_W-1:0] THR_INIT  = R_W'(64'd1 << 30)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   feat_pass,   // a feature passed this frame
  input  logic                   frame_end,   // last position of the frame
  output logic signed [R_W-1:0]  thr,
  output logic                   stable
);
  localparam int CNT_W = 24;
  localparam logic [R_W-1:0] THR_MAX = {2'b00, {(R_W-2){1'b1}}};

  logic [CNT_W-1:0] cnt_q;
  logic [R_W-1:0]   thr_q;
  logic             changed_q;
  logic             seen_q;     // at least one frame has ended

  assign thr    = thr_q;
  assign stable = seen_q && !changed_q;

  // features of the frame, including one passing in the frame_end clock
  logic [CNT_W-1:0] n;
  assign n = cnt_q + CNT_W'(feat_pass);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      thr_q <= THR_INIT;
      changed_q <= 1'b1;
      seen_q <= 1'b0;
    end else if (frame_end) begin
      cnt_q  <= '0;
      seen_q <= 1'b1;
      if (n > CNT_W'(TARGET_HI) && thr_q <= (THR_MAX >> 1)) begin
        thr_q <= thr_q << 1;
        changed_q <= 1'b1;
      end else if (n < CNT_W'(TARGET_LO) && thr_q > 1) begin
        thr_q <= thr_q >> 1;
        changed_q <= 1'b1;
      end else begin
        changed_q <= 1'b0;
      end
    end else if (feat_pass && cnt_q != '1) begin
      cnt_q <= cnt_q + 1'b1;
    end
  end
endmodule
