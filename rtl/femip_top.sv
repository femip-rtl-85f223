// femip_top: FEMIP, a features extractor and matcher for video-based
// navigation. It takes a stream of 10-bit grey-scale frames packed on a
// 32-bit bus and returns the pairs of corner features that match between
// consecutive frames.
//
//   gaussian_filter  - 7x7 smoothing, one filtered pixel (10.15) per clock;
//                      every filtered pixel is also written to external
//                      memory (em_wr_*), where the matcher later reads it.
//   harris_extractor - Harris R-factor per clock, self-adaptive threshold.
//   features_matcher - features buffer, 3x3 non-max suppression, two-frame
//                      NMS buffer, correlation over 11x11 windows, and the
//                      512-pair matched buffer drained on match_*.
//
// The external frame store is not part of the core: em_wr_* is its write
// port (one word per clock, no backpressure), mem_* its in-order read port.
// Frames carry no framing: the first word after reset starts frame 0 and
// every IMG_W*IMG_H pixels make a frame. cc_thr is the correlation
// acceptance threshold. The status outputs report buffer overflows, frames
// the matcher had to skip, and the end of each matching pass.
module femip_top
  import femip_pkg::*;
#(
  parameter int             IMG_W     = 1024,
  parameter int             IMG_H     = 1024,
  parameter int             TARGET_LO = 256,
  parameter int             TARGET_HI = 1024,
  parameter logic [R_W-1:0] THR_INIT  = R_W'(64'd1 << 30),
  parameter int             FB_DEPTH  = 1024,
  parameter int             MB_DEPTH  = 512
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // packed pixel input bus
  input  logic [31:0]               in_data,
  input  logic                      in_valid,
  output logic                      in_ready,
  // external memory write port (filtered pixels)
  output logic                      em_wr_valid,
  output logic [31:0]               em_wr_data,
  output logic                      em_wr_frame,
  output logic [COORD_W-1:0]        em_wr_x,
  output logic [COORD_W-1:0]        em_wr_y,
  // external memory read port
  output logic                      mem_req_valid,
  input  logic                      mem_req_ready,
  output logic                      mem_req_frame,
  output logic [COORD_W-1:0]        mem_req_x,
  output logic [COORD_W-1:0]        mem_req_y,
  input  logic                      mem_rsp_valid,
  input  logic [31:0]               mem_rsp_data,
  // configuration
  input  logic [SAD_W-1:0]          cc_thr,
  // matched feature pairs
  output logic                      match_valid,
  output match_t                    match_data,
  input  logic                      match_ready,
  // status
  output logic signed [R_W-1:0]     harris_thr,
  output logic                      harris_thr_stable,
  output logic                      fb_overflow,
  output logic                      mb_overflow,
  output logic                      frame_missed,
  output logic                      match_done,
  output logic [$clog2(MB_DEPTH):0] match_count
);
  logic               fp_valid, fp_frame;
  logic [FPIX_W-1:0]  fp_pix;
  logic [COORD_W-1:0] fp_x, fp_y;

  gaussian_filter #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_gauss (
    .clk, .rst_n, .in_data, .in_valid, .in_ready,
    .fp_valid, .fp_pix, .fp_x, .fp_y, .fp_frame,
    .em_wr_valid, .em_wr_data, .em_wr_frame, .em_wr_x, .em_wr_y
  );

  logic     feat_valid, feat_frame, frame_start, frame_end;
  feature_t feat;

  harris_extractor #(
    .IMG_W(IMG_W), .IMG_H(IMG_H), .TARGET_LO(TARGET_LO), .TARGET_HI(TARGET_HI),
    .THR_INIT(THR_INIT)
  ) u_harris (
    .clk, .rst_n, .fp_valid, .fp_pix, .fp_x, .fp_y, .fp_frame,
    .feat_valid, .feat, .feat_frame, .frame_start, .frame_end,
    .thr(harris_thr), .thr_stable(harris_thr_stable)
  );

  features_matcher #(.FB_DEPTH(FB_DEPTH), .MB_DEPTH(MB_DEPTH)) u_matcher (
    .clk, .rst_n, .feat_valid, .feat, .feat_frame, .frame_start, .frame_end,
    .thr_stable(harris_thr_stable), .cc_thr,
    .mem_req_valid, .mem_req_ready, .mem_req_frame, .mem_req_x, .mem_req_y,
    .mem_rsp_valid, .mem_rsp_data,
    .match_valid, .match_data, .match_ready,
    .fb_overflow, .mb_overflow, .frame_missed, .match_done, .match_count
  );
endmodule
