// features_matcher: matches the Harris features of two consecutive frames.
//
// Each frame goes through three phases:
//   collect  - the features of the frame are appended to one of two features
//              buffer banks (the banks alternate between accepted frames);
//   suppress - after the frame end the 3x3 non-max suppressor reads that bank
//              and writes the surviving positions into the NMS-buffer bank
//              chosen by the frame parity, which frees the features bank;
//   match    - if the frame just before was also collected and the adaptive
//              threshold was stable, the correlation controller matches the
//              older NMS bank (frame 1) against the newer one (frame 2),
//              reading the 11x11 windows of filtered pixels from external
//              memory, and pushes the accepted pairs into the 512-entry
//              matched buffer, drained on match_*.
// Collection runs independently of the other two phases, which one engine
// runs in frame order: while frame N is suppressed and matched against N-1,
// frame N+1 is already being collected into the other bank. Streaming frames
// back to back is therefore possible as long as suppression plus matching of
// a frame takes less than a frame time. A frame that starts while its bank
// still holds an unsuppressed frame is skipped (frame_missed pulses), and the
// frame after it is not matched, since its predecessor is lost.
// The two-bank features buffer and this sequencing are this design's choice;
// the original description gives the phases, not how they overlap the input
// stream.
module features_matcher
  import femip_pkg::*;
#(
  parameter int FB_DEPTH  = 1024,
  parameter int NMS_RANGE = 20,
  parameter int MAX_MOVE  = 17,
  parameter int MB_DEPTH  = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // from the Harris extractor
  input  logic                 feat_valid,
  input  feature_t             feat,
  input  logic                 feat_frame,
  input  logic                 frame_start,
  input  logic                 frame_end,
  input  logic                 thr_stable,
  input  logic [SAD_W-1:0]     cc_thr,
  // external memory read port
  output logic                 mem_req_valid,
  input  logic                 mem_req_ready,
  output logic                 mem_req_frame,
  output logic [COORD_W-1:0]   mem_req_x,
  output logic [COORD_W-1:0]   mem_req_y,
  input  logic                 mem_rsp_valid,
  input  logic [31:0]          mem_rsp_data,
  // matched pairs
  output logic                 match_valid,
  output match_t               match_data,
  input  logic                 match_ready,
  // status
  output logic                 fb_overflow,
  output logic                 mb_overflow,
  output logic                 frame_missed,
  output logic                 match_done,
  output logic [$clog2(MB_DEPTH):0] match_count
);
  localparam int A_W = $clog2(FB_DEPTH);
  localparam int C_W = A_W + 1;

  // engine: suppression then matching, one collected frame at a time
  typedef enum logic [2:0] {S_IDLE, S_NMS_GO, S_NMS, S_CORR_GO, S_CORR} state_t;
  state_t state;

  // collector
  logic           coll_q, coll_bank_q, last_ok_q;
  // per features-buffer bank: holds a frame waiting for suppression, and
  // that frame's parity, threshold stability and whether its predecessor
  // was collected
  logic [1:0]     full_q, par_q, stab_q, cons_q;
  logic           eng_bank_q, cur_par_q;
  logic [C_W-1:0] ncnt_q [2];

  // ---- features buffer: two banks --------------------------------------------
  logic [C_W-1:0] fb_count [2], fb_count_sel;
  logic [A_W-1:0] fb_rd_addr;
  feature_t       fb_rd_data [2], fb_rd_sel;
  logic [1:0]     fb_ovf;
  logic           accept;

  // a frame is accepted when the bank it would use holds no unsuppressed frame
  assign accept = frame_start && !full_q[~coll_bank_q];

  for (genvar b = 0; b < 2; b++) begin : g_fb
    features_buffer #(.DEPTH(FB_DEPTH)) u_fb (
      .clk, .rst_n, .clear(accept && (~coll_bank_q) == 1'(b)),
      .wr_valid(feat_valid && coll_q && coll_bank_q == 1'(b)), .wr_data(feat),
      .count(fb_count[b]), .overflow(fb_ovf[b]), .rd_addr(fb_rd_addr), .rd_data(fb_rd_data[b])
    );
  end
  assign fb_overflow  = |fb_ovf;
  assign fb_count_sel = fb_count[eng_bank_q];
  assign fb_rd_sel    = fb_rd_data[eng_bank_q];

  // ---- 3x3 non-max suppressor ----------------------------------------------
  logic           nb_wr_en, nb_wr_bank, nms_done;
  logic [A_W-1:0] nb_wr_addr;
  point_t         nb_wr_data;
  logic [C_W-1:0] nms_count;

  nms_3x3 #(.DEPTH(FB_DEPTH), .RANGE(NMS_RANGE)) u_nms (
    .clk, .rst_n, .start(state == S_NMS_GO), .bank(cur_par_q), .count(fb_count_sel),
    .fb_rd_addr, .fb_rd_data(fb_rd_sel), .nb_wr_en, .nb_wr_bank, .nb_wr_addr, .nb_wr_data,
    .busy(), .done(nms_done), .out_count(nms_count)
  );

  // ---- NMS buffer ------------------------------------------------------------
  logic           rd_bank_a, rd_bank_b;
  logic [A_W-1:0] rd_addr_a, rd_addr_b;
  point_t         rd_data_a, rd_data_b;

  nms_buffer #(.DEPTH(FB_DEPTH)) u_nb (
    .clk, .wr_en(nb_wr_en), .wr_bank(nb_wr_bank), .wr_addr(nb_wr_addr), .wr_data(nb_wr_data),
    .rd_bank_a, .rd_addr_a, .rd_data_a, .rd_bank_b, .rd_addr_b, .rd_data_b
  );

  // ---- correlation controller ------------------------------------------------
  logic   match_push;
  match_t push_data;

  correlation_controller #(.DEPTH(FB_DEPTH), .MAX_MOVE(MAX_MOVE)) u_cc (
    .clk, .rst_n, .start(state == S_CORR_GO), .bank1(~cur_par_q),
    .count1(ncnt_q[~cur_par_q]), .count2(ncnt_q[cur_par_q]), .cc_thr,
    .rd_bank_a, .rd_addr_a, .rd_data_a, .rd_bank_b, .rd_addr_b, .rd_data_b,
    .mem_req_valid, .mem_req_ready, .mem_req_frame, .mem_req_x, .mem_req_y,
    .mem_rsp_valid, .mem_rsp_data,
    .match_push, .match_data(push_data), .busy(), .done(match_done)
  );

  // ---- matched buffer ----------------------------------------------------------
  matched_buffer #(.DEPTH(MB_DEPTH)) u_mb (
    .clk, .rst_n, .push(match_push), .push_data,
    .out_valid(match_valid), .out_data(match_data), .out_ready(match_ready),
    .count(match_count), .overflow(mb_overflow)
  );

  // ---- phase sequencing ---------------------------------------------------------
  assign frame_missed = frame_start && !accept;

  // collector
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      coll_q <= 1'b0; coll_bank_q <= 1'b1; last_ok_q <= 1'b0;
    end else if (frame_start) begin
      coll_q    <= accept;
      last_ok_q <= accept;
      if (accept) coll_bank_q <= ~coll_bank_q;
    end else if (frame_end) begin
      coll_q <= 1'b0;
    end
  end

  // bank bookkeeping and engine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      full_q <= '0; par_q <= '0; stab_q <= '0; cons_q <= '0;
      eng_bank_q <= 1'b0; cur_par_q <= 1'b0;
      ncnt_q[0] <= '0; ncnt_q[1] <= '0;
    end else begin
      if (accept) cons_q[~coll_bank_q] <= last_ok_q;
      if (frame_end && coll_q) begin
        full_q[coll_bank_q] <= 1'b1;
        par_q[coll_bank_q]  <= feat_frame;
        stab_q[coll_bank_q] <= thr_stable;
      end
      case (state)
        S_IDLE: if (full_q[eng_bank_q]) begin
          cur_par_q <= par_q[eng_bank_q];
          state     <= S_NMS_GO;
        end
        S_NMS_GO: state <= S_NMS;
        S_NMS: if (nms_done) begin
          ncnt_q[cur_par_q]    <= nms_count;
          full_q[eng_bank_q]   <= 1'b0;
          eng_bank_q           <= ~eng_bank_q;
          state <= (cons_q[eng_bank_q] && stab_q[eng_bank_q]) ? S_CORR_GO : S_IDLE;
        end
        S_CORR_GO: state <= S_CORR;
        default: if (match_done) state <= S_IDLE; // S_CORR
      endcase
    end
  end
endmodule
