// correlation_controller: finds, for every feature of the older frame
// ("frame 1"), the best-matching feature of the newer frame ("frame 2").
//
// For each frame-1 feature the controller scans the whole frame-2 list. A
// frame-2 feature is a candidate when it lies within MAX_MOVE (17) pixels in x
// and in y, i.e. inside the 35x35 neighbourhood a feature can move across
// between two frames. At the first candidate the 11x11 window of filtered
// pixels around the frame-1 feature is fetched from external memory into the
// patch register. For each candidate the 11x11 window around it in frame 2
// is fetched, and each arriving pixel is compared on the fly with the stored
// one in the computation module (sum of absolute differences). The candidate
// with the lowest sum is kept; if that sum is below 'cc_thr' the pair is
// pushed into the matched buffer, so each frame-1 feature yields at most one
// pair. The patch is fetched only once per frame-1 feature.
//
// External memory read port: a request (mem_req_*) is accepted when
// mem_req_ready is high; responses return in request order on mem_rsp_*, with
// any latency. Window pixel (r, c) of a feature at (x, y) is at image position
// (y-5+r, x-5+c) of the frame with parity mem_req_frame.
// The frame-1 bank is read on NMS-buffer port A, frame-2 on port B.
module correlation_controller
  import femip_pkg::*;
#(
  parameter int DEPTH    = 1024,
  parameter int MAX_MOVE = 17
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      bank1,       // bank / frame parity of frame 1
  input  logic [$clog2(DEPTH):0]    count1,
  input  logic [$clog2(DEPTH):0]    count2,
  input  logic [SAD_W-1:0]          cc_thr,
  // NMS buffer read ports (1-clock latency)
  output logic                      rd_bank_a,
  output logic [$clog2(DEPTH)-1:0]  rd_addr_a,
  input  point_t                    rd_data_a,
  output logic                      rd_bank_b,
  output logic [$clog2(DEPTH)-1:0]  rd_addr_b,
  input  point_t                    rd_data_b,
  // external memory read port
  output logic                      mem_req_valid,
  input  logic                      mem_req_ready,
  output logic                      mem_req_frame,
  output logic [COORD_W-1:0]        mem_req_x,
  output logic [COORD_W-1:0]        mem_req_y,
  input  logic                      mem_rsp_valid,
  input  logic [31:0]               mem_rsp_data,
  // matched buffer push
  output logic                      match_push,
  output match_t                    match_data,
  output logic                      busy,
  output logic                      done
);
  localparam int A_W  = $clog2(DEPTH);
  localparam int C_W  = A_W + 1;
  localparam int NPIX = WIN * WIN;
  localparam int P_W  = $clog2(NPIX);
  localparam int HW   = WIN / 2;

  typedef enum logic [3:0] {
    S_IDLE, S_RD_A, S_CAP_A, S_RD_B, S_CHK_B, S_PATCH, S_CORR, S_CMP, S_NEXT_B, S_END_A, S_DONE
  } state_t;
  state_t state;

  logic [C_W-1:0]   ia_q, ib_q, n1_q, n2_q;
  logic             bank1_q;
  point_t           fa_q, fb_q, best_q;
  logic [SAD_W-1:0] best_sad_q;
  logic             found_q, loaded_q;
  logic [P_W:0]     req_cnt_q, rsp_cnt_q;
  logic [3:0]       req_row_q, req_col_q; // window row/column of the next request
  logic             fetching;


  function automatic logic in_reach(input logic [COORD_W-1:0] a, input logic [COORD_W-1:0] b);
    return (a >= b) ? (a - b <= COORD_W'(MAX_MOVE)) : (b - a <= COORD_W'(MAX_MOVE));
  endfunction

  // ---- datapath ------------------------------------------------------------
  logic [FPIX_W-1:0] patch_pix;
  logic [SAD_W-1:0]  sad;
  logic              rsp_in_patch, rsp_in_corr;

  assign rsp_in_patch = (state == S_PATCH) && mem_rsp_valid;
  assign rsp_in_corr  = (state == S_CORR)  && mem_rsp_valid;

  patch_register #(.N(NPIX)) u_patch (
    .clk, .wr_en(rsp_in_patch), .wr_idx(rsp_cnt_q[P_W-1:0]),
    .wr_data(mem_rsp_data[FPIX_W-1:0]), .rd_idx(rsp_cnt_q[P_W-1:0]), .rd_data(patch_pix)
  );

  correlation_compute u_comp (
    .clk, .rst_n, .clear(state == S_CHK_B), .en(rsp_in_corr),
    .a(patch_pix), .b(mem_rsp_data[FPIX_W-1:0]), .acc(sad)
  );

  // ---- request generation -------------------------------------------------
  assign fetching      = (state == S_PATCH) || (state == S_CORR);
  assign mem_req_valid = fetching && (req_cnt_q < (P_W+1)'(NPIX));
  assign mem_req_frame = (state == S_PATCH) ? bank1_q : ~bank1_q;
  assign mem_req_x     = ((state == S_PATCH) ? fa_q.x : fb_q.x) - COORD_W'(HW) + COORD_W'(req_col_q);
  assign mem_req_y     = ((state == S_PATCH) ? fa_q.y : fb_q.y) - COORD_W'(HW) + COORD_W'(req_row_q);

  assign rd_bank_a = bank1_q;
  assign rd_addr_a = ia_q[A_W-1:0];
  assign rd_bank_b = ~bank1_q;
  assign rd_addr_b = ib_q[A_W-1:0];

  assign match_push = (state == S_END_A) && found_q && (best_sad_q < cc_thr);
  assign match_data = '{p1: fa_q, p2: best_q, score: best_sad_q};
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ia_q <= '0; ib_q <= '0; n1_q <= '0; n2_q <= '0; bank1_q <= 1'b0;
      fa_q <= '0; fb_q <= '0; best_q <= '0; best_sad_q <= '0;
      found_q <= 1'b0; loaded_q <= 1'b0; req_cnt_q <= '0; rsp_cnt_q <= '0;
      req_row_q <= '0; req_col_q <= '0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (mem_req_valid && mem_req_ready) begin
        req_cnt_q <= req_cnt_q + 1'b1;
        if (req_col_q == 4'(WIN - 1)) begin
          req_col_q <= '0;
          req_row_q <= req_row_q + 1'b1;
        end else begin
          req_col_q <= req_col_q + 1'b1;
        end
      end
      if (fetching && mem_rsp_valid)      rsp_cnt_q <= rsp_cnt_q + 1'b1;
      case (state)
        S_IDLE: if (start) begin
          bank1_q <= bank1;
          n1_q    <= count1;
          n2_q    <= count2;
          ia_q    <= '0;
          state   <= (count1 == '0 || count2 == '0) ? S_DONE : S_RD_A;
        end
        S_RD_A:  state <= S_CAP_A;
        S_CAP_A: begin
          fa_q     <= rd_data_a;
          found_q  <= 1'b0;
          loaded_q <= 1'b0;
          best_sad_q <= '1;
          ib_q     <= '0;
          state    <= S_RD_B;
        end
        S_RD_B:  state <= S_CHK_B;
        S_CHK_B: begin
          fb_q      <= rd_data_b;
          req_cnt_q <= '0; req_row_q <= '0; req_col_q <= '0;
          rsp_cnt_q <= '0;
          if (in_reach(rd_data_b.x, fa_q.x) && in_reach(rd_data_b.y, fa_q.y))
            state <= loaded_q ? S_CORR : S_PATCH;
          else
            state <= S_NEXT_B;
        end
        S_PATCH: if (mem_rsp_valid && rsp_cnt_q == (P_W+1)'(NPIX - 1)) begin
          loaded_q  <= 1'b1;
          req_cnt_q <= '0; req_row_q <= '0; req_col_q <= '0;
          rsp_cnt_q <= '0;
          state     <= S_CORR;
        end
        S_CORR: if (mem_rsp_valid && rsp_cnt_q == (P_W+1)'(NPIX - 1)) state <= S_CMP;
        S_CMP: begin
          if (sad < best_sad_q) begin
            best_sad_q <= sad;
            best_q     <= fb_q;
          end
          found_q <= 1'b1;
          state   <= S_NEXT_B;
        end
        S_NEXT_B: begin
          ib_q  <= ib_q + 1'b1;
          state <= (ib_q + 1'b1 == n2_q) ? S_END_A : S_RD_B;
        end
        S_END_A: begin
          ia_q  <= ia_q + 1'b1;
          state <= (ia_q + 1'b1 == n1_q) ? S_DONE : S_RD_A;
        end
        default: begin // S_DONE
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end
endmodule
