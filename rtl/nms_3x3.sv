// nms_3x3: 3x3 non-maximum suppression over the features of one frame.
//
// After a frame has been stored in the features buffer, 'start' makes the
// block visit every feature i and compare it with the features stored at
// buffer positions i-RANGE .. i+RANGE only. Features are stored row by row and
// a row holds few of them, so every feature within one pixel of feature i lies
// in that slice of the buffer (the design bounds it at 20 positions either
// side). Feature i is suppressed if a neighbour within one pixel in x and y
// has a higher R-factor, or an equal one and an earlier position (this tie
// rule is this design's choice). Surviving features are written, positions
// only, into the NMS buffer bank 'bank', packed from address 0; 'done' pulses
// with the number written in 'out_count'.
// Timing: 4 clocks per feature plus one per buffer position in its search
// slice (itself included), plus 2 clocks to start and finish.
module nms_3x3
  import femip_pkg::*;
#(
  parameter int DEPTH = 1024,
  parameter int RANGE = 20
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      bank,
  input  logic [$clog2(DEPTH):0]    count,
  // features buffer read port (1-clock latency)
  output logic [$clog2(DEPTH)-1:0]  fb_rd_addr,
  input  feature_t                  fb_rd_data,
  // NMS buffer write port
  output logic                      nb_wr_en,
  output logic                      nb_wr_bank,
  output logic [$clog2(DEPTH)-1:0]  nb_wr_addr,
  output point_t                    nb_wr_data,
  output logic                      busy,
  output logic                      done,
  output logic [$clog2(DEPTH):0]    out_count
);
  localparam int A_W = $clog2(DEPTH);
  localparam int C_W = A_W + 1;

  typedef enum logic [2:0] {S_IDLE, S_RD_I, S_CAP_I, S_SCAN, S_DECIDE, S_DONE} state_t;
  state_t state;

  logic [C_W-1:0] n_q, i_q, j_q, hi_q, pj_q, ocnt_q;
  logic           pv_q, sup_q, bank_q;
  feature_t       fi_q;

  function automatic logic near(input logic [COORD_W-1:0] a, input logic [COORD_W-1:0] b);
    return (a == b) || (a == b + 1'b1) || (b == a + 1'b1);
  endfunction

  assign busy = (state != S_IDLE);

  always_comb begin
    fb_rd_addr = (state == S_RD_I) ? i_q[A_W-1:0] : j_q[A_W-1:0];
    nb_wr_en   = (state == S_DECIDE) && !sup_q;
    nb_wr_bank = bank_q;
    nb_wr_addr = ocnt_q[A_W-1:0];
    nb_wr_data = '{x: fi_q.x, y: fi_q.y};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      n_q <= '0; i_q <= '0; j_q <= '0; hi_q <= '0; pj_q <= '0; ocnt_q <= '0;
      pv_q <= 1'b0; sup_q <= 1'b0; bank_q <= 1'b0; fi_q <= '0;
      done <= 1'b0; out_count <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          n_q    <= count;
          bank_q <= bank;
          i_q    <= '0;
          ocnt_q <= '0;
          state  <= (count == '0) ? S_DONE : S_RD_I;
        end
        S_RD_I: begin
          j_q   <= (i_q >= C_W'(RANGE)) ? i_q - C_W'(RANGE) : '0;
          hi_q  <= (i_q + C_W'(RANGE) < n_q) ? i_q + C_W'(RANGE) : n_q - 1'b1;
          sup_q <= 1'b0;
          state <= S_CAP_I;
        end
        S_CAP_I: begin
          fi_q  <= fb_rd_data;
          pv_q  <= 1'b1;
          pj_q  <= j_q;
          j_q   <= j_q + 1'b1;
          state <= S_SCAN;
        end
        S_SCAN: begin
          if (pv_q && pj_q != i_q && near(fb_rd_data.x, fi_q.x) && near(fb_rd_data.y, fi_q.y) &&
              (fb_rd_data.r > fi_q.r || (fb_rd_data.r == fi_q.r && pj_q < i_q)))
            sup_q <= 1'b1;
          if (j_q <= hi_q) begin
            pv_q <= 1'b1;
            pj_q <= j_q;
            j_q  <= j_q + 1'b1;
          end else begin
            pv_q <= 1'b0;
            if (!pv_q) state <= S_DECIDE;
          end
        end
        S_DECIDE: begin
          if (!sup_q) ocnt_q <= ocnt_q + 1'b1;
          i_q   <= i_q + 1'b1;
          state <= (i_q + 1'b1 == n_q) ? S_DONE : S_RD_I;
        end
        default: begin // S_DONE
          done      <= 1'b1;
          out_count <= ocnt_q;
          state     <= S_IDLE;
        end
      endcase
    end
  end
endmodule
