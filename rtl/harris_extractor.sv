// harris_extractor: Harris corner detector over the filtered pixel stream,
// producing one R-factor per clock and emitting the positions whose R-factor
// exceeds a self-adaptive threshold.
//
// Pipeline (each stage registered, one sample per clock):
//   1. 3x3 window over the integer part of the filtered pixels;
//   2. central-difference gradients Ix = p(x+1)-p(x-1), Iy = p(y+1)-p(y-1) and
//      the products Ix*Ix, Iy*Iy, Ix*Iy;
//   3. 3x3 window over the three products;
//   4. windowed sums Sxx, Syy, Sxy;
//   5. det = Sxx*Syy - Sxy^2 and k*trace^2 with k = K_NUM / 2^K_SHIFT;
//   6. R = det - k*trace^2;
//   7. threshold compare and output.
// The design fixes the algorithm (Harris), the one-R-per-clock rate and the
// frame-by-frame adaptive threshold. The gradient operator, the 3x3
// summation window, the use of only the 10 integer bits of the filtered pixel
// and k = 3/64 are this design's choices. Features closer than BORDER pixels
// to the image edge are not reported, so that the matcher's 11x11 window
// around every feature lies in the filtered part of the image.
//
// Interface: fp_* is the filtered stream (image coordinates; the first sample
// of a row is at x = 3). feat_valid marks a feature; frame_start and
// frame_end mark the first and last position of each frame at the output
// stage. thr/thr_stable come from the adaptive threshold.
// Timing: the result for a position leaves 7 clocks after the filtered pixel
// two rows below and two columns right of it entered.
module harris_extractor
  import femip_pkg::*;
#(
  parameter int             IMG_W     = 1024,
  parameter int             IMG_H     = 1024,
  parameter int             BORDER    = 8,
  parameter int             K_NUM     = 3,
  parameter int             K_SHIFT   = 6,
  parameter int             TARGET_LO = 256,
  parameter int             TARGET_HI = 1024,
  parameter logic [R_W-1:0] THR_INIT  = R_W'(64'd1 << 30)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  fp_valid,
  input  logic [FPIX_W-1:0]     fp_pix,
  input  logic [COORD_W-1:0]    fp_x,
  input  logic [COORD_W-1:0]    fp_y,
  input  logic                  fp_frame,
  output logic                  feat_valid,
  output feature_t              feat,
  output logic                  feat_frame,
  output logic                  frame_start,
  output logic                  frame_end,
  output logic signed [R_W-1:0] thr,
  output logic                  thr_stable
);
  localparam int H   = KSIZE / 2;          // border removed by the smoothing
  localparam int L   = IMG_W - 2 * H;      // filtered line length
  localparam int G_W = PIX_W + 1;          // gradient
  localparam int P_W = 2 * G_W;            // gradient product (signed)
  localparam int S_W = P_W + 4;            // sum of 9 products (signed)
  localparam int OFF = H + 1;              // stage-3 centre to image coordinate

  // ---- stage 1: pixel window -------------------------------------------
  logic [2:0][2:0][PIX_W-1:0] pw;
  logic                       a_valid, a_frame;
  logic [COORD_W-1:0]         a_c, a_r;

  window3x3 #(.W(PIX_W), .LINE(L)) u_pwin (
    .clk, .rst_n, .in_valid(fp_valid), .in_data(fp_pix[FPIX_W-1 -: PIX_W]),
    .in_c(fp_x - COORD_W'(H)), .in_r(fp_y - COORD_W'(H)), .in_frame(fp_frame),
    .win(pw), .out_valid(a_valid), .out_c(a_c), .out_r(a_r), .out_frame(a_frame)
  );

  // ---- stage 2: gradients and products ---------------------------------
  logic signed [P_W-1:0] b_xx, b_yy, b_xy;
  logic                  b_valid, b_frame;
  logic [COORD_W-1:0]    b_c, b_r;

  logic signed [G_W-1:0] ix, iy;
  assign ix = $signed({1'b0, pw[1][2]}) - $signed({1'b0, pw[1][0]});
  assign iy = $signed({1'b0, pw[2][1]}) - $signed({1'b0, pw[0][1]});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0; b_xx <= '0; b_yy <= '0; b_xy <= '0;
      b_c <= '0; b_r <= '0; b_frame <= 1'b0;
    end else begin
      b_valid <= a_valid;
      b_xx    <= P_W'(ix) * P_W'(ix);
      b_yy    <= P_W'(iy) * P_W'(iy);
      b_xy    <= P_W'(ix) * P_W'(iy);
      // shift to a 0-based raster for the second window
      b_c     <= a_c - 1'b1;
      b_r     <= a_r - 1'b1;
      b_frame <= a_frame;
    end
  end

  // ---- stage 3: product window -----------------------------------------
  logic [2:0][2:0][3*P_W-1:0] qw;
  logic                       c_valid, c_frame;
  logic [COORD_W-1:0]         c_c, c_r;

  window3x3 #(.W(3 * P_W), .LINE(L)) u_qwin (
    .clk, .rst_n, .in_valid(b_valid), .in_data({b_xx, b_yy, b_xy}),
    .in_c(b_c), .in_r(b_r), .in_frame(b_frame),
    .win(qw), .out_valid(c_valid), .out_c(c_c), .out_r(c_r), .out_frame(c_frame)
  );

  // ---- stage 4: windowed sums --------------------------------------------
  logic signed [S_W-1:0] d_sxx, d_syy, d_sxy;
  logic                  d_valid, d_frame;
  logic [COORD_W-1:0]    d_x, d_y;

  logic signed [S_W-1:0] sxx, syy, sxy;
  always_comb begin
    sxx = '0; syy = '0; sxy = '0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        sxx += S_W'($signed(qw[i][j][3*P_W-1 -: P_W]));
        syy += S_W'($signed(qw[i][j][2*P_W-1 -: P_W]));
        sxy += S_W'($signed(qw[i][j][P_W-1:0]));
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0; d_sxx <= '0; d_syy <= '0; d_sxy <= '0;
      d_x <= '0; d_y <= '0; d_frame <= 1'b0;
    end else begin
      d_valid <= c_valid;
      d_sxx <= sxx; d_syy <= syy; d_sxy <= sxy;
      d_x <= c_c + COORD_W'(OFF);
      d_y <= c_r + COORD_W'(OFF);
      d_frame <= c_frame;
    end
  end

  // ---- stage 5: determinant and scaled squared trace --------------------
  logic signed [R_W-1:0] e_det, e_ktr;
  logic                  e_valid, e_frame;
  logic [COORD_W-1:0]    e_x, e_y;

  logic signed [R_W+1:0] tr, tr2;
  assign tr  = (R_W+2)'(d_sxx) + (R_W+2)'(d_syy);
  assign tr2 = tr * tr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      e_valid <= 1'b0; e_det <= '0; e_ktr <= '0;
      e_x <= '0; e_y <= '0; e_frame <= 1'b0;
    end else begin
      e_det   <= R_W'(d_sxx) * R_W'(d_syy) - R_W'(d_sxy) * R_W'(d_sxy);
      e_ktr   <= R_W'((tr2 * (R_W+2)'(K_NUM)) >>> K_SHIFT);
      e_valid <= d_valid;
      e_x <= d_x; e_y <= d_y; e_frame <= d_frame;
    end
  end

  // ---- stage 6: R-factor -------------------------------------------------
  logic signed [R_W-1:0] f_r;
  logic                  f_valid, f_frame;
  logic [COORD_W-1:0]    f_x, f_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f_valid <= 1'b0; f_r <= '0; f_x <= '0; f_y <= '0; f_frame <= 1'b0;
    end else begin
      f_valid <= e_valid;
      f_r     <= e_det - e_ktr;
      f_x <= e_x; f_y <= e_y; f_frame <= e_frame;
    end
  end

  // ---- stage 7: threshold and output ------------------------------------
  logic in_area, pass;
  assign in_area = (f_x >= COORD_W'(BORDER)) && (f_x <= COORD_W'(IMG_W - 1 - BORDER)) &&
                  (f_y >= COORD_W'(BORDER)) && (f_y <= COORD_W'(IMG_H - 1 - BORDER));
  assign pass   = f_valid && in_area && (f_r > thr);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feat_valid <= 1'b0; feat <= '0; feat_frame <= 1'b0;
      frame_start <= 1'b0; frame_end <= 1'b0;
    end else begin
      feat_valid  <= pass;
      feat.x      <= f_x;
      feat.y      <= f_y;
      feat.r      <= f_r;
      feat_frame  <= f_frame;
      frame_start <= f_valid && f_x == COORD_W'(OFF + 1) && f_y == COORD_W'(OFF + 1);
      frame_end   <= f_valid && f_x == COORD_W'(IMG_W - 1 - OFF - 1) &&
                     f_y == COORD_W'(IMG_H - 1 - OFF - 1);
    end
  end

  adaptive_threshold #(
    .TARGET_LO(TARGET_LO), .TARGET_HI(TARGET_HI), .THR_INIT(THR_INIT)
  ) u_thr (
    .clk, .rst_n, .feat_pass(feat_valid), .frame_end, .thr, .stable(thr_stable)
  );
endmodule
