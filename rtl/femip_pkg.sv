// femip_pkg: widths, record types and the default smoothing kernel shared by
// the FEMIP feature extractor and matcher.
//
// Pixels enter as 10-bit grey levels. The smoothing kernel coefficients are
// unsigned 0.15 fixed point, so a filtered pixel is 10.15 fixed point (25 bits),
// as the design specifies. Coordinates are 10 bits, enough for the 1024x1024
// frames the core is built for. The Harris response width (R_W) and the
// 7x7 binomial approximation of the Gaussian are this design's own choices:
// the kernel coefficients are (C(6,i)*C(6,j))/4096, scaled to 0.15 format, so
// they sum to exactly 1.0 and a filtered pixel never exceeds 1023.0.
package femip_pkg;

  localparam int PIX_W   = 10;   // input pixel width
  localparam int KER_W   = 15;   // kernel coefficient, 0.15 fixed point
  localparam int FPIX_W  = 25;   // filtered pixel, 10.15 fixed point
  localparam int COORD_W = 10;   // pixel coordinate
  localparam int R_W     = 50;   // signed Harris R-factor
  localparam int KSIZE   = 7;    // smoothing kernel is KSIZE x KSIZE
  localparam int WIN     = 11;   // correlation window is WIN x WIN
  localparam int SAD_W   = 32;   // correlation accumulator

  typedef logic [KSIZE*KSIZE-1:0][KER_W-1:0] kernel_t;

  // One extracted feature: position in the original image and its R-factor.
  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic signed [R_W-1:0] r;
  } feature_t;

  // A feature that survived non-maximum suppression: only its position is kept.
  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
  } point_t;

  // A matched pair: a feature of the older frame and its match in the newer one.
  typedef struct packed {
    point_t     p1;
    point_t     p2;
    logic [SAD_W-1:0] score;
  } match_t;

  function automatic int binom6(input int i);
    case (i)
      0, 6:    return 1;
      1, 5:    return 6;
      2, 4:    return 15;
      default: return 20;
    endcase
  endfunction

  // Default kernel: entry i*7+j multiplies the window pixel in row i, column j.
  function automatic kernel_t binomial_kernel();
    kernel_t k;
    for (int i = 0; i < KSIZE; i++)
      for (int j = 0; j < KSIZE; j++)
        k[i*KSIZE+j] = KER_W'(binom6(i) * binom6(j) * 8);
    return k;
  endfunction

endpackage
