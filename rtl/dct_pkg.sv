// dct_pkg: constants and types shared by the content-dependent DA-based DCT.
//
// The 1-D 8-point DCT is Y(k) = (c_k/2) * sum_n x(n) cos((2n+1)k*pi/16), with
// c_0 = 1/sqrt(2) and c_k = 1 otherwise. Its matrix entries are written
// a..g: a = cos(pi/4)/2, b = cos(pi/16)/2, c = cos(2pi/16)/2, d = cos(3pi/16)/2,
// e = cos(5pi/16)/2, f = cos(6pi/16)/2, g = cos(7pi/16)/2.
// The whole matrix is scaled by 1/a, so every core produces Y(k)/a. DC and
// AC4 then need only additions, and the other entries become the constants
// below, held as fixed point with COEF_FRAC fractional bits:
//   K_x = round(2^COEF_FRAC * x / a).
// After both passes an output equals 8 times the orthonormal 2-D DCT value,
// because a*a = 1/8. The scaling by 1/a follows the document. The bit
// widths, the fixed-point precision and the enum encoding are this design's
// choices.
package dct_pkg;

  // Fractional bits of the scaled coefficients in the RAC ROMs.
  localparam int COEF_FRAC = 12;

  // round(4096 * cos(k*pi/16) / cos(pi/4)) for k = 1,2,3,5,6,7
  localparam int K_B = 5681;  // b/a
  localparam int K_C = 5352;  // c/a
  localparam int K_D = 4816;  // d/a
  localparam int K_E = 3218;  // e/a
  localparam int K_F = 2217;  // f/a
  localparam int K_G = 1130;  // g/a

  // Bit-serial budget: one bit per cycle, eight cycles per 8-point vector.
  localparam int MAX_BITS = 8;

  // Macroblock coding mode that selects the classifier's threshold set.
  typedef enum logic {
    MB_INTRA = 1'b0,
    MB_INTER = 1'b1
  } mb_mode_e;

  // Width of the H.263 quantiser parameter (1..31).
  localparam int QP_W = 5;

  // Threshold table of one classifier group: three rising thresholds, in
  // units of QP, that separate the four classes.
  typedef logic [2:0][7:0] th_set_t;

  // Maximum bits per class, class 0 .. 3 (index 0 is the least active).
  typedef logic [3:0][3:0] class_bits_t;

  // Per-vector record of what the content-dependent control decided: the
  // class of each group, its effective width and the bits it processed.
  typedef struct packed {
    logic [1:0] cls_even;
    logic [1:0] cls_odd;
    logic [4:0] w_even;
    logic [4:0] w_odd;
    logic [3:0] n_even;
    logic [3:0] n_odd;
  } vec_stat_t;

endpackage
