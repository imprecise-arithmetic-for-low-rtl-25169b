// sloppy_pkg: types and constants shared by the imprecise image-processing blocks.
//
// It holds the filter-mode encoding used by the 3x3 image filter, the multiplier
// scheme selector used by the radix-4 multiplier, and the fixed-point cosine
// table of the 8x8 inverse DCT. The three filter modes (smoothing, sharpening,
// edge detection) are the ones the design is evaluated with; their 2-bit
// encoding is this design's own choice. The IDCT coefficients are computed
// here from eight integer constants, round(1024*cos(k*pi/16)) for k = 0..8,
// so that no table file is needed.
package sloppy_pkg;

  typedef enum logic [1:0] {
    FILT_SMOOTH  = 2'd0,  // averaging (low-pass)
    FILT_SHARPEN = 2'd1,  // sharpening
    FILT_EDGE    = 2'd2,  // edge detection (Laplacian magnitude)
    FILT_PASS    = 2'd3   // centre pixel unchanged
  } filt_mode_e;

  // Fixed-point format of the IDCT basis: A[i][u] = round(2^11 * c(u)/2 *
  // cos((2i+1)*u*pi/16)), c(0) = 1/sqrt(2), c(u>0) = 1. Fits 12-bit signed.
  localparam int IDCT_COEF_FRAC = 11;

  // round(1024*cos(k*pi/16)), k = 0..8
  function automatic int cos1024(input int k);
    case (k)
      0: return 1024;  1: return 1004;  2: return 946;
      3: return 851;   4: return 724;   5: return 569;
      6: return 392;   7: return 200;   default: return 0;
    endcase
  endfunction

  // Basis coefficient A[i][u] in Q11 (12-bit signed).
  function automatic logic signed [11:0] idct_coef(input int i, input int u);
    int m;
    if (u == 0) return 12'sd724;             // 2048 * (1/sqrt2) / 2
    m = ((2*i + 1) * u) % 32;                 // angle in units of pi/16
    if (m > 16) m = 32 - m;                   // cos(2pi - a) = cos(a)
    if (m > 8) return -12'(cos1024(16 - m));  // cos(pi - a) = -cos(a)
    return 12'(cos1024(m));
  endfunction

endpackage
