// sloppy_ref_pkg: word-level reference models of the imprecise operators, used
// by the testbenches to compute expected values independently of the RTL.
//
//   ref_sloppy_add : ((a >> k) + (b >> k)) << k | ((a | b) mod 2^k)
//   ref_booth_row  : value of one radix-4 partial-product row (error-free,
//                    whole-row sloppy, or with b sloppy low bits)
//   ref_mult       : the N x N radix-4 product for a given number of sloppy rows
//                    and sloppy columns, summed row by row in integer arithmetic
package sloppy_ref_pkg;

  function automatic longint ref_sloppy_add(longint a, longint b, int k);
    return (((a >> k) + (b >> k)) << k) | ((a | b) & ((longint'(1) << k) - 1));
  endfunction

  // Sign-extend the low w bits of v.
  function automatic longint sext(longint v, int w);
    longint m = (longint'(1) << w) - 1;
    v = v & m;
    if ((v >> (w - 1)) & 1) v = v - (longint'(1) << w);
    return v;
  endfunction

  // One row: y3 = {y2k+1, y2k, y2k-1}, x signed n-bit value.
  function automatic longint ref_booth_row(int y3, longint x, int n, bit row_sloppy, int sbits);
    int     d;
    longint mag, booth_bits, sl_bits, bits, mask, w;
    bit     neg, sl;
    w   = n + 1;
    mask = (longint'(1) << w) - 1;
    case (y3)
      0, 7: d = 0;  1, 2: d = 1;  3: d = 2;  4: d = -2;  default: d = -1;  // 5, 6
    endcase
    neg = (y3 >> 2) & 1;
    sl  = ((y3 >> 1) & 3) != 0;
    mag = (d < 0 ? -d : d) * x;
    booth_bits = (neg ? ~mag : mag) & mask;
    sl_bits    = (sl ? 2 * x : 0) & mask;
    if (row_sloppy) return sext(sl_bits, w);
    if (sbits == 0) return sext(booth_bits, w) + longint'(neg);
    bits = (booth_bits & ~((longint'(1) << sbits) - 1)) | (sl_bits & ((longint'(1) << sbits) - 1));
    return sext(bits, w);
  endfunction

  // Product of n-bit signed x and y (values), given sloppy rows / columns.
  function automatic longint ref_mult(longint x, longint y, int n, int srows, int scols);
    longint acc = 0, yu;
    yu = y & ((longint'(1) << n) - 1);
    for (int k = 0; k < n / 2; k++) begin
      int y3, sb;
      y3 = int'((yu >> (2 * k)) & 3) << 1;
      if (k > 0 && k != srows) y3 = y3 | int'((yu >> (2 * k - 1)) & 1);
      sb = scols - 2 * k;
      if (sb < 0) sb = 0;
      if (sb > n + 1) sb = n + 1;
      acc += ref_booth_row(y3, x, n, k < srows, sb) << (2 * k);
    end
    return acc;
  endfunction

  // 3x3 kernel: w[0..8] raster order, mode 0 smooth, 1 sharpen, 2 edge,
  // 3 pass; k sloppy bits; the tree order is ((s0+s1)+(s2+s3))+((s4+s5)+(s6+s7)), +s8.
  function automatic int ref_filter(int w[9], int mode, int k);
    longint s[9], a0, a1, a2, a3, b0, b1, c0, t, d;
    for (int i = 0; i < 9; i++) s[i] = 0;
    case (mode)
      0: begin
        s[0] = w[0]; s[1] = 2*w[1]; s[2] = w[2]; s[3] = 2*w[3]; s[4] = 4*w[4];
        s[5] = 2*w[5]; s[6] = w[6]; s[7] = 2*w[7]; s[8] = w[8];
      end
      1: begin s[0] = w[1]; s[1] = w[3]; s[2] = w[5]; s[3] = w[7]; end
      2: begin
        s[0] = w[0]; s[1] = w[1]; s[2] = w[2]; s[3] = w[3];
        s[4] = w[5]; s[5] = w[6]; s[6] = w[7]; s[7] = w[8];
      end
      default: ;
    endcase
    a0 = ref_sloppy_add(s[0], s[1], k); a1 = ref_sloppy_add(s[2], s[3], k);
    a2 = ref_sloppy_add(s[4], s[5], k); a3 = ref_sloppy_add(s[6], s[7], k);
    b0 = ref_sloppy_add(a0, a1, k);     b1 = ref_sloppy_add(a2, a3, k);
    c0 = ref_sloppy_add(b0, b1, k);     t  = ref_sloppy_add(c0, s[8], k);
    case (mode)
      0: return int'(t >> 4);
      1: begin
        d = ref_sloppy_add(4 * w[4], w[4], k) - t;
        return (d < 0) ? 0 : (d > 255) ? 255 : int'(d);
      end
      2: begin
        d = 8 * w[4] - t;
        if (d < 0) d = -d;
        return (d > 255) ? 255 : int'(d);
      end
      default: return w[4];
    endcase
  endfunction

  typedef int blk_t [8][8];

  // IDCT basis A[i][u] = round(2048 * c(u)/2 * cos((2i+1) u pi / 16)).
  function automatic longint ref_idct_coef(int i, int u);
    real c;
    c = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    return longint'($rtoi($floor(2048.0 * c / 2.0 * $cos((2 * i + 1) * u * 3.14159265358979 / 16.0) + 0.5)));
  endfunction

  // Fixed-point row-column IDCT of the design: G in Q2 saturated to 12 bits,
  // pixels rounded, level-shifted by 128 and clamped; products by ref_mult.
  function automatic blk_t ref_idct(blk_t F, int srows);
    longint G [8][8];
    longint acc;
    blk_t   px;
    for (int i = 0; i < 8; i++)
      for (int v = 0; v < 8; v++) begin
        acc = 0;
        for (int u = 0; u < 8; u++) acc += ref_mult(ref_idct_coef(i, u), longint'(F[u][v]), 12, srows, 0);
        acc = (acc + 256) >>> 9;
        G[i][v] = (acc > 2047) ? 2047 : (acc < -2048) ? -2048 : acc;
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        acc = 0;
        for (int v = 0; v < 8; v++) acc += ref_mult(ref_idct_coef(j, v), G[i][v], 12, srows, 0);
        acc = ((acc + 4096) >>> 13) + 128;
        px[i][j] = (acc > 255) ? 255 : (acc < 0) ? 0 : int'(acc);
      end
    return px;
  endfunction

endpackage
