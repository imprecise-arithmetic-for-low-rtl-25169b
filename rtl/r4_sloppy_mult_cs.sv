// r4_sloppy_mult_cs: N x N two's-complement radix-4 multiplier array with
// optional sloppy rows or sloppy columns, ending in carry-save form.
//
// The multiplier y is split into N/2 radix-4 digits; row k is generated by a
// booth_rec_ppgen from {y[2k+1], y[2k], y[2k-1]} and weighs 4^k.
//   * sloppy-rows: the SLOPPY_ROWS least-significant rows are sloppy rows
//     (digit 0 -> 0, digits 1, 2, 3 -> 2x). They read their digits as unsigned,
//     so the first error-free row above them is fed y[2k-1] = 0; with that, the
//     array is exact whenever every sloppy digit is 0 or 2.
//   * sloppy-cols: the SLOPPY_COLS least-significant product columns hold sloppy
//     bits: row k gets max(0, SLOPPY_COLS - 2k) sloppy low bits.
// Each row is sign-extended to OUT_W bits (the sign-extension method is not
// part of the design description; plain sign extension is used) and the rows,
// plus one vector of correction bits, are reduced without carry propagation by
// a chain of 3:2 carry-save adders to two operands, sum and carry, whose sum
// modulo 2^OUT_W is the (approximate) product. No final adder is included here.
// SLOPPY_ROWS=0 and SLOPPY_COLS=0 give the exact radix-4 multiplier.
// The defaults, 12 x 12 bits with two sloppy rows, are the configuration used
// for the IDCT. Combinational.
module r4_sloppy_mult_cs #(
  parameter int unsigned N           = 12,      // operand width (even)
  parameter int unsigned SLOPPY_ROWS = 2,       // sloppy rows (0..N/2)
  parameter int unsigned SLOPPY_COLS = 0,       // sloppy columns (0..2N)
  parameter int unsigned OUT_W       = 2*N      // width of the carry-save result
) (
  input  logic [N-1:0]     x,     // multiplicand, two's complement
  input  logic [N-1:0]     y,     // multiplier, two's complement
  output logic [OUT_W-1:0] ps,    // carry-save sum
  output logic [OUT_W-1:0] pc     // carry-save carry (already weighted)
);

  localparam int unsigned R = N / 2;  // number of partial-product rows

  logic [N:0]       pp  [R];
  logic [R-1:0]     neg;
  logic [OUT_W-1:0] ops [R+1];

  for (genvar k = 0; k < R; k++) begin : g_row
    localparam bit          RS = (k < SLOPPY_ROWS);
    localparam int unsigned SB = (SLOPPY_COLS > 2*k) ?
                                 ((SLOPPY_COLS - 2*k > N + 1) ? N + 1 : SLOPPY_COLS - 2*k) : 0;
    logic [2:0] yb;
    if (k == 0) begin : g_first
      assign yb = {y[1], y[0], 1'b0};
    end else if (k == SLOPPY_ROWS) begin : g_after_sloppy
      assign yb = {y[2*k+1], y[2*k], 1'b0};       // lower digits read as unsigned
    end else begin : g_booth
      assign yb = {y[2*k+1], y[2*k], y[2*k-1]};
    end
    booth_rec_ppgen #(.N(N), .ROW_SLOPPY(RS), .SLOPPY_BITS(SB)) u_pp (
      .ybits(yb), .x(x), .pp(pp[k]), .neg_out(neg[k])
    );
  end

  // Align the rows, sign-extend them, and collect the correction bits.
  always_comb begin
    for (int k = 0; k < int'(R); k++) begin
      ops[k] = OUT_W'($signed(pp[k])) << (2*k);
    end
    ops[R] = '0;
    for (int k = 0; k < int'(R); k++) ops[R][2*k] = neg[k];
  end

  // Carry-free reduction: a chain of 3:2 carry-save adders.
  always_comb begin
    logic [OUT_W-1:0] s, c, t;
    s = ops[0];
    c = ops[1];
    for (int i = 2; i <= int'(R); i++) begin
      t = s ^ c ^ ops[i];
      c = ((s & c) | (s & ops[i]) | (c & ops[i])) << 1;
      s = t;
    end
    ps = s;
    pc = c;
  end

endmodule
