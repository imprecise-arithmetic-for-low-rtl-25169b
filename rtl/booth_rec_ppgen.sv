// booth_rec_ppgen: radix-4 recoder and partial-product generator for one
// multiplier digit (one row of the multiplier array).
//
// Inputs are the three multiplier bits {y[2k+1], y[2k], y[2k-1]} and the N-bit
// two's-complement multiplicand x. The row is N+1 bits, pp[N] being its sign,
// and its value is signed(pp) + neg_out.
//   Error-free row (Booth): one = y2k ^ y2k-1, two = the digit is +-2,
//     neg = y2k+1; pp[j] = ((one & x[j]) | (two & x[j-1])) ^ neg, with x[-1] = 0
//     and x[N] = x[N-1]; neg_out = neg is the two's-complement correction bit.
//   Sloppy row (ROW_SLOPPY=1): the digit (y2k+1, y2k) is read as an unsigned
//     radix-4 digit and every non-zero digit 1, 2, 3 becomes 2, so the row is
//     2x or 0: pp[j] = sloppy & x[j-1], pp[0] = 0, sloppy = y2k+1 | y2k. y2k-1 is
//     unused and there is no negation and no correction bit.
//   Sloppy columns (SLOPPY_BITS=b > 0): bits j < b of an otherwise error-free
//     row are generated the sloppy way (sloppy & x[j-1]), the others the Booth
//     way; the correction bit, which sits in bit 0, is dropped.
// The three forms and the recoding table follow the design description; the
// dropping of the correction bit inside sloppy columns is this design's reading
// of it. Combinational.
module booth_rec_ppgen #(
  parameter int unsigned N           = 12,   // multiplicand width
  parameter bit          ROW_SLOPPY  = 1'b0, // whole row sloppy
  parameter int unsigned SLOPPY_BITS = 0     // sloppy low bits of the row (0..N+1)
) (
  input  logic [2:0]   ybits,   // {y[2k+1], y[2k], y[2k-1]}
  input  logic [N-1:0] x,       // multiplicand, two's complement
  output logic [N:0]   pp,      // partial product row, pp[N] is the sign
  output logic         neg_out  // correction bit, weight of pp[0]
);

  logic one, two, neg, sloppy;
  logic [N+1:0] xe;  // xe[j+1] = x[j]; xe[0] = x[-1] = 0; xe[N+1] = x[N] = x[N-1]

  always_comb begin
    one    = ybits[1] ^ ybits[0];
    two    = (ybits[2] & ~ybits[1] & ~ybits[0]) | (~ybits[2] & ybits[1] & ybits[0]);
    neg    = ybits[2];
    sloppy = ybits[2] | ybits[1];
    xe     = {x[N-1], x, 1'b0};
    for (int j = 0; j <= int'(N); j++) begin
      if (ROW_SLOPPY || j < int'(SLOPPY_BITS))
        pp[j] = sloppy & xe[j];                               // bit j of 2x
      else
        pp[j] = ((one & xe[j+1]) | (two & xe[j])) ^ neg;      // Booth bit
    end
    neg_out = (ROW_SLOPPY || SLOPPY_BITS > 0) ? 1'b0 : neg;
  end

endmodule
