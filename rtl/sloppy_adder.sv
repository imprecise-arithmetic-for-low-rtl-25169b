// sloppy_adder: unsigned N-bit adder that ignores carries in its K low bits.
//
// Bits below position K are formed without any carry: each sum bit is the OR of
// the two operand bits (OR_LOW=1), which halves the worst error compared with
// the XOR (OR_LOW=0), and no carry leaves these bits. Bits K..N-1 form an
// ordinary carry-propagate adder whose carry into position K is 0; its generate
// and propagate signals feed a radix-4 carry-lookahead carry network
// (cla_carry_network), and each sum bit is p[i] ^ c[i]. With K=0 the unit is an
// exact adder. The output carries the carry-out, so s is N+1 bits wide.
//
// The algorithm, the OR variant, the radix-4 lookahead network and the
// defaults N=8, K=4 follow the design description; keeping the carry-out is
// this design's own choice.
// Purely combinational; no clock.
module sloppy_adder #(
  parameter int unsigned N      = 8,  // operand width
  parameter int unsigned K      = 4,  // number of carry-free low bits (K <= N)
  parameter bit          OR_LOW = 1'b1 // 1: low bits a|b, 0: low bits a^b
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   s
);

  logic [N-1:0] g, p;   // generate / propagate per bit
  logic [N:0]   c;      // carry into each position (0 in the sloppy bits)

  assign g = a & b;
  assign p = a ^ b;

  if (K < N) begin : g_precise
    // carry network over bits K..N-1, carry-in 0 at position K
    cla_carry_network #(.W(N - K)) u_cn (
      .g(g[N-1:K]), .p(p[N-1:K]), .cin(1'b0), .c(c[N:K])
    );
  end else begin : g_no_precise
    assign c[N] = 1'b0;
  end
  if (K > 0) begin : g_sloppy_carries
    assign c[K-1:0] = '0;                  // no carry enters or leaves a sloppy bit
  end

  always_comb begin
    for (int i = 0; i < int'(N); i++) begin
      if (i < int'(K)) s[i] = OR_LOW ? (a[i] | b[i]) : p[i];
      else             s[i] = p[i] ^ c[i];
    end
    s[N] = c[N];
  end

endmodule
