// cla_carry_network: radix-4 carry-lookahead carry network for W bits.
//
// Inputs are the per-bit generate g[i] = a[i] & b[i] and propagate
// p[i] = a[i] ^ b[i] and the carry-in; the outputs are the carries into every
// bit position, c[0] = cin .. c[W] = carry-out.
// The network is built in levels of groups of four. Going up, every level forms
// the group generate and propagate of four groups of the level below,
//   G = g3 | p3 g2 | p3 p2 g1 | p3 p2 p1 g0,   P = p3 p2 p1 p0,
// until one group covers all bits. Going down, the carry into each group is
// spread to its four sub-groups by the same lookahead expressions,
//   c1 = g0 | p0 c0, c2 = g1 | p1 g0 | p1 p0 c0, c3 = ..., 
// so every carry passes through about 2 log4(W) two-level lookahead stages.
// This is the iterative radix-4 carry-lookahead network with which the adders
// of this design were characterised; W need not be a power of four (missing
// bits have g = 0, p = 0). Combinational.
module cla_carry_network #(
  parameter int unsigned W = 4   // number of bit positions
) (
  input  logic [W-1:0] g,
  input  logic [W-1:0] p,
  input  logic         cin,
  output logic [W:0]   c
);

  // number of radix-4 levels: smallest L with 4^L >= W
  function automatic int levels(input int n);
    int l, span;
    l = 0; span = 1;
    while (span < n) begin span = span * 4; l++; end
    return (l == 0) ? 1 : l;
  endfunction

  localparam int L  = levels(W);
  localparam int WP = 4 ** L;        // padded width

  // gg[l][i] / pp[l][i]: group of 4^l bits starting at bit i * 4^l
  logic [WP-1:0] gg [L+1];
  logic [WP-1:0] pp [L+1];
  logic [WP:0]   cc [L+1];           // cc[l][i]: carry into group i of level l

  always_comb begin
    for (int l = 0; l <= L; l++) begin
      gg[l] = '0;
      pp[l] = '0;
      cc[l] = '0;
    end
    gg[0][W-1:0] = g;
    pp[0][W-1:0] = p;
    // upward: group generate / propagate
    for (int l = 1; l <= L; l++) begin
      for (int i = 0; i < WP / (4 ** l); i++) begin
        logic [3:0] sg, sp;
        for (int j = 0; j < 4; j++) begin
          sg[j] = gg[l-1][4*i + j];
          sp[j] = pp[l-1][4*i + j];
        end
        gg[l][i] = sg[3] | (sp[3] & sg[2]) | (sp[3] & sp[2] & sg[1]) | (sp[3] & sp[2] & sp[1] & sg[0]);
        pp[l][i] = &sp;
      end
    end
    // downward: carries into the sub-groups of every group
    cc[L][0] = cin;
    cc[L][1] = gg[L][0] | (pp[L][0] & cin);
    for (int l = L; l >= 1; l--) begin
      for (int i = 0; i < WP / (4 ** l); i++) begin
        logic [3:0] sg, sp;
        logic       c0;
        for (int j = 0; j < 4; j++) begin
          sg[j] = gg[l-1][4*i + j];
          sp[j] = pp[l-1][4*i + j];
        end
        c0 = cc[l][i];
        cc[l-1][4*i]     = c0;
        cc[l-1][4*i + 1] = sg[0] | (sp[0] & c0);
        cc[l-1][4*i + 2] = sg[1] | (sp[1] & sg[0]) | (sp[1] & sp[0] & c0);
        cc[l-1][4*i + 3] = sg[2] | (sp[2] & sg[1]) | (sp[2] & sp[1] & sg[0]) | (sp[2] & sp[1] & sp[0] & c0);
        cc[l-1][4*i + 4] = sg[3] | (sp[3] & sg[2]) | (sp[3] & sp[2] & sg[1]) | (sp[3] & sp[2] & sp[1] & sg[0])
                           | (sp[3] & sp[2] & sp[1] & sp[0] & c0);
      end
    end
    c = cc[0][W:0];
  end

endmodule
