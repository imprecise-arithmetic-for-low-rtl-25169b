// mac_unit: multiply-accumulate unit with an imprecise radix-4 multiplier and
// error-free carry-save accumulation.
//
// Each cycle with en=1 the product x*y of r4_sloppy_mult_cs (already in
// carry-save form, sign-extended to ACC_W bits) is added to the accumulator,
// which is itself kept as a sum/carry pair: two rows of 3:2 carry-save adders
// (a 4:2 compression) merge the four vectors, so accumulation never propagates
// a carry. clr=1 with en=1 starts a new sum (the old accumulator is ignored).
// acc is the error-free sum of the two accumulator registers, available the
// cycle after the last en. Only the multiplier is imprecise; keeping both the
// accumulation and the final addition exact follows the design description,
// the widths, the clear/enable handshake and the reset are this design's own.
// Timing: one product accepted per cycle, result one cycle after the last.
module mac_unit #(
  parameter int unsigned N           = 12,  // operand width
  parameter int unsigned ACC_W       = 30,  // accumulator width (2N + 6 guard bits)
  parameter int unsigned SLOPPY_ROWS = 2,   // multiplier scheme, see r4_sloppy_mult_cs
  parameter int unsigned SLOPPY_COLS = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,  // asynchronous, active low
  input  logic                    en,     // accumulate x*y this cycle
  input  logic                    clr,    // with en: start a new sum with x*y
  input  logic [N-1:0]            x,      // multiplicand, two's complement
  input  logic [N-1:0]            y,      // multiplier, two's complement
  output logic signed [ACC_W-1:0] acc     // accumulated sum
);

  logic [ACC_W-1:0] ps, pc;          // product, carry-save
  logic [ACC_W-1:0] acc_s, acc_c;    // accumulator, carry-save
  logic [ACC_W-1:0] s1, c1, s2, c2;

  r4_sloppy_mult_cs #(.N(N), .SLOPPY_ROWS(SLOPPY_ROWS), .SLOPPY_COLS(SLOPPY_COLS),
                      .OUT_W(ACC_W)) u_mult (.x(x), .y(y), .ps(ps), .pc(pc));

  always_comb begin
    logic [ACC_W-1:0] as, ac;
    as = clr ? '0 : acc_s;
    ac = clr ? '0 : acc_c;
    s1 = ps ^ pc ^ as;
    c1 = ((ps & pc) | (ps & as) | (pc & as)) << 1;
    s2 = s1 ^ c1 ^ ac;
    c2 = ((s1 & c1) | (s1 & ac) | (c1 & ac)) << 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_s <= '0;
      acc_c <= '0;
    end else if (en) begin
      acc_s <= s2;
      acc_c <= c2;
    end
  end

  assign acc = $signed(acc_s + acc_c);

endmodule
