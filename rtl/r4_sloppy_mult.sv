// r4_sloppy_mult: complete imprecise radix-4 multiplier: the array of
// r4_sloppy_mult_cs (partial products and carry-free reduction) followed by an
// error-free carry-propagate adder that merges the sum and carry vectors.
// Only partial-product generation is imprecise; reduction and final addition
// are exact, as in the design description. The final adder is written as a
// plain addition. p is the 2N-bit two's-complement (approximate) product.
// Combinational.
module r4_sloppy_mult #(
  parameter int unsigned N           = 12,
  parameter int unsigned SLOPPY_ROWS = 2,
  parameter int unsigned SLOPPY_COLS = 0
) (
  input  logic [N-1:0]   x,  // multiplicand, two's complement
  input  logic [N-1:0]   y,  // multiplier, two's complement
  output logic [2*N-1:0] p   // product, two's complement
);

  logic [2*N-1:0] ps, pc;

  r4_sloppy_mult_cs #(.N(N), .SLOPPY_ROWS(SLOPPY_ROWS), .SLOPPY_COLS(SLOPPY_COLS),
                      .OUT_W(2*N)) u_array (.x(x), .y(y), .ps(ps), .pc(pc));

  assign p = ps + pc;

endmodule
