// tb_r4_sloppy_mult_full: checks the complete multiplier (array plus exact final
// adder) at its default configuration, 12 x 12 with two sloppy rows, against
// the integer model, and checks that the product is exact whenever the two low
// radix-4 digits of y are 0 or 2 and equals x*y + x*(e) otherwise, where each
// sloppy digit 1 adds x*4^k and each digit 3 subtracts x*4^k.
module tb_r4_sloppy_mult_full;
  import sloppy_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [11:0] x, y;
  logic [23:0] p;

  r4_sloppy_mult u_dut (.x(x), .y(y), .p(p));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d y=%0d: got %0d expected %0d", what, $signed(x), $signed(y), got, exp);
    end
  endtask

  initial begin
    for (int it = 0; it < 20000; it++) begin
      longint xv, yv, e;
      x = 12'($urandom); y = 12'($urandom); #1;
      xv = longint'($signed(x)); yv = longint'($signed(y));
      e = 0;
      for (int k = 0; k < 2; k++) begin
        int d;
        d = int'((y >> (2 * k)) & 12'd3);
        if (d == 1) e += xv << (2 * k);
        if (d == 3) e -= xv << (2 * k);
      end
      check("model", sext(longint'(p), 24), sext(ref_mult(xv, yv, 12, 2, 0), 24));
      check("error table", sext(longint'(p), 24), sext(xv * yv + e, 24));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
