// tb_r4_sloppy_mult: checks the radix-4 multiplier array (carry-save output) in
// the schemes r4-mult (exact), sloppy-rows with 1, 2 and 3 rows, and sloppy-cols
// with 2, 4, 6 and 8 columns, for 12 x 12 two's-complement operands: corner values
// plus random pairs, the carry-save sum compared with the integer model of
// sloppy_ref_pkg, and the exact scheme compared with x*y. It also checks the
// worked example (0111)_4 x (0231)_4 = 21 x 45: exact 945, two sloppy rows 882.
module tb_r4_sloppy_mult;
  import sloppy_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 12;
  localparam int NC = 8;
  localparam int SR [NC] = '{0, 1, 2, 3, 0, 0, 0, 0};
  localparam int SC [NC] = '{0, 0, 0, 0, 2, 4, 6, 8};
  logic [N-1:0]   x, y;
  longint         err_sum [NC] = '{default: 0};
  logic [2*N-1:0] ps [NC], pc [NC];

  for (genvar g = 0; g < NC; g++) begin : g_dut
    r4_sloppy_mult_cs #(.N(N), .SLOPPY_ROWS(SR[g]), .SLOPPY_COLS(SC[g])) u_dut
      (.x(x), .y(y), .ps(ps[g]), .pc(pc[g]));
  end

  function automatic longint prod(int g);
    return sext(longint'(ps[g]) + longint'(pc[g]), 2 * N);
  endfunction

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d y=%0d: got %0d expected %0d", what, $signed(x), $signed(y), got, exp);
    end
  endtask

  initial begin
    int corner [6] = '{0, 1, -1, 2047, -2048, 45};
    x = 12'd21; y = 12'd45; #1;
    check("example exact", prod(0), 945);
    check("example 2 sloppy rows", prod(2), 882);
    for (int i = 0; i < 6; i++)
      for (int j = 0; j < 6; j++) begin
        x = N'(corner[i]); y = N'(corner[j]); #1;
        for (int g = 0; g < NC; g++)
          check($sformatf("scheme %0d", g), prod(g),
                sext(ref_mult(longint'($signed(x)), longint'($signed(y)), N, SR[g], SC[g]), 2 * N));
        check("exact", prod(0), longint'($signed(x)) * longint'($signed(y)));
      end
    for (int it = 0; it < 20000; it++) begin
      x = N'($urandom); y = N'($urandom); #1;
      for (int g = 0; g < NC; g++) begin
        longint d;
        check($sformatf("scheme %0d", g), prod(g),
              sext(ref_mult(longint'($signed(x)), longint'($signed(y)), N, SR[g], SC[g]), 2 * N));
        d = prod(g) - longint'($signed(x)) * longint'($signed(y));
        err_sum[g] += (d < 0) ? -d : d;
      end
      check("exact", prod(0), longint'($signed(x)) * longint'($signed(y)));
    end
    $display("mean |error| over the random pairs, schemes exact, rows 1-3, cols 2/4/6/8:");
    for (int g = 0; g < NC; g++) $display("  scheme %0d: %f", g, real'(err_sum[g]) / 20000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("mean |error| over the random pairs, schemes exact, rows 1-3, cols 2/4/6/8:");
    for (int g = 0; g < NC; g++) $display("  scheme %0d: %f", g, real'(err_sum[g]) / 20000.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
