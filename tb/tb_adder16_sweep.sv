// tb_adder16_sweep: 16-bit sloppy adders with K = 4, 8 and 12 carry-free bits,
// the adder sizes the design is characterised with. 200 000 random operand
// pairs per adder are checked against the word-level model, and the measured
// mean error is compared with its expected value: a low bit i loses 2^i when
// both operand bits are 1 (probability 1/4), so the mean error is
// (2^K - 1) / 4, i.e. 3.75, 63.75 and 1023.75. The measured mean over the
// 160 000 uniformly random pairs must lie
// within 3 % of it. An exact 16-bit adder (K = 0), whose carries all come from
// the two-level radix-4 lookahead network, is checked against a + b, with
// operands chosen to give long carry chains in one pair out of five. The
// testbench prints the mean and maximum errors.
module tb_adder16_sweep;
  import sloppy_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NK = 3;
  localparam int KS [NK] = '{4, 8, 12};
  logic [15:0] a, b;
  logic [16:0] s [NK];

  logic [16:0] s_exact;
  sloppy_adder #(.N(16), .K(0)) u_exact (.a(a), .b(b), .s(s_exact));

  for (genvar g = 0; g < NK; g++) begin : g_dut
    sloppy_adder #(.N(16), .K(KS[g])) u_add (.a(a), .b(b), .s(s[g]));
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  longint esum [NK] = '{default: 0};
  longint emax [NK] = '{default: 0};

  initial begin
    for (int it = 0; it < 200000; it++) begin
      a = 16'($urandom); b = 16'($urandom);
      if (it % 5 == 0) b = ~a ^ 16'(1 << ($urandom % 16));   // long carry chains
      #1;
      check("exact 16-bit", longint'(s_exact), longint'(a) + longint'(b));
      for (int g = 0; g < NK; g++) begin
        longint e;
        check($sformatf("K=%0d", KS[g]), longint'(s[g]), ref_sloppy_add(longint'(a), longint'(b), KS[g]));
        e = longint'(a) + longint'(b) - longint'(s[g]);
        if (it % 5 != 0) esum[g] += e;             // statistics on uniform pairs only
        if (e > emax[g]) emax[g] = e;
      end
    end
    for (int g = 0; g < NK; g++) begin
      real m, ex;
      m  = real'(esum[g]) / 160000.0;
      ex = real'((1 << KS[g]) - 1) / 4.0;
      $display("K=%0d: mean error %f (expected %f), max %0d", KS[g], m, ex, emax[g]);
      checks++;
      if (m < 0.97 * ex || m > 1.03 * ex) begin failures++; $display("FAIL mean error K=%0d", KS[g]); end
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
