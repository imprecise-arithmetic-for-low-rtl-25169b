// tb_sloppy_adder: exhaustive self-checking test of sloppy_adder.
//
// Three instances are checked over all 65536 pairs of 8-bit operands against a
// reference written at word level: for K carry-free bits,
//   s = (((a >> K) + (b >> K)) << K) | ((a op b) & (2^K - 1)), op = OR or XOR.
// It also checks the worked example 103 + 70 (OR: 167, XOR: 161, exact 173),
// the exactness of K = 0, and the total error over all operand pairs, whose
// mean must be 3.75 for OR and 7.5 for XOR with N = 8, K = 4.
module tb_sloppy_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] a, b;
  logic [8:0] s_or, s_xor, s_ex;

  sloppy_adder #(.N(8), .K(4), .OR_LOW(1'b1)) dut_or  (.a(a), .b(b), .s(s_or));
  sloppy_adder #(.N(8), .K(4), .OR_LOW(1'b0)) dut_xor (.a(a), .b(b), .s(s_xor));
  sloppy_adder #(.N(8), .K(0), .OR_LOW(1'b1)) dut_ex  (.a(a), .b(b), .s(s_ex));

  function automatic int model(int x, int y, int k, bit use_or);
    int lo = use_or ? ((x | y) & ((1 << k) - 1)) : ((x ^ y) & ((1 << k) - 1));
    return (((x >> k) + (y >> k)) << k) | lo;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d (a=%0d b=%0d)", what, got, exp, a, b);
    end
  endtask

  initial begin
    longint err_or = 0, err_xor = 0;
    a = 8'd103; b = 8'd70; #1;
    check("example OR", int'(s_or), 167);
    check("example XOR", int'(s_xor), 161);
    check("example exact", int'(s_ex), 173);
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j); #1;
        check("or", int'(s_or), model(i, j, 4, 1'b1));
        check("xor", int'(s_xor), model(i, j, 4, 1'b0));
        check("exact", int'(s_ex), i + j);
        err_or  += (i + j) - int'(s_or);
        err_xor += (i + j) - int'(s_xor);
      end
    end
    // mean error 3.75 and 7.5 over 65536 pairs
    a = 8'd0; b = 8'd0;
    checks++; if (err_or * 4 != 15 * 65536) begin failures++; $display("FAIL mean OR error %0d/65536", err_or); end
    checks++; if (err_xor * 2 != 15 * 65536) begin failures++; $display("FAIL mean XOR error %0d/65536", err_xor); end
    $display("mean error OR = %f, XOR = %f", real'(err_or) / 65536.0, real'(err_xor) / 65536.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
