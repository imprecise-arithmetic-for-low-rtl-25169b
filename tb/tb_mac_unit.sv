// tb_mac_unit: runs random multiply-accumulate sequences of 1 to 12 products
// through two MAC units, one with the default sloppy-row-2 multiplier and one
// exact, with random idle cycles (en = 0) in between. After the last product of
// each sequence the accumulator must equal, one cycle later, the sum of the
// integer-model products (sloppy) and the sum of x*y (exact). Holding en low
// must keep the value.
module tb_mac_unit;
  import sloppy_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic        rst_n, en, clr;
  logic [11:0] x, y;
  logic signed [29:0] acc_s, acc_e;

  mac_unit u_sloppy (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .x(x), .y(y), .acc(acc_s));
  mac_unit #(.SLOPPY_ROWS(0)) u_exact (.clk(clk), .rst_n(rst_n), .en(en), .clr(clr), .x(x), .y(y), .acc(acc_e));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    rst_n = 1'b0; en = 1'b0; clr = 1'b0; x = '0; y = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int seq = 0; seq < 2000; seq++) begin
      longint sum_s, sum_e;
      int len;
      sum_s = 0; sum_e = 0;
      len = 1 + int'($urandom % 12);
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        en = 1'b1; clr = (i == 0);
        x = 12'($urandom); y = 12'($urandom);
        sum_s += ref_mult(longint'($signed(x)), longint'($signed(y)), 12, 2, 0);
        sum_e += longint'($signed(x)) * longint'($signed(y));
        if ($urandom % 4 == 0 && i != len - 1) begin
          @(negedge clk);
          en = 1'b0; clr = 1'b1; x = 12'($urandom); y = 12'($urandom);   // idle cycle
        end
      end
      @(negedge clk);
      en = 1'b0; clr = 1'b0;
      check("sloppy sum", longint'(acc_s), sext(sum_s, 30));
      check("exact sum", longint'(acc_e), sext(sum_e, 30));
      @(negedge clk);
      check("hold", longint'(acc_e), sext(sum_e, 30));
    end
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
