// tb_booth_rec_ppgen: checks one radix-4 rec+PPgen row in its three forms
// (error-free Booth, whole-row sloppy, three sloppy low bits) for all eight
// multiplier-bit patterns and many multiplicands, against the row value of
// sloppy_ref_pkg. It also checks the recoding table directly: an error-free row
// must equal d*x with the Booth digit d, and a sloppy row 2x for every non-zero
// unsigned digit (y2k+1, y2k).
module tb_booth_rec_ppgen;
  import sloppy_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int N = 12;
  logic [2:0]   yb;
  logic [N-1:0] x;
  logic [N:0]   pp_b, pp_s, pp_c;
  logic         n_b, n_s, n_c;

  booth_rec_ppgen #(.N(N), .ROW_SLOPPY(1'b0), .SLOPPY_BITS(0)) u_b (.ybits(yb), .x(x), .pp(pp_b), .neg_out(n_b));
  booth_rec_ppgen #(.N(N), .ROW_SLOPPY(1'b1), .SLOPPY_BITS(0)) u_s (.ybits(yb), .x(x), .pp(pp_s), .neg_out(n_s));
  booth_rec_ppgen #(.N(N), .ROW_SLOPPY(1'b0), .SLOPPY_BITS(3)) u_c (.ybits(yb), .x(x), .pp(pp_c), .neg_out(n_c));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s y=%b x=%0d: got %0d expected %0d", what, yb, $signed(x), got, exp);
    end
  endtask

  initial begin
    int digit [8] = '{0, 1, 1, 2, -2, -1, -1, 0};
    for (int it = 0; it < 3000; it++) begin
      longint xv;
      x = (it < 8) ? N'(it * 1021) : N'($urandom);
      if (it == 8) x = 12'h800;
      if (it == 9) x = 12'h7FF;
      xv = longint'($signed(x));
      for (int y3 = 0; y3 < 8; y3++) begin
        yb = 3'(y3); #1;
        check("booth", sext(longint'(pp_b), N + 1) + longint'(n_b), digit[y3] * xv);
        check("sloppy", sext(longint'(pp_s), N + 1) + longint'(n_s), (((y3 >> 1) & 3) != 0) ? 2 * xv : 0);
        check("cols", sext(longint'(pp_c), N + 1) + longint'(n_c), ref_booth_row(y3, xv, N, 1'b0, 3));
      end
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
