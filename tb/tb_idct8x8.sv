// tb_idct8x8: transforms several 8x8 blocks with two IDCT units, the default
// sloppy-row-2 one and an exact one (no sloppy rows).
//
// Each block of pixels (random, smooth ramps, flat, and extreme values) is
// forward-transformed in the testbench with real arithmetic and rounded to
// 12-bit coefficients. Expected pixels come from a fixed-point model of the
// row-column algorithm whose cosine constants are recomputed here with $cos
// and whose products use the integer multiplier model, so the outputs of both
// units must match it bit for bit. The exact unit must also lie within 2 of
// the real-valued inverse transform. The cycle count from start to done must
// be 2 * 64 * 8 + 2.
module tb_idct8x8;
  import sloppy_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic               rst_n, we, start;
  logic [5:0]         in_addr, out_addr;
  logic signed [11:0] in_data;
  logic               busy_s, done_s, busy_e, done_e;
  logic [7:0]         out_s, out_e;

  idct8x8 u_sloppy (.clk(clk), .rst_n(rst_n), .in_we(we), .in_addr(in_addr), .in_data(in_data),
                    .start(start), .busy(busy_s), .done(done_s), .out_addr(out_addr), .out_data(out_s));
  idct8x8 #(.SLOPPY_ROWS(0)) u_exact (.clk(clk), .rst_n(rst_n), .in_we(we), .in_addr(in_addr),
                    .in_data(in_data), .start(start), .busy(busy_e), .done(done_e),
                    .out_addr(out_addr), .out_data(out_e));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic real cu(int u);
    return (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
  endfunction

  longint A [8][8];          // A[i][u] in Q11
  int     pix [8][8];
  int     F [8][8];
  int     exp_px [2][8][8];  // [0] sloppy, [1] exact
  real    ideal [8][8];

  function automatic longint rnd_shift(longint v, int sh);
    return (v + (longint'(1) << (sh - 1))) >>> sh;
  endfunction

  task automatic model(int srows, int idx);
    longint G [8][8];
    longint acc;
    for (int i = 0; i < 8; i++)
      for (int v = 0; v < 8; v++) begin
        acc = 0;
        for (int u = 0; u < 8; u++) acc += ref_mult(A[i][u], longint'(F[u][v]), 12, srows, 0);
        acc = rnd_shift(acc, 9);
        G[i][v] = (acc > 2047) ? 2047 : (acc < -2048) ? -2048 : acc;
      end
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) begin
        acc = 0;
        for (int v = 0; v < 8; v++) acc += ref_mult(A[j][v], G[i][v], 12, srows, 0);
        acc = rnd_shift(acc, 13) + 128;
        exp_px[idx][i][j] = (acc > 255) ? 255 : (acc < 0) ? 0 : int'(acc);
      end
  endtask

  initial begin
    real sum_err_s, pi;
    pi = 3.14159265358979;
    sum_err_s = 0.0;
    for (int i = 0; i < 8; i++)
      for (int u = 0; u < 8; u++)
        A[i][u] = longint'($rtoi($floor(2048.0 * cu(u) / 2.0 * $cos((2 * i + 1) * u * pi / 16.0) + 0.5)));
    rst_n = 1'b0; we = 1'b0; start = 1'b0; in_addr = '0; in_data = '0; out_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int blk = 0; blk < 8; blk++) begin
      int cyc;
      // pixel block
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++)
          case (blk)
            0: pix[i][j] = 128;
            1: pix[i][j] = 16 * i + 8 * j + 10;
            2: pix[i][j] = ((i + j) % 2) ? 255 : 0;
            3: pix[i][j] = 255;
            4: pix[i][j] = 0;
            default: pix[i][j] = int'($urandom % 256);
          endcase
      // forward DCT (real) and the ideal inverse
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          real s;
          s = 0.0;
          for (int i = 0; i < 8; i++)
            for (int j = 0; j < 8; j++)
              s += (pix[i][j] - 128) * $cos((2 * i + 1) * u * pi / 16.0) * $cos((2 * j + 1) * v * pi / 16.0);
          F[u][v] = $rtoi($floor(cu(u) * cu(v) / 4.0 * s + 0.5));
        end
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) begin
          real s;
          s = 0.0;
          for (int u = 0; u < 8; u++)
            for (int v = 0; v < 8; v++)
              s += cu(u) * cu(v) / 4.0 * F[u][v] * $cos((2 * i + 1) * u * pi / 16.0) * $cos((2 * j + 1) * v * pi / 16.0);
          ideal[i][j] = s + 128.0;
        end
      model(2, 0);
      model(0, 1);
      // load and run
      for (int a = 0; a < 64; a++) begin
        @(negedge clk);
        we = 1'b1; in_addr = 6'(a); in_data = 12'(F[a / 8][a % 8]);
      end
      @(negedge clk);
      we = 1'b0; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!done_s) begin
        @(negedge clk);
        cyc++;
      end
      // cyc - 1 = clock edges from the edge that samples start to the edge that raises done
      check("cycles start to done", cyc - 1, 2 * 64 * 8 + 2);
      check("both done together", longint'(done_e), 1);
      for (int a = 0; a < 64; a++) begin
        real d;
        out_addr = 6'(a); #1;
        check("sloppy pixel", out_s, exp_px[0][a / 8][a % 8]);
        check("exact pixel", out_e, exp_px[1][a / 8][a % 8]);
        d = real'(int'(out_e)) - (ideal[a / 8][a % 8] > 255.0 ? 255.0 : ideal[a / 8][a % 8] < 0.0 ? 0.0 : ideal[a / 8][a % 8]);
        checks++;
        if (d > 2.0 || d < -2.0) begin
          failures++;
          $display("FAIL exact vs ideal at %0d: %0d vs %f", a, out_e, ideal[a / 8][a % 8]);
        end
        sum_err_s += (int'(out_s) > int'(out_e)) ? real'(int'(out_s) - int'(out_e)) : real'(int'(out_e) - int'(out_s));
      end
    end
    $display("mean |sloppy - exact| pixel error over 8 blocks: %f", sum_err_s / 512.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
