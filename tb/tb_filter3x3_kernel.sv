// tb_filter3x3_kernel: drives random and extreme 3x3 windows through the
// sloppy kernel (K = 4) and an exact one (K = 0) in all four modes. The
// sloppy output must equal the word-level model of sloppy_ref_pkg, which
// replays the same addition order; the exact one must equal the plain integer
// filter. It counts the windows where the sloppy result differs from the exact
// one (the sloppy error must show up) and where sharpening or edge detection
// saturate, and fails if either never happens.
module tb_filter3x3_kernel;
  import sloppy_pkg::*;
  import sloppy_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [7:0] w [9];
  filt_mode_e mode;
  logic [7:0] pix_s, pix_e;

  filter3x3_kernel u_sloppy (.w(w), .mode(mode), .pix(pix_s));
  filter3x3_kernel #(.K(0)) u_exact (.w(w), .mode(mode), .pix(pix_e));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s mode %0d: got %0d expected %0d", what, int'(mode), got, exp);
    end
  endtask

  function automatic int exact_filter(int v[9], int m);
    int d;
    case (m)
      0: return (v[0] + 2*v[1] + v[2] + 2*v[3] + 4*v[4] + 2*v[5] + v[6] + 2*v[7] + v[8]) / 16;
      1: begin d = 5*v[4] - v[1] - v[3] - v[5] - v[7]; return d < 0 ? 0 : d > 255 ? 255 : d; end
      2: begin
        d = 8*v[4] - (v[0] + v[1] + v[2] + v[3] + v[5] + v[6] + v[7] + v[8]);
        if (d < 0) d = -d;
        return d > 255 ? 255 : d;
      end
      default: return v[4];
    endcase
  endfunction

  int n_err = 0, n_sat = 0;

  initial begin
    int v [9];
    for (int it = 0; it < 20000; it++) begin
      for (int i = 0; i < 9; i++) begin
        case (it % 4)
          0: v[i] = int'($urandom % 256);
          1: v[i] = ($urandom % 2) ? 255 : 0;
          2: v[i] = 100 + int'($urandom % 16);
          default: v[i] = int'($urandom % 256) & 8'hF0 | 4'hF;
        endcase
        w[i] = 8'(v[i]);
      end
      for (int m = 0; m < 4; m++) begin
        mode = filt_mode_e'(m); #1;
        check("sloppy", int'(pix_s), ref_filter(v, m, 4));
        check("exact", int'(pix_e), exact_filter(v, m));
        if (pix_s != pix_e) n_err++;
        if ((m == 1 || m == 2) && pix_e == 8'd255) n_sat++;
      end
    end
    $display("windows with sloppy error: %0d, saturated: %0d", n_err, n_sat);
    checks++; if (n_err == 0) begin failures++; $display("FAIL sloppy error never seen"); end
    checks++; if (n_sat == 0) begin failures++; $display("FAIL saturation never seen"); end
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
