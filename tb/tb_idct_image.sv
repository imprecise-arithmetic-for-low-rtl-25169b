// tb_idct_image: decodes a whole 256 x 256 grayscale image block by block with
// the default idct8x8 (sloppy-row-2), the IDCT workload of the design.
//
// A synthetic image (smooth gradients, a large bright disc, checkered blocks
// and noise) is generated, each 8x8 block is forward-transformed in real
// arithmetic and rounded to 12-bit coefficients (no quantisation), and the
// 1024 blocks are loaded, transformed and read back one after the other. Every
// pixel is checked bit for bit against the fixed-point model, and the testbench
// reports the mean and maximum pixel error and the PSNR of the sloppy decoder
// and of the same decoder with an exact multiplier, both against the original
// image. It also checks that every transform takes 1026 cycles from the edge
// that samples start to the edge that raises done.
module tb_idct_image;
  import sloppy_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int S = 256;
  localparam int NB = (S / 8) * (S / 8);

  logic               rst_n, we, start, busy, done;
  logic [5:0]         in_addr, out_addr;
  logic signed [11:0] in_data;
  logic [7:0]         out_data;

  idct8x8 u_dut (.clk(clk), .rst_n(rst_n), .in_we(we), .in_addr(in_addr), .in_data(in_data),
                 .start(start), .busy(busy), .done(done), .out_addr(out_addr), .out_data(out_data));

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  real    cs [8][8];     // cos((2i+1) u pi / 16)
  int     img [S][S];
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    real    se_s, se_e, psnr_s, psnr_e;
    longint ae_s, ae_e;
    int     max_s, max_e;
    longint c0, tcyc;
    se_s = 0.0; se_e = 0.0; ae_s = 0; ae_e = 0; max_s = 0; max_e = 0;
    for (int i = 0; i < 8; i++)
      for (int u = 0; u < 8; u++) cs[i][u] = $cos((2 * i + 1) * u * 3.14159265358979 / 16.0);
    for (int r = 0; r < S; r++)
      for (int c = 0; c < S; c++) begin
        int v;
        v = (r + 2 * c) / 3;
        if ((r - 96) * (r - 96) + (c - 160) * (c - 160) < 50 * 50) v = 230 - (r - 96) / 4;
        if (r >= 192 && c < 96) v = (((r / 4) + (c / 4)) % 2) ? 200 : 40;
        v = v + int'($urandom % 9) - 4;
        img[r][c] = v < 0 ? 0 : v > 255 ? 255 : v;
      end
    rst_n = 1'b0; we = 1'b0; start = 1'b0; in_addr = '0; in_data = '0; out_addr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    tcyc = 0;
    for (int b = 0; b < NB; b++) begin
      blk_t F, pe, px_exact;
      int br, bc;
      br = (b / (S / 8)) * 8; bc = (b % (S / 8)) * 8;
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++) begin
          real s;
          s = 0.0;
          for (int i = 0; i < 8; i++)
            for (int j = 0; j < 8; j++) s += (img[br + i][bc + j] - 128) * cs[i][u] * cs[j][v];
          s = s * ((u == 0) ? 0.70710678118 : 1.0) * ((v == 0) ? 0.70710678118 : 1.0) / 4.0;
          F[u][v] = $rtoi($floor(s + 0.5));
        end
      pe = ref_idct(F, 2);
      px_exact = ref_idct(F, 0);
      for (int a = 0; a < 64; a++) begin
        we = 1'b1; in_addr = 6'(a); in_data = 12'(F[a / 8][a % 8]);
        @(negedge clk);
      end
      we = 1'b0; start = 1'b1;
      @(negedge clk);
      start = 1'b0;
      c0 = cycle;                       // edge that sampled start
      while (!done) @(negedge clk);
      tcyc += cycle - c0;
      for (int a = 0; a < 64; a++) begin
        int o, d;
        out_addr = 6'(a); #1;
        check("pixel", out_data, pe[a / 8][a % 8]);
        o = img[br + a / 8][bc + a % 8];
        d = int'(out_data) - o; if (d < 0) d = -d;
        ae_s += d; se_s += real'(d * d); if (d > max_s) max_s = d;
        d = px_exact[a / 8][a % 8] - o; if (d < 0) d = -d;
        ae_e += d; se_e += real'(d * d); if (d > max_e) max_e = d;
      end
    end
    check("transform cycles", tcyc, longint'(NB) * 1026);
    psnr_s = 10.0 * $log10(255.0 * 255.0 / (se_s / real'(S * S)));
    psnr_e = 10.0 * $log10(255.0 * 255.0 / (se_e / real'(S * S)));
    $display("sloppy-row-2 IDCT: mean |error| %f, max %0d, PSNR %f dB", real'(ae_s) / real'(S * S), max_s, psnr_s);
    $display("exact IDCT       : mean |error| %f, max %0d, PSNR %f dB", real'(ae_e) / real'(S * S), max_e, psnr_e);
    checks++;
    if (psnr_s < 30.0) begin failures++; $display("FAIL sloppy decoding PSNR below 30 dB"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
