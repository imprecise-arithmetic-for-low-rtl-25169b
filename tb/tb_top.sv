// tb_top: end-to-end test of imprecise_imgproc_top at its default parameters
// (256-pixel lines, K = 4 sloppy filter adders, sloppy-row-2 IDCT).
//
// Filter side: three 256 x 256 synthetic grayscale frames (gradients, blocks,
// fine texture and noise) are streamed with random gaps, one frame per mode
// (smoothing, sharpening, edge detection), switching the mode between frames.
// Every output pixel is compared with the sloppy kernel model, in order and at
// a latency of two cycles, and its error against the exact filter is gathered;
// the testbench prints the maximum and mean error per mode.
// IDCT side, running at the same time: blocks of DCT coefficients (a random
// smooth block, a flat block, a high-contrast block) are loaded, transformed and
// read back, each pixel compared with the fixed-point model, and the cycle
// count from start to done checked.
// Stand-alone multiplier, at the same time: 5000 random products checked against
// the integer model.
// Mechanisms counted (each must occur at least once): filter mode switches,
// sloppy multiplier products that differ from exact ones,
// sloppy filter results that differ from exact ones, saturated filter outputs,
// IDCT results where the sloppy multiplier changes a pixel, and IDCT pixels
// clamped at 0 or 255.
module tb_top;
  import sloppy_pkg::*;
  import sloppy_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 256, H = 256;

  logic               rst_n;
  filt_mode_e         filt_mode;
  logic               f_in_valid, f_in_sof, f_out_valid;
  logic [7:0]         f_in_pix, f_out_pix;
  logic               i_we, i_start, i_busy, i_done;
  logic [5:0]         i_in_addr, i_out_addr;
  logic signed [11:0] i_in_data;
  logic [7:0]         i_out_data;
  logic [11:0]        m_x, m_y;
  logic [23:0]        m_p;

  imprecise_imgproc_top u_top (
    .clk(clk), .rst_n(rst_n),
    .filt_mode(filt_mode), .filt_in_valid(f_in_valid), .filt_in_sof(f_in_sof),
    .filt_in_pix(f_in_pix), .filt_out_valid(f_out_valid), .filt_out_pix(f_out_pix),
    .idct_in_we(i_we), .idct_in_addr(i_in_addr), .idct_in_data(i_in_data),
    .idct_start(i_start), .idct_busy(i_busy), .idct_done(i_done),
    .idct_out_addr(i_out_addr), .idct_out_data(i_out_data),
    .mult_x(m_x), .mult_y(m_y), .mult_p(m_p)
  );

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_mult_err = 0;
  int n_mode_switch = 0, n_filt_err = 0, n_filt_sat = 0, n_idct_err = 0, n_idct_clamp = 0;
  int err_max [3] = '{0, 0, 0};
  longint err_sum [3] = '{0, 0, 0};
  int n_out [3] = '{0, 0, 0};

  // ---------------- filter side ----------------
  int     expq [$];
  int     exq  [$];   // exact filter value
  int     mq   [$];
  longint due  [$];
  int     img  [H][W];
  bit     filt_done = 1'b0, idct_done_all = 1'b0;

  function automatic int exact_filter(int v[9], int m);
    return ref_filter(v, m, 0);
  endfunction

  always @(negedge clk) begin
    if (rst_n && f_out_valid) begin
      if (expq.size() == 0) begin
        checks++; failures++;
        $display("FAIL unexpected filter output");
      end else begin
        int e, ex, m;
        e = expq.pop_front(); ex = exq.pop_front(); m = mq.pop_front();
        check("filter pixel", f_out_pix, e);
        check("filter latency", cycle, due.pop_front());
        if (e != ex) n_filt_err++;
        if ((m == 1 || m == 2) && f_out_pix == 8'd255) n_filt_sat++;
        n_out[m]++;
        err_sum[m] += (e > ex) ? e - ex : ex - e;
        if (((e > ex) ? e - ex : ex - e) > err_max[m]) err_max[m] = (e > ex) ? e - ex : ex - e;
      end
    end
  end

  task automatic run_filter();
    for (int f = 0; f < 3; f++) begin
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          int v;
          v = (r + c) / 4 + (((r / 32 + c / 32) % 2) ? 80 : 0) + int'($urandom % 24);
          if (r > 128 && c > 128) v = ((r + c) % 2) ? 250 : 5;      // fine texture
          img[r][c] = v > 255 ? 255 : v;
        end
      @(negedge clk);
      if (filt_mode != filt_mode_e'(f)) n_mode_switch++;
      filt_mode = filt_mode_e'(f);
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          while ($urandom % 8 == 0) begin
            f_in_valid = 1'b0;
            @(negedge clk);
          end
          f_in_valid = 1'b1; f_in_sof = (r == 0 && c == 0); f_in_pix = 8'(img[r][c]);
          if (r >= 2 && c >= 2) begin
            int win [9];
            for (int i = 0; i < 3; i++)
              for (int j = 0; j < 3; j++) win[3 * i + j] = img[r - 2 + i][c - 2 + j];
            expq.push_back(ref_filter(win, f, 4));
            exq.push_back(exact_filter(win, f));
            mq.push_back(f);
            due.push_back(cycle + 2);
          end
          @(negedge clk);
        end
      f_in_valid = 1'b0; f_in_sof = 1'b0;
      repeat (4) @(negedge clk);
      check("filter outputs per frame", n_out[f], (H - 2) * (W - 2));
    end
    filt_done = 1'b1;
  endtask

  // ---------------- IDCT side ----------------
  task automatic run_idct();
    blk_t F, pe, px_exact;
    for (int b = 0; b < 6; b++) begin
      int cyc;
      for (int u = 0; u < 8; u++)
        for (int v = 0; v < 8; v++)
          case (b % 3)
            0: F[u][v] = (u + v < 4) ? int'($urandom % 201) - 100 : int'($urandom % 9) - 4;
            1: F[u][v] = (u == 0 && v == 0) ? -1000 : 0;                 // flat, clamps at 0
            default: F[u][v] = (u + v) % 3 == 0 ? 300 - 37 * (u + v) : -150 + 19 * u;
          endcase
      if (b == 4) F[0][0] = 1000;                                        // flat, clamps at 255
      pe = ref_idct(F, 2);
      px_exact = ref_idct(F, 0);
      for (int a = 0; a < 64; a++) begin
        @(negedge clk);
        i_we = 1'b1; i_in_addr = 6'(a); i_in_data = 12'(F[a / 8][a % 8]);
      end
      @(negedge clk);
      i_we = 1'b0; i_start = 1'b1;
      @(negedge clk);
      i_start = 1'b0;
      cyc = 1;
      while (!i_done) begin
        @(negedge clk);
        cyc++;
      end
      check("idct cycles", cyc - 1, 2 * 64 * 8 + 2);
      for (int a = 0; a < 64; a++) begin
        i_out_addr = 6'(a); #1;
        check("idct pixel", i_out_data, pe[a / 8][a % 8]);
        if (pe[a / 8][a % 8] != px_exact[a / 8][a % 8]) n_idct_err++;
        if (i_out_data == 8'd0 || i_out_data == 8'd255) n_idct_clamp++;
      end
    end
    idct_done_all = 1'b1;
  endtask

  // ---------------- stand-alone multiplier ----------------
  task automatic run_mult();
    for (int it = 0; it < 5000; it++) begin
      longint xv, yv, e;
      @(negedge clk);
      m_x = 12'($urandom); m_y = 12'($urandom);
      #1;
      xv = longint'($signed(m_x)); yv = longint'($signed(m_y));
      e = sext(ref_mult(xv, yv, 12, 2, 0), 24);
      check("multiplier product", sext(longint'(m_p), 24), e);
      if (e != xv * yv) n_mult_err++;
    end
  endtask

  initial begin
    rst_n = 1'b0; m_x = '0; m_y = '0; filt_mode = FILT_PASS; f_in_valid = 1'b0; f_in_sof = 1'b0; f_in_pix = '0;
    i_we = 1'b0; i_start = 1'b0; i_in_addr = '0; i_in_data = '0; i_out_addr = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      run_filter();
      run_idct();
      run_mult();
    join
    $display("filter error vs exact  (max / mean): smoothing %0d / %f, sharpening %0d / %f, edge %0d / %f",
             err_max[0], real'(err_sum[0]) / real'(n_out[0]), err_max[1], real'(err_sum[1]) / real'(n_out[1]),
             err_max[2], real'(err_sum[2]) / real'(n_out[2]));
    $display("stand-alone multiplier: %0d of 5000 products differ from exact", n_mult_err);
    $display("mechanisms: mode switches %0d, sloppy filter errors %0d, filter saturations %0d, idct sloppy errors %0d, idct clamps %0d",
             n_mode_switch, n_filt_err, n_filt_sat, n_idct_err, n_idct_clamp);
    checks++; if (n_mult_err == 0)    begin failures++; $display("FAIL no sloppy multiplier error"); end
    checks++; if (n_mode_switch == 0) begin failures++; $display("FAIL no mode switch"); end
    checks++; if (n_filt_err == 0)    begin failures++; $display("FAIL no sloppy filter error"); end
    checks++; if (n_filt_sat == 0)    begin failures++; $display("FAIL no filter saturation"); end
    checks++; if (n_idct_err == 0)    begin failures++; $display("FAIL no sloppy idct error"); end
    checks++; if (n_idct_clamp == 0)  begin failures++; $display("FAIL no idct clamp"); end
    check("filter queue drained", expq.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
