// tb_image_filter: streams three small random frames (16 pixels per line, 9
// lines) through image_filter, one per filter mode, with random gaps in
// in_valid. The expected output stream, computed from the frame with the
// kernel model of sloppy_ref_pkg, has one value per interior pixel in raster
// order; each output must arrive exactly two cycles after the input pixel that
// completes its window, and the count per frame must be (H-2)*(W-2). A second
// unit built with K = 6 sloppy bits runs on the same stream and is checked
// against the model with K = 6.
module tb_image_filter;
  import sloppy_pkg::*;
  import sloppy_ref_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int W = 16, H = 9;
  logic       rst_n, in_valid, in_sof, out_valid;
  logic [7:0] in_pix, out_pix;
  filt_mode_e mode;

  logic       out_valid6;
  logic [7:0] out_pix6;
  int         exp6 [$];
  int         n_k6_diff = 0;

  // second unit with K = 6 sloppy bits, the edge-detection variant
  image_filter #(.IMG_W(W), .K(6)) u_dut6 (.clk(clk), .rst_n(rst_n), .mode(mode), .in_valid(in_valid),
    .in_sof(in_sof), .in_pix(in_pix), .out_valid(out_valid6), .out_pix(out_pix6));

  image_filter #(.IMG_W(W)) u_dut (.clk(clk), .rst_n(rst_n), .mode(mode), .in_valid(in_valid),
    .in_sof(in_sof), .in_pix(in_pix), .out_valid(out_valid), .out_pix(out_pix));

  int img [H][W];
  int expq [$];
  longint due [$];   // cycle at which each expected output is due
  longint cycle = 0;
  int got_cnt;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // output monitor
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      got_cnt++;
      if (expq.size() == 0) begin
        checks++; failures++;
        $display("FAIL unexpected output");
      end else begin
        check("pixel", out_pix, expq.pop_front());
        check("latency", cycle, due.pop_front());
      end
      if (!out_valid6) begin
        checks++; failures++;
      end else if (exp6.size() > 0) begin
        int e6;
        e6 = exp6.pop_front();
        check("K=6 pixel", out_pix6, e6);
        if (out_pix6 != out_pix) n_k6_diff++;
      end
    end
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; in_sof = 1'b0; in_pix = '0; mode = FILT_SMOOTH;
    got_cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int f = 0; f < 3; f++) begin
      int n_before;
      n_before = got_cnt;
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) img[r][c] = int'($urandom % 256);
      @(negedge clk);
      mode = filt_mode_e'(f);
      for (int r = 0; r < H; r++)
        for (int c = 0; c < W; c++) begin
          while ($urandom % 4 == 0) begin
            in_valid = 1'b0;
            @(negedge clk);
          end
          in_valid = 1'b1; in_sof = (r == 0 && c == 0); in_pix = 8'(img[r][c]);
          if (r >= 2 && c >= 2) begin
            int win [9];
            for (int i = 0; i < 3; i++)
              for (int j = 0; j < 3; j++) win[3 * i + j] = img[r - 2 + i][c - 2 + j];
            expq.push_back(ref_filter(win, f, 4));
            exp6.push_back(ref_filter(win, f, 6));
            due.push_back(cycle + 2);
          end
          @(negedge clk);
        end
      in_valid = 1'b0; in_sof = 1'b0;
      repeat (4) @(negedge clk);
      check("outputs per frame", got_cnt - n_before, (H - 2) * (W - 2));
    end
    check("queue drained", expq.size(), 0);
    checks++; if (n_k6_diff == 0) begin failures++; $display("FAIL K=6 never differs from K=4"); end
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
