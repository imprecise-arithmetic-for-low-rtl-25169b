// image_filter: streaming 3x3 filter for grayscale images of IMG_W pixels per
// line, using the sloppy-adder kernel filter3x3_kernel.
//
// Pixels arrive in raster order, one per cycle at most (in_valid); in_sof marks
// the first pixel of a frame and restarts the row/column count. Two line buffers
// hold the two previous lines; together with the incoming pixel they give one
// new window column per pixel, shifted into a 3x3 window register. A window is
// complete once the current pixel is at row >= 2 and column >= 2; it is then
// centred on pixel (row-1, col-1). Border pixels produce no output, so an
// H x W frame yields (H-2) x (W-2) results, in raster order.
// Timing: out_valid/out_pix follow the completing input pixel by two cycles.
// The mode may change between frames or at any pixel; it applies to the windows
// that reach the kernel from then on.
// The 256-pixel line and K = 4 sloppy bits follow the design description; the
// streaming structure, the border rule and the handshake are this design's own.
module image_filter
  import sloppy_pkg::*;
#(
  parameter int unsigned IMG_W = 256,   // pixels per line
  parameter int unsigned K     = 4      // sloppy bits of the kernel adders
) (
  input  logic       clk,
  input  logic       rst_n,
  input  filt_mode_e mode,
  input  logic       in_valid,
  input  logic       in_sof,
  input  logic [7:0] in_pix,
  output logic       out_valid,
  output logic [7:0] out_pix
);

  localparam int unsigned CW = $clog2(IMG_W);

  logic [7:0]    lb0 [IMG_W];   // previous line
  logic [7:0]    lb1 [IMG_W];   // line before that
  logic [7:0]    win [9];       // raster order, win[4] centre
  logic [CW-1:0] col;
  logic [15:0]   row;
  logic [CW-1:0] col_c;
  logic [15:0]   row_c;
  logic          win_ok;
  logic [7:0]    kpix;

  assign col_c = in_sof ? '0 : col;
  assign row_c = in_sof ? '0 : row;

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb0[col_c] <= in_pix;
      lb1[col_c] <= lb0[col_c];
      // shift the window left, new column on the right
      win[0] <= win[1]; win[1] <= win[2]; win[2] <= lb1[col_c];
      win[3] <= win[4]; win[4] <= win[5]; win[5] <= lb0[col_c];
      win[6] <= win[7]; win[7] <= win[8]; win[8] <= in_pix;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col       <= '0;
      row       <= '0;
      win_ok    <= 1'b0;
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      win_ok <= in_valid && (row_c >= 16'd2) && (col_c >= CW'(2));
      if (in_valid) begin
        if (col_c == CW'(IMG_W - 1)) begin
          col <= '0;
          row <= row_c + 16'd1;
        end else begin
          col <= col_c + CW'(1);
          row <= row_c;
        end
      end
      out_valid <= win_ok;
      out_pix   <= kpix;
    end
  end

  filter3x3_kernel #(.W(12), .K(K)) u_kernel (.w(win), .mode(mode), .pix(kpix));

endmodule
