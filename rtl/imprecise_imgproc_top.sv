// imprecise_imgproc_top: the two image-processing engines built from imprecise
// arithmetic, side by side.
//
//   * image_filter: a streaming 3x3 smoothing / sharpening / edge-detection
//     filter for 256-pixel lines whose additions use sloppy adders (K = 4
//     carry-free low bits).
//   * idct8x8: an 8x8 inverse DCT on one multiply-accumulate unit whose radix-4
//     multiplier has two sloppy rows (sloppy-row-2) and whose accumulation is an
//     exact carry-save sum.
//   * r4_sloppy_mult: the stand-alone 12 x 12 imprecise radix-4 multiplier
//     (array plus exact final adder), the operator characterised on its own,
//     with its scheme set by MULT_SLOPPY_ROWS / MULT_SLOPPY_COLS. Combinational.
// The units share only clock and reset; each keeps its own ports, described
// in its own module. Placing them in one top is this design's own choice.
module imprecise_imgproc_top
  import sloppy_pkg::*;
#(
  parameter int unsigned IMG_W            = 256,
  parameter int unsigned FILT_K           = 4,
  parameter int unsigned IDCT_SLOPPY_ROWS = 2,
  parameter int unsigned IDCT_SLOPPY_COLS = 0,
  parameter int unsigned MULT_SLOPPY_ROWS = 2,
  parameter int unsigned MULT_SLOPPY_COLS = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  // image filter
  input  filt_mode_e         filt_mode,
  input  logic               filt_in_valid,
  input  logic               filt_in_sof,
  input  logic [7:0]         filt_in_pix,
  output logic               filt_out_valid,
  output logic [7:0]         filt_out_pix,
  // IDCT
  input  logic               idct_in_we,
  input  logic [5:0]         idct_in_addr,
  input  logic signed [11:0] idct_in_data,
  input  logic               idct_start,
  output logic               idct_busy,
  output logic               idct_done,
  input  logic [5:0]         idct_out_addr,
  output logic [7:0]         idct_out_data,
  // stand-alone multiplier
  input  logic [11:0]        mult_x,
  input  logic [11:0]        mult_y,
  output logic [23:0]        mult_p
);

  image_filter #(.IMG_W(IMG_W), .K(FILT_K)) u_filter (
    .clk(clk), .rst_n(rst_n), .mode(filt_mode),
    .in_valid(filt_in_valid), .in_sof(filt_in_sof), .in_pix(filt_in_pix),
    .out_valid(filt_out_valid), .out_pix(filt_out_pix)
  );

  idct8x8 #(.SLOPPY_ROWS(IDCT_SLOPPY_ROWS), .SLOPPY_COLS(IDCT_SLOPPY_COLS)) u_idct (
    .clk(clk), .rst_n(rst_n),
    .in_we(idct_in_we), .in_addr(idct_in_addr), .in_data(idct_in_data),
    .start(idct_start), .busy(idct_busy), .done(idct_done),
    .out_addr(idct_out_addr), .out_data(idct_out_data)
  );

  r4_sloppy_mult #(.N(12), .SLOPPY_ROWS(MULT_SLOPPY_ROWS), .SLOPPY_COLS(MULT_SLOPPY_COLS)) u_mult (
    .x(mult_x), .y(mult_y), .p(mult_p)
  );

endmodule
