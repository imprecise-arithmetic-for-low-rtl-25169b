// filter3x3_kernel: 3x3 spatial filter on 8-bit grayscale pixels built only
// from shifts, sloppy additions and one final subtraction.
//
// w[0..8] is the window in raster order, w[4] the centre. A tree of eight
// sloppy_adder instances (W bits, K carry-free low bits) sums nine slot terms
// s0..s8 in the fixed order ((s0+s1)+(s2+s3)) + ((s4+s5)+(s6+s7)), then + s8.
//   FILT_SMOOTH : slots are the mask 1 2 1 / 2 4 2 / 1 2 1 (by shifts);
//                 out = S >> 4.
//   FILT_SHARPEN: mask 0 -1 0 / -1 5 -1 / 0 -1 0. Slots hold the four edge
//                 neighbours; a ninth sloppy adder forms 5c = (c << 2) + c;
//                 out = clamp(5c - S, 0, 255).
//   FILT_EDGE   : Laplacian 8c - (sum of the 8 neighbours);
//                 out = min(|8c - S|, 255).
//   FILT_PASS   : out = c.
// The positive and negative parts are each summed with sloppy adders and the
// final subtraction is exact. The sloppy adder with K = 4 and the three filter
// kinds follow the design description; the masks, the output scaling and the
// exact final subtraction are this design's own choices. Combinational.
module filter3x3_kernel
  import sloppy_pkg::*;
#(
  parameter int unsigned W      = 12,   // adder width (largest sum 16 * 255 = 4080)
  parameter int unsigned K      = 4,    // sloppy bits of every adder
  parameter bit          OR_LOW = 1'b1
) (
  input  logic [7:0]  w [9],
  input  filt_mode_e  mode,
  output logic [7:0]  pix
);

  logic [W-1:0] s [9];        // tree inputs
  logic [W:0]   l1 [4];       // first level sums
  logic [W:0]   l2 [2];
  logic [W:0]   l3, l4;
  logic [W:0]   five_c;
  logic [W-1:0] c4, cc;

  function automatic logic [W-1:0] z(input logic [7:0] p, input int sh);
    return W'(p) << sh;
  endfunction

  always_comb begin
    for (int i = 0; i < 9; i++) s[i] = '0;
    case (mode)
      FILT_SMOOTH: begin
        s[0] = z(w[0], 0); s[1] = z(w[1], 1); s[2] = z(w[2], 0);
        s[3] = z(w[3], 1); s[4] = z(w[4], 2); s[5] = z(w[5], 1);
        s[6] = z(w[6], 0); s[7] = z(w[7], 1); s[8] = z(w[8], 0);
      end
      FILT_SHARPEN: begin
        s[0] = z(w[1], 0); s[1] = z(w[3], 0); s[2] = z(w[5], 0); s[3] = z(w[7], 0);
      end
      FILT_EDGE: begin
        s[0] = z(w[0], 0); s[1] = z(w[1], 0); s[2] = z(w[2], 0); s[3] = z(w[3], 0);
        s[4] = z(w[5], 0); s[5] = z(w[6], 0); s[6] = z(w[7], 0); s[7] = z(w[8], 0);
      end
      default: ;
    endcase
  end

  for (genvar i = 0; i < 4; i++) begin : g_l1
    sloppy_adder #(.N(W), .K(K), .OR_LOW(OR_LOW)) u_add (.a(s[2*i]), .b(s[2*i+1]), .s(l1[i]));
  end
  for (genvar i = 0; i < 2; i++) begin : g_l2
    sloppy_adder #(.N(W), .K(K), .OR_LOW(OR_LOW)) u_add
      (.a(l1[2*i][W-1:0]), .b(l1[2*i+1][W-1:0]), .s(l2[i]));
  end
  sloppy_adder #(.N(W), .K(K), .OR_LOW(OR_LOW)) u_add_l3
    (.a(l2[0][W-1:0]), .b(l2[1][W-1:0]), .s(l3));
  sloppy_adder #(.N(W), .K(K), .OR_LOW(OR_LOW)) u_add_l4
    (.a(l3[W-1:0]), .b(s[8]), .s(l4));

  assign c4 = z(w[4], 2);
  assign cc = z(w[4], 0);
  sloppy_adder #(.N(W), .K(K), .OR_LOW(OR_LOW)) u_add_5c (.a(c4), .b(cc), .s(five_c));

  always_comb begin
    logic signed [W+1:0] d;
    pix = w[4];
    d   = '0;
    case (mode)
      FILT_SMOOTH: pix = 8'(l4 >> 4);
      FILT_SHARPEN: begin
        d = $signed({1'b0, five_c}) - $signed({1'b0, l4});
        pix = (d < 0) ? 8'd0 : (d > 255) ? 8'd255 : 8'(d);
      end
      FILT_EDGE: begin
        d = $signed({1'b0, z(w[4], 3)}) - $signed({1'b0, l4});
        if (d < 0) d = -d;
        pix = (d > 255) ? 8'd255 : 8'(d);
      end
      default: pix = w[4];
    endcase
  end

endmodule
