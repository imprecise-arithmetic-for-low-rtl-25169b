// idct8x8: 8x8 two-dimensional inverse DCT, the direct row-column method, on
// one imprecise multiply-accumulate unit.
//
// The block is loaded with 64 DCT coefficients F[u][v] (12-bit signed, address
// 8u+v) and started. It computes
//   pass 1: G[i][v] = sum_u A[i][u] * F[u][v]
//   pass 2: f[i][j] = sum_v A[j][v] * G[i][v],  pixel = clamp(f + 128, 0, 255)
// with A[i][u] = c(u)/2 * cos((2i+1)u*pi/16) in Q11 (sloppy_pkg::idct_coef).
// Every output is eight MAC operations, one per cycle; the MAC's multiplicand x
// is the cosine constant and its multiplier y, whose low radix-4 digits are the
// sloppy ones, is the data word. G is stored with two fractional bits and
// saturated to 12 bits, so that pass 2 also uses 12 x 12 multiplications.
// Each result is written one cycle after its last product, while the next
// output's first product already enters the MAC.
// Interface: in_we/in_addr/in_data load coefficients while idle; start begins a
// transform; done pulses for one cycle when all 64 pixels are in the output
// buffer, read combinationally through out_addr/out_data (address 8i+j).
// Timing: done rises 2 * 64 * 8 + 2 = 1026 clock edges after the edge that
// samples start.
// The use of an imprecise MAC for a straightforward IDCT (sloppy-row-2 by
// default) follows the design description; the row-column order, the
// fixed-point formats, the buffers and the handshake are this design's own.
module idct8x8
  import sloppy_pkg::*;
#(
  parameter int unsigned SLOPPY_ROWS = 2,  // MAC multiplier scheme
  parameter int unsigned SLOPPY_COLS = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_we,
  input  logic [5:0]         in_addr,
  input  logic signed [11:0] in_data,
  input  logic               start,
  output logic               busy,
  output logic               done,
  input  logic [5:0]         out_addr,
  output logic [7:0]         out_data
);

  localparam int unsigned ACC_W = 30;

  typedef enum logic [2:0] {S_IDLE, S_P1, S_GAP, S_P2, S_FLUSH} state_e;

  typedef logic signed [11:0] coef_tab_t [64];
  function automatic coef_tab_t make_tab();
    coef_tab_t t;
    for (int i = 0; i < 8; i++)
      for (int u = 0; u < 8; u++) t[8*i+u] = idct_coef(i, u);
    return t;
  endfunction
  localparam coef_tab_t COEF = make_tab();   // COEF[8i+u] = A[i][u]

  logic signed [11:0] fbuf [64];   // input coefficients F
  logic signed [11:0] gbuf [64];   // pass-1 result G, Q2
  logic [7:0]         pbuf [64];   // output pixels

  state_e   state;
  logic [5:0] o;          // output index {i, j or v}
  logic [2:0] t;          // term index
  logic       wr_pend;    // a result is in the MAC accumulator
  logic       wr_pass2;
  logic [5:0] wr_idx;

  logic [11:0] mx, my;
  logic        mac_en, mac_clr;
  logic signed [ACC_W-1:0] acc;

  // operand selection
  always_comb begin
    mac_en  = (state == S_P1) || (state == S_P2);
    mac_clr = (t == 3'd0);
    if (state == S_P2) begin
      mx = COEF[{o[2:0], t}];          // A[j][v]
      my = gbuf[{o[5:3], t}];          // G[i][v]
    end else begin
      mx = COEF[{o[5:3], t}];          // A[i][u]
      my = fbuf[{t, o[2:0]}];          // F[u][v]
    end
  end

  mac_unit #(.N(12), .ACC_W(ACC_W), .SLOPPY_ROWS(SLOPPY_ROWS), .SLOPPY_COLS(SLOPPY_COLS))
    u_mac (.clk(clk), .rst_n(rst_n), .en(mac_en), .clr(mac_clr), .x(mx), .y(my), .acc(acc));

  // result scaling
  logic signed [ACC_W-1:0] g_full, f_full;
  logic signed [11:0]      g_sat;
  logic [7:0]              pix;
  always_comb begin
    g_full = (acc + ACC_W'(1 <<< (IDCT_COEF_FRAC - 3))) >>> (IDCT_COEF_FRAC - 2);  // Q11 -> Q2, rounded
    if (g_full > 2047)       g_sat = 12'sh7FF;
    else if (g_full < -2048) g_sat = -12'sh800;
    else                     g_sat = g_full[11:0];
    f_full = ((acc + ACC_W'(1 <<< (IDCT_COEF_FRAC + 1))) >>> (IDCT_COEF_FRAC + 2)) + 128;  // Q13 -> integer, level shift
    if (f_full > 255)    pix = 8'd255;
    else if (f_full < 0) pix = 8'd0;
    else                 pix = f_full[7:0];
  end

  always_ff @(posedge clk) begin
    if (in_we && state == S_IDLE) fbuf[in_addr] <= in_data;
    if (wr_pend && !wr_pass2) gbuf[wr_idx] <= g_sat;
    if (wr_pend &&  wr_pass2) pbuf[wr_idx] <= pix;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      o        <= '0;
      t        <= '0;
      wr_pend  <= 1'b0;
      wr_pass2 <= 1'b0;
      wr_idx   <= '0;
      done     <= 1'b0;
    end else begin
      done    <= 1'b0;
      wr_pend <= 1'b0;
      if (mac_en && t == 3'd7) begin
        wr_pend  <= 1'b1;
        wr_pass2 <= (state == S_P2);
        wr_idx   <= o;
      end
      case (state)
        S_IDLE: if (start) begin
          state <= S_P1;
          o     <= '0;
          t     <= '0;
        end
        S_P1, S_P2: begin
          t <= t + 3'd1;
          if (t == 3'd7) begin
            o <= o + 6'd1;
            if (o == 6'd63) state <= (state == S_P1) ? S_GAP : S_FLUSH;
          end
        end
        S_GAP:   state <= S_P2;       // last G written this cycle
        S_FLUSH: begin                // last pixel written this cycle
          state <= S_IDLE;
          done  <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy     = (state != S_IDLE);
  assign out_data = pbuf[out_addr];

endmodule
