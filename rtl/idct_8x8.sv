// idct_8x8: 8x8 two-dimensional inverse DCT with approximate signed
// multipliers.
//
// Reconstructs a pixel block from its DCT coefficients,
//   f[m][n] = sum_u sum_v c[u] c[v] F[u][v] cos((2m+1)u pi/16) cos((2n+1)v pi/16)
// with c[0] = 1 and c[k] = 2 otherwise (the inverse of a DCT normalised by
// 1/64). It is computed as two 1-D passes over a block buffer:
//   row pass:    T[u][n] = sum_v C[v][n] F[u][v]
//   column pass: f[m][n] = sum_u C[u][m] T[u][n]
// with C[k][x] = c[k] cos((2x+1)k pi/16). Eight multiplier slots (smult_sel,
// TBM-7 by default) and an adder tree produce one 1-D result per cycle.
//
// Number formats (choices of this design): coefficients F and the
// intermediate T are signed 16-bit with DFRAC = 7 fraction bits (range
// +-256, saturated); the cosine constants are signed 16-bit with
// CFRAC = 14 fraction bits (|C| < 2); output pixels are rounded and clamped
// to 0..255. The row/column organisation and the handshake are also this
// design's own.
//
// Interface and timing: in_ready is high while the block buffer is being
// filled; 64 coefficients F[u][v] are accepted in u-major order (v fastest),
// one per in_valid & in_ready cycle. The row pass then takes 64 cycles and
// the column pass 64 cycles, during which out_valid marks one pixel per cycle
// in m-major order (n fastest), out_last on the 64th. A block therefore
// takes 192 cycles from first coefficient to last pixel when the input
// never stalls; out_valid of the first pixel comes 66 cycles after the last
// coefficient is accepted. There is no output back-pressure.
module idct_8x8
  import approx_pkg::*;
#(
  parameter mult_kind_e  MKIND = MK_TBM,
  parameter int unsigned T     = 7,   // TBM truncation
  parameter int unsigned VBL   = 8,   // BBM break line
  parameter int unsigned CFRAC = 14,  // fraction bits of C (table below is Q14)
  parameter int unsigned DFRAC = 7    // fraction bits of F and T
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  logic signed [15:0] in_coef,
  output logic               out_valid,
  output logic               out_last,
  output pixel_t             out_pix
);
  typedef enum logic [1:0] {ST_LOAD, ST_ROW, ST_COL} state_e;

  // round(2^14 * c[k] * cos(k pi / 16)) for k = 0..7, c[k] as above
  localparam logic signed [15:0] CTAB [8] = '{
    16'sd16384, 16'sd32138, 16'sd30274, 16'sd27246,
    16'sd23170, 16'sd18205, 16'sd12540, 16'sd6393
  };

  // C[k][x] = c[k] cos((2x+1) k pi/16) in Q14
  function automatic logic signed [15:0] cosc(logic [2:0] k, logic [2:0] x);
    logic [5:0] th;     // angle in units of pi/16, reduced to 0..31
    logic [4:0] r;
    logic       neg;
    th  = 6'((({3'b000, x} << 1) + 6'd1) * {3'b000, k}) & 6'h1f;
    r   = (th > 6'd16) ? 5'(6'd32 - th) : th[4:0];   // cos is even
    neg = 1'b0;
    if (r > 5'd8) begin                            // cos(pi - a) = -cos(a)
      r   = 5'd16 - r;
      neg = 1'b1;
    end
    if (k == 3'd0) return CTAB[0];
    if (r == 5'd8) return 16'sd0;
    return neg ? -CTAB[r[2:0]] : CTAB[r[2:0]];
  endfunction

  state_e             state;
  logic [5:0]         cnt;                 // element index in the current phase
  logic signed [15:0] fbuf [64];           // F[u][v], index u*8+v
  logic signed [15:0] tbuf [64];           // T[u][n], index u*8+n
  logic signed [15:0] opc  [8];
  logic signed [15:0] opd  [8];
  logic signed [31:0] prod [8];
  logic signed [34:0] acc;

  assign in_ready = (state == ST_LOAD);

  // operand selection: cnt = {i, j}
  always_comb begin
    logic [2:0] hi, lo;
    hi = cnt[5:3];
    lo = cnt[2:0];
    for (int k = 0; k < 8; k++) begin
      if (state == ST_COL) begin          // f[hi=m][lo=n] = sum_u C[u][m] T[u][n]
        opc[k] = cosc(3'(k), hi);
        opd[k] = tbuf[{3'(k), lo}];
      end else begin                      // T[hi=u][lo=n] = sum_v C[v][n] F[u][v]
        opc[k] = cosc(3'(k), lo);
        opd[k] = fbuf[{hi, 3'(k)}];
      end
    end
  end

  for (genvar k = 0; k < 8; k++) begin : g_mul
    smult_sel #(.KIND(MKIND), .N(16), .T(T), .VBL(VBL)) u_mul (
      .a(opc[k]), .b(opd[k]), .p(prod[k])
    );
  end

  // adder tree and rescaling (round half up)
  localparam logic signed [34:0] RND_T = 35'sd1 <<< (CFRAC - 1);
  localparam logic signed [34:0] RND_P = 35'sd1 <<< (CFRAC + DFRAC - 1);
  logic signed [15:0] t_next;
  pixel_t             pix_next;
  always_comb begin
    logic signed [34:0] rt, rp;
    acc = '0;
    for (int k = 0; k < 8; k++) acc = acc + 35'(prod[k]);
    // row pass: back to DFRAC fraction bits, saturate to 16 bits
    rt = (acc + RND_T) >>> CFRAC;
    if (rt > 35'sd32767)       t_next = 16'sd32767;
    else if (rt < -35'sd32768) t_next = -16'sd32768;
    else                       t_next = 16'(rt);
    // column pass: to integer, clamp to the pixel range
    rp = (acc + RND_P) >>> (CFRAC + DFRAC);
    if (rp < 0)                pix_next = 8'd0;
    else if (rp > 35'sd255)    pix_next = 8'd255;
    else                       pix_next = pixel_t'(rp);
  end

  always_ff @(posedge clk) begin
    if (state == ST_LOAD && in_valid) fbuf[cnt] <= in_coef;
    if (state == ST_ROW)              tbuf[cnt] <= t_next;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_LOAD;
      cnt       <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= (state == ST_COL);
      out_last  <= (state == ST_COL) && (cnt == 6'd63);
      if (state == ST_COL) out_pix <= pix_next;
      unique case (state)
        ST_LOAD: if (in_valid) begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) state <= ST_ROW;
        end
        ST_ROW: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) state <= ST_COL;
        end
        ST_COL: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'd63) state <= ST_LOAD;
        end
        default: state <= ST_LOAD;
      endcase
    end
  end
endmodule
