// img_sharpen: streaming 5x5 image sharpening with approximate multipliers.
//
// Computes S(x,y) = 2 I(x,y) - Y(x,y), where Y is a 5x5 blur
// Y(x,y) = (1/4368) * sum_{i,j} G(i,j) * I(x-i, y-j) with the kernel
//         16  64 112  64  16
//         64 256 416 256  64
//   G =  112 416 656 416 112      (the weights sum to 4368)
//         64 256 416 256  64
//         16  64 112  64  16
// 2 I is a one-bit shift, so only the blur needs multipliers. S is clamped to
// 0..255 (a choice of this design).
//
// Structure: win5x5 (four line buffers and a register window) feeds 25
// multiplier slots (umult_sel) working in parallel, one per kernel tap, and
// an accurate adder tree. Each multiplier gets the pixel aligned to the top
// of its 16-bit operand (pixel << 8) and the integer kernel weight, so the
// truncating approximate multipliers lose only low-order product bits; this
// operand alignment is a choice of this design. The division by
// 256 * 4368 = D is a multiply by the reciprocal R = ceil(2^SH / D) with
// round-half-up; SH is chosen so that x * (R*D - 2^SH) < 2^SH for every
// reachable x, which makes the result equal to floor((sum + D/2) / D).
// By default every multiplier is TAM1-16 (MKIND = MK_AM); MKIND = MK_ACC
// gives the accurate reference design.
//
// Interface and timing: one pixel per in_valid cycle in raster order; an
// output pixel appears two cycles after the pixel that completes its window
// (one window register, one output register), with out_x/out_y giving its
// position. There is no back-pressure. Frame size is a parameter (512 x 512
// by default, a choice of this design).
module img_sharpen
  import approx_pkg::*;
#(
  parameter int unsigned IMG_W  = 512,
  parameter int unsigned IMG_H  = 512,
  parameter mult_kind_e  MKIND  = MK_AM,
  parameter int unsigned T      = 7,    // TruM truncation
  parameter int unsigned M      = 16,   // AM recovery MSBs
  parameter int unsigned SCHEME = 1,    // AM1 / AM2 accumulation
  parameter int unsigned TCOLS  = 16    // truncated columns (TAM)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  pixel_t                   in_pix,
  output logic                     out_valid,
  output pixel_t                   out_pix,
  output logic [$clog2(IMG_W)-1:0] out_x,
  output logic [$clog2(IMG_H)-1:0] out_y
);
  localparam int unsigned     XW = $clog2(IMG_W);
  localparam int unsigned     YW = $clog2(IMG_H);
  localparam longint unsigned D  = 64'd1118208;
  localparam int unsigned     SH = 49;
  localparam longint unsigned R  = 64'd503439391;

  // Kernel, symmetric about the centre: value by distance from the centre
  function automatic logic [15:0] weight(int r, int c);
    int dr, dc;
    dr = (r > 2) ? r - 2 : 2 - r;
    dc = (c > 2) ? c - 2 : 2 - c;
    case ({dr[1:0], dc[1:0]})
      4'b00_00: return 16'd656;
      4'b00_01, 4'b01_00: return 16'd416;
      4'b00_10, 4'b10_00: return 16'd112;
      4'b01_01: return 16'd256;
      4'b01_10, 4'b10_01: return 16'd64;
      default: return 16'd16;
    endcase
  endfunction

  logic          win_valid;
  pixel_t        win [5][5];
  logic [XW-1:0] win_x;
  logic [YW-1:0] win_y;
  logic [31:0]   prod [5][5];
  logic [36:0]   acc;
  logic [63:0]   scaled;
  logic [9:0]    y_blur;
  pixel_t        res;

  win5x5 #(.IMG_W(IMG_W), .IMG_H(IMG_H)) u_win (
    .clk, .rst_n, .in_valid, .in_pix,
    .win_valid, .win, .win_x, .win_y
  );

  for (genvar r = 0; r < 5; r++) begin : g_row
    for (genvar c = 0; c < 5; c++) begin : g_col
      umult_sel #(
        .KIND(MKIND), .N(16), .T(T), .M(M), .SCHEME(SCHEME), .TCOLS(TCOLS)
      ) u_mul (
        .a({win[r][c], 8'h00}),
        .b(weight(r, c)),
        .p(prod[r][c])
      );
    end
  end

  always_comb begin
    acc = '0;
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++) acc = acc + 37'(prod[r][c]);
    scaled = 64'((longint'(acc) + longint'(D / 2)) * R) >> SH;
    y_blur = (scaled > 64'd255) ? 10'd255 : 10'(scaled);
    begin
      logic signed [11:0] s;
      s = 12'sd0 + 12'(signed'({2'b00, win[2][2], 1'b0})) - 12'(signed'({2'b00, y_blur}));
      if (s < 0)            res = 8'd0;
      else if (s > 12'sd255) res = 8'd255;
      else                  res = pixel_t'(s);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
      out_x     <= '0;
      out_y     <= '0;
    end else begin
      out_valid <= win_valid;
      if (win_valid) begin
        out_pix <= res;
        out_x   <= win_x;
        out_y   <= win_y;
      end
    end
  end
endmodule
