// approx_image_top: three image-processing accelerators whose multipliers
// are approximate circuits sized so that, at 70 C, they meet the clock of an
// accurate design at 25 C without a delay guard-band, plus the approximate
// arithmetic library they were chosen from.
//
// The blocks are independent and share only clock and reset:
//   idct_8x8    8x8 inverse DCT, eight TBM-7 signed multipliers
//   img_smooth  5x5 Gaussian smoothing, 25 TAM1-16 unsigned multipliers
//   img_sharpen 5x5 unsharp sharpening, 25 TAM1-16 unsigned multipliers
//   approx_arith_lib  every characterized adder and multiplier, fed by
//                     lib_a / lib_b, combinational
// This is the high-performance configuration; the low-power one differs only
// in using TAM2-16 (SCHEME = 2) for smoothing and sharpening. The port
// protocols are those of the individual blocks.
module approx_image_top
  import approx_pkg::*;
#(
  parameter int unsigned IMG_W = 512,
  parameter int unsigned IMG_H = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // IDCT
  input  logic                     idct_in_valid,
  output logic                     idct_in_ready,
  input  logic signed [15:0]       idct_in_coef,
  output logic                     idct_out_valid,
  output logic                     idct_out_last,
  output pixel_t                   idct_out_pix,
  // smoothing
  input  logic                     sm_in_valid,
  input  pixel_t                   sm_in_pix,
  output logic                     sm_out_valid,
  output pixel_t                   sm_out_pix,
  output logic [$clog2(IMG_W)-1:0] sm_out_x,
  output logic [$clog2(IMG_H)-1:0] sm_out_y,
  // sharpening
  input  logic                     sh_in_valid,
  input  pixel_t                   sh_in_pix,
  output logic                     sh_out_valid,
  output pixel_t                   sh_out_pix,
  output logic [$clog2(IMG_W)-1:0] sh_out_x,
  output logic [$clog2(IMG_H)-1:0] sh_out_y,
  // arithmetic library
  input  logic [15:0]              lib_a,
  input  logic [15:0]              lib_b,
  output logic [16:0]              lib_sum [11],  // LOA TruA ESA ETAII SCSA ACA ACAA CSA GCSA CSPA CCA
  output logic [31:0]              lib_prod [9]   // TruM AM1 TAM1 TAM2 PPAM UDM TBM BBM ICM
);
  idct_8x8 #(.MKIND(MK_TBM), .T(7)) u_idct (
    .clk, .rst_n,
    .in_valid(idct_in_valid), .in_ready(idct_in_ready), .in_coef(idct_in_coef),
    .out_valid(idct_out_valid), .out_last(idct_out_last), .out_pix(idct_out_pix)
  );

  img_smooth #(.IMG_W(IMG_W), .IMG_H(IMG_H), .MKIND(MK_AM), .M(16), .SCHEME(1), .TCOLS(16)) u_smooth (
    .clk, .rst_n,
    .in_valid(sm_in_valid), .in_pix(sm_in_pix),
    .out_valid(sm_out_valid), .out_pix(sm_out_pix), .out_x(sm_out_x), .out_y(sm_out_y)
  );

  img_sharpen #(.IMG_W(IMG_W), .IMG_H(IMG_H), .MKIND(MK_AM), .M(16), .SCHEME(1), .TCOLS(16)) u_sharpen (
    .clk, .rst_n,
    .in_valid(sh_in_valid), .in_pix(sh_in_pix),
    .out_valid(sh_out_valid), .out_pix(sh_out_pix), .out_x(sh_out_x), .out_y(sh_out_y)
  );

  logic signed [31:0] p_tbm, p_bbm;

  approx_arith_lib u_lib (
    .a(lib_a), .b(lib_b),
    .s_loa(lib_sum[0]), .s_trua(lib_sum[1]), .s_esa(lib_sum[2]), .s_etaii(lib_sum[3]),
    .s_scsa(lib_sum[4]), .s_aca(lib_sum[5]), .s_acaa(lib_sum[6]), .s_csa(lib_sum[7]),
    .s_gcsa(lib_sum[8]), .s_cspa(lib_sum[9]), .s_cca(lib_sum[10]),
    .p_trum(lib_prod[0]), .p_am1(lib_prod[1]), .p_tam1(lib_prod[2]), .p_tam2(lib_prod[3]),
    .p_ppam(lib_prod[4]), .p_udm(lib_prod[5]), .p_icm(lib_prod[8]), .p_tbm(p_tbm), .p_bbm(p_bbm)
  );

  assign lib_prod[6] = p_tbm;
  assign lib_prod[7] = p_bbm;
endmodule
