// approx_pkg: types and constants shared by the approximate-arithmetic
// library and the image accelerators built on it.
//
// mult_kind_e selects which multiplier an accelerator instantiates for every
// product it forms. The accurate kinds are there as the reference design; the
// approximate kinds are the circuits the guard-band-for-precision trade uses.
// Pixel and fixed-point formats used by more than one module are also here.
package approx_pkg;

  // Multiplier chosen inside an accelerator (a synthesis-time choice).
  typedef enum logic [2:0] {
    MK_ACC  = 3'd0,  // accurate multiply
    MK_TRUM = 3'd1,  // unsigned: operand truncation (TruM-T)
    MK_AM   = 3'd2,  // unsigned: AM1/AM2/TAM1/TAM2 family
    MK_PPAM = 3'd3,  // unsigned: partial-product perforation
    MK_UDM  = 3'd4,  // unsigned: under-designed 2x2 blocks
    MK_TBM  = 3'd5,  // signed: truncated radix-4 Booth (TBM-T)
    MK_BBM  = 3'd6,  // signed: broken radix-4 Booth (BBM-VBL)
    MK_ICM  = 3'd7   // unsigned: approximate 4:2 counter tree
  } mult_kind_e;

  // Operand width of every characterized arithmetic circuit.
  localparam int unsigned OPW = 16;

  typedef logic [7:0] pixel_t;

endpackage
