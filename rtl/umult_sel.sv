// umult_sel: unsigned NxN multiplier slot of an accelerator.
//
// Instantiates exactly one multiplier, chosen at elaboration time by KIND
// (see approx_pkg::mult_kind_e): accurate, TruM, the AM/TAM family, PPAM,
// UDM or ICM. This is how an accelerator's arithmetic is swapped for an approximate
// circuit without touching the surrounding glue logic. The remaining
// parameters are forwarded to the selected circuit and ignored otherwise.
// Combinational.
module umult_sel
  import approx_pkg::*;
#(
  parameter mult_kind_e  KIND   = MK_AM,
  parameter int unsigned N      = 16,
  parameter int unsigned T      = 7,    // TruM truncation
  parameter int unsigned M      = 16,   // AM recovery MSBs
  parameter int unsigned SCHEME = 1,    // AM accumulation scheme
  parameter int unsigned TCOLS  = 16,   // AM truncated columns
  parameter int unsigned PJ     = 1,    // PPAM first perforated row
  parameter int unsigned PK     = 11    // PPAM perforated rows
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (KIND == MK_TRUM) begin : g_trum
    trum_mult #(.N(N), .T(T)) u_m (.a(a), .b(b), .p(p));
  end else if (KIND == MK_AM) begin : g_am
    am_mult #(.N(N), .M(M), .SCHEME(SCHEME), .TCOLS(TCOLS)) u_m (.a(a), .b(b), .p(p));
  end else if (KIND == MK_PPAM) begin : g_ppam
    ppam_mult #(.N(N), .J(PJ), .K(PK)) u_m (.a(a), .b(b), .p(p));
  end else if (KIND == MK_UDM) begin : g_udm
    udm_mult #(.N(N)) u_m (.a(a), .b(b), .p(p));
  end else if (KIND == MK_ICM) begin : g_icm
    icm_mult #(.N(N)) u_m (.a(a), .b(b), .p(p));
  end else begin : g_acc
    assign p = (2*N)'(a) * (2*N)'(b);
  end
endmodule
