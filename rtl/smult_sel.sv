// smult_sel: signed NxN multiplier slot of an accelerator.
//
// Instantiates one two's-complement multiplier chosen at elaboration time by
// KIND: MK_TBM (truncated Booth), MK_BBM (broken Booth) or, for any other
// value, an accurate multiply. Combinational.
module smult_sel
  import approx_pkg::*;
#(
  parameter mult_kind_e  KIND = MK_TBM,
  parameter int unsigned N    = 16,
  parameter int unsigned T    = 7,    // TBM operand truncation
  parameter int unsigned VBL  = 8     // BBM vertical break line
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);
  if (KIND == MK_TBM) begin : g_tbm
    tbm_mult #(.N(N), .T(T)) u_m (.a(a), .b(b), .p(p));
  end else if (KIND == MK_BBM) begin : g_bbm
    bbm_mult #(.N(N), .VBL(VBL)) u_m (.a(a), .b(b), .p(p));
  end else begin : g_acc
    assign p = a * b;
  end
endmodule
