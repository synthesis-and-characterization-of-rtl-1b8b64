// ppam_mult: partial-product perforation multiplier (PPAM-JxKy).
//
// K consecutive partial-product rows, starting at row J, are never generated
// (perforated): the product is a times b with bits J..J+K-1 of b cleared,
// summed accurately. No correction term is added. Combinational.
//   a, b : N-bit unsigned operands
//   p    : 2N-bit approximate product
// Defaults J=1, K=11 are the perforation picked for a 70 C high-performance
// corner.
module ppam_mult #(
  parameter int unsigned N = 16,
  parameter int unsigned J = 1,
  parameter int unsigned K = 11
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam logic [N-1:0] PERF = N'(((64'(1) << K) - 1) << J);

  logic [N-1:0] bp;

  always_comb begin
    bp = b & ~PERF;
    p  = (2*N)'(a) * (2*N)'(bp);
  end
endmodule
