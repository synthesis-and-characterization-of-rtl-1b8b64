// trum_mult: truncated unsigned multiplier (TruM-T).
//
// The T least significant bits of both operands are dropped, which removes
// the corresponding partial-product rows and columns; the remaining
// (N-T)x(N-T) product is formed accurately and shifted back into place.
// Combinational.
//   a, b : N-bit unsigned operands
//   p    : 2N-bit approximate product (the 2T LSBs are always 0)
// Default T=7 is the truncation that removes the delay guard-band of a 16-bit
// multiplier at 70 C.
module trum_mult #(
  parameter int unsigned N = 16,
  parameter int unsigned T = 7
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [2*(N-T)-1:0] core;

  always_comb begin
    core = (2*(N-T))'(a[N-1:T]) * (2*(N-T))'(b[N-1:T]);
    p    = {core, {2*T{1'b0}}};
  end
endmodule
