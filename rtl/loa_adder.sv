// loa_adder: lower-part OR adder (LOA-K).
//
// The K least significant sum bits are a plain bitwise OR of the operands, so
// no carry ripples through them. The upper N-K bits are an accurate adder
// whose carry-in is the AND of the two operand bits at position K-1, the
// usual LOA carry approximation (this carry term is a design choice; the OR
// lower part is the defining feature). Purely combinational.
//   a, b : N-bit unsigned operands
//   sum  : N+1-bit result, bit N is the carry-out
// Default K=10 is the precision picked for a 70 C high-performance corner.
module loa_adder #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 10
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   sum
);
  logic [N-K:0] upper;
  logic         cin;

  always_comb begin
    cin   = a[K-1] & b[K-1];
    upper = {1'b0, a[N-1:K]} + {1'b0, b[N-1:K]} + (N-K+1)'(cin);
    sum   = {upper, a[K-1:0] | b[K-1:0]};
  end
endmodule
