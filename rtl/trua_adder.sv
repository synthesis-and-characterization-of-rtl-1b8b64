// trua_adder: truncated adder (TruA-K).
//
// The logic for the K least significant sum bits is removed: those bits read
// as 0 and no carry enters the accurate upper part. Combinational.
//   a, b : N-bit unsigned operands
//   sum  : N+1-bit result, bit N is the carry-out
// Default K=9 is the precision picked for a 70 C high-performance corner.
module trua_adder #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 9
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   sum
);
  logic [N-K:0] upper;

  always_comb begin
    upper = {1'b0, a[N-1:K]} + {1'b0, b[N-1:K]};
    sum   = {upper, {K{1'b0}}};
  end
endmodule
