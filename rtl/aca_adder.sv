// aca_adder: almost correct adder (ACA-K).
//
// Every sum bit i gets its own carry from a K-bit sub-adder over the K bit
// pairs just below it (bits i-K .. i-1, carry-in 0), so any carry chain
// longer than K bits is lost. The sub-adders overlap and work in parallel,
// giving a delay that grows with K rather than N at the cost of area. The
// carry-out bit N is formed the same way from bits N-K .. N-1.
// Which bits a "sub-adder of length K" spans is this design's reading: with
// the carry taken from the K bits below, 16-bit ACA-4 errs on about 18% of
// uniform random inputs and ACA-8 on about 0.8%, in line with published
// error rates for these sizes; a window that ends at bit i (K-1 bits below)
// would err about twice as often.
// Combinational.
//   a, b : N-bit unsigned operands
//   sum  : N+1-bit result
// Default K=4 is the precision picked for a 70 C high-performance corner.
module aca_adder #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   sum
);
  logic [N:0] ax, bx;

  assign ax = {1'b0, a};
  assign bx = {1'b0, b};

  for (genvar i = 0; i <= N; i++) begin : g_bit
    // window [LO, i]: the K carry bits below i plus bit i itself;
    // bit N is a zero-extended position
    localparam int unsigned LO = (i > K) ? i - K : 0;
    localparam int unsigned WW = i - LO + 1;
    logic [WW:0] s;
    assign s      = {1'b0, ax[i:LO]} + {1'b0, bx[i:LO]};
    assign sum[i] = s[WW-1];
  end
endmodule
