// scsa_adder: speculative carry selection adder (SCSA-K).
//
// Each K-bit block holds two sub-adders, one with carry-in 0 and one with
// carry-in 1, computed in parallel. A multiplexer picks one of them using the
// carry-out of the carry-in-0 sub-adder of the previous block, so the
// critical path is one K-bit adder plus a mux. Block 0 uses the carry-in-0
// result. Where K does not divide N the top block is narrower. Combinational.
//   a, b : N-bit unsigned operands
//   sum  : N+1-bit result, bit N is the carry-out of the top block
// Default K=3 is the precision picked for a 70 C high-performance corner.
module scsa_adder #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 3
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   sum
);
  localparam int unsigned NB = (N + K - 1) / K;
  localparam int unsigned W  = NB * K;

  logic [W-1:0]  ax, bx;
  logic [W:0]    sfull;
  logic [NB-1:0] c0out;  // carry-out of each carry-in-0 sub-adder

  assign ax = W'(a);
  assign bx = W'(b);

  for (genvar j = 0; j < NB; j++) begin : g_blk
    logic [K:0] s0, s1, s;
    assign s0       = {1'b0, ax[j*K +: K]} + {1'b0, bx[j*K +: K]};
    assign s1       = {1'b0, ax[j*K +: K]} + {1'b0, bx[j*K +: K]} + (K+1)'(1);
    assign c0out[j] = s0[K];
    if (j == 0) begin : g_b0
      assign s = s0;
    end else begin : g_bj
      assign s = c0out[j-1] ? s1 : s0;
    end
    assign sfull[j*K +: K] = s[K-1:0];
    if (j == NB - 1) begin : g_top
      assign sfull[W] = s[K];
    end
  end

  assign sum = sfull[N:0];
endmodule
