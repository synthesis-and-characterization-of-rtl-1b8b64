// esa_adder: equal segmentation adder (ESA-K).
//
// The operands are cut into K-bit blocks from the LSB up; each block has its
// own accurate sub-adder with carry-in 0, so no carry crosses a block
// boundary and the critical path is one K-bit adder. Where K does not divide
// N the top block is narrower. Combinational.
//   a, b : N-bit unsigned operands
//   sum  : N+1-bit result, bit N is the carry-out of the top block
// Default K=6 is the precision picked for a 70 C high-performance corner.
module esa_adder #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 6
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   sum
);
  localparam int unsigned NB = (N + K - 1) / K;
  localparam int unsigned W  = NB * K;

  logic [W-1:0] ax, bx;
  logic [W:0]   sfull;

  assign ax = W'(a);
  assign bx = W'(b);

  for (genvar j = 0; j < NB; j++) begin : g_blk
    logic [K:0] s;
    assign s = {1'b0, ax[j*K +: K]} + {1'b0, bx[j*K +: K]};
    assign sfull[j*K +: K] = s[K-1:0];
    if (j == NB - 1) begin : g_top
      assign sfull[W] = s[K];
    end
  end

  assign sum = sfull[N:0];
endmodule
