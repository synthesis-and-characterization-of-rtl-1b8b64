// cspa_adder: carry speculative adder (CSPA-K).
//
// The operands are cut into K-bit blocks. Each block computes two results,
// one assuming carry-in 0 and one assuming carry-in 1, plus a carry
// predictor: the carry-out of the block's upper H = ceil(K/2) bits with
// carry-in 0. The predictor of block i-1 selects which result block i uses,
// so the critical path is the short predictor plus a mux. The predictor size
// is this design's choice. Where K does not divide N the top block is
// narrower. Combinational.
//   a, b : N-bit unsigned operands
//   sum  : N+1-bit result, bit N is the carry-out of the top block
// Default K=5 is the precision picked for a 70 C high-performance corner.
module cspa_adder #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 5
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   sum
);
  localparam int unsigned NB = (N + K - 1) / K;
  localparam int unsigned W  = NB * K;
  localparam int unsigned H  = (K + 1) / 2;

  logic [W-1:0]  ax, bx;
  logic [W:0]    sfull;
  logic [NB-1:0] pred;

  assign ax = W'(a);
  assign bx = W'(b);

  for (genvar j = 0; j < NB; j++) begin : g_blk
    logic [K:0] s0, s1, s;
    logic [H:0] pr;
    assign s0      = {1'b0, ax[j*K +: K]} + {1'b0, bx[j*K +: K]};
    assign s1      = {1'b0, ax[j*K +: K]} + {1'b0, bx[j*K +: K]} + (K+1)'(1);
    assign pr      = {1'b0, ax[j*K+K-H +: H]} + {1'b0, bx[j*K+K-H +: H]};
    assign pred[j] = pr[H];
    if (j == 0) begin : g_b0
      assign s = s0;
    end else begin : g_bj
      assign s = pred[j-1] ? s1 : s0;
    end
    assign sfull[j*K +: K] = s[K-1:0];
    if (j == NB - 1) begin : g_top
      assign sfull[W] = s[K];
    end
  end

  assign sum = sfull[N:0];
endmodule
