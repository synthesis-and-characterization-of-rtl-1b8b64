// csa_adder: carry skip speculative adder (CSA-K).
//
// The operands are cut into K-bit blocks. Each block has a sub-carry
// generator (its carry-out with carry-in 0, "generate" G) and a propagate
// signal P (every bit pair differs, so a carry-in would pass straight
// through). The carry-in of block i is G of block i-1, unless block i-1
// propagates, in which case its own G is 0 and the carry is taken from the
// generator of block i-2 instead. Where K does not divide N the top block is
// narrower. Combinational.
//   a, b : N-bit unsigned operands
//   sum  : N+1-bit result, bit N is the carry-out of the top block
// Default K=5 is the precision picked for a 70 C low-power corner.
module csa_adder #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 5
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   sum
);
  localparam int unsigned NB = (N + K - 1) / K;
  localparam int unsigned W  = NB * K;

  logic [W-1:0]  ax, bx;
  logic [W:0]    sfull;
  logic [NB-1:0] gen, prop;

  assign ax = W'(a);
  assign bx = W'(b);

  for (genvar j = 0; j < NB; j++) begin : g_blk
    logic [K:0] cg, s;
    logic       cin;
    assign cg      = {1'b0, ax[j*K +: K]} + {1'b0, bx[j*K +: K]};
    assign gen[j]  = cg[K];
    assign prop[j] = &(ax[j*K +: K] ^ bx[j*K +: K]);
    if (j == 0) begin : g_c0
      assign cin = 1'b0;
    end else if (j == 1) begin : g_c1
      assign cin = gen[0];
    end else begin : g_cj
      assign cin = prop[j-1] ? gen[j-2] : gen[j-1];
    end
    assign s = {1'b0, ax[j*K +: K]} + {1'b0, bx[j*K +: K]} + (K+1)'(cin);
    assign sfull[j*K +: K] = s[K-1:0];
    if (j == NB - 1) begin : g_top
      assign sfull[W] = s[K];
    end
  end

  assign sum = sfull[N:0];
endmodule
