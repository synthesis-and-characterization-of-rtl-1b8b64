// gcsa_adder: generate-signal-exploited carry speculation adder (GCSA-K).
//
// The operands are cut into K-bit blocks with propagate P (every bit pair
// differs). The carry-in of block i is chosen by the block's own propagate
// signal: when block i propagates, an error in its carry-in would reach its
// carry-out, so the carry-in is taken from a longer speculation (the
// carry-out of the 2K bits below, with carry-in 0); otherwise from the K bits
// below. The exact selection rule is this design's reading of the scheme.
// Where K does not divide N the top block is narrower. Combinational.
//   a, b : N-bit unsigned operands
//   sum  : N+1-bit result, bit N is the carry-out of the top block
// Default K=6 is the precision picked for a 70 C low-power corner.
module gcsa_adder #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 6
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N:0]   sum
);
  localparam int unsigned NB = (N + K - 1) / K;
  localparam int unsigned W  = NB * K;

  logic [W-1:0]  ax, bx;
  logic [W:0]    sfull;
  logic [NB-1:0] gen;    // carry-out of block j, carry-in 0
  logic [NB-1:0] gen2;   // carry-out of blocks j-1..j together, carry-in 0
  logic [NB-1:0] prop;   // block j would pass a carry straight through

  assign ax = W'(a);
  assign bx = W'(b);

  for (genvar j = 0; j < NB; j++) begin : g_blk
    logic [K:0] cg, s0, s1, s;
    assign cg      = {1'b0, ax[j*K +: K]} + {1'b0, bx[j*K +: K]};
    assign gen[j]  = cg[K];
    assign prop[j] = &(ax[j*K +: K] ^ bx[j*K +: K]);
    if (j == 0) begin : g_g20
      assign gen2[j] = cg[K];
    end else begin : g_g2j
      logic [2*K:0] cg2;
      assign cg2     = {1'b0, ax[(j-1)*K +: 2*K]} + {1'b0, bx[(j-1)*K +: 2*K]};
      assign gen2[j] = cg2[2*K];
    end
    assign s0 = cg;
    assign s1 = {1'b0, ax[j*K +: K]} + {1'b0, bx[j*K +: K]} + (K+1)'(1);
    if (j == 0) begin : g_b0
      assign s = s0;
    end else begin : g_bj
      assign s = (prop[j]) ? (gen2[j-1] ? s1 : s0) : (gen[j-1] ? s1 : s0);
    end
    assign sfull[j*K +: K] = s[K-1:0];
    if (j == NB - 1) begin : g_top
      assign sfull[W] = s[K];
    end
  end

  assign sum = sfull[N:0];
endmodule
