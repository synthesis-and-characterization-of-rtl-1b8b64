// etaii_adder: error-tolerant adder type II (ETAII-K).
//
// The operands are cut into K-bit blocks. A carry generator per block
// computes that block's carry-out assuming carry-in 0; block j adds its bits
// with the carry generator output of block j-1 as carry-in. A carry therefore
// travels at most across two blocks. Where K does not divide N the top block
// is narrower. Combinational.
//   a, b : N-bit unsigned operands
//   sum  : N+1-bit result, bit N is the carry-out of the top block
// Default K=3 is the precision picked for a 70 C high-performance corner.
module etaii_adder #(
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
  logic [NB-1:0] gen;    // carry-out of each block with carry-in 0

  assign ax = W'(a);
  assign bx = W'(b);

  for (genvar j = 0; j < NB; j++) begin : g_blk
    logic [K:0] cg, s;
    logic       cin;
    assign cg     = {1'b0, ax[j*K +: K]} + {1'b0, bx[j*K +: K]};
    assign gen[j] = cg[K];
    if (j == 0) begin : g_c0
      assign cin = 1'b0;
    end else begin : g_cj
      assign cin = gen[j-1];
    end
    assign s = {1'b0, ax[j*K +: K]} + {1'b0, bx[j*K +: K]} + (K+1)'(cin);
    assign sfull[j*K +: K] = s[K-1:0];
    if (j == NB - 1) begin : g_top
      assign sfull[W] = s[K];
    end
  end

  assign sum = sfull[N:0];
endmodule
