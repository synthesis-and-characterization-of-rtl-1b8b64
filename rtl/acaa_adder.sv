// acaa_adder: accuracy-configurable approximate adder (ACAA-K), without its
// optional error-correction stage.
//
// The carry chain is cut every K bits. Sub-adder j (j >= 1) is 2K bits wide
// and adds operand bits (j-1)K .. (j+1)K-1 with carry-in 0, so consecutive
// sub-adders overlap by K bits; only its upper K sum bits are used. The
// lowest sub-adder also supplies the bottom K sum bits. A carry is therefore
// seen across at most K bit positions of lookahead. Where K does not divide
// N the top block is narrower. Combinational.
//   a, b : N-bit unsigned operands
//   sum  : N+1-bit result, bit N from the top sub-adder
// Default K=3 is the precision picked for a 70 C high-performance corner.
module acaa_adder #(
  parameter int unsigned N = 16,
  parameter int unsigned K = 3
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

  if (NB == 1) begin : g_single
    assign sfull = {1'b0, ax} + {1'b0, bx};
  end else begin : g_multi
    for (genvar j = 1; j < NB; j++) begin : g_sub
      logic [2*K:0] s;
      assign s = {1'b0, ax[(j-1)*K +: 2*K]} + {1'b0, bx[(j-1)*K +: 2*K]};
      if (j == 1) begin : g_low
        assign sfull[0 +: K] = s[K-1:0];
      end
      assign sfull[j*K +: K] = s[2*K-1:K];
      if (j == NB - 1) begin : g_top
        assign sfull[W] = s[2*K];
      end
    end
  end

  assign sum = sfull[N:0];
endmodule
