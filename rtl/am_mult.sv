// am_mult: approximate unsigned multiplier with configurable partial error
// recovery (AM1 / AM2, and with low-column truncation TAM1 / TAM2).
//
// The N partial-product rows a*b[j]<<j are summed in a binary tree of
// carry-free approximate adders. Each tree adder turns x + y into
//   S = (x ^ y) | ((x & y) << 1)   (the sum, without carry propagation)
//   E = (x ^ y) & ((x & y) << 1)   (what S lost: x + y = S + E exactly)
// so the only error comes from dropping the E vectors. Error recovery adds an
// approximation of all the E vectors back, but only in the M most
// significant product bits:
//   SCHEME 1 (AM1): every E vector is ORed into one recovery vector;
//   SCHEME 2 (AM2): the E vectors of each tree level are ORed, and the
//                   per-level vectors are added accurately.
// With TCOLS > 0 the partial-product bits in the TCOLS lowest columns are not
// generated (the truncated TAM1 / TAM2 variants). The final sum plus the
// recovery term is one accurate addition. The tree shape, the two
// accumulation rules and TCOLS = N are this design's concrete choices.
// Combinational; N must be a power of two.
//   a, b : N-bit unsigned operands
//   p    : 2N-bit approximate product (never above the exact product)
// Defaults give TAM1-16, the multiplier used for smoothing and sharpening.
module am_mult #(
  parameter int unsigned N      = 16,
  parameter int unsigned M      = 16,  // product MSBs that get error recovery
  parameter int unsigned SCHEME = 1,   // 1 = AM1 accumulation, 2 = AM2
  parameter int unsigned TCOLS  = 16   // truncated low columns (0 = AM1/AM2)
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned PW = 2 * N;
  localparam int unsigned LV = $clog2(N);
  localparam logic [PW-1:0] TMASK = ~(PW'((64'(1) << TCOLS) - 1));
  localparam logic [PW-1:0] RMASK = ~(PW'((64'(1) << (PW - M)) - 1));

  logic [PW-1:0] node [LV+1][N];
  logic [PW-1:0] elev [LV];     // OR of the error vectors of one level
  logic [PW-1:0] rec;

  always_comb begin
    logic [PW-1:0] x, y, c;
    for (int j = 0; j < N; j++) begin
      node[0][j] = ((PW'(a) & {PW{b[j]}}) << j) & TMASK;
    end
    for (int l = 0; l < LV; l++) begin
      elev[l] = '0;
      for (int k = 0; k < N; k++) node[l+1][k] = '0;
      for (int k = 0; k < (N >> (l + 1)); k++) begin
        x = node[l][2*k];
        y = node[l][2*k+1];
        c = (x & y) << 1;
        node[l+1][k] = (x ^ y) | c;
        elev[l]      = elev[l] | ((x ^ y) & c);
      end
    end
    rec = '0;
    for (int l = 0; l < LV; l++) begin
      if (SCHEME == 1) rec = rec | elev[l];
      else             rec = rec + elev[l];
    end
    p = node[LV][0] + (rec & RMASK);
  end
endmodule
