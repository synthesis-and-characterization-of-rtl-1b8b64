// icm_mult: inaccurate counter-based unsigned multiplier (ICM).
//
// The N partial-product rows a*b[j]<<j are reduced in a Wallace-style tree
// of 4:2 counters until two rows are left, which one accurate adder sums.
// An exact 4:2 counter turns four bits of one column into a 3-bit count
// (0..4). The approximate counter keeps only two output bits: the sum bit is
// the parity of the four inputs and the carry bit (weight 2) is set when at
// least two inputs are 1. The counts 0..3 come out exact; the count 4
// ("100") comes out as "10", i.e. 2, so the product is never above the
// exact one and loses 2 at a counter's weight whenever all four of its
// inputs are 1.
// The counter's function follows the description of the scheme; the tree
// shape is this design's simplest choice: at each level the rows are taken
// four at a time, and a counter is applied at every bit position of those
// four rows (16 -> 8 -> 4 -> 2 rows for N = 16). Counters over columns that
// hold fewer than four live bits see zeros and are exact.
// Combinational; N must be a power of two and at least 4.
//   a, b : N-bit unsigned operands
//   p    : 2N-bit approximate product
module icm_mult #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned PW = 2 * N;
  localparam int unsigned LV = $clog2(N) - 1;  // levels down to 2 rows

  logic [PW-1:0] rows [LV+1][N];

  always_comb begin
    for (int r = 0; r < N; r++) begin
      rows[0][r] = b[r] ? (PW'(a) << r) : '0;
    end
    for (int l = 1; l <= LV; l++) begin
      for (int r = 0; r < N; r++) rows[l][r] = '0;
      for (int g = 0; g < (N >> (l + 1)); g++) begin
        logic [PW-1:0] x0, x1, x2, x3, two;
        x0 = rows[l-1][4*g];
        x1 = rows[l-1][4*g+1];
        x2 = rows[l-1][4*g+2];
        x3 = rows[l-1][4*g+3];
        // at least two of four set, per bit
        two = (x0 & x1) | (x0 & x2) | (x0 & x3) | (x1 & x2) | (x1 & x3) | (x2 & x3);
        rows[l][2*g]   = x0 ^ x1 ^ x2 ^ x3;
        rows[l][2*g+1] = two << 1;
      end
    end
    p = rows[LV][0] + rows[LV][1];
  end
endmodule
