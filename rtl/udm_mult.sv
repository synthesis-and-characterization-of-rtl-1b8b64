// udm_mult: under-designed unsigned multiplier (UDM).
//
// The building block is a 2x2 multiplier whose Karnaugh map is simplified so
// that 3 x 3 gives 7 (binary 111) instead of 9, saving an output bit; every
// other 2x2 product is exact. An NxN multiplier is built by splitting both
// operands in halves and combining four half-size multipliers with accurate
// adders, recursively down to 2x2. Because those additions are exact, the
// result equals the sum of every 2x2 block product at its weight 4^(i+j),
// which is how it is written here. Combinational; N must be a power of two.
//   a, b : N-bit unsigned operands
//   p    : 2N-bit approximate product
module udm_mult #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned ND = N / 2;

  always_comb begin
    logic [1:0]     x, y;
    logic [2:0]     blk;
    logic [2*N-1:0] acc;
    acc = '0;
    for (int i = 0; i < ND; i++) begin
      for (int j = 0; j < ND; j++) begin
        x   = a[2*i +: 2];
        y   = b[2*j +: 2];
        // approximate 2x2 product
        blk = {x[1] & y[1], (x[1] & y[0]) | (x[0] & y[1]), x[0] & y[0]};
        acc = acc + ((2*N)'(blk) << (2 * (i + j)));
      end
    end
    p = acc;
  end
endmodule
