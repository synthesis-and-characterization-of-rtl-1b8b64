// booth4_rows: radix-4 Booth partial-product generator for an NxN signed
// multiply (N even).
//
// The multiplier b is recoded into N/2 digits in {-2,-1,0,+1,+2}; digit j
// looks at bits b[2j+1], b[2j], b[2j-1] (b[-1] = 0). Row j is the multiplicand
// times |digit|, inverted when the digit is negative, sign-extended to 2N
// bits and shifted left by 2j. The "+1" that completes a two's-complement
// negation is not added into the row but returned separately in corr, at
// column 2j, so that column-dropping schemes can treat it as its own bit.
// The exact product is sum(rows) + corr modulo 2^2N. Combinational.
module booth4_rows #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] rows [N/2],
  output logic [2*N-1:0] corr
);
  always_comb begin
    logic [2:0]   trip;
    logic         neg;
    logic [N:0]   mag;     // |digit| * a, N+1-bit signed
    logic [2*N-1:0] ext;
    corr = '0;
    for (int j = 0; j < N/2; j++) begin
      trip = {b[2*j+1], b[2*j], (j == 0) ? 1'b0 : b[2*j-1]};
      neg  = trip[2] & ~(trip[1] & trip[0]);
      unique case (trip)
        3'b001, 3'b010, 3'b101, 3'b110: mag = {a[N-1], a};
        3'b011, 3'b100:                 mag = {a, 1'b0};
        default:                        mag = '0;
      endcase
      if (neg) mag = ~mag;
      ext     = {{(N-1){mag[N]}}, mag};
      rows[j] = ext << (2*j);
      corr[2*j] = neg;
    end
  end
endmodule
