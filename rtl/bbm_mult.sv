// bbm_mult: broken radix-4 Booth signed multiplier (BBM-VBL).
//
// The partial products of an exact radix-4 Booth multiplier (booth4_rows) are
// summed accurately, except that every partial-product bit in a column below
// the vertical break line VBL is omitted, including the negation "+1" bits
// that fall there. This removes the adder cells of the low columns. Row
// omission (a horizontal break line) is not used. Combinational.
//   a, b : N-bit signed operands
//   p    : 2N-bit signed approximate product (the VBL LSBs are always 0)
// Default VBL=8 is the configuration compared for the IDCT at 70 C.
module bbm_mult #(
  parameter int unsigned N   = 16,
  parameter int unsigned VBL = 8
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);
  localparam logic [2*N-1:0] KEEP = ~((2*N)'((64'(1) << VBL) - 1));

  logic [2*N-1:0] rows [N/2];
  logic [2*N-1:0] corr;

  booth4_rows #(.N(N)) u_rows (.a(a), .b(b), .rows(rows), .corr(corr));

  always_comb begin
    logic [2*N-1:0] acc;
    acc = corr & KEEP;
    for (int j = 0; j < N/2; j++) acc = acc + (rows[j] & KEEP);
    p = signed'(acc);
  end
endmodule
