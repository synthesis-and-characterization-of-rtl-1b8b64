// tbm_mult: truncated radix-4 Booth signed multiplier (TBM-T).
//
// The T least significant bits of each two's-complement operand are forced
// to 0, then the product is formed by radix-4 Booth recoding (booth4_rows)
// and an accurate sum of the N/2 partial-product rows. Zeroed operand bits
// let synthesis remove the low partial-product columns and shorten the
// critical path. Combinational.
//   a, b : N-bit signed operands
//   p    : 2N-bit signed approximate product
// Default T=7 is the truncation used for the IDCT at 70 C.
module tbm_mult #(
  parameter int unsigned N = 16,
  parameter int unsigned T = 7
) (
  input  logic signed [N-1:0]   a,
  input  logic signed [N-1:0]   b,
  output logic signed [2*N-1:0] p
);
  logic [N-1:0]   at, bt;
  logic [2*N-1:0] rows [N/2];
  logic [2*N-1:0] corr;

  assign at = {a[N-1:T], {T{1'b0}}};
  assign bt = {b[N-1:T], {T{1'b0}}};

  booth4_rows #(.N(N)) u_rows (.a(at), .b(bt), .rows(rows), .corr(corr));

  always_comb begin
    logic [2*N-1:0] acc;
    acc = corr;
    for (int j = 0; j < N/2; j++) acc = acc + rows[j];
    p = signed'(acc);
  end
endmodule
