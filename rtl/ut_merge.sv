// Merge stage of the Urdhva Tiryakbhyam multiplier.
//
// Combines the four products of N/2-bit digits into the 2N-bit product of
// N-bit operands a = {aH, aL}, b = {bH, bL}: the vertical products
// ll = aL*bL and hh = aH*bH and the crosswise products lh = aL*bH and
// hl = aH*bL. With h = N/2:
//   p[h-1:0]  = ll[h-1:0]                      (passed through)
//   p[2N-1:h] = {hh, ll[N-1:h]} + lh + hl      (two N+h bit ripple adds)
// The carry out of both ripple carry adders is always zero because the
// product fits in 2N bits; it is left unused.
//
// Interface: ll, lh, hl, hh (N bits each) in; p (2N bits) out. Purely
// combinational. N must be even; the default 8 merges four 4x4 products.
module ut_merge #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   ll,
  input  logic [N-1:0]   lh,
  input  logic [N-1:0]   hl,
  input  logic [N-1:0]   hh,
  output logic [2*N-1:0] p
);

  localparam int unsigned H = N / 2;

  logic [N+H-1:0] vert;        // vertical products side by side
  logic [N+H-1:0] sum1, sum2;
  logic           co1, co2;    // always zero, see header

  assign vert = {hh, ll[N-1:H]};

  rca #(.W(N+H)) u_add1 (.a(vert), .b({{H{1'b0}}, lh}), .ci(1'b0), .s(sum1), .co(co1));
  rca #(.W(N+H)) u_add2 (.a(sum1), .b({{H{1'b0}}, hl}), .ci(1'b0), .s(sum2), .co(co2));

  assign p = {sum2, ll[H-1:0]};

endmodule
