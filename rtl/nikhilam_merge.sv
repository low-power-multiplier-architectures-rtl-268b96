// Merge stage of the Nikhilam multiplier.
//
// Combines the four products of N/2-bit digits (ll = aL*bL, lh = aL*bH,
// hl = aH*bL, hh = aH*bH) into the 2N-bit product of a = {aH, aL} and
// b = {bH, bL}. With h = N/2, the low h bits of ll are kept as they are;
// the three overlapping words {hh, ll[N-1:h]}, lh and hl (N+h bits each)
// are reduced to a sum and a carry word by a carry save adder, and one
// ripple carry adder resolves them into the upper product bits. The top
// carry bits are always zero since the product fits in 2N bits.
//
// Interface: ll, lh, hl, hh (N bits each) in; p (2N bits) out. Purely
// combinational. N must be even; the default 8 merges four 4x4 products.
module nikhilam_merge #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]   ll,
  input  logic [N-1:0]   lh,
  input  logic [N-1:0]   hl,
  input  logic [N-1:0]   hh,
  output logic [2*N-1:0] p
);

  localparam int unsigned H = N / 2;

  logic [N+H-1:0] vert;
  logic [N+H-1:0] cs_s, cs_c;    // carry save form, cs_c weighted by 2
  logic [N+H-1:0] upper;
  logic           co_unused;

  assign vert = {hh, ll[N-1:H]};

  csa #(.W(N+H)) u_csa (
    .x(vert), .y({{H{1'b0}}, lh}), .z({{H{1'b0}}, hl}), .s(cs_s), .c(cs_c)
  );

  rca #(.W(N+H)) u_add (
    .a(cs_s), .b({cs_c[N+H-2:0], 1'b0}), .ci(1'b0), .s(upper), .co(co_unused)
  );

  assign p = {upper, ll[H-1:0]};

endmodule
