// Carry save adder.
//
// Reduces three W-bit words to a sum word and a carry word without
// propagating carries: one full adder per bit position, all in parallel.
// x + y + z = s + 2*c. The Nikhilam multiplier uses it to merge the three
// overlapping sub-products before one final ripple carry addition.
//
// Interface: x, y, z (W bits) in; s and c (W bits) out, c weighted by two
// (c[i] belongs to bit i+1). Purely combinational, one full-adder delay.
module csa #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .ci(z[i]), .s(s[i]), .co(c[i]));
  end

endmodule
