// Ripple carry adder.
//
// Adds two W-bit words and a carry in with a chain of W full adders, the
// carry rippling from bit 0 to bit W-1. The multipliers use it to sum the
// products of their sub-multipliers.
//
// Interface: a, b (W bits), ci in; s (W bits), co out. Purely
// combinational; the delay grows linearly with W.
module rca #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s,
  output logic         co
);

  logic [W:0] c;  // carry into each bit position

  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end

  assign co = c[W];

endmodule
