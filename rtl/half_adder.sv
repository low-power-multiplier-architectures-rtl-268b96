// Half adder.
//
// Adds two bits. The carry is produced by the same partial-product AND
// cell (pp_and) that forms partial products; the sum is an XOR, which in
// the low-power cell is a 4-transistor XOR (9 transistors in total). Only
// the logic function of the transistor-level cell is modelled here.
//
// Interface: a, b in; s = a ^ b, c = a & b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  pp_and u_carry (.a(a), .b(b), .y(c));

  assign s = a ^ b;

endmodule
