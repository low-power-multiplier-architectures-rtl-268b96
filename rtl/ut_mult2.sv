// 2x2 Urdhva Tiryakbhyam (vertically and crosswise) multiplier.
//
// The smallest Vedic multiplier cell, from which all UT multipliers are
// built. Four partial-product AND gates form a0b0, a1b0, a0b1 and a1b1.
// Vertically: p0 = a0b0. Crosswise: a1b0 + a0b1 in a half adder gives p1
// and a carry. Vertically again: a1b1 plus that carry in a second half
// adder gives p2 and p3. The structure (4 AND gates, 2 half adders) is the
// published one.
//
// Interface: a, b (2 bits) in; p = a*b (4 bits). Purely combinational.
module ut_mult2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic a0b0, a1b0, a0b1, a1b1;
  logic c1;

  pp_and u_and00 (.a(a[0]), .b(b[0]), .y(a0b0));
  pp_and u_and10 (.a(a[1]), .b(b[0]), .y(a1b0));
  pp_and u_and01 (.a(a[0]), .b(b[1]), .y(a0b1));
  pp_and u_and11 (.a(a[1]), .b(b[1]), .y(a1b1));

  assign p[0] = a0b0;

  half_adder u_ha1 (.a(a1b0), .b(a0b1), .s(p[1]), .c(c1));
  half_adder u_ha2 (.a(a1b1), .b(c1),   .s(p[2]), .c(p[3]));

endmodule
