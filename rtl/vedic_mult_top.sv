// Vedic multiplier family: Urdhva Tiryakbhyam and Nikhilam multipliers at
// 4, 8, 16, 32 and 64 bits, side by side.
//
// The ten multipliers are independent, purely combinational units with
// their own operand and product ports; nothing is shared and there is no
// clock. ut<N>_* ports belong to the N-bit Urdhva Tiryakbhyam multiplier
// (parallel crosswise partial products, ripple carry summation, built from
// 2x2 cells). nk<N>_* ports belong to the N-bit Nikhilam multiplier (4x4
// square-ROM cores merged by carry save addition). Each product port is
// 2N bits wide and holds the unsigned product of its two operands.
module vedic_mult_top (
  input  logic [3:0]   ut4_a,  ut4_b,
  output logic [7:0]   ut4_p,
  input  logic [7:0]   ut8_a,  ut8_b,
  output logic [15:0]  ut8_p,
  input  logic [15:0]  ut16_a, ut16_b,
  output logic [31:0]  ut16_p,
  input  logic [31:0]  ut32_a, ut32_b,
  output logic [63:0]  ut32_p,
  input  logic [63:0]  ut64_a, ut64_b,
  output logic [127:0] ut64_p,

  input  logic [3:0]   nk4_a,  nk4_b,
  output logic [7:0]   nk4_p,
  input  logic [7:0]   nk8_a,  nk8_b,
  output logic [15:0]  nk8_p,
  input  logic [15:0]  nk16_a, nk16_b,
  output logic [31:0]  nk16_p,
  input  logic [31:0]  nk32_a, nk32_b,
  output logic [63:0]  nk32_p,
  input  logic [63:0]  nk64_a, nk64_b,
  output logic [127:0] nk64_p
);

  // Urdhva Tiryakbhyam multipliers.
  ut_mult #(.N(4))  u_ut4  (.a(ut4_a),  .b(ut4_b),  .p(ut4_p));
  ut_mult #(.N(8))  u_ut8  (.a(ut8_a),  .b(ut8_b),  .p(ut8_p));
  ut_mult #(.N(16)) u_ut16 (.a(ut16_a), .b(ut16_b), .p(ut16_p));
  ut_mult #(.N(32)) u_ut32 (.a(ut32_a), .b(ut32_b), .p(ut32_p));
  ut_mult #(.N(64)) u_ut64 (.a(ut64_a), .b(ut64_b), .p(ut64_p));

  // Nikhilam multipliers.
  nikhilam_mult #(.N(4))  u_nk4  (.a(nk4_a),  .b(nk4_b),  .p(nk4_p));
  nikhilam_mult #(.N(8))  u_nk8  (.a(nk8_a),  .b(nk8_b),  .p(nk8_p));
  nikhilam_mult #(.N(16)) u_nk16 (.a(nk16_a), .b(nk16_b), .p(nk16_p));
  nikhilam_mult #(.N(32)) u_nk32 (.a(nk32_a), .b(nk32_b), .p(nk32_p));
  nikhilam_mult #(.N(64)) u_nk64 (.a(nk64_a), .b(nk64_b), .p(nk64_p));

endmodule
