// 4x4 Nikhilam multiplier core with a square ROM.
//
// Unsigned, purely combinational. The Nikhilam rule ("all from 9 and the
// last from 10") is applied in base B = 16, the power of two just above any
// 4-bit operand:
//   deviations       da = B - a, db = B - b          (1..16)
//   right-hand side  RHS = da * db
//   left-hand side   LHS = a - db  (= b - da, cross subtraction)
//   product          a*b = LHS * B + RHS
// The low four product bits are RHS[3:0] unchanged; the high four are
// LHS + RHS[7:4], formed in a 4-bit ripple carry adder (modulo 256, which
// is exact because a*b < 256 even where LHS is negative).
//
// The deviation product RHS is not multiplied but looked up, with the
// average/deviation method of a square ROM:
//   avg = floor((da+db)/2), dev = avg - min(da, db)
//   da - db even:  RHS = avg^2 - dev^2
//   da - db odd:   RHS = avg*(avg+1) - dev*(dev+1) = (avg^2+avg) - (dev^2+dev)
// Both squares come from one two-port ROM of squares (square_rom); the
// parity of da - db is the parity of da + db. The choice of base 16, the
// modulo-256 merge and using the ROM method for RHS are this design's
// reading of how the published procedure fits together.
//
// Interface: a, b (4 bits) in; p = a*b (8 bits).
module nikhilam_mult4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  localparam int unsigned W  = vedic_pkg::NIKHILAM_CORE_W;  // 4
  localparam int unsigned AW = W + 1;                       // ROM address

  logic [W:0]      da, db;          // deviations from the base, 1..16
  logic [W+1:0]    dsum;            // da + db
  logic            odd_diff;        // da - db is odd
  logic [W:0]      avg, dmin, dev;
  logic [2*AW-1:0] sq_avg, sq_dev;
  logic [2*AW-1:0] rhs;             // da * db, at most 256
  logic [W-1:0]    lhs;             // a - db, modulo 16
  logic            co_unused;       // carry out of the merge, weight 256

  // Nikhilam: complements from the base.
  assign da = (W+1)'(1 << W) - {1'b0, a};
  assign db = (W+1)'(1 << W) - {1'b0, b};

  // Average and deviation of the two deviations.
  assign dsum     = {1'b0, da} + {1'b0, db};
  assign odd_diff = dsum[0];
  assign avg      = dsum[W+1:1];
  assign dmin     = (da < db) ? da : db;
  assign dev      = avg - dmin;

  square_rom #(.AW(AW)) u_rom (
    .addr_a(avg), .addr_b(dev), .data_a(sq_avg), .data_b(sq_dev)
  );

  // Even difference: avg^2 - dev^2. Odd difference: n(n+1) = n^2 + n.
  always_comb begin
    if (odd_diff) rhs = (sq_avg + (2*AW)'(avg)) - (sq_dev + (2*AW)'(dev));
    else          rhs = sq_avg - sq_dev;
  end

  // Cross subtraction gives the left-hand side.
  assign lhs = a - db[W-1:0];

  // Merge: keep the low part of RHS, add LHS to its high part.
  assign p[W-1:0] = rhs[W-1:0];
  rca #(.W(W)) u_merge (
    .a(lhs), .b(rhs[2*W-1:W]), .ci(1'b0), .s(p[2*W-1:W]), .co(co_unused)
  );

endmodule
