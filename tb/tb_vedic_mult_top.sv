// End-to-end testbench of vedic_mult_top at its default parameters.
//
// Drives all ten multipliers at once with the same operand pair
// (truncated to each width): first every operand pair published for the
// waveforms of the two families, then corner cases and random pairs. Each
// of the ten products is compared with the simulator's own product.
//
// It counts how often the mechanisms of the design were exercised and
// counts a failure for any that never happened:
//   - even and odd difference of the deviations in the 4x4 Nikhilam cores
//     (the two square-ROM cases), taken over every 4-bit digit pair that
//     the 8-bit Nikhilam multiplier's four cores receive;
//   - negative cross difference (left-hand side) in those cores;
//   - a carry out of the crosswise addition in the 8-bit UT multiplier,
//     i.e. the ripple adders carrying into the hi*hi product.
module tb_vedic_mult_top;
  logic [63:0] x, y;
  logic [7:0]   ut4_p,  nk4_p;
  logic [15:0]  ut8_p,  nk8_p;
  logic [31:0]  ut16_p, nk16_p;
  logic [63:0]  ut32_p, nk32_p;
  logic [127:0] ut64_p, nk64_p;
  int checks = 0, failures = 0;
  int n_even = 0, n_odd = 0, n_lhs_neg = 0, n_cross_carry = 0;

  vedic_mult_top dut (
    .ut4_a(x[3:0]),   .ut4_b(y[3:0]),   .ut4_p(ut4_p),
    .ut8_a(x[7:0]),   .ut8_b(y[7:0]),   .ut8_p(ut8_p),
    .ut16_a(x[15:0]), .ut16_b(y[15:0]), .ut16_p(ut16_p),
    .ut32_a(x[31:0]), .ut32_b(y[31:0]), .ut32_p(ut32_p),
    .ut64_a(x),       .ut64_b(y),       .ut64_p(ut64_p),
    .nk4_a(x[3:0]),   .nk4_b(y[3:0]),   .nk4_p(nk4_p),
    .nk8_a(x[7:0]),   .nk8_b(y[7:0]),   .nk8_p(nk8_p),
    .nk16_a(x[15:0]), .nk16_b(y[15:0]), .nk16_p(nk16_p),
    .nk32_a(x[31:0]), .nk32_b(y[31:0]), .nk32_p(nk32_p),
    .nk64_a(x),       .nk64_b(y),       .nk64_p(nk64_p)
  );

  task automatic cmp(input string name, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: %0d * %0d gave %0d, expected %0d", name, x, y, got, exp);
    end
  endtask

  // Tally the Nikhilam core cases for the four digit pairs of the 8-bit unit.
  task automatic tally();
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        int da, db;
        da = 16 - int'(x[4*i +: 4]);
        db = 16 - int'(y[4*j +: 4]);
        if (((da - db) & 1) == 0) n_even++; else n_odd++;
        if (int'(x[4*i +: 4]) - db < 0) n_lhs_neg++;
      end
    // Crosswise sum overflowing into the hi*hi weight of the 8-bit UT unit.
    if (((int'(x[3:0]) * int'(y[3:0])) >> 4) + int'(x[3:0]) * int'(y[7:4])
        + int'(x[7:4]) * int'(y[3:0]) >= 256) n_cross_carry++;
  endtask

  task automatic apply(input logic [63:0] a, input logic [63:0] b);
    x = a; y = b;
    #1;
    cmp("ut4",  128'(ut4_p),  128'(x[3:0])  * 128'(y[3:0]));
    cmp("ut8",  128'(ut8_p),  128'(x[7:0])  * 128'(y[7:0]));
    cmp("ut16", 128'(ut16_p), 128'(x[15:0]) * 128'(y[15:0]));
    cmp("ut32", 128'(ut32_p), 128'(x[31:0]) * 128'(y[31:0]));
    cmp("ut64", ut64_p,       128'(x)       * 128'(y));
    cmp("nk4",  128'(nk4_p),  128'(x[3:0])  * 128'(y[3:0]));
    cmp("nk8",  128'(nk8_p),  128'(x[7:0])  * 128'(y[7:0]));
    cmp("nk16", 128'(nk16_p), 128'(x[15:0]) * 128'(y[15:0]));
    cmp("nk32", 128'(nk32_p), 128'(x[31:0]) * 128'(y[31:0]));
    cmp("nk64", nk64_p,       128'(x)       * 128'(y));
    tally();
  endtask

  initial begin
    // Operand pairs of the published waveforms.
    apply(64'd15, 64'd15);      cmp("ut4 published", 128'(ut4_p), 225);
    apply(64'd14, 64'd14);      cmp("nk4 published", 128'(nk4_p), 196);
    apply(64'd2, 64'd4);        cmp("ut8 published", 128'(ut8_p), 8);
    apply(64'd97, 64'd2);       cmp("nk8 published", 128'(nk8_p), 194);
    apply(64'd3, 64'd10);       cmp("ut16 published", 128'(ut16_p), 30);
    apply(64'd2565, 64'd2);     cmp("nk16 published", 128'(nk16_p), 5130);
    apply(64'd8, 64'd7);        cmp("ut32 published", 128'(ut32_p), 56);
    apply(64'd65553, 64'd1114129);
    cmp("nk32 published", 128'(nk32_p), 128'd73034498337);
    apply(64'd12, 64'd1);       cmp("ut64 published", ut64_p, 12);
    apply(64'd4113, 64'd268435473);
    cmp("nk64 published", nk64_p, 128'd1104075100449);

    // Corners and random pairs.
    apply('1, '1);
    apply('0, '1);
    apply('1, 64'd1);
    for (int k = 0; k < 2000; k++) apply({$urandom, $urandom}, {$urandom, $urandom});

    $display("mechanisms: even difference %0d, odd difference %0d, negative LHS %0d, crosswise carry %0d",
             n_even, n_odd, n_lhs_neg, n_cross_carry);
    checks++;
    if (n_even == 0 || n_odd == 0 || n_lhs_neg == 0 || n_cross_carry == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
