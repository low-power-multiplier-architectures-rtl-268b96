// Self-checking testbench of nikhilam_mult4: all 256 operand pairs,
// product compared with the integer product. It also classifies each pair
// by the two cases of the square-ROM method (the deviations 16-a and 16-b
// differ by an even or an odd amount) and by the sign of the cross
// difference a - (16 - b), and counts a failure if any case never occurs.
module tb_nikhilam_mult4;
  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;
  int n_even = 0, n_odd = 0, n_lhs_neg = 0, n_lhs_pos = 0;

  nikhilam_mult4 dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          $display("FAIL %0d * %0d = %0d", i, j, p);
        end
        if ((((16 - i) - (16 - j)) & 1) == 0) n_even++; else n_odd++;
        if (i - (16 - j) < 0) n_lhs_neg++; else n_lhs_pos++;
      end
    $display("even difference %0d, odd difference %0d, negative LHS %0d, non-negative LHS %0d",
             n_even, n_odd, n_lhs_neg, n_lhs_pos);
    checks++;
    if (n_even == 0 || n_odd == 0 || n_lhs_neg == 0 || n_lhs_pos == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
