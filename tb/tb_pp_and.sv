// Self-checking testbench of pp_and: applies all four input combinations
// and compares y with the truth table of AND.
module tb_pp_and;
  logic a, b, y;
  int checks = 0, failures = 0;

  pp_and dut (.a(a), .b(b), .y(y));

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (y !== (i == 3)) begin
        failures++;
        $display("FAIL a=%0b b=%0b y=%0b", a, b, y);
      end
    end
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
