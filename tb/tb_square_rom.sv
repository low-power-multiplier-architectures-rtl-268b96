// Self-checking testbench of square_rom: reads every address of a 5-bit
// ROM on both ports (port b in reverse order) and compares with i*i.
module tb_square_rom;
  logic [4:0] addr_a, addr_b;
  logic [9:0] data_a, data_b;
  int checks = 0, failures = 0;

  square_rom #(.AW(5)) dut (
    .addr_a(addr_a), .addr_b(addr_b), .data_a(data_a), .data_b(data_b)
  );

  initial begin
    for (int i = 0; i < 32; i++) begin
      addr_a = 5'(i); addr_b = 5'(31 - i);
      #1;
      checks += 2;
      if (data_a !== 10'(i * i)) begin
        failures++;
        $display("FAIL port a: rom[%0d] = %0d", i, data_a);
      end
      if (data_b !== 10'((31 - i) * (31 - i))) begin
        failures++;
        $display("FAIL port b: rom[%0d] = %0d", 31 - i, data_b);
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
