// Self-checking testbench of csa: for exhaustive 4-bit and random 48-bit
// triples, checks s + 2*c == x + y + z and, bit by bit, that s is the XOR
// and c the majority of the three inputs (no carry propagation).
module tb_csa;
  logic [3:0]  x4, y4, z4, s4, c4;
  logic [47:0] x, y, z, s, c;
  int checks = 0, failures = 0;

  csa #(.W(4))  dut4  (.x(x4), .y(y4), .z(z4), .s(s4), .c(c4));
  csa #(.W(48)) dut48 (.x(x), .y(y), .z(z), .s(s), .c(c));

  initial begin
    for (int i = 0; i < 4096; i++) begin
      {x4, y4, z4} = 12'(i);
      #1;
      checks++;
      if (7'(s4) + 7'({c4, 1'b0}) !== 7'(x4) + 7'(y4) + 7'(z4)) begin
        failures++;
        $display("FAIL W=4 x=%0d y=%0d z=%0d s=%0d c=%0d", x4, y4, z4, s4, c4);
      end
    end
    for (int k = 0; k < 2000; k++) begin
      x = 48'({$urandom, $urandom}); y = 48'({$urandom, $urandom}); z = 48'({$urandom, $urandom});
      #1;
      checks++;
      if (s !== (x ^ y ^ z) || c !== ((x & y) | (x & z) | (y & z)) ||
          50'(s) + {1'b0, c, 1'b0} !== 50'(x) + 50'(y) + 50'(z)) begin
        failures++;
        if (failures < 10) $display("FAIL W=48 x=%h y=%h z=%h s=%h c=%h", x, y, z, s, c);
      end
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
