// Self-checking testbench of ut_mult at every evaluated word length.
// The 4- and 8-bit multipliers are checked exhaustively; the 16-, 32- and
// 64-bit ones (64 being the module's default) with the operand pairs shown
// in the published simulation results, corner cases (zero, one, all ones)
// and random operands. Every product is compared with the product worked
// out by the simulator's own wide multiplication.
module tb_ut_mult;
  logic [3:0]   a4,  b4;   logic [7:0]   p4;
  logic [7:0]   a8,  b8;   logic [15:0]  p8;
  logic [15:0]  a16, b16;  logic [31:0]  p16;
  logic [31:0]  a32, b32;  logic [63:0]  p32;
  logic [63:0]  a64, b64;  logic [127:0] p64;
  int checks = 0, failures = 0;

  ut_mult #(.N(4))  dut4  (.a(a4),  .b(b4),  .p(p4));
  ut_mult #(.N(8))  dut8  (.a(a8),  .b(b8),  .p(p8));
  ut_mult #(.N(16)) dut16 (.a(a16), .b(b16), .p(p16));
  ut_mult #(.N(32)) dut32 (.a(a32), .b(b32), .p(p32));
  ut_mult           dut64 (.a(a64), .b(b64), .p(p64));

  // Applies one operand pair to every width (truncated to that width).
  task automatic apply(input logic [63:0] x, input logic [63:0] y, input int widths);
    a4 = x[3:0];   b4 = y[3:0];
    a8 = x[7:0];   b8 = y[7:0];
    a16 = x[15:0]; b16 = y[15:0];
    a32 = x[31:0]; b32 = y[31:0];
    a64 = x;       b64 = y;
    #1;
    if ((widths & 1) != 0)  begin checks++; if (p4  !== 8'(a4)   * 8'(b4))    begin failures++; $display("FAIL N=4 %0d*%0d=%0d",  a4,  b4,  p4);  end end
    if ((widths & 2) != 0)  begin checks++; if (p8  !== 16'(a8)  * 16'(b8))   begin failures++; $display("FAIL N=8 %0d*%0d=%0d",  a8,  b8,  p8);  end end
    if ((widths & 4) != 0)  begin checks++; if (p16 !== 32'(a16) * 32'(b16))  begin failures++; $display("FAIL N=16 %0d*%0d=%0d", a16, b16, p16); end end
    if ((widths & 8) != 0)  begin checks++; if (p32 !== 64'(a32) * 64'(b32))  begin failures++; $display("FAIL N=32 %0d*%0d=%0d", a32, b32, p32); end end
    if ((widths & 16) != 0) begin checks++; if (p64 !== 128'(a64) * 128'(b64)) begin failures++; $display("FAIL N=64 %0d*%0d=%0d", a64, b64, p64); end end
  endtask

  // Checks one product against a value printed in a published waveform.
  task automatic expect_value(input int width, input logic [127:0] got, input logic [127:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL N=%0d published value %0d, got %0d", width, exp, got);
    end
  endtask

  initial begin
    // Exhaustive at 4 and 8 bits.
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        apply(64'(i), 64'(j), (i < 16 && j < 16) ? 3 : 2);

    // Published operand pairs.
    apply(64'd15, 64'd15, 1);  expect_value(4, 128'(p4), 225);
    apply(64'd10, 64'd12, 1);  expect_value(4, 128'(p4), 120);
    apply(64'd2, 64'd255, 2);  expect_value(8, 128'(p8), 510);
    apply(64'd11, 64'd2, 2);   expect_value(8, 128'(p8), 22);
    apply(64'd3, 64'd10, 4);   expect_value(16, 128'(p16), 30);
    apply(64'd8, 64'd7, 8);    expect_value(32, 128'(p32), 56);
    apply(64'd12, 64'd1, 16);  expect_value(64, p64, 12);
    apply(64'd1, 64'd17596481077249, 16); expect_value(64, p64, 128'd17596481077249);
    // Corners and random operands at all widths.
    apply('1, '1, 31);
    apply('1, 64'd1, 31);
    apply(64'd0, '1, 31);
    apply({1'b1, 63'd0}, {1'b1, 63'd0}, 31);
    for (int k = 0; k < 3000; k++)
      apply({$urandom, $urandom}, {$urandom, $urandom}, 28);

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
