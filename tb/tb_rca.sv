// Self-checking testbench of rca: an 8-bit adder is checked exhaustively
// (every a, b and carry in) and a 64-bit adder with random words and the
// all-ones carry-propagation case, against the integer sum.
module tb_rca;
  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [63:0] a64, b64, s64;
  logic        ci64, co64;
  int checks = 0, failures = 0;

  rca #(.W(8))  dut8  (.a(a8),  .b(b8),  .ci(ci8),  .s(s8),  .co(co8));
  rca #(.W(64)) dut64 (.a(a64), .b(b64), .ci(ci64), .s(s64), .co(co64));

  task automatic check64(input logic [63:0] x, input logic [63:0] y, input logic c);
    logic [64:0] exp;
    a64 = x; b64 = y; ci64 = c;
    #1;
    exp = {1'b0, x} + {1'b0, y} + 65'(c);
    checks++;
    if ({co64, s64} !== exp) begin
      failures++;
      $display("FAIL W=64 %h + %h + %0b = %h, expected %h", x, y, c, {co64, s64}, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int c = 0; c < 2; c++) begin
          a8 = 8'(i); b8 = 8'(j); ci8 = 1'(c);
          #1;
          checks++;
          if ({co8, s8} !== 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL W=8 %0d + %0d + %0d = %0d", i, j, c, {co8, s8});
          end
        end
    check64('1, 64'd0, 1'b1);
    check64('1, '1, 1'b1);
    for (int k = 0; k < 2000; k++)
      check64({$urandom, $urandom}, {$urandom, $urandom}, 1'($urandom));
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
