// tb_rca: self-checking test of the ripple carry adder.
// The default 8-bit instance gets every operand pair with both carry-in
// values (131072 cases); a 16-bit instance gets corner cases (all ones,
// carry through the whole chain) and random operands. Each result
// {cout, sum} is compared with a + b + cin in wider arithmetic.
module tb_rca;
  logic [7:0]  a8, b8, s8;
  logic        ci8, co8;
  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  int checks = 0, failures = 0;

  rca dut8 (.a(a8), .b(b8), .cin(ci8), .sum(s8), .cout(co8));
  rca #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic ci);
    a16 = x; b16 = y; ci16 = ci;
    #1;
    checks++;
    if ({co16, s16} !== 17'(x) + 17'(y) + 17'(ci)) begin
      failures++;
      $display("FAIL16 %h + %h + %0b -> %0b %h", x, y, ci, co16, s16);
    end
  endtask

  initial begin
    a16 = '0; b16 = '0; ci16 = 1'b0;
    for (int i = 0; i < (1 << 17); i++) begin
      {ci8, a8, b8} = 17'(i);
      #1;
      checks++;
      if ({co8, s8} !== 9'(a8) + 9'(b8) + 9'(ci8)) begin
        failures++;
        $display("FAIL8 %h + %h + %0b -> %0b %h", a8, b8, ci8, co8, s8);
      end
    end
    check16(16'hffff, 16'h0000, 1'b1);
    check16(16'hffff, 16'hffff, 1'b1);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h0000, 16'h0000, 1'b0);
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
