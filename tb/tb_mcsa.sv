// tb_mcsa: self-checking test of the modified carry save adder.
// A 4-bit instance gets every combination of its three operands (4096
// cases); the default 16-bit instance gets corner cases and random
// operands, both as a three-operand adder and with the third operand 0, the
// way the 16x16 multiplier uses it. Results {cout, sum} are compared with
// a + b + c in wider arithmetic. The test also counts how often the second
// carry (cout) is set, which only three operands can do.
module tb_mcsa;
  logic [3:0]  a4, b4, c4;
  logic [4:0]  s4;
  logic        co4;
  logic [15:0] a16, b16, c16;
  logic [16:0] s16;
  logic        co16;
  int checks = 0, failures = 0;
  int n_cout = 0;

  mcsa #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .c(c4), .sum(s4), .cout(co4));
  mcsa dut16 (.a(a16), .b(b16), .c(c16), .sum(s16), .cout(co16));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y, input logic [15:0] z);
    a16 = x; b16 = y; c16 = z;
    #1;
    checks++;
    if ({co16, s16} !== 18'(x) + 18'(y) + 18'(z)) begin
      failures++;
      $display("FAIL16 %h + %h + %h -> %0b %h", x, y, z, co16, s16);
    end
    if (co16) n_cout++;
  endtask

  initial begin
    a16 = '0; b16 = '0; c16 = '0;
    for (int i = 0; i < (1 << 12); i++) begin
      {a4, b4, c4} = 12'(i);
      #1;
      checks++;
      if ({co4, s4} !== 6'(a4) + 6'(b4) + 6'(c4)) begin
        failures++;
        $display("FAIL4 %h + %h + %h -> %0b %h", a4, b4, c4, co4, s4);
      end
      if (co4) n_cout++;
    end
    check16(16'hffff, 16'hffff, 16'hffff);
    check16(16'hffff, 16'h0001, 16'h0000);
    check16(16'h8000, 16'h8000, 16'h0000);
    check16(16'h0000, 16'h0000, 16'h0000);
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom), 16'($urandom));
    for (int i = 0; i < 20000; i++) check16(16'($urandom), 16'($urandom), 16'h0000);
    $display("second carry set %0d times", n_cout);
    checks++;
    if (n_cout == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
