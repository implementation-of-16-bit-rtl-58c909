// tb_vedic2x2: exhaustive self-checking test of the 2x2 Vedic multiplier.
// Applies all 16 operand pairs and compares p with a * b.
module tb_vedic2x2;
  logic [1:0] a, b;
  logic [3:0] p;
  int checks = 0, failures = 0;

  vedic2x2 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (p !== 4'(a) * 4'(b)) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
