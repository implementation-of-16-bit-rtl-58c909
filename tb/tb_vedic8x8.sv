// tb_vedic8x8: exhaustive self-checking test of the 8x8 Vedic multiplier.
// Applies all 65536 operand pairs and compares p with a * b computed
// in wider arithmetic. It also counts how often each of the two carries
// merged by the OR gate (c1 from the crosswise sum, c2 from adding the high
// half of the low product) is set, and fails if either never is.
module tb_vedic8x8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int n_c1 = 0, n_c2 = 0;

  vedic8x8 dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      checks++;
      if (p !== 16'(a) * 16'(b)) begin
        failures++;
        $display("FAIL %0d * %0d -> %0d", a, b, p);
      end
      if (dut.c1) n_c1++;
      if (dut.c2) n_c2++;
    end
    $display("carry c1 set %0d times, carry c2 set %0d times", n_c1, n_c2);
    checks++;
    if (n_c1 == 0 || n_c2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
