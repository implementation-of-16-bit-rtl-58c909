// tb_mux_full_adder: exhaustive self-checking test of the multiplexer-based
// full adder. Applies all eight input combinations and compares
// {carry, sum} with a + b + c.
module tb_mux_full_adder;
  logic a, b, c, sum, carry;
  int checks = 0, failures = 0;

  mux_full_adder dut (.a(a), .b(b), .c(c), .sum(sum), .carry(carry));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({carry, sum} !== 2'(a) + 2'(b) + 2'(c)) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b -> carry=%0b sum=%0b", a, b, c, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
