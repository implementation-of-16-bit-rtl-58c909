// tb_mux41: exhaustive self-checking test of mux41.
// Walks all 16 data patterns under all four select values and checks that
// q equals the selected data bit.
module tb_mux41;
  logic [3:0] d;
  logic [1:0] s;
  logic       q;
  int checks = 0, failures = 0;

  mux41 dut (.d0(d[0]), .d1(d[1]), .d2(d[2]), .d3(d[3]), .s1(s[1]), .s0(s[0]), .q(q));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {s, d} = 6'(i);
      #1;
      checks++;
      if (q !== d[s]) begin
        failures++;
        $display("FAIL d=%4b s=%2b -> q=%0b", d, s, q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
