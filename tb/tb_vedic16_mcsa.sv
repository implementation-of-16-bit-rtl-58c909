// tb_vedic16_mcsa: end-to-end self-checking test of the 16x16 Vedic
// multiplier with modified carry save adders, at its only (full) size.
// Applies corner operands (0, 1, all ones, single high bits), operands that
// force each of the two carries merged by the OR gate, walking ones, and
// random pairs, and compares the 32-bit product with a * b computed in
// 64-bit arithmetic. It counts how often each carry path is exercised at
// this level (c1: crosswise MCSA carry, c2: carry of the MCSA that adds the
// high byte of the low product, and both zero) and how often the OR of the
// two carries reaches the top adder, and fails if any never happens.
module tb_vedic16_mcsa;
  logic [15:0] a, b;
  logic [31:0] p;
  int checks = 0, failures = 0;
  int n_c1 = 0, n_c2 = 0, n_none = 0;
  longint unsigned expect_p;

  vedic16_mcsa dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] x, input logic [15:0] y);
    a = x; b = y;
    #1;
    expect_p = longint'(x) * longint'(y);
    checks++;
    if (64'(p) !== expect_p) begin
      failures++;
      $display("FAIL %h * %h -> %h (expected %h)", x, y, p, expect_p);
    end
    if (dut.c1) n_c1++;
    if (dut.c2) n_c2++;
    if (!dut.c1 && !dut.c2) n_none++;
  endtask

  initial begin
    apply(16'h0000, 16'h0000);
    apply(16'h0001, 16'h0001);
    apply(16'hffff, 16'hffff);   // largest product, c1 set
    apply(16'hffff, 16'h0001);
    apply(16'h8000, 16'h8000);
    apply(16'h00ff, 16'hffff);
    apply(16'hff00, 16'h00ff);
    apply(16'h10ff, 16'hf0ff);   // crosswise sum below 2^16, c2 set
    apply(16'h1234, 16'h5678);
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) apply(16'(1) << i, 16'(1) << j);
    for (int i = 0; i < 200000; i++) apply(16'($urandom), 16'($urandom));
    $display("c1 set %0d, c2 set %0d, neither %0d (OR gate output set %0d times)",
             n_c1, n_c2, n_none, n_c1 + n_c2);
    checks++;
    if (n_c1 == 0 || n_c2 == 0 || n_none == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
