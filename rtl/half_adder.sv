// half_adder: one-bit half adder.
//
// Adds two bits and returns a sum bit and a carry bit: sum = a XOR b,
// carry = a AND b. It is the cell from which the 2x2 Vedic multiplier forms
// its middle and upper product bits. Purely combinational, no clock.
// The adder's function is the standard one; the gate-level form is this
// design's own choice.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
