// vedic2x2: 2x2 unsigned Vedic (Urdhva Tiryagbhyam) multiplier.
//
// Forms the four one-bit products "vertically and crosswise" and adds them
// with two half adders:
//   p[0]        = a0b0                     (vertical, low bits)
//   {k, p[1]}   = a1b0 + a0b1              (crosswise, first half adder)
//   {p[3],p[2]} = a1b1 + k                 (vertical, high bits, second half adder)
// The 4-bit product p is the leaf of the 4x4, 8x8 and 16x16 multipliers.
// Purely combinational, no clock. The half-adder arrangement follows the
// published 2x2 diagram; forming each one-bit product with an AND is the
// standard binary product and this design's way of writing it.
module vedic2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic k;  // carry of the crosswise half adder

  always_comb begin
    a0b0 = a[0] & b[0];
    a1b0 = a[1] & b[0];
    a0b1 = a[0] & b[1];
    a1b1 = a[1] & b[1];
  end

  assign p[0] = a0b0;
  half_adder u_ha_cross (.a(a0b1), .b(a1b0), .sum(p[1]), .carry(k));
  half_adder u_ha_high  (.a(a1b1), .b(k),    .sum(p[2]), .carry(p[3]));
endmodule
