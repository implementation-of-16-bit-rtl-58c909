// mux_full_adder: one-bit full adder made of two 4-to-1 multiplexers.
//
// This is the cell of the modified carry save adder (mcsa). The two addend
// bits a and b drive the select lines of both multiplexers (b on S1, a on
// S0), so each multiplexer only has to choose among functions of the third
// input c:
//   M1 (sum):   D0 = c, D1 = ~c, D2 = ~c, D3 = c   -> a ^ b ^ c
//   M2 (carry): D0 = 0, D1 = c,  D2 = c,  D3 = 1   -> majority(a, b, c)
// The inverter on c is shared by D1 and D2 of M1. The data-input assignment
// and the select wiring follow the published cell diagram; everything is
// combinational, with no clock.
module mux_full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic sum,
  output logic carry
);
  logic c_n;

  always_comb c_n = ~c;

  mux41 u_m1 (.d0(c),    .d1(c_n), .d2(c_n), .d3(c),    .s1(b), .s0(a), .q(sum));
  mux41 u_m2 (.d0(1'b0), .d1(c),   .d2(c),   .d3(1'b1), .s1(b), .s0(a), .q(carry));
endmodule
