// full_adder: one-bit full adder built from plain gates.
//
// Adds three bits of equal weight: sum = a XOR b XOR cin and
// cout = majority(a, b, cin). It is the cell of the ripple carry adders used
// inside the 4x4 and 8x8 Vedic multipliers. Purely combinational, no clock.
// The gate-level form is this design's own choice; the multiplexer-based full
// adder of the modified carry save adder is the separate module
// mux_full_adder.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (a & cin) | (b & cin);
  end
endmodule
