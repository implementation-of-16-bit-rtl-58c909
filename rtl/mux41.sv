// mux41: 4-to-1 multiplexer.
//
// Passes data input d[{s1,s0}] to q. Two of these form the one-bit full
// adder of the modified carry save adder (mux_full_adder), where the two
// addend bits drive the selects and the carry-in, its inverse and the
// constants 0 and 1 drive the data inputs. Purely combinational, no clock.
// Port names D0..D3, S1, S0 and Q follow the cell symbol of that full adder.
module mux41 (
  input  logic d0,
  input  logic d1,
  input  logic d2,
  input  logic d3,
  input  logic s1,
  input  logic s0,
  output logic q
);
  always_comb begin
    unique case ({s1, s0})
      2'b00: q = d0;
      2'b01: q = d1;
      2'b10: q = d2;
      2'b11: q = d3;
    endcase
  end
endmodule
