// rca: WIDTH-bit ripple carry adder.
//
// Adds two WIDTH-bit unsigned words and a carry-in with a chain of WIDTH
// full_adder cells; the carry of bit i feeds bit i+1, so the delay grows
// linearly with WIDTH. Outputs are the WIDTH-bit sum and the carry out of
// the top bit. The 4x4 Vedic multiplier uses three 4-bit instances, the 8x8
// one three 8-bit instances; both tie cin to 0. Purely combinational.
// The ripple structure follows the design; the carry-in port is this
// design's own addition, so that the adder is a general building block.
module rca #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[WIDTH];
endmodule
