// mcsa: WIDTH-bit modified carry save adder (three-operand adder).
//
// Two rows of full adders, all of them the multiplexer-based mux_full_adder
// cell:
//   * Carry-save row: cell i adds a[i], b[i] and c[i] with no carry between
//     cells, giving a save-sum bit ps[i] and a save-carry bit pc[i] of weight
//     2^(i+1).
//   * Ripple row: sum[0] = ps[0]; cell i (1..WIDTH-1) adds ps[i], pc[i-1]
//     and the ripple carry of cell i-1 (0 into the first cell); a last cell
//     adds 0, pc[WIDTH-1] and the ripple carry and gives sum[WIDTH] and cout.
// The result is a + b + c = {cout, sum}, WIDTH+2 bits, which holds the
// largest sum of three WIDTH-bit words. With c = 0, as in the 16x16 Vedic
// multiplier, it is a two-operand adder whose carry is sum[WIDTH] and cout
// stays 0. Purely combinational, no clock.
// The two-row arrangement, the zero into the first ripple cell and the zero
// operand of the last cell follow the published 4-bit diagram, generalised
// to WIDTH bits; the use of the multiplexer full adder throughout is how the
// modified adder differs from the plain carry save adder. Which cell input
// each signal uses is this design's choice: the ripple carry enters on the
// data input c of the cell, not on a select line.
module mcsa #(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH:0]   sum,
  output logic             cout
);
  logic [WIDTH-1:0] ps;  // carry-save row: sum bits
  logic [WIDTH-1:0] pc;  // carry-save row: carry bits (weight i+1)
  logic [WIDTH:1]   rc;  // ripple row: carry into cell i

  // Carry-save row
  for (genvar i = 0; i < WIDTH; i++) begin : g_save
    mux_full_adder u_fa (.a(a[i]), .b(b[i]), .c(c[i]), .sum(ps[i]), .carry(pc[i]));
  end

  // Ripple row
  assign sum[0] = ps[0];
  assign rc[1]  = 1'b0;
  for (genvar i = 1; i < WIDTH; i++) begin : g_ripple
    mux_full_adder u_fa (.a(ps[i]), .b(pc[i-1]), .c(rc[i]), .sum(sum[i]), .carry(rc[i+1]));
  end
  mux_full_adder u_fa_top (.a(1'b0), .b(pc[WIDTH-1]), .c(rc[WIDTH]), .sum(sum[WIDTH]), .carry(cout));

endmodule
