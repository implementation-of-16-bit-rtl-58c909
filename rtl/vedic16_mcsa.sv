// vedic16_mcsa: 16x16 unsigned Vedic multiplier with modified carry save
// adders (top level of the design).
//
// The Urdhva Tiryagbhyam ("vertically and crosswise") rule splits each
// operand into bytes and multiplies them in parallel with four 8x8 Vedic
// multipliers (vedic8x8), themselves built recursively from 4x4 and 2x2
// multipliers and ripple carry adders:
//   p_ll = a[7:0]*b[7:0]    p_hl = a[15:8]*b[7:0]
//   p_lh = a[7:0]*b[15:8]   p_hh = a[15:8]*b[15:8]
// At this level the three 16-bit additions use the modified carry save
// adder (mcsa), whose full adders are built from 4:1 multiplexers; its
// third operand is tied to 0, so it adds two words and returns their carry
// in sum[16]:
//   MCSA 1: s1 = p_hl + p_lh                               carry c1
//   MCSA 2: s2 = s1 + {8'h00, p_ll[15:8]}                  carry c2
//   MCSA 3: p[31:16] = p_hh + {7'b0, c1|c2, s2[15:8]}      carry c3
//   p[15:8] = s2[7:0],  p[7:0] = p_ll[7:0]
// c1 and c2 carry the same weight 2^24 and are never 1 together, so an OR
// gate merges them; c3 is always 0 because the product fits in 32 bits.
// Assertions check both, and that no MCSA raises its second carry (cout).
//
// Interface: a and b are the 16-bit unsigned operands, p the 32-bit
// product. The multiplier is purely combinational: the product is valid one
// propagation delay after the operands change, with no clock, register or
// handshake (a user who needs a pipeline registers the ports).
// The partitioning, the adder connections and the OR gate follow the
// published 16x16 block diagram; operands are taken as unsigned, which is
// this design's reading.
module vedic16_mcsa (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] p
);
  localparam int unsigned W = 16;
  localparam int unsigned H = W / 2;

  logic [W-1:0] p_ll, p_hl, p_lh, p_hh;  // partial products of the 8x8 multipliers
  logic [W:0]   r1, r2, r3;              // MCSA results, bit W is the carry
  logic         x1, x2, x3;              // MCSA second carries, always 0 here
  logic         c1, c2, c3;
  logic         c12;

  vedic8x8 u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(p_ll));
  vedic8x8 u_hl (.a(a[W-1:H]), .b(b[H-1:0]), .p(p_hl));
  vedic8x8 u_lh (.a(a[H-1:0]), .b(b[W-1:H]), .p(p_lh));
  vedic8x8 u_hh (.a(a[W-1:H]), .b(b[W-1:H]), .p(p_hh));

  mcsa #(.WIDTH(W)) u_add1 (.a(p_hl), .b(p_lh), .c('0), .sum(r1), .cout(x1));
  mcsa #(.WIDTH(W)) u_add2 (.a(r1[W-1:0]), .b({{H{1'b0}}, p_ll[W-1:H]}), .c('0),
                            .sum(r2), .cout(x2));

  assign c1  = r1[W];
  assign c2  = r2[W];
  assign c12 = c1 | c2;

  mcsa #(.WIDTH(W)) u_add3 (.a(p_hh), .b({{(H-1){1'b0}}, c12, r2[W-1:H]}), .c('0),
                            .sum(r3), .cout(x3));

  assign c3 = r3[W];
  assign p  = {r3[W-1:0], r2[H-1:0], p_ll[H-1:0]};

  always_comb begin
    a_carry_excl: assert final (!(c1 && c2));
    a_no_c3:      assert final (!c3);
    a_no_cout:    assert final (!(x1 || x2 || x3));
  end
endmodule
