// vedic8x8: 8x8 unsigned Vedic (Urdhva Tiryagbhyam) multiplier.
//
// Each operand is split into a high and a low 4-bit half. Four 4x4
// Vedic multipliers (vedic4x4) form, in parallel, the vertical products
// p_ll = aL*bL and p_hh = aH*bH and the crosswise products p_hl = aH*bL and
// p_lh = aL*bH. Three 8-bit ripple carry adders (rca) then add them:
//   adder 1: s1 = p_hl + p_lh                      carry c1
//   adder 2: s2 = s1 + {4'b0, p_ll[7:4]}           carry c2
//   adder 3: p[15:8] = p_hh + {3'b0, c1|c2, s2[7:4]}  carry c3
//   p[7:4] = s2[3:0],  p[3:0] = p_ll[3:0]
// c1 and c2 both have weight 2^(8+4) and are never 1 together (p_hl + p_lh +
// p_ll[7:4] < 2^9), so an OR gate merges them
// exactly; c3 is always 0 because the product fits in 16 bits. Both facts
// are checked by assertions. Output p is the 16-bit product; the block is
// purely combinational, with no clock.
// The adder arrangement, the zero-padded operands and the OR gate follow the
// published block diagram; all adders have their carry-in tied to 0.
module vedic8x8 (
  input  logic [7:0]   a,
  input  logic [7:0]   b,
  output logic [15:0] p
);
  localparam int unsigned W = 8;
  localparam int unsigned H = W / 2;

  logic [W-1:0] p_ll, p_hl, p_lh, p_hh;  // partial products
  logic [W-1:0] s1, s2, s3;
  logic         c1, c2, c3;
  logic         c12;

  vedic4x4 u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(p_ll));
  vedic4x4 u_hl (.a(a[W-1:H]), .b(b[H-1:0]), .p(p_hl));
  vedic4x4 u_lh (.a(a[H-1:0]), .b(b[W-1:H]), .p(p_lh));
  vedic4x4 u_hh (.a(a[W-1:H]), .b(b[W-1:H]), .p(p_hh));

  rca #(.WIDTH(W)) u_add1 (.a(p_hl), .b(p_lh), .cin(1'b0), .sum(s1), .cout(c1));
  rca #(.WIDTH(W)) u_add2 (.a(s1), .b({{H{1'b0}}, p_ll[W-1:H]}), .cin(1'b0), .sum(s2), .cout(c2));

  assign c12 = c1 | c2;

  rca #(.WIDTH(W)) u_add3 (.a(p_hh), .b({{(H-1){1'b0}}, c12, s2[W-1:H]}), .cin(1'b0),
                           .sum(s3), .cout(c3));

  assign p = {s3, s2[H-1:0], p_ll[H-1:0]};

  always_comb begin
    a_carry_excl: assert final (!(c1 && c2));
    a_no_c3:      assert final (!c3);
  end
endmodule
