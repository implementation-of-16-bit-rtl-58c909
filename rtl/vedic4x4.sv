// vedic4x4: 4x4 unsigned Vedic (Urdhva Tiryagbhyam) multiplier.
//
// Each operand is split into a high and a low 2-bit half. Four 2x2
// Vedic multipliers (vedic2x2) form, in parallel, the vertical products
// p_ll = aL*bL and p_hh = aH*bH and the crosswise products p_hl = aH*bL and
// p_lh = aL*bH. Three 4-bit ripple carry adders (rca) then add them:
//   adder 1: s1 = p_hl + p_lh                      carry c1
//   adder 2: s2 = s1 + {2'b0, p_ll[3:2]}           carry c2
//   adder 3: p[7:4] = p_hh + {1'b0, c1|c2, s2[3:2]}  carry c3
//   p[3:2] = s2[1:0],  p[1:0] = p_ll[1:0]
// c1 and c2 both have weight 2^(4+2) and are never 1 together (p_hl + p_lh +
// p_ll[3:2] < 2^5), so an OR gate merges them
// exactly; c3 is always 0 because the product fits in 8 bits. Both facts
// are checked by assertions. Output p is the 8-bit product; the block is
// purely combinational, with no clock.
// The adder arrangement, the zero-padded operands and the OR gate follow the
// published block diagram; all adders have their carry-in tied to 0.
module vedic4x4 (
  input  logic [3:0]   a,
  input  logic [3:0]   b,
  output logic [7:0] p
);
  localparam int unsigned W = 4;
  localparam int unsigned H = W / 2;

  logic [W-1:0] p_ll, p_hl, p_lh, p_hh;  // partial products
  logic [W-1:0] s1, s2, s3;
  logic         c1, c2, c3;
  logic         c12;

  vedic2x2 u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(p_ll));
  vedic2x2 u_hl (.a(a[W-1:H]), .b(b[H-1:0]), .p(p_hl));
  vedic2x2 u_lh (.a(a[H-1:0]), .b(b[W-1:H]), .p(p_lh));
  vedic2x2 u_hh (.a(a[W-1:H]), .b(b[W-1:H]), .p(p_hh));

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
