// Unsigned 4x4 Urdhava Tiryakbhyam multiplier, the basic block of the Q15 and
// Q31 multipliers.
//
// The operands are split into 2-bit halves a = {a3a2, a1a0}, b = {b3b2, b1b0}
// and four 2x2 multipliers form the vertical products (a3a2*b3b2, a1a0*b1b0)
// and the crosswise products (a3a2*b1b0, a1a0*b3b2) at the same time. Three
// 4-bit ripple carry adders combine them:
//   adder 1: the two crosswise products            -> s1, carry ca1
//   adder 2: s1 + {00, bits 3..2 of the low product} -> s2, carry ca2
//   adder 3: high product + {0, ca1|ca2, s2[3:2]}    -> p[7:4]
// and p[3:2] = s2[1:0], p[1:0] = bits 1..0 of the low product.
// The split, the three 4-bit adders and the bit fields that feed them follow
// the published architecture. How the two middle carries reach adder 3 is this
// design's choice: they are ORed into bit 2 of its second operand. They cannot
// both be 1, since the middle sum is at most 2*9 + 3 = 21 < 32, so the OR loses
// nothing. Adder 3 cannot overflow because the product fits in 8 bits.
// Purely combinational.
module ut_mul4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [3:0] m_hh, m_hl, m_lh, m_ll;   // a-half x b-half products
  logic [3:0] s1, s2;
  logic       ca1, ca2, ca3_unused;

  ut_mul2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(m_hh));
  ut_mul2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(m_hl));
  ut_mul2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(m_lh));
  ut_mul2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(m_ll));

  rca #(.W(4)) u_add1 (
    .a(m_hl), .b(m_lh), .cin(1'b0), .sum(s1), .cout(ca1)
  );

  rca #(.W(4)) u_add2 (
    .a(s1), .b({2'b00, m_ll[3:2]}), .cin(1'b0), .sum(s2), .cout(ca2)
  );

  rca #(.W(4)) u_add3 (
    .a(m_hh), .b({1'b0, ca1 | ca2, s2[3:2]}), .cin(1'b0),
    .sum(p[7:4]), .cout(ca3_unused)
  );

  assign p[3:2] = s2[1:0];
  assign p[1:0] = m_ll[1:0];

endmodule
