// Unsigned 8x8 Urdhava Tiryakbhyam multiplier.
//
// The operands are split into 4-bit halves, a = {AH, AL} and b = {BH, BL}.
// Four ut_mul4x4 blocks form the vertical products AH*BH and AL*BL and the
// crosswise products AH*BL and AL*BH concurrently, and ut_combine adds them
// with its middle and left ADDER blocks into the 16-bit product. The
// structure (four half-size multipliers and two adders) follows the published
// architecture. Purely combinational.
module ut_mul8x8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] p
);

  logic [7:0] m_hh, m_hl, m_lh, m_ll;  // a-half x b-half products

  ut_mul4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(m_hh));
  ut_mul4x4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(m_hl));
  ut_mul4x4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(m_lh));
  ut_mul4x4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(m_ll));

  ut_combine #(.W(8)) u_add (
    .m_hh(m_hh), .m_hl(m_hl), .m_lh(m_lh), .m_ll(m_ll), .p(p)
  );

endmodule
