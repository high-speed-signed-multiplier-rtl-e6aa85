// Unsigned 32x32 Urdhava Tiryakbhyam multiplier.
//
// The operands are split into 16-bit halves, a = {AH, AL} and b = {BH, BL}.
// Four ut_mul16x16 blocks form the vertical products AH*BH and AL*BL and the
// crosswise products AH*BL and AL*BH concurrently, and ut_combine adds them
// with its middle and left ADDER blocks into the 64-bit product. The
// structure (four half-size multipliers and two adders) follows the published
// architecture. Purely combinational.
module ut_mul32x32 (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] p
);

  logic [31:0] m_hh, m_hl, m_lh, m_ll;  // a-half x b-half products

  ut_mul16x16 u_hh (.a(a[31:16]), .b(b[31:16]), .p(m_hh));
  ut_mul16x16 u_hl (.a(a[31:16]), .b(b[15:0]), .p(m_hl));
  ut_mul16x16 u_lh (.a(a[15:0]), .b(b[31:16]), .p(m_lh));
  ut_mul16x16 u_ll (.a(a[15:0]), .b(b[15:0]), .p(m_ll));

  ut_combine #(.W(32)) u_add (
    .m_hh(m_hh), .m_hl(m_hl), .m_lh(m_lh), .m_ll(m_ll), .p(p)
  );

endmodule
