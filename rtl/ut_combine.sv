// Partial-product adders of a 2H x 2H Urdhava Tiryakbhyam multiplier (W = 2H).
//
// Given the four HxH sub-products of a = {AH, AL} and b = {BH, BL}
// (m_hh = AH*BH, m_hl = AH*BL, m_lh = AL*BH, m_ll = AL*BL, each W bits) it
// forms the 2W-bit product with two ADDER blocks of W-bit ripple carry adders:
//   middle ADDER: m_hl + m_lh + (m_ll >> H)      -> W-bit sum s2, carry
//   left ADDER:   m_hh + ({carry, s2} >> H)      -> p[2W-1:W]
// with p[W-1:H] = s2[H-1:0] and p[H-1:0] = m_ll[H-1:0]. The bit fields that
// pass between the blocks follow the published 8x8 and 16x16 architectures.
// The three-input middle ADDER is built, as in the 4x4 block, from two chained
// W-bit adders whose carries are ORed: both cannot be 1, since the middle sum
// is at most 2(2^H-1)^2 + 2^H - 1 < 2^(W+1). That, and ripple carry for these
// wide adders, is this design's choice. The left adder cannot overflow since
// the product fits in 2W bits. Purely combinational.
module ut_combine #(
  parameter int unsigned W = 16  // width of one sub-product; operands are W bits
) (
  input  logic [W-1:0]   m_hh,
  input  logic [W-1:0]   m_hl,
  input  logic [W-1:0]   m_lh,
  input  logic [W-1:0]   m_ll,
  output logic [2*W-1:0] p
);

  localparam int unsigned H = W / 2;

  logic [W-1:0] s1, s2;
  logic         c1, c2, c3_unused;

  // Middle ADDER: the two crosswise products plus the carried half of AL*BL.
  rca #(.W(W)) u_mid_a (
    .a(m_hl), .b(m_lh), .cin(1'b0), .sum(s1), .cout(c1)
  );
  rca #(.W(W)) u_mid_b (
    .a(s1), .b({{H{1'b0}}, m_ll[W-1:H]}), .cin(1'b0), .sum(s2), .cout(c2)
  );

  // Left ADDER: the vertical high product plus the carried part of the middle.
  rca #(.W(W)) u_left (
    .a(m_hh), .b({{(H-1){1'b0}}, c1 | c2, s2[W-1:H]}), .cin(1'b0),
    .sum(p[2*W-1:W]), .cout(c3_unused)
  );

  assign p[W-1:H] = s2[H-1:0];
  assign p[H-1:0] = m_ll[H-1:0];

endmodule
