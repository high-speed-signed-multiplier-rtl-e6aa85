// Unsigned 2x2 multiplier by the vertical and crosswise (Urdhava Tiryakbhyam) rule.
//
// For a = a1a0 and b = b1b0 the three steps are: r0 = a0b0 (vertical);
// c1r1 = a1b0 + a0b1 (crosswise, one half adder); c2r2 = c1 + a1b1 (vertical,
// one half adder). The product is p = {c2, r2, r1, r0}. All four partial
// products are formed at once. This is the leaf cell of every larger
// multiplier; its insides follow the general step rule, the use of two half
// adders is this design's choice. Purely combinational.
module ut_mul2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic pp00, pp10, pp01, pp11;
  logic r1, c1, r2, c2;

  assign pp00 = a[0] & b[0];
  assign pp10 = a[1] & b[0];
  assign pp01 = a[0] & b[1];
  assign pp11 = a[1] & b[1];

  half_adder u_ha_cross (.a(pp10), .b(pp01), .sum(r1), .cout(c1));
  half_adder u_ha_top   (.a(pp11), .b(c1),   .sum(r2), .cout(c2));

  assign p = {c2, r2, r1, pp00};

endmodule
