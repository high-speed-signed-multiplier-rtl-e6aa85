// W-bit ripple carry adder.
//
// {cout, sum} = a + b + cin, formed by a chain of W full adders in which the
// carry of bit i feeds bit i+1. The 4-bit instance is the adder of the 4x4
// Urdhava multiplier; the wider instances form the ADDER blocks that combine
// the four sub-products of the 8x8, 16x16 and 32x32 multipliers and the
// incrementer of the 2's complementer. Using ripple carry for the wider adders
// too is this design's choice: only the 4-bit adders are named as ripple carry
// adders by the architecture. Purely combinational.
module rca #(
  parameter int unsigned W = 4  // operand width
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .sum (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign cout = carry[W];

endmodule
