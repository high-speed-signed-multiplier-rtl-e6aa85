// Enabled 2's complementer.
//
// When en is 1 the output is the 2's complement of d (invert every bit, add
// one); when en is 0 the output equals d. The inversion is an XOR of each bit
// with en and the +1 is en fed as the carry in of a ripple carry adder whose
// other operand is zero. It is used on both operands of the signed multiplier
// (enabled by each operand's sign bit) and on its result (enabled by the XOR
// of the two sign bits). Purely combinational.
module twos_complementer #(
  parameter int unsigned W = 16  // word width
) (
  input  logic         en,  // 1: negate d
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);

  logic [W-1:0] inv;
  logic         unused_cout;

  assign inv = d ^ {W{en}};

  rca #(.W(W)) u_inc (
    .a   (inv),
    .b   ('0),
    .cin (en),
    .sum (q),
    .cout(unused_cout)
  );

endmodule
