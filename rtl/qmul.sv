// Signed Q(N-1) fractional multiplier built on an unsigned Urdhava Tiryakbhyam
// multiplier (N = 16 gives the Q15 multiplier, N = 32 the Q31 multiplier).
//
// Operands and product are N-bit 2's complement fractions: bit N-1 is the sign,
// bits N-2..0 the fraction, value = word / 2^(N-1). The multiplication runs in
// sign-magnitude form:
//   1. each operand whose sign bit is 1 is replaced by its 2's complement, and
//      its MSB is then forced to 0, leaving an (N-1)-bit magnitude;
//   2. an NxN Urdhava multiplier (four (N/2)x(N/2) blocks and two adders:
//      ut_mul16x16 for Q15, ut_mul32x32 for Q31) forms
//      the 2N-bit magnitude product P, whose bit 2N-1 is always 0 (the
//      redundant sign bit);
//   3. P is shifted left by one and its top N bits are kept: P[2N-2:N-1]. The
//      bits below are dropped, so the magnitude is truncated;
//   4. the XOR of the two sign bits enables a 2's complementer that turns the
//      N-bit magnitude into a negative result.
// All four steps and the bit fields follow the published architecture.
// Consequences of it, kept as published: the result is rounded toward zero,
// and the word -1.0 (only the sign bit set) has magnitude 0 after step 1, so
// any product with -1.0 as an operand is 0.
// Purely combinational; the clocked top registers its inputs and output.
module qmul #(
  parameter int unsigned N = 16  // word width: 16 (Q15) or 32 (Q31)
) (
  input  logic [N-1:0] x,   // multiplicand, Q(N-1)
  input  logic [N-1:0] y,   // multiplier, Q(N-1)
  output logic [N-1:0] p    // product, Q(N-1)
);

  logic         sx, sy, sp;
  logic [N-1:0] x_abs, y_abs;       // after the input 2's complementers
  logic [N-1:0] x_mag, y_mag;       // MSB forced to 0
  logic [2*N-1:0] prod;             // unsigned magnitude product
  logic [N-1:0] p_mag;              // shifted, top N bits

  assign sx = x[N-1];
  assign sy = y[N-1];
  assign sp = sx ^ sy;

  twos_complementer #(.W(N)) u_neg_x (.en(sx), .d(x), .q(x_abs));
  twos_complementer #(.W(N)) u_neg_y (.en(sy), .d(y), .q(y_abs));

  assign x_mag = {1'b0, x_abs[N-2:0]};
  assign y_mag = {1'b0, y_abs[N-2:0]};

  if (N == 16) begin : g_q15
    ut_mul16x16 u_mul (.a(x_mag), .b(y_mag), .p(prod));
  end else if (N == 32) begin : g_q31
    ut_mul32x32 u_mul (.a(x_mag), .b(y_mag), .p(prod));
  end else begin : g_bad_width
    $error("qmul: N must be 16 (Q15) or 32 (Q31)");
  end

  // Left shift by one drops the redundant sign bit prod[2N-1]; keep the top N.
  assign p_mag = prod[2*N-2:N-1];

  twos_complementer #(.W(N)) u_neg_p (.en(sp), .d(p_mag), .q(p));

endmodule
