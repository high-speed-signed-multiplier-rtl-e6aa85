// Shared constants of the Q-format Urdhava Tiryakbhyam multipliers.
//
// A signed fractional word of N bits in Q(N-1) format has one sign bit and N-1
// fraction bits, so its value lies in [-1, 1 - 2^-(N-1)]. The design offers the
// two word sizes used by fixed-point DSPs: Q15 (16 bits) and Q31 (32 bits).
package qmul_pkg;

  localparam int unsigned Q15_WIDTH = 16;  // Q15: 1 sign bit + 15 fraction bits
  localparam int unsigned Q31_WIDTH = 32;  // Q31: 1 sign bit + 31 fraction bits

  // Clock cycles from an operand pair at the top's inputs to its product at
  // the top's outputs: one input register stage and one output register stage.
  localparam int unsigned TOP_LATENCY = 2;

  typedef logic [Q15_WIDTH-1:0] q15_t;
  typedef logic [Q31_WIDTH-1:0] q31_t;

endpackage
