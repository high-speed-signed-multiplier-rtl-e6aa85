// Q15 and Q31 Urdhava Tiryakbhyam signed multipliers, clocked.
//
// Two independent lanes stand side by side: a 16-bit Q15 multiplier and a
// 32-bit Q31 multiplier, each a qmul instance. Every lane registers its two
// operands on a rising clock edge, multiplies them combinationally in the
// following cycle and registers the product on the next edge, so a product
// appears 2 clock cycles after its operands are presented (TOP_LATENCY) and a
// new operand pair can be accepted every cycle. The lanes share only the clock
// and the reset.
//
// The published design is clocked throughout but does not say where its
// registers sit; the input and output register stages, the asynchronous
// active-low reset that clears them to 0 and the absence of any valid or
// enable signal are this design's choices.
module qmul_top
  import qmul_pkg::*;
(
  input  logic clk,
  input  logic rst_n,    // asynchronous, active low: clears all registers

  input  q15_t q15_x,    // Q15 multiplicand
  input  q15_t q15_y,    // Q15 multiplier
  output q15_t q15_p,    // Q15 product, 2 cycles after its operands

  input  q31_t q31_x,    // Q31 multiplicand
  input  q31_t q31_y,    // Q31 multiplier
  output q31_t q31_p     // Q31 product, 2 cycles after its operands
);

  q15_t q15_x_r, q15_y_r, q15_p_c;
  q31_t q31_x_r, q31_y_r, q31_p_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q15_x_r <= '0;
      q15_y_r <= '0;
      q31_x_r <= '0;
      q31_y_r <= '0;
      q15_p   <= '0;
      q31_p   <= '0;
    end else begin
      q15_x_r <= q15_x;
      q15_y_r <= q15_y;
      q31_x_r <= q31_x;
      q31_y_r <= q31_y;
      q15_p   <= q15_p_c;
      q31_p   <= q31_p_c;
    end
  end

  qmul #(.N(Q15_WIDTH)) u_q15 (.x(q15_x_r), .y(q15_y_r), .p(q15_p_c));
  qmul #(.N(Q31_WIDTH)) u_q31 (.x(q31_x_r), .y(q31_y_r), .p(q31_p_c));

endmodule
