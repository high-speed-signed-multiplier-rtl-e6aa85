// One-bit half adder, used to sum the cross products inside the 2x2 multiplier.
//
// sum = a ^ b, cout = a & b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);

  always_comb begin
    sum  = a ^ b;
    cout = a & b;
  end

endmodule
