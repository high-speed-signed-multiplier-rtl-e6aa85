// Self-checking testbench of the 32x32 Urdhava multiplier: the operand
// corners (0, 1, all ones, each half all ones, the top bit alone) against each
// other, then 20000 random pairs, compared with the integer product.
module tb_ut_mul32x32;

  int checks = 0, failures = 0;
  logic [31:0] a, b;
  logic [63:0] p;

  ut_mul32x32 dut (.a(a), .b(b), .p(p));

  logic [31:0] corner [7];

  task automatic check(input logic [31:0] x, input logic [31:0] y);
    logic [63:0] exp;
    a = x; b = y;
    #1;
    exp = 64'(x) * 64'(y);
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h = %h, expected %h", x, y, p, exp);
    end
  endtask

  initial begin
    corner = '{'0, 32'd1, '1, {{16{1'b1}}, {16{1'b0}}}, {{16{1'b0}}, {16{1'b1}}},
               {1'b1, {31{1'b0}}}, {1'b0, {31{1'b1}}}};
    foreach (corner[i])
      foreach (corner[j]) check(corner[i], corner[j]);
    for (int k = 0; k < 20000; k++) check(32'({$urandom, $urandom}), 32'({$urandom, $urandom}));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
