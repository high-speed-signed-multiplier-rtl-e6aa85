// Self-checking testbench of the 16x16 Urdhava multiplier: the operand
// corners (0, 1, all ones, each half all ones, the top bit alone) against each
// other, then 20000 random pairs, compared with the integer product.
module tb_ut_mul16x16;

  int checks = 0, failures = 0;
  logic [15:0] a, b;
  logic [31:0] p;

  ut_mul16x16 dut (.a(a), .b(b), .p(p));

  logic [15:0] corner [7];

  task automatic check(input logic [15:0] x, input logic [15:0] y);
    logic [31:0] exp;
    a = x; b = y;
    #1;
    exp = 32'(x) * 32'(y);
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %h*%h = %h, expected %h", x, y, p, exp);
    end
  endtask

  initial begin
    corner = '{'0, 16'd1, '1, {{8{1'b1}}, {8{1'b0}}}, {{8{1'b0}}, {8{1'b1}}},
               {1'b1, {15{1'b0}}}, {1'b0, {15{1'b1}}}};
    foreach (corner[i])
      foreach (corner[j]) check(corner[i], corner[j]);
    for (int k = 0; k < 20000; k++) check(16'({$urandom, $urandom}), 16'({$urandom, $urandom}));
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
