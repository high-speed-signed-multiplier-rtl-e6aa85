// Self-checking testbench of the ripple carry adder.
//
// A 4-bit adder is checked exhaustively (all a, b and cin) and a 32-bit adder
// with random operands and the carry-chain corner cases; the expected
// {cout, sum} is the integer sum a + b + cin.
module tb_rca;

  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  logic [31:0] a32, b32, s32;
  logic        ci32, co32;

  rca #(.W(4))  u4  (.a(a4),  .b(b4),  .cin(ci4),  .sum(s4),  .cout(co4));
  rca #(.W(32)) u32 (.a(a32), .b(b32), .cin(ci32), .sum(s32), .cout(co32));

  task automatic check32(input logic [31:0] a, input logic [31:0] b, input logic c);
    logic [32:0] exp;
    a32 = a; b32 = b; ci32 = c;
    #1;
    exp = {1'b0, a} + {1'b0, b} + 33'(c);
    checks++;
    if ({co32, s32} !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL rca32 %h+%h+%b = %b%h, expected %h", a, b, c, co32, s32, exp);
    end
  endtask

  initial begin
    for (int c = 0; c < 2; c++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          a4 = 4'(i); b4 = 4'(j); ci4 = c[0];
          #1;
          checks++;
          if ({co4, s4} !== 5'(i + j + c)) begin
            failures++;
            $display("FAIL rca4 %0d+%0d+%0d = %0d", i, j, c, {co4, s4});
          end
        end
    check32(32'hFFFF_FFFF, 32'h0, 1'b1);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check32(32'h0, 32'h0, 1'b0);
    check32(32'h8000_0000, 32'h8000_0000, 1'b0);
    for (int k = 0; k < 5000; k++) check32($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
