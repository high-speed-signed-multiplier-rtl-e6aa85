// Self-checking testbench of the 2x2 multiplier: all 16 operand pairs,
// compared with the integer product.
module tb_ut_mul2x2;

  int checks = 0, failures = 0;
  logic [1:0] a, b;
  logic [3:0] p;

  ut_mul2x2 dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        a = 2'(i); b = 2'(j);
        #1;
        checks++;
        if (p !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d = %0d", i, j, p);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
