// Self-checking testbench of the 4x4 Urdhava multiplier: all 256 operand
// pairs, compared with the integer product.
module tb_ut_mul4x4;

  int checks = 0, failures = 0;
  logic [3:0] a, b;
  logic [7:0] p;

  ut_mul4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (p !== 8'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d", i, j, p);
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
