// Self-checking testbench of the 8x8 Urdhava multiplier: all 65536 operand
// pairs, compared with the integer product.
module tb_ut_mul8x8;

  int checks = 0, failures = 0;
  logic [7:0]  a, b;
  logic [15:0] p;

  ut_mul8x8 dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a = 8'(i); b = 8'(j);
        #1;
        checks++;
        if (p !== 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL %0d*%0d = %0d", i, j, p);
        end
      end
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
