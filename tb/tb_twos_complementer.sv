// Self-checking testbench of the enabled 2's complementer.
//
// A 4-bit instance is checked exhaustively and a 16-bit instance with random
// words plus 0, 1, 0x8000 and 0xFFFF, both with en = 0 (word unchanged) and
// en = 1 (expected value: 2^W - d, modulo 2^W).
module tb_twos_complementer;

  int checks = 0, failures = 0;

  logic        en4, en16;
  logic [3:0]  d4, q4;
  logic [15:0] d16, q16;

  twos_complementer #(.W(4))  u4  (.en(en4),  .d(d4),  .q(q4));
  twos_complementer #(.W(16)) u16 (.en(en16), .d(d16), .q(q16));

  task automatic check16(input logic e, input logic [15:0] d);
    logic [15:0] exp;
    en16 = e; d16 = d;
    #1;
    exp = e ? 16'(17'h10000 - 17'(d)) : d;
    checks++;
    if (q16 !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL tc16 en=%b d=%h q=%h expected %h", e, d, q16, exp);
    end
  endtask

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 16; i++) begin
        en4 = e[0]; d4 = 4'(i);
        #1;
        checks++;
        if (q4 !== (e[0] ? 4'(16 - i) : 4'(i))) begin
          failures++;
          $display("FAIL tc4 en=%0d d=%0d q=%0d", e, i, q4);
        end
      end
    foreach (d16_corner[k]) begin
      check16(1'b0, d16_corner[k]);
      check16(1'b1, d16_corner[k]);
    end
    for (int k = 0; k < 5000; k++) check16(1'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] d16_corner [4] = '{16'h0000, 16'h0001, 16'h8000, 16'hFFFF};

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
