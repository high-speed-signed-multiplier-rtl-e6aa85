// Self-checking testbench of the partial-product adders.
//
// For random operand pairs a = {AH, AL}, b = {BH, BL} the testbench forms the
// four half-size products itself, feeds them to 8-bit and 16-bit ut_combine
// instances and compares the result with the full integer product a*b. All
// 8-bit operand pairs with every half all ones are included, where the middle
// sum is largest.
module tb_ut_combine;

  int checks = 0, failures = 0;

  logic [7:0]  h8, hl8, lh8, l8;
  logic [15:0] p8;
  logic [15:0] h16, hl16, lh16, l16;
  logic [31:0] p16;

  ut_combine #(.W(8))  u8  (.m_hh(h8),  .m_hl(hl8),  .m_lh(lh8),  .m_ll(l8),  .p(p8));
  ut_combine #(.W(16)) u16 (.m_hh(h16), .m_hl(hl16), .m_lh(lh16), .m_ll(l16), .p(p16));

  task automatic check8(input logic [7:0] a, input logic [7:0] b);
    h8  = 8'(a[7:4] * b[7:4]);
    hl8 = 8'(a[7:4] * b[3:0]);
    lh8 = 8'(a[3:0] * b[7:4]);
    l8  = 8'(a[3:0] * b[3:0]);
    #1;
    checks++;
    if (p8 !== 16'(a) * 16'(b)) begin
      failures++;
      if (failures < 10) $display("FAIL combine8 %h*%h = %h", a, b, p8);
    end
  endtask

  task automatic check16(input logic [15:0] a, input logic [15:0] b);
    h16  = 16'(a[15:8] * b[15:8]);
    hl16 = 16'(a[15:8] * b[7:0]);
    lh16 = 16'(a[7:0] * b[15:8]);
    l16  = 16'(a[7:0] * b[7:0]);
    #1;
    checks++;
    if (p16 !== 32'(a) * 32'(b)) begin
      failures++;
      if (failures < 10) $display("FAIL combine16 %h*%h = %h", a, b, p16);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) check8(8'(i), 8'(j));
    check16('1, '1);
    check16(16'h00FF, 16'hFF00);
    for (int k = 0; k < 20000; k++) check16(16'($urandom), 16'($urandom));
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
