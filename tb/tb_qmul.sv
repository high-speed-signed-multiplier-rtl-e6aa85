// Self-checking testbench of the signed Q-format multiplier, at Q15 (N = 16)
// and Q31 (N = 32).
//
// Every product is checked two ways, both computed here from the operands
// with integer arithmetic:
//  - bit-exact against the rule the multiplier implements: magnitude
//    |x|*|y| >> (N-1) with the word -1.0 taken as magnitude 0, negated when
//    the signs differ;
//  - for operands other than -1.0, against the exact product x*y / 2^(N-1):
//    the result must lie within one LSB of it, on the side of zero.
// Directed cases: the published worked examples (Q15 -0.75 * -0.25 = 0.1875,
// and the Q31 pair -0.666666 * 0.333333 giving 0xE38E3C9E), the bit pattern
// 0xC000 printed for the second Q15 operand (-0.5, so 0x3000), sign
// combinations, zero, the largest positive word and -1.0.
module tb_qmul;

  int checks = 0, failures = 0;

  logic [15:0] x16, y16, p16;
  logic [31:0] x32, y32, p32;

  qmul                u16 (.x(x16), .y(y16), .p(p16));
  qmul #(.N(32))      u32 (.x(x32), .y(y32), .p(p32));

  // Reference of the published rule, for a word width n of 16 or 32.
  function automatic longint unsigned ref_rule(longint unsigned x, longint unsigned y, int n);
    longint unsigned mask = (n == 64) ? '1 : ((64'd1 << n) - 1);
    longint unsigned min  = 64'd1 << (n - 1);
    longint unsigned mx, my, mag;
    logic sx = x[n-1], sy = y[n-1];
    mx = sx ? ((~x + 1) & mask) : x;
    my = sy ? ((~y + 1) & mask) : y;
    if (mx == min) mx = 0;
    if (my == min) my = 0;
    mag = (mx * my) >> (n - 1);
    return (sx ^ sy) ? ((~mag + 1) & mask) : mag;
  endfunction

  // Accuracy against the exact product; skipped for -1.0 operands.
  function automatic bit accurate(longint x, longint y, longint p, int n);
    longint exact = x * y;               // scaled by 2^(2n-2)
    longint got   = p <<< (n - 1);       // result scaled the same way
    longint err   = exact - got;
    longint lsb   = 64'sd1 <<< (n - 1);
    if (exact >= 0) return (err >= 0) && (err < lsb);
    else            return (err <= 0) && (-err < lsb);
  endfunction

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    longint unsigned exp;
    x16 = x; y16 = y;
    #1;
    exp = ref_rule(64'(x), 64'(y), 16);
    checks++;
    if (p16 !== 16'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL q15 %h*%h = %h, expected %h", x, y, p16, 16'(exp));
    end
    if (x != 16'h8000 && y != 16'h8000) begin
      checks++;
      if (!accurate(longint'($signed(x)), longint'($signed(y)), longint'($signed(p16)), 16)) begin
        failures++;
        if (failures < 10) $display("FAIL q15 accuracy %h*%h = %h", x, y, p16);
      end
    end
  endtask

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    longint unsigned exp;
    x32 = x; y32 = y;
    #1;
    exp = ref_rule(64'(x), 64'(y), 32);
    checks++;
    if (p32 !== 32'(exp)) begin
      failures++;
      if (failures < 10) $display("FAIL q31 %h*%h = %h, expected %h", x, y, p32, 32'(exp));
    end
    if (x != 32'h8000_0000 && y != 32'h8000_0000) begin
      checks++;
      if (!accurate(longint'($signed(x)), longint'($signed(y)), longint'($signed(p32)), 32)) begin
        failures++;
        if (failures < 10) $display("FAIL q31 accuracy %h*%h = %h", x, y, p32);
      end
    end
  endtask

  task automatic expect16(input logic [15:0] x, input logic [15:0] y, input logic [15:0] e);
    check16(x, y);
    checks++;
    if (p16 !== e) begin
      failures++;
      $display("FAIL q15 example %h*%h = %h, expected %h", x, y, p16, e);
    end
  endtask

  task automatic expect32(input logic [31:0] x, input logic [31:0] y, input logic [31:0] e);
    check32(x, y);
    checks++;
    if (p32 !== e) begin
      failures++;
      $display("FAIL q31 example %h*%h = %h, expected %h", x, y, p32, e);
    end
  endtask

  logic [15:0] c16 [8] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'h8001,
                           16'hFFFF, 16'h4000, 16'hC000};
  logic [31:0] c32 [8] = '{32'h0, 32'h1, 32'h7FFF_FFFF, 32'h8000_0000, 32'h8000_0001,
                           32'hFFFF_FFFF, 32'h4000_0000, 32'hC000_0000};

  initial begin
    // Published examples.
    expect16(16'hA000, 16'hE000, 16'h1800);        // -0.75 * -0.25 = 0.1875
    expect16(16'hA000, 16'hC000, 16'h3000);        // -0.75 * -0.5  = 0.375
    expect32(32'hAAAA_B042, 32'h2AAA_A7DF, 32'hE38E_3C9E);
    // -1.0 and +1.0 - 2^-15 corners.
    expect16(16'h7FFF, 16'h7FFF, 16'h7FFE);
    expect16(16'h8000, 16'h4000, 16'h0000);
    expect16(16'h4000, 16'hC000, 16'hE000);        // 0.5 * -0.5 = -0.25
    foreach (c16[i]) foreach (c16[j]) check16(c16[i], c16[j]);
    foreach (c32[i]) foreach (c32[j]) check32(c32[i], c32[j]);
    for (int k = 0; k < 30000; k++) check16(16'($urandom), 16'($urandom));
    for (int k = 0; k < 30000; k++) check32($urandom, $urandom);
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
