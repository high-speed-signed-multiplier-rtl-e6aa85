// End-to-end testbench of the clocked Q15/Q31 multiplier top, at its default
// (and only) configuration.
//
// After an asynchronous reset, which must clear both products, a new operand
// pair is presented to each lane on every clock cycle: the published worked
// examples first, then a mix of random words and corner words (0, -1.0,
// +1.0 - LSB, -LSB, +-0.5). Each product is compared, exactly TOP_LATENCY = 2
// cycles after its operands were presented, with a reference computed here by
// integer arithmetic; the changing operands make any other latency fail. A
// second reset in mid-stream must clear the outputs again.
//
// The testbench counts how often each mechanism of the design was exercised
// and fails if one never was: a negative result (the output 2's complementer
// enabled), both operands negative (both input 2's complementers enabled),
// a -1.0 operand (magnitude 0 after the input complementer), a zero product and the
// reset clearing the outputs.
module tb_qmul_top;
  import qmul_pkg::*;

  localparam int unsigned NOPS = 20000;

  int checks = 0, failures = 0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  q15_t q15_x = '0, q15_y = '0, q15_p;
  q31_t q31_x = '0, q31_y = '0, q31_p;

  qmul_top dut (.*);

  always #5 clk = ~clk;

  // Mechanism counters.
  int n_neg15 = 0, n_neg31 = 0, n_bothneg15 = 0, n_bothneg31 = 0;
  int n_min15 = 0, n_min31 = 0, n_zero15 = 0, n_zero31 = 0, n_reset = 0;

  // Reference of the published rule, for a word width n of 16 or 32.
  function automatic longint unsigned ref_rule(longint unsigned x, longint unsigned y, int n);
    longint unsigned mask = (64'd1 << n) - 1;
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

  function automatic q15_t pick15();
    q15_t c [6] = '{16'h0000, 16'h8000, 16'h7FFF, 16'hFFFF, 16'h4000, 16'hC000};
    return ($urandom_range(3) == 0) ? c[$urandom_range(5)] : q15_t'($urandom);
  endfunction

  function automatic q31_t pick31();
    q31_t c [6] = '{32'h0, 32'h8000_0000, 32'h7FFF_FFFF, 32'hFFFF_FFFF,
                    32'h4000_0000, 32'hC000_0000};
    return ($urandom_range(3) == 0) ? c[$urandom_range(5)] : q31_t'($urandom);
  endfunction

  // Expected products and operands, indexed by the cycle of presentation.
  q15_t exp15 [NOPS + 8];
  q31_t exp31 [NOPS + 8];
  q15_t ax15 [NOPS + 8], ay15 [NOPS + 8];
  q31_t ax31 [NOPS + 8], ay31 [NOPS + 8];

  task automatic check_reset_clear();
    checks++;
    if (q15_p !== '0 || q31_p !== '0) begin
      failures++;
      $display("FAIL reset did not clear outputs: %h %h", q15_p, q31_p);
    end else n_reset++;
  endtask

  task automatic run_stream(input int n);
    for (int k = 0; k < n + TOP_LATENCY; k++) begin
      @(negedge clk);
      if (k >= TOP_LATENCY) begin
        int j = k - TOP_LATENCY;
        checks += 2;
        if (q15_p !== exp15[j]) begin
          failures++;
          if (failures < 10) $display("FAIL q15 op %0d: %h*%h = %h, expected %h",
                                      j, ax15[j], ay15[j], q15_p, exp15[j]);
        end
        if (q31_p !== exp31[j]) begin
          failures++;
          if (failures < 10) $display("FAIL q31 op %0d: %h*%h = %h, expected %h",
                                      j, ax31[j], ay31[j], q31_p, exp31[j]);
        end
        if (exp15[j][15]) n_neg15++;
        if (exp31[j][31]) n_neg31++;
        if (ax15[j][15] && ay15[j][15]) n_bothneg15++;
        if (ax31[j][31] && ay31[j][31]) n_bothneg31++;
        if (ax15[j] == 16'h8000 || ay15[j] == 16'h8000) n_min15++;
        if (ax31[j] == 32'h8000_0000 || ay31[j] == 32'h8000_0000) n_min31++;
        if (exp15[j] == '0) n_zero15++;
        if (exp31[j] == '0) n_zero31++;
      end
      if (k < n) begin
        if (k == 0) begin         // published Q15 and Q31 examples
          ax15[k] = 16'hA000;      ay15[k] = 16'hE000;
          ax31[k] = 32'hAAAA_B042; ay31[k] = 32'h2AAA_A7DF;
        end else begin
          ax15[k] = pick15(); ay15[k] = pick15();
          ax31[k] = pick31(); ay31[k] = pick31();
        end
        exp15[k] = q15_t'(ref_rule(64'(ax15[k]), 64'(ay15[k]), 16));
        exp31[k] = q31_t'(ref_rule(64'(ax31[k]), 64'(ay31[k]), 32));
        q15_x = ax15[k]; q15_y = ay15[k];
        q31_x = ax31[k]; q31_y = ay31[k];
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check_reset_clear();
    rst_n = 1'b1;
    run_stream(NOPS);
    // The published examples: check the expected words were produced.
    checks += 2;
    if (exp15[0] !== 16'h1800) begin failures++; $display("FAIL q15 example"); end
    if (exp31[0] !== 32'hE38E_3C9E) begin failures++; $display("FAIL q31 example"); end
    // Reset in mid-stream: outputs hold a non-zero product, then clear.
    q15_x = 16'h4000; q15_y = 16'h4000; q31_x = 32'h4000_0000; q31_y = 32'h4000_0000;
    repeat (3) @(negedge clk);
    checks++;
    if (q15_p !== 16'h2000 || q31_p !== 32'h2000_0000) begin
      failures++;
      $display("FAIL 0.5*0.5: %h %h", q15_p, q31_p);
    end
    rst_n = 1'b0;
    #1;
    check_reset_clear();
    @(negedge clk);
    check_reset_clear();
    rst_n = 1'b1;
    run_stream(100);

    $display("mechanisms: q15 negative=%0d both-negative=%0d minus-one=%0d zero=%0d",
             n_neg15, n_bothneg15, n_min15, n_zero15);
    $display("mechanisms: q31 negative=%0d both-negative=%0d minus-one=%0d zero=%0d reset=%0d",
             n_neg31, n_bothneg31, n_min31, n_zero31, n_reset);
    foreach (mech[i]) begin
      checks++;
      if (mech[i] == 0) begin
        failures++;
        $display("FAIL mechanism %0d never exercised", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int mech [9];
  always_comb mech = '{n_neg15, n_neg31, n_bothneg15, n_bothneg31,
                       n_min15, n_min31, n_zero15, n_zero31, n_reset};

  initial begin : watchdog
    repeat (NOPS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
