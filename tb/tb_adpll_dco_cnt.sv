// tb_adpll_dco_cnt: checks the divide-by-M counter for several M.
// The count must run 1..M and wrap, CLK_DIV must rise exactly every M
// cycles, on the cycle where the count is 1, and stay high for M/8-1
// cycles; a clear must make the next edge count 1 with a rising CLK_DIV.
module tb_adpll_dco_cnt;
  timeunit 1ps; timeprecision 1ps;
  logic clk = 0, rstb = 1, clr = 0;
  logic [11:0] multi, cnt;
  logic clk_div;
  int checks = 0, failures = 0;

  adpll_dco_cnt dut (.*);

  always #500 clk = ~clk;

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  task automatic run_m(input int m);
    int exp_cnt, high, rises, last_rise, cyc;
    multi = 12'(m);
    @(negedge clk) clr = 1;
    @(negedge clk) clr = 0;
    checks++;
    if (cnt != 0 || clk_div) fail($sformatf("M=%0d clear: cnt=%0d div=%0b", m, cnt, clk_div));
    @(negedge clk);
    // first edge after the clear: count must be 1 and CLK_DIV high
    checks++;
    if (cnt != 1 || !clk_div) fail($sformatf("M=%0d restart: cnt=%0d div=%0b", m, cnt, clk_div));
    exp_cnt = 1; high = 1; rises = 1; last_rise = 0; cyc = 0;
    repeat (3 * m) begin
      logic prev_div;
      prev_div = clk_div;
      @(negedge clk);
      cyc++;
      exp_cnt = (exp_cnt >= m) ? 1 : exp_cnt + 1;
      checks++;
      if (cnt != 12'(exp_cnt)) fail($sformatf("M=%0d cnt=%0d expected %0d", m, cnt, exp_cnt));
      if (clk_div) high++;
      if (clk_div && !prev_div) begin
        rises++;
        checks++;
        if (cyc - last_rise != m) fail($sformatf("M=%0d divided period %0d", m, cyc - last_rise));
        if (cnt != 1) fail($sformatf("M=%0d rise at count %0d", m, cnt));
        last_rise = cyc;
      end
    end
    checks++;
    if (rises != 4) fail($sformatf("M=%0d rises=%0d", m, rises));
    checks++;
    if (high != 3 * (m / 8 - 1) + 1) fail($sformatf("M=%0d high cycles %0d", m, high));
  endtask

  initial begin
    multi = 12'd800;
    #10 rstb = 0; #1000 rstb = 1;
    checks++;
    if (cnt != 0 || clk_div) fail("reset");
    run_m(16);
    run_m(64);
    run_m(800);
    run_m(1344);
    run_m(2160);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
