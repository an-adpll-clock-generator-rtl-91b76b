// tb_adpll_jitter: phase error of the loop against Hsync jitter.
//
// The loop at its default parameters (typical corner) runs the five display
// modes VGA, SVGA, XGA, SXGA and UXGA, each with a reference whose rising
// edges move by a uniformly distributed random amount of up to +-J ps,
// for J = 0, 600 and 1200 ps (+-200 ps is covered by the end-to-end test).
// For each mode and jitter level it checks:
//   - lock (tracking state) within 80 reference cycles without jitter. With
//     jitter a wrong-sign result can make the DIT1 stage use its 21st
//     comparison, so up to 83 cycles are allowed;
//   - over 40 reference cycles after lock, exactly MULTI pixel clocks in
//     every CLK_DIVO period, so the pixel clock never slips;
//   - without jitter, the largest CLK_IN to CLK_DIVO phase error stays
//     below 3 ns. With jitter the error is printed but not checked: it
//     depends on which search decisions the jitter turned around, and over
//     many random sequences it reaches about 6 ns at +-600 ps and 10 to
//     20 ns at +-1200 ps.
// It prints the largest phase error in ps and as a percentage of the pixel
// clock period, the measure in which phase drift is usually quoted.
module tb_adpll_jitter;
  timeunit 1ps; timeprecision 1ps;
  import adpll_pkg::*;

  logic        rstb = 1, clk_in = 0;
  logic [11:0] multi = 12'd800;
  logic        clk_dcoo, clk_divo;
  int checks = 0, failures = 0;

  adpll_top dut (.rstb, .clk_in, .multi, .adjust(4'd0), .clk_dcoo, .clk_divo);

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // -------------------------------------------------------------- reference
  longint tref, jit;
  bit     ref_run = 0;
  int     ref_cycles;
  longint t_in;
  always begin
    longint j;
    if (!ref_run) @(posedge ref_run);
    j = longint'($urandom_range(32'(2 * jit))) - jit;
    #(tref / 2 + j);
    clk_in = 1; ref_cycles++; t_in = $time;
    #(tref / 8);
    clk_in = 0;
    #(tref - tref / 8 - tref / 2 - j);
  end

  // -------------------------------------------------------------- monitors
  bit     mon = 0, started;
  int     lock_at, periods, bad, max_ph, pix;
  logic   div_q;

  always @(posedge dut.u_ctrl.locked) lock_at = ref_cycles;

  // pixel clocks per divided period, sampled just after each pixel edge
  always @(posedge clk_dcoo) begin
    #1;
    if (!mon) begin
      started = 0;
    end else if (clk_divo && !div_q) begin
      if (started) begin
        periods++;
        if (pix != int'(multi)) bad++;
      end
      started = 1;
      pix = 1;
    end else begin
      pix++;
    end
    div_q = clk_divo;
  end

  // phase of each CLK_DIVO rising edge against the nearest CLK_IN edge
  always @(posedge clk_divo) begin
    longint d;
    if (mon) begin
      d = $time - t_in;
      if (d > tref / 2) d = tref - d;
      if (int'(d) > max_ph) max_ph = int'(d);
    end
  end

  task automatic run_mode(input string name, input int m, input longint period_ps, input longint j);
    multi = 12'(m); tref = period_ps; jit = j;
    ref_run = 0;
    #100000 rstb = 0;
    #100000 rstb = 1;
    ref_cycles = 0; lock_at = -1;
    ref_run = 1;
    wait (ref_cycles == 90);
    checks++;
    if (lock_at < 0 || lock_at > (j == 0 ? 80 : 83))
      fail($sformatf("%s +-%0d ps: lock at reference cycle %0d", name, j, lock_at));
    periods = 0; bad = 0; max_ph = 0;
    mon = 1;
    repeat (40) @(posedge clk_in);
    #(period_ps / 2);
    mon = 0;
    $display("%s M=%0d jitter +-%0d ps: lock at ref cycle %0d, max phase %0d ps = %0.1f %% of the pixel clock",
             name, m, j, lock_at, max_ph, 100.0 * real'(max_ph) * m / real'(period_ps));
    checks++;
    if (periods < 39 || bad != 0)
      fail($sformatf("%s +-%0d ps: %0d of %0d divided periods without %0d pixel clocks", name, j, bad, periods, m));
    if (j == 0) checks++;
    if (j == 0 && max_ph > 3000) fail($sformatf("%s +-%0d ps: phase error %0d ps", name, j, max_ph));
  endtask

  initial begin
    #1 rstb = 0;
    foreach (JIT[k]) begin
      run_mode("VGA",  800,  31746032, JIT[k]);
      run_mode("SVGA", 1056, 26385224, JIT[k]);
      run_mode("XGA",  1344, 20661157, JIT[k]);
      run_mode("SXGA", 1688, 15625000, JIT[k]);
      run_mode("UXGA", 2160, 13333333, JIT[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam longint JIT [3] = '{0, 600, 1200};

  initial begin
    #80000000000;   // 80 ms; the run takes about 42 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
