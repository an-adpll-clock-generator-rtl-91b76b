// tb_adpll_top: end-to-end test of the ADPLL at its default parameters.
//
// Runs the five display modes VGA, SVGA, XGA, SXGA and UXGA (multiplication
// factor 800, 1056, 1344, 1688, 2160 at their pixel-clock targets) and a
// 100 kHz x 2000 = 200 MHz functional test, each with a
// reference of 1/8 duty and +-200 ps of random edge jitter. For each mode:
//   - CLK_DCOO and CLK_DIVO stay silent until lock;
//   - lock (tracking state) within 80 reference cycles;
//   - after lock, over 40 reference cycles: exactly MULTI pixel clocks per
//     CLK_DIVO period, CLK_DIVO high for MULTI/8-1 pixel clocks, pixel
//     count within 2 of 40*MULTI (mean frequency = MULTI x Hsync), and
//     CLK_DIVO rising within 3 ns of CLK_IN;
//   - in VGA mode ADJUST is stepped 0 -> 8 -> 15 after lock: the loop must
//     stay locked and the divided clock must trail the raw DCO edge by the
//     adjustment line's delay for that code.
// It also counts how often each mechanism of the loop happened (SAR, LIN
// and DIT1 search steps, LIN ending on a polarity change, DIT1 step
// halving, DCO stop/restart, IS_UP and IS_DN results, DIT2 corrections and
// fractional-counter restores, ADJUST change) and fails for any that never
// did.
module tb_adpll_top;
  timeunit 1ps; timeprecision 1ps;
  import adpll_pkg::*;

  logic        rstb = 1, clk_in = 0;
  logic [11:0] multi = 12'd800;
  logic [3:0]  adjust = 4'd0;
  logic        clk_dcoo, clk_divo;

  int checks = 0, failures = 0;

  // hold the design in reset from the start (its flops power up random)
  initial #1 rstb = 0;

  adpll_top dut (.*);

  task automatic fail(input string s);
    failures++;
    if (failures < 30) $display("FAIL %s", s);
  endtask

  // -------------------------------------------------------------- reference
  longint tref;         // nominal reference period in ps
  bit     ref_run = 0;
  int     ref_cycles;
  longint t_in;
  initial forever begin
    longint j;
    if (!ref_run) @(posedge ref_run);
    j = longint'($urandom_range(400)) - 200;   // +-200 ps jitter
    #(tref / 2 + j);
    clk_in = 1; ref_cycles++; t_in = $time;
    #(tref / 8);
    clk_in = 0;
    #(tref - tref / 8 - tref / 2 - j);
  end

  // -------------------------------------------------------------- mechanisms
  int n_sar, n_lin, n_dit1, n_lin_chg, n_halve, n_stop, n_up, n_dn;
  int n_dit2, n_restore, n_adjust;
  always @(posedge dut.clk_adj) if (dut.u_ctrl.seq == 2'd3 && dut.u_ctrl.r_valid) begin
    if (dut.is_up) n_up++; else n_dn++;
    case (dut.u_ctrl.state)
      ST_SAR:  n_sar++;
      ST_LIN:  begin n_lin++; if (dut.u_ctrl.chg) n_lin_chg++; end
      ST_DIT1: begin n_dit1++; if (dut.u_ctrl.chg) n_halve++; end
      ST_DIT2: begin n_dit2++; if (dut.u_ctrl.chg) n_restore++; end
      default: ;
    endcase
  end
  always @(negedge dut.dco_en) if (rstb && $time > 1000) n_stop++;

  // -------------------------------------------------------------- output monitors
  int     pix;            // pixel clocks since the last CLK_DIVO rise
  int     pix_total;
  int     hi;             // CLK_DIVO high count in pixel clocks
  bit     mon = 0;
  longint max_phase;
  longint t_raw;          // last raw DCO rising edge
  int     pre_lock_edges;

  always @(posedge dut.clk_dco) t_raw = $time;

  bit div_q = 0;
  always @(posedge clk_dcoo) begin
    if (!dut.u_ctrl.locked) pre_lock_edges++;
    #1;
    if (clk_divo && !div_q) begin
      if (mon) begin
        checks++;
        if (pix != int'(multi)) fail($sformatf("M=%0d: %0d pixel clocks in a divided period", multi, pix));
        checks++;
        if (hi != int'(multi) / 8 - 1) fail($sformatf("M=%0d: CLK_DIVO high for %0d pixel clocks", multi, hi));
      end
      pix = 0; hi = 0;
    end
    div_q = clk_divo;
    pix++; pix_total++;
    if (clk_divo) hi++;
  end
  always @(posedge clk_divo) if (!dut.u_ctrl.locked) pre_lock_edges++;

  always @(posedge clk_divo) begin
    longint ph;
    ph = $time - t_in;
    if (ph > tref / 2) ph -= tref;
    if (mon) begin
      if (ph > max_phase) max_phase = ph;
      if (-ph > max_phase) max_phase = -ph;
    end
  end

  localparam longint ADJ_D [16] = '{331, 557, 788, 1014, 1242, 1472, 1699, 1927,
                                    2156, 2384, 2613, 2841, 3071, 3299, 3526, 3758};

  task automatic check_adjust(input logic [3:0] code);
    adjust = code; n_adjust++;
    repeat (10) @(posedge clk_in);
    @(posedge dut.clk_div);
    checks++;
    if ($time - t_raw != ADJ_D[code])
      fail($sformatf("ADJUST=%0d: divided clock %0d ps after the DCO edge, expected %0d", code, $time - t_raw, ADJ_D[code]));
    checks++;
    if (!dut.u_ctrl.locked) fail($sformatf("ADJUST=%0d: lost lock", code));
  endtask

  task automatic run_mode(input string name, input int m, input longint period_ps, input bit do_adj);
    int lock_cycles;
    longint t0;
    multi = 12'(m); tref = period_ps; adjust = 0;
    ref_run = 0;
    #100000 rstb = 0;
    #100000 rstb = 1;
    pre_lock_edges = 0; ref_cycles = 0; mon = 0;
    ref_run = 1;
    // give up on this mode 100 reference cycles after the start
    fork
      wait (dut.u_ctrl.state == ST_DIT2);
      wait (ref_cycles > 100);
    join_any
    disable fork;
    lock_cycles = ref_cycles;
    checks++;
    if (dut.u_ctrl.state != ST_DIT2) begin
      fail($sformatf("%s: no lock after %0d reference cycles", name, lock_cycles));
      return;
    end
    if (lock_cycles > 80) fail($sformatf("%s: lock after %0d reference cycles", name, lock_cycles));
    checks++;
    if (pre_lock_edges != 0) fail($sformatf("%s: %0d output edges before lock", name, pre_lock_edges));
    repeat (4) @(posedge clk_in);
    @(posedge clk_divo);
    #2;
    max_phase = 0; mon = 1;
    pix_total = 1;   // the pixel clock of this CLK_DIVO edge
    t0 = $time;
    repeat (40) @(posedge clk_divo);
    #2;
    mon = 0;
    pix_total--;     // the next period's first pixel clock
    checks++;
    if (pix_total != 40 * m) fail($sformatf("%s: %0d pixel clocks in 40 divided periods", name, pix_total));
    checks++;
    begin
      longint ideal = 40 * period_ps;
      longint meas = $time - t0;
      if (meas - ideal > 3000 || ideal - meas > 3000)
        fail($sformatf("%s: 40 divided periods took %0d ps, expected %0d", name, meas, ideal));
      $display("%s: M=%0d lock after %0d ref cycles, pixel clock %0.3f MHz (target %0.3f), max CLK_IN-CLK_DIVO phase %0d ps, TUNE1=%h TUNE2=%h fra3=%0d",
               name, m, lock_cycles, 1.0e6 * 40 * m / real'(meas), 1.0e6 * m / real'(period_ps),
               max_phase, dut.tune1, dut.tune2, dut.u_ctrl.fra3);
    end
    checks++;
    if (max_phase > 3000) fail($sformatf("%s: phase error %0d ps", name, max_phase));
    if (do_adj) begin
      check_adjust(4'd8);
      check_adjust(4'd15);
      check_adjust(4'd0);
    end
  endtask

  initial begin
    // Hsync periods from the pixel clock targets: T = MULTI / f_pixel
    run_mode("VGA",  800,  31746032, 1);   // 25.200 MHz / 800
    run_mode("SVGA", 1056, 26385224, 0);   // 40.022 MHz / 1056
    run_mode("XGA",  1344, 20661157, 0);   // 65.049 MHz / 1344
    run_mode("SXGA", 1688, 15625000, 0);   // 108.032 MHz / 1688
    run_mode("UXGA", 2160, 13333333, 0);   // 162.000 MHz / 2160
    run_mode("100 kHz x 2000", 2000, 10000000, 0);   // 200 MHz functional test
    $display("mechanisms: SAR %0d LIN %0d (ended by polarity change %0d) DIT1 %0d (halvings %0d) DCO stops %0d IS_UP %0d IS_DN %0d DIT2 %0d (restores %0d) ADJUST changes %0d",
             n_sar, n_lin, n_lin_chg, n_dit1, n_halve, n_stop, n_up, n_dn, n_dit2, n_restore, n_adjust);
    checks++; if (n_sar != 6 * 12) fail($sformatf("SAR steps %0d, expected 72", n_sar));
    checks++; if (n_lin == 0)      fail("no LIN step");
    checks++; if (n_lin_chg == 0)  fail("LIN never ended on a polarity change");
    checks++; if (n_dit1 == 0)     fail("no DIT1 step");
    checks++; if (n_halve == 0)    fail("DIT1 step never halved");
    checks++; if (n_stop != n_sar + n_lin + n_dit1) fail($sformatf("%0d DCO stops for %0d search steps", n_stop, n_sar + n_lin + n_dit1));
    checks++; if (n_up == 0)       fail("no IS_UP result");
    checks++; if (n_dn == 0)       fail("no IS_DN result");
    checks++; if (n_dit2 == 0)     fail("no DIT2 correction");
    checks++; if (n_restore == 0)  fail("DIT2 never restored the fractional counter");
    checks++; if (n_adjust == 0)   fail("ADJUST never changed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30000000000;   // 30 ms; the full run takes about 13 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
