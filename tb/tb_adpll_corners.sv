// tb_adpll_corners: the whole loop at the fast (FF) and slow (SS) process
// corners.
//
// Two copies of adpll_top, one with each corner's oscillator and delay-line
// figures, get the same Hsync, MULTI and reset. They run VGA (800 x
// 31.5 kHz = 25.2 MHz, near the FF corner's slowest period), UXGA (2160 x
// 75 kHz = 162 MHz) and 100 kHz x 2000 = 200 MHz (near the SS corner's
// fastest period), with +-200 ps of random Hsync jitter. For each corner and
// mode it checks:
//   - lock (tracking state) within 80 reference cycles;
//   - over 40 reference cycles after lock, exactly MULTI pixel clocks in
//     every CLK_DIVO period;
//   - CLK_DIVO rising within 3 ns of CLK_IN.
// The corner figures are the design's simulated delays; the check limits
// are the same as for the typical corner.
module tb_adpll_corners;
  timeunit 1ps; timeprecision 1ps;
  import adpll_pkg::*;

  logic        rstb = 1, clk_in = 0;
  logic [11:0] multi = 12'd800;
  logic [1:0]  dcoo, divo;
  int checks = 0, failures = 0;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // -------------------------------------------------------------- reference
  longint tref;
  bit     ref_run = 0;
  int     ref_cycles;
  longint t_in;
  always begin
    longint j;
    if (!ref_run) @(posedge ref_run);
    j = longint'($urandom_range(400)) - 200;   // +-200 ps jitter
    #(tref / 2 + j);
    clk_in = 1; ref_cycles++; t_in = $time;
    #(tref / 8);
    clk_in = 0;
    #(tref - tref / 8 - tref / 2 - j);
  end

  // -------------------------------------------------------------- per corner
  bit     mon = 0;
  int     lock_at [2];
  int     periods [2], bad [2], max_ph [2];

  for (genvar g = 0; g < 2; g++) begin : c
    int   pix;
    bit   started;
    logic div_q;

    adpll_top #(.CORNER(g == 0 ? CORNER_FF : CORNER_SS)) u (
      .rstb, .clk_in, .multi, .adjust(4'd0),
      .clk_dcoo(dcoo[g]), .clk_divo(divo[g])
    );

    always @(posedge u.u_ctrl.locked) lock_at[g] = ref_cycles;

    // pixel clocks per divided period, sampled just after each pixel edge
    always @(posedge dcoo[g]) begin
      #1;
      if (!mon) begin
        started = 0;
      end else if (divo[g] && !div_q) begin
        if (started) begin
          periods[g]++;
          if (pix != int'(multi)) begin
            bad[g]++;
            $display("corner %0d: %0d pixel clocks in a divided period", g, pix);
          end
        end
        started = 1;
        pix = 1;
      end else begin
        pix++;
      end
      div_q = divo[g];
    end

    // phase of each CLK_DIVO rising edge against the nearest CLK_IN edge
    always @(posedge divo[g]) begin
      longint d;
      if (mon) begin
        d = $time - t_in;
        if (d > tref / 2) d = tref - d;
        if (int'(d) > max_ph[g]) max_ph[g] = int'(d);
      end
    end
  end

  task automatic run_mode(input string name, input int m, input longint period_ps);
    multi = 12'(m); tref = period_ps;
    ref_run = 0;
    #100000 rstb = 0;
    #100000 rstb = 1;
    ref_cycles = 0; lock_at = '{-1, -1};
    ref_run = 1;
    wait (ref_cycles == 90);
    for (int g = 0; g < 2; g++) begin
      checks++;
      if (lock_at[g] < 0 || lock_at[g] > 80)
        fail($sformatf("%s corner %s: lock at reference cycle %0d", name, g == 0 ? "FF" : "SS", lock_at[g]));
    end
    periods = '{0, 0}; bad = '{0, 0}; max_ph = '{0, 0};
    mon = 1;
    repeat (40) @(posedge clk_in);
    #(period_ps / 2);
    mon = 0;
    for (int g = 0; g < 2; g++) begin
      string cn = g == 0 ? "FF" : "SS";
      $display("%s %s: M=%0d lock at ref cycle %0d, %0d divided periods, max phase %0d ps",
               name, cn, m, lock_at[g], periods[g], max_ph[g]);
      checks++;
      if (periods[g] < 39 || bad[g] != 0)
        fail($sformatf("%s %s: %0d of %0d divided periods without %0d pixel clocks", name, cn, bad[g], periods[g], m));
      checks++;
      if (max_ph[g] > 3000) fail($sformatf("%s %s: phase error %0d ps", name, cn, max_ph[g]));
    end
  endtask

  initial begin
    #1 rstb = 0;
    run_mode("VGA",  800,  31746032);            // 25.200 MHz
    run_mode("UXGA", 2160, 13333333);            // 162.000 MHz
    run_mode("100 kHz x 2000", 2000, 10000000);  // 200 MHz
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #30000000000;   // 30 ms; the run takes about 7 ms
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
