// tb_adpll_ctrl: closed-loop test of the control unit against an abstract
// oscillator and phase detector written in the testbench.
//
// The testbench runs the control unit's clock at a fixed 1 ns while DCO_EN
// is high, keeps its own divide-by-M count (cleared by CNT_CLR) and, for
// every divided period, adds up a "virtual" DCO period per cycle computed
// from the control words the unit set on that cycle's edge (typical-corner
// stage weights). At each PFD_GET rising edge it answers IS_UP when the
// virtual divided period is longer than the virtual reference period
// (search states) or when the accumulated phase lags (tracking). The
// checks: the SAR search starts at 12'h800 and takes exactly 12 steps, the
// LIN stage at most 8 and DIT1 at most 20, lock within 80 reference cycles,
// the DCO stops in every search step and never in tracking, the remaining
// frequency error after DIT1 is within one coarse dither step (96 ps per
// divided period), and the tracking phase stays bounded with fra4 being
// restored to M/2 on polarity changes. Two target frequencies are run.
module tb_adpll_ctrl;
  timeunit 1ps; timeprecision 1ps;
  import adpll_pkg::*;

  localparam int M = 64;
  localparam int SAR_W [12] = '{19, 36, 71, 138, 264, 522, 1039, 2073, 4085, 8077, 16062, 31668};
  localparam int LIN_D [16] = '{482, 485, 488, 492, 497, 501, 506, 510, 515, 519, 524, 528, 533, 537, 542, 546};

  logic clk = 0, rstb = 1, clk_in = 0;
  logic [11:0] multi = 12'(M);
  logic [11:0] cnt;
  logic is_up = 0, is_dn = 0;
  logic [11:0] tune1; logic [3:0] tune2; logic tune3, tune4, dco_en;
  logic pfd_get, pfd_rb, pfd_rb2, cnt_clr, locked;
  adpll_state_e state;
  logic [12:0] fra3, fra4;

  int checks = 0, failures = 0;

  // hold the design in reset from the start (its flops power up random)
  initial #1 rstb = 0;

  adpll_ctrl dut (.*);

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  // oscillator: starts 20 ps after DCO_EN, 1 ns period
  initial forever begin
    if (!dco_en) @(posedge dco_en);
    #20;
    while (dco_en) begin clk = 1; #500; clk = 0; #500; end
  end

  // divide-by-M count mirrored from the clock counter's definition
  always_ff @(posedge clk or negedge rstb)
    if (!rstb)          cnt <= '0;
    else if (cnt_clr)   cnt <= '0;
    else if (cnt >= multi) cnt <= 12'd1;
    else                cnt <= cnt + 12'd1;

  function automatic longint vper(input logic [11:0] t1, input logic [3:0] t2, input logic t3, input logic t4);
    longint p = 2387;
    for (int i = 0; i < 12; i++) if (t1[i]) p += longint'(SAR_W[i]);
    p += longint'(LIN_D[t2]) - longint'(LIN_D[0]);
    if (t3) p += 96;
    if (t4) p += 13;
    return p;
  endfunction

  longint tref_v;      // virtual reference period
  longint acc, v_last, phase;
  bit     v_valid;
  // sample the words 1 ps after each edge (they set that cycle's period)
  always @(posedge clk) begin
    #1;
    if (cnt == 1) begin
      if (acc != 0) begin v_last = acc; v_valid = 1; if (state == ST_DIT2) phase += acc - tref_v; end
      acc = 0;
    end
    if (cnt != 0) acc += vper(tune1, tune2, tune3, tune4);
  end

  // phase detector model
  always @(posedge pfd_get) begin
    if (!v_valid) begin is_up = 0; is_dn = 0; end
    else if (state == ST_DIT2) begin is_up = (phase > 0); is_dn = !(phase > 0); end
    else begin is_up = (v_last > tref_v); is_dn = !(v_last > tref_v); end
    if (state != ST_DIT2) v_valid = 0;
  end

  // reference clock: period M ns, 1/8 high
  bit ref_run = 0;
  int ref_cycles;
  initial forever begin
    if (!ref_run) @(posedge ref_run);
    clk_in = 1; ref_cycles++; #(M * 1000 / 8); clk_in = 0; #(M * 1000 - M * 1000 / 8);
  end

  // step counters
  int steps[adpll_state_e];
  int stops, dit2_stops, restores;
  adpll_state_e st_q;   // state before the current edge
  always @(posedge clk) begin #2; st_q = state; end
  always @(negedge dco_en) begin stops++; if (st_q == ST_DIT2) dit2_stops++; end
  always @(posedge clk) if (dut.seq == 2'd3 && (is_up || is_dn)) begin
    steps[state]++;
    if (state == ST_DIT2 && dut.chg) restores++;
  end

  task automatic run(input longint tv, input string name);
    int lock_cycles;
    longint maxph;
    tref_v = tv; acc = 0; v_valid = 0; phase = 0;
    ref_run = 0;
    #5000 rstb = 0; #5000 rstb = 1;
    steps.delete(); stops = 0; dit2_stops = 0; restores = 0; ref_cycles = 0;
    checks++;
    if (state != ST_IDLE || dco_en) fail({name, ": not idle after reset"});
    #10000 ref_run = 1;
    // first step: check start word and first SAR decision
    wait (state == ST_SAR);
    checks++;
    if (tune1 != 12'h800 || tune2 != 4'h8 || fra3 != 13'(M / 2) || fra4 != 13'(M / 2))
      fail($sformatf("%s: start words %h %h %0d %0d", name, tune1, tune2, fra3, fra4));
    wait (dut.sar_idx == 4'd10);
    #2000;
    checks++;
    if (tv > M * vper(12'h800, 4'h8, 0, 0) + M * 96) begin
      if (tune1 != 12'hc00) fail($sformatf("%s: first SAR decision gave %h", name, tune1));
    end else if (tv < M * vper(12'h800, 4'h8, 0, 0)) begin
      if (tune1 != 12'h400) fail($sformatf("%s: first SAR decision gave %h", name, tune1));
    end
    wait (state == ST_DIT2);
    #100;
    lock_cycles = ref_cycles;
    checks++;
    if (lock_cycles > 80) fail($sformatf("%s: lock after %0d reference cycles", name, lock_cycles));
    checks++;
    if (steps[ST_SAR] != 12) fail($sformatf("%s: SAR steps %0d", name, steps[ST_SAR]));
    checks++;
    if (steps[ST_LIN] < 1 || steps[ST_LIN] > 8) fail($sformatf("%s: LIN steps %0d", name, steps[ST_LIN]));
    checks++;
    if (steps[ST_DIT1] < 1 || steps[ST_DIT1] > 20) fail($sformatf("%s: DIT1 steps %0d", name, steps[ST_DIT1]));
    checks++;
    if (stops != steps[ST_SAR] + steps[ST_LIN] + steps[ST_DIT1])
      fail($sformatf("%s: %0d DCO stops for %0d search steps", name, stops,
                     steps[ST_SAR] + steps[ST_LIN] + steps[ST_DIT1]));
    // residual frequency error with fra4 at M/2
    checks++;
    if (v_last - tv > 2 * 96 || tv - v_last > 2 * 96)
      fail($sformatf("%s: residual error %0d ps per divided period", name, v_last - tv));
    // tracking
    repeat (3) @(posedge clk_in);
    phase = 0;
    maxph = 0;
    repeat (60) begin
      @(posedge clk_in);
      if (phase > maxph) maxph = phase;
      if (-phase > maxph) maxph = -phase;
    end
    checks++;
    if (maxph > 3000) fail($sformatf("%s: tracking phase error %0d ps", name, maxph));
    checks++;
    if (dit2_stops != 0) fail($sformatf("%s: DCO stopped in tracking", name));
    checks++;
    if (restores == 0) fail($sformatf("%s: no fra4 restore", name));
    checks++;
    if (!locked || !dco_en) fail($sformatf("%s: not locked", name));
    $display("%s: lock in %0d ref cycles, SAR %0d LIN %0d DIT1 %0d DIT2 %0d, tune1=%h tune2=%h fra3=%0d, residual %0d ps, max phase %0d ps, restores %0d",
             name, lock_cycles, steps[ST_SAR], steps[ST_LIN], steps[ST_DIT1], steps[ST_DIT2],
             tune1, tune2, fra3, v_last - tv, maxph, restores);
  endtask


  initial begin
    run(longint'(M) * 36123 + 20, "slow target");
    run(longint'(M) * 5001 + 7, "fast target");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
