// tb_adpll_dco: checks the DCO model's period against the typical-corner
// stage figures. For a set of control words it enables the oscillator,
// measures the time between rising edges and compares it with
//   2387 + sum(SAR weights) + LIN(code) - LIN(0) + 96*TUNE3 + 13*TUNE4 ps.
// It also checks the start (first edge right after DCO_EN rises), the stop
// (no further rising edge, clock held low) and the period range ends.
// Two more instances, set to the fast (FF) and slow (SS) process corners,
// are checked against those corners' figures over the same formula, with
// the period range ends quoted for each corner.
module tb_adpll_dco;
  timeunit 1ps; timeprecision 1ps;
  logic        dco_en = 0;
  logic [11:0] tune1 = 12'h800;
  logic [3:0]  tune2 = 4'h8;
  logic        tune3 = 0, tune4 = 0;
  logic        clk_dco;
  int checks = 0, failures = 0;

  localparam int SAR_W [12] = '{19, 36, 71, 138, 264, 522, 1039, 2073, 4085, 8077, 16062, 31668};
  localparam int LIN_D [16] = '{482, 485, 488, 492, 497, 501, 506, 510, 515, 519, 524, 528, 533, 537, 542, 546};

  adpll_dco dut (.*);

  // fast and slow corner instances, sharing the control words
  logic en_x = 0, clk_ff, clk_ss;
  adpll_dco #(.CORNER(adpll_pkg::CORNER_FF)) u_ff (.dco_en(en_x), .tune1, .tune2, .tune3, .tune4, .clk_dco(clk_ff));
  adpll_dco #(.CORNER(adpll_pkg::CORNER_SS)) u_ss (.dco_en(en_x), .tune1, .tune2, .tune3, .tune4, .clk_dco(clk_ss));

  localparam int SAR_FF [12] = '{12, 24, 45, 89, 166, 325, 644, 1284, 2555, 5059, 10065, 19850};
  localparam int SAR_SS [12] = '{33, 61, 120, 239, 459, 902, 1758, 3487, 6763, 13358, 26551, 52337};
  localparam int LIN_FF [16] = '{306, 309, 311, 314, 317, 321, 324, 327, 331, 334, 337, 341, 344, 347, 350, 353};
  localparam int LIN_SS [16] = '{828, 832, 836, 843, 850, 856, 863, 870, 877, 884, 890, 897, 905, 911, 917, 924};

  function automatic int expected_x(input bit ss, input logic [11:0] t1, input logic [3:0] t2, input logic t3, input logic t4);
    int e = ss ? 4212 : 1474;
    for (int i = 0; i < 12; i++) if (t1[i]) e += ss ? SAR_SS[i] : SAR_FF[i];
    e += ss ? LIN_SS[t2] - LIN_SS[0] : LIN_FF[t2] - LIN_FF[0];
    e += t3 ? (ss ? 168 : 60) : 0;
    e += t4 ? (ss ? 17 : 10) : 0;
    return e;
  endfunction

  task automatic check_x(input string c, input longint got, input int exp_p);
    checks++;
    if (got != longint'(exp_p)) begin
      failures++;
      $display("FAIL %s tune1=%h tune2=%h t3=%0b t4=%0b period %0d expected %0d", c, tune1, tune2, tune3, tune4, got, exp_p);
    end
  endtask

  task automatic measure_x(input logic [11:0] t1, input logic [3:0] t2, input logic t3, input logic t4);
    longint pf, ps;
    tune1 = t1; tune2 = t2; tune3 = t3; tune4 = t4;
    en_x = 1;
    fork
      begin longint a; @(posedge clk_ff); @(posedge clk_ff); a = $time; @(posedge clk_ff); pf = $time - a; end
      begin longint a; @(posedge clk_ss); @(posedge clk_ss); a = $time; @(posedge clk_ss); ps = $time - a; end
    join
    #1 en_x = 0;
    #250000;
    check_x("FF", pf, expected_x(0, t1, t2, t3, t4));
    check_x("SS", ps, expected_x(1, t1, t2, t3, t4));
  endtask

  function automatic int expected(input logic [11:0] t1, input logic [3:0] t2, input logic t3, input logic t4);
    int e = 2387;
    for (int i = 0; i < 12; i++) if (t1[i]) e += SAR_W[i];
    e += LIN_D[t2] - LIN_D[0];
    e += t3 ? 96 : 0;
    e += t4 ? 13 : 0;
    return e;
  endfunction

  task automatic measure(input logic [11:0] t1, input logic [3:0] t2, input logic t3, input logic t4);
    longint t0, ta, tb_;
    int exp_p;
    tune1 = t1; tune2 = t2; tune3 = t3; tune4 = t4;
    t0 = $time;
    dco_en = 1;
    @(posedge clk_dco); ta = $time;
    checks++;
    if (ta - t0 > 100) begin
      failures++;
      $display("FAIL start delay %0d ps", ta - t0);
    end
    @(posedge clk_dco); ta = $time;
    @(posedge clk_dco); tb_ = $time;
    exp_p = expected(t1, t2, t3, t4);
    checks++;
    if (tb_ - ta != longint'(exp_p)) begin
      failures++;
      $display("FAIL tune1=%h tune2=%h t3=%0b t4=%0b period %0d expected %0d", t1, t2, t3, t4, tb_ - ta, exp_p);
    end
    // stop in the high phase: no further rising edge, clock returns low
    #1 dco_en = 0;
    ta = $time;
    fork
      begin @(posedge clk_dco); checks++; failures++; $display("FAIL edge after stop"); end
      #(3 * exp_p);
    join_any
    disable fork;
    checks++;
    if (clk_dco !== 1'b0) begin
      failures++;
      $display("FAIL clock not low when stopped");
    end
  endtask

  initial begin
    #1000;
    checks++;
    if (clk_dco !== 1'b0) begin failures++; $display("FAIL running while disabled"); end
    measure(12'h000, 4'h0, 0, 0);   // minimum period 2387 ps
    measure(12'h800, 4'h8, 0, 0);   // search start point
    measure(12'h958, 4'hc, 1, 0);
    measure(12'h958, 4'hc, 1, 1);
    measure(12'h001, 4'h1, 0, 1);
    measure(12'h555, 4'h7, 0, 0);
    measure(12'hfff, 4'hf, 1, 1);   // maximum period
    for (int i = 0; i < 12; i++) measure(12'(1 << i), 4'h0, 0, 0);
    for (int k = 0; k < 16; k++) measure(12'h000, 4'(k), 0, 0);
    measure_x(12'h000, 4'h0, 0, 0);   // FF 1474 ps, SS 4212 ps
    measure_x(12'hfff, 4'hf, 1, 1);
    measure_x(12'h958, 4'hc, 1, 0);
    measure_x(12'h000, 4'h0, 0, 1);
    for (int i = 0; i < 12; i++) measure_x(12'(1 << i), 4'(i), 0, 0);
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
