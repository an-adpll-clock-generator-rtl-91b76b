// tb_adpll_pfd: directed test of the phase/frequency detector.
// Scenarios: reference first (lag -> IS_UP), divided clock first (lead ->
// IS_DN), a 1 ps separation either way, a second reference edge after the
// first comparison (must not change the result until the clear), edges
// while the detector is cleared (ignored), and the PFD_RB2 result clear.
module tb_adpll_pfd;
  timeunit 1ps; timeprecision 1ps;
  logic clk_in = 0, clk_div = 0, pfd_get = 0, pfd_rb = 1, pfd_rb2 = 1;
  logic up, dn, is_up, is_dn;
  int checks = 0, failures = 0;

  adpll_pfd dut (.*);

  task automatic check(input string what, input logic eu, input logic ed);
    checks++;
    if (is_up !== eu || is_dn !== ed) begin
      failures++;
      $display("FAIL %s: is_up=%0b is_dn=%0b expected %0b %0b", what, is_up, is_dn, eu, ed);
    end
  endtask

  task automatic clear();
    #100 pfd_rb = 0; #100 pfd_rb = 1; #100;
  endtask

  task automatic get();
    #200 pfd_get = 1; #100 pfd_get = 0; #100;
  endtask

  // first edge on a, then b after sep ps; then both fall
  task automatic race(input bit ref_first, input int sep);
    if (ref_first) begin clk_in = 1; #(sep); clk_div = 1; end
    else           begin clk_div = 1; #(sep); clk_in = 1; end
    #500 clk_in = 0; clk_div = 0;
  endtask

  initial begin
    pfd_rb = 0; pfd_rb2 = 0; #100; pfd_rb = 1; pfd_rb2 = 1; #100;
    check("after reset", 0, 0);

    race(1, 2000); get(); check("reference first", 1, 0);
    clear();
    race(0, 2000); get(); check("divided first", 0, 1);
    clear();
    race(1, 1); get(); check("reference first by 1 ps", 1, 0);
    clear();
    race(0, 1); get(); check("divided first by 1 ps", 0, 1);
    clear();

    // after a lead, a further reference edge must not flip the result
    race(0, 1000);
    #1000 clk_in = 1; #200 clk_in = 0;
    get(); check("second reference edge ignored", 0, 1);
    clear();

    // edges while cleared are ignored
    pfd_rb = 0;
    clk_in = 1; #300 clk_in = 0;
    #300 pfd_rb = 1;
    clk_div = 1; #300 clk_div = 0;
    get(); check("edge during clear ignored", 0, 1);

    // clear the latched result
    #100 pfd_rb2 = 0; #100 pfd_rb2 = 1;
    check("result cleared", 0, 0);

    // GET without any edge latches nothing
    clear(); get(); check("no edge", 0, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
