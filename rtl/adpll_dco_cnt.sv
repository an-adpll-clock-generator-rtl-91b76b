// adpll_dco_cnt: DCO clock counter and divider (DCO_CNT).
//
// Counts DCO cycles 1, 2, ..., M, 1, 2, ... where M is the multiplication
// factor MULTI. CLK_DIV, the feedback clock for the PFD and the source of
// the divided output, goes high on the edge where the count becomes 1 and
// low on the edge where it reaches M/8, giving a 12.5% duty cycle similar
// to Hsync. Counting, wrap and duty cycle follow the design.
//
// The control unit stops the DCO between the two reference edges of a
// frequency-search step; it asserts `clr` on the last DCO edge before the
// stop so the count restarts at 0 and the first edge after the restart
// (aligned with the reference edge) gives count 1 and a rising CLK_DIV.
// That clear input is this implementation's choice. CLK_DIV is registered,
// so it is glitch free. `cnt` is the count after the current edge.
// Reset: active-low asynchronous `rstb` sets the count to 0.
// MULTI must be at least 16 for the duty-cycle decode to make sense.
module adpll_dco_cnt
  import adpll_pkg::*;
(
  input  logic               clk,     // DCO clock (after the adjustment line)
  input  logic               rstb,
  input  logic               clr,     // synchronous restart of the count
  input  logic [MULTI_W-1:0] multi,   // multiplication factor M
  output logic [MULTI_W-1:0] cnt,     // current count, 1..M (0 after clear)
  output logic               clk_div  // divided clock, high for counts 1..M/8-1
);
  timeunit 1ps; timeprecision 1ps;

  logic [MULTI_W-1:0] cnt_nxt;

  always_comb begin
    if (clr)                cnt_nxt = '0;
    else if (cnt >= multi)  cnt_nxt = MULTI_W'(1);
    else                    cnt_nxt = cnt + MULTI_W'(1);
  end

  always_ff @(posedge clk or negedge rstb) begin
    if (!rstb) begin
      cnt     <= '0;
      clk_div <= 1'b0;
    end else begin
      cnt     <= cnt_nxt;
      clk_div <= (cnt_nxt != '0) && (cnt_nxt < (multi >> 3));
    end
  end
endmodule
