// adpll_top: all-digital line-locked PLL clock generator for video capture.
//
// The loop multiplies the horizontal sync CLK_IN (Hsync, tens of kHz) by the
// total horizontal resolution MULTI (800 to 2160 for VGA to UXGA) to give
// the pixel clock CLK_DCOO (25 to 230 MHz), phase aligned to Hsync, and the
// divided clock CLK_DIVO. Blocks and connections follow the design's
// architecture:
//   PFD     - sign-only phase detector, armed and cleared by CTRL
//   CTRL    - SAR/LIN/DIT1 frequency search, DIT2 phase tracking
//   DCO     - four-stage ring oscillator (behavioural model)
//   ADJ     - 16-step output delay line set by ADJUST (behavioural model)
//   DCO_CNT - divide-by-MULTI counter producing CLK_DIV
// The clock counter and the control unit are clocked by the adjustment
// line's output, as drawn in the architecture, so CLK_DIV (and with it the
// locked phase of CLK_DCOO) moves with ADJUST.
//
// Operation: hold RSTB low, set MULTI and apply CLK_IN, release RSTB. The
// loop locks in at most 40 two-reference-cycle search steps (80 reference
// cycles), after which CLK_DCOO and CLK_DIVO start. Both outputs are low
// before lock. The reference CLK_IN reaching the control unit, the clock
// gate on CLK_DCOO and the AND gate on CLK_DIVO are this implementation's
// choices where the architecture drawing shows no detail. CORNER selects
// the process corner whose delay figures the two behavioural models use.
module adpll_top
  import adpll_pkg::*;
#(
  parameter int unsigned DIT2_STEP = 8,         // tracking step of the fine dither counter
  parameter adpll_corner_e CORNER  = CORNER_TT  // delay figures of the DCO and ADJ models
) (
  input  logic                rstb,      // active-low enable/reset
  input  logic                clk_in,    // reference clock (Hsync)
  input  logic [MULTI_W-1:0]  multi,     // multiplication factor
  input  logic [ADJ_BITS-1:0] adjust,    // output phase adjustment
  output logic                clk_dcoo,  // pixel clock
  output logic                clk_divo   // divided clock
);
  timeunit 1ps; timeprecision 1ps;

  logic [SAR_BITS-1:0] tune1;
  logic [LIN_BITS-1:0] tune2;
  logic                tune3, tune4, dco_en;
  logic                clk_dco, clk_adj, clk_div;
  logic                pfd_get, pfd_rb, pfd_rb2, is_up, is_dn, up, dn;
  logic                cnt_clr, locked;
  logic [MULTI_W-1:0]  cnt;
  adpll_state_e        state;
  logic [MULTI_W:0]    fra3, fra4;

  adpll_pfd u_pfd (
    .clk_in, .clk_div, .pfd_get, .pfd_rb, .pfd_rb2,
    .up, .dn, .is_up, .is_dn
  );

  adpll_ctrl #(.DIT2_STEP(DIT2_STEP)) u_ctrl (
    .clk(clk_adj), .rstb, .clk_in, .multi, .cnt, .is_up, .is_dn,
    .tune1, .tune2, .tune3, .tune4, .dco_en, .pfd_get, .pfd_rb, .pfd_rb2,
    .cnt_clr, .locked, .state, .fra3, .fra4
  );

  adpll_dco #(.CORNER(CORNER)) u_dco (
    .dco_en, .tune1, .tune2, .tune3, .tune4, .clk_dco
  );

  adpll_adj #(.CORNER(CORNER)) u_adj (
    .adjust, .cki(clk_dco), .cko(clk_adj)
  );

  adpll_dco_cnt u_cnt (
    .clk(clk_adj), .rstb, .clr(cnt_clr), .multi, .cnt, .clk_div
  );

  adpll_clk_gate u_gate (
    .clk(clk_adj), .rstb, .en(locked), .gclk(clk_dcoo)
  );

  assign clk_divo = clk_div & locked;
endmodule
