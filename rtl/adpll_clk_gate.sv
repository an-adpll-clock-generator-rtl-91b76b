// adpll_clk_gate: glitch-free clock gate for the pixel-clock output.
//
// The enable is sampled on the falling edge of the clock and ANDed with it,
// so the gated clock only ever starts or stops with a whole high phase.
// It keeps CLK_DCOO silent during frequency search and releases it once the
// loop is locked; the design states the output is enabled at lock, the
// gate's structure is this implementation's choice. Reset: active low,
// asynchronous, output disabled.
module adpll_clk_gate (
  input  logic clk,
  input  logic rstb,
  input  logic en,
  output logic gclk
);
  timeunit 1ps; timeprecision 1ps;

  logic en_q;

  always_ff @(negedge clk or negedge rstb) begin
    if (!rstb) en_q <= 1'b0;
    else       en_q <= en;
  end

  assign gclk = clk & en_q;
endmodule
