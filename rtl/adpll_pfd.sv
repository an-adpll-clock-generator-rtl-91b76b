// adpll_pfd: three-state phase/frequency detector without a self-reset path.
//
// Two flip-flops with their D tied high record the arrival of a rising
// edge on the reference clock CLK_IN (LAG) and on the divided feedback
// clock CLK_DIV (LEAD). Whichever arrives first wins: UP means the divided
// clock lags the reference (the DCO must speed up), DN means it leads.
// A rising edge of PFD_GET latches UP/DN into IS_UP/IS_DN, which the control
// unit reads. Unlike the classic PFD, nothing resets LAG/LEAD
// automatically: the control unit pulls PFD_RB low to clear them and
// releases it to arm the next comparison, so the detector never sees a
// second reference edge before it is cleared. PFD_RB2 (active low) clears
// the latched result. Only the sign of the phase error is reported.
//
// The structure follows the detector's schematic. The cross-coupled
// AND/inverter pair that picks the first arrival is written here without a
// combinational loop: each edge flop also samples whether the other edge
// had already arrived, and its output counts only if it came first. Edges
// in the same simulation instant set both UP and DN (the dead zone); the
// control unit then gives IS_UP priority. That tie rule is this
// implementation's choice.
//
// Timing: LAG/LEAD set on the input edges; IS_UP/IS_DN valid right after
// the PFD_GET rising edge. All resets are asynchronous, active low.
module adpll_pfd (
  input  logic clk_in,   // reference clock (Hsync)
  input  logic clk_div,  // divided DCO clock
  input  logic pfd_get,  // rising edge latches the comparison result
  input  logic pfd_rb,   // active-low clear of the edge detectors
  input  logic pfd_rb2,  // active-low clear of the latched result
  output logic up,       // divided clock lags (combinational)
  output logic dn,       // divided clock leads (combinational)
  output logic is_up,    // latched UP
  output logic is_dn     // latched DN
);
  timeunit 1ps; timeprecision 1ps;

  logic lag, lead;        // an edge has arrived on CLK_IN / CLK_DIV
  logic lag_first;        // CLK_DIV had not arrived when CLK_IN came
  logic lead_first;       // CLK_IN had not arrived when CLK_DIV came

  always_ff @(posedge clk_in or negedge pfd_rb) begin
    if (!pfd_rb) begin
      lag       <= 1'b0;
      lag_first <= 1'b0;
    end else if (!lag) begin
      lag       <= 1'b1;
      lag_first <= !lead;
    end
  end

  always_ff @(posedge clk_div or negedge pfd_rb) begin
    if (!pfd_rb) begin
      lead       <= 1'b0;
      lead_first <= 1'b0;
    end else if (!lead) begin
      lead       <= 1'b1;
      lead_first <= !lag;
    end
  end

  assign up = lag  && lag_first;
  assign dn = lead && lead_first;

  always_ff @(posedge pfd_get or negedge pfd_rb2) begin
    if (!pfd_rb2) begin
      is_up <= 1'b0;
      is_dn <= 1'b0;
    end else begin
      is_up <= up;
      is_dn <= dn;
    end
  end
endmodule
