// adpll_ctrl: control unit (CTRL) of the ADPLL clock generator.
//
// The control unit turns the sign-only PFD result into DCO control words.
// After reset it waits in IDLE; the first reference edge starts the DCO and
// the unit walks through three frequency-search states and one tracking
// state:
//   SAR  - successive approximation of the 12-bit coarse word TUNE1, MSB
//          first, starting at 12'h800: IS_UP (DCO too slow) clears the bit
//          under test, IS_DN keeps it; the next bit is then set. 12 steps.
//   LIN  - the 4-bit linear word TUNE2 starts at 4'b1000 and moves by one
//          (IS_UP: down, faster; IS_DN: up, slower) until the PFD polarity
//          changes or the word reaches an end. At most 8 steps.
//   DIT1 - dithering with TUNE3: the fractional counter fra3 (default M/2)
//          sets the DCO count from which TUNE3 is high, so M-fra3+1 cycles
//          of every divided period are long. A step counter (default M/4)
//          is halved on every polarity change and added to fra3 on IS_UP
//          or subtracted on IS_DN; the stage ends when the step reaches 0.
//          A step that has moved fra3 twice without a polarity change is
//          halved as well, so the stage always ends, within 20 moves and
//          21 comparisons, even when reference jitter hides the change.
//   DIT2 - phase tracking with TUNE4 and the counter fra4 (default M/2):
//          the DCO runs continuously and every reference edge moves fra4 by
//          DIT2_STEP, or restores it to M/2 when the polarity changes.
// The CLK_DCOO/CLK_DIVO outputs are enabled (`locked`) in DIT2.
//
// Two-cycle frequency compare: each search step uses two reference edges.
// The first edge starts the DCO (DCO_EN), so the divided clock starts in
// phase with the reference; the PFD is armed a few DCO cycles later; the
// second edge triggers the command sequence PFD_GET (latch), PFD_RB low
// (clear), then DCO stop and tune. No phase error accumulates from one
// step to the next and the PFD never sees a second edge before its clear.
//
// Clocking: everything except one toggle flop runs on the DCO clock `clk`
// (after the adjustment line), which only runs while DCO_EN is high. The
// reference clock enters through a 3-flop synchronizer and edge detector.
// DCO_EN is the XOR of a start toggle, flipped by a CLK_IN rising edge
// while the DCO is stopped, and a stop toggle flipped here. An edge of
// `clk` that still arrives after a stop is ignored and holds the counter
// cleared (`cnt_clr`).
//
// From the design: the states and their order, the state codes, the
// default words, the SAR/LIN/DIT1/DIT2 update rules and the command
// sequence. This implementation's choices: the toggle-based DCO start/stop,
// the synchronizer, the exact DCO-cycle offsets of the commands (GET one
// cycle after the synchronized edge, clear and tune two cycles later),
// arming the PFD at count 2 during search and at count M/2 during tracking,
// treating the first comparison of each stage as "no change", halving the
// DIT1 step after two moves without a polarity change, ending LIN
// when TUNE2 saturates, clamping fra3/fra4 to 1..M+1, the default tracking
// step DIT2_STEP, and ignoring a comparison in which neither IS_UP nor
// IS_DN was latched. Reset: RSTB, active low, asynchronous.
module adpll_ctrl
  import adpll_pkg::*;
#(
  parameter int unsigned DIT2_STEP  = 8,  // tracking step of fra4
  parameter int unsigned PFD_EN_CNT = 2   // DCO count at which the PFD is armed during search
) (
  input  logic                clk,      // DCO clock (runs only while dco_en)
  input  logic                rstb,     // active-low reset
  input  logic                clk_in,   // reference clock (Hsync)
  input  logic [MULTI_W-1:0]  multi,    // multiplication factor M
  input  logic [MULTI_W-1:0]  cnt,      // DCO count from the clock counter
  input  logic                is_up,    // PFD: divided clock lagged
  input  logic                is_dn,    // PFD: divided clock led
  output logic [SAR_BITS-1:0] tune1,    // SAR stage word
  output logic [LIN_BITS-1:0] tune2,    // linear stage word
  output logic                tune3,    // first dithering stage
  output logic                tune4,    // second dithering stage
  output logic                dco_en,   // DCO enable
  output logic                pfd_get,  // rising edge latches the PFD
  output logic                pfd_rb,   // active-low PFD clear
  output logic                pfd_rb2,  // active-low clear of the PFD result
  output logic                cnt_clr,  // restart the clock counter
  output logic                locked,   // frequency search done (DIT2)
  output adpll_state_e        state,    // current state
  output logic [MULTI_W:0]    fra3,     // fractional counter of TUNE3
  output logic [MULTI_W:0]    fra4      // fractional counter of TUNE4
);
  timeunit 1ps; timeprecision 1ps;

  // ---------------------------------------------------------------- DCO start/stop
  logic start_tog;   // CLK_IN domain
  logic stop_tog;    // DCO domain

  always_ff @(posedge clk_in or negedge rstb) begin
    if (!rstb)        start_tog <= 1'b0;
    else if (!dco_en) start_tog <= ~start_tog;
  end

  assign dco_en = start_tog ^ stop_tog;

  // ---------------------------------------------------------------- DCO domain
  typedef enum logic [1:0] {SEQ_IDLE, SEQ_GET, SEQ_WAIT, SEQ_TUNE} seq_e;

  logic [2:0]           ref_s;       // reference synchronizer
  logic                 ref_rise;
  logic                 restart;     // DCO was stopped; next running edge starts a step
  seq_e                 seq;
  logic [3:0]           sar_idx;     // SAR bit under test
  logic [STEP_W-1:0]    step3;       // DIT1 step counter
  logic [1:0]           uses3;       // times step3 has been applied
  logic                 prev_up, prev_valid;
  logic                 searching;
  logic [MULTI_W-1:0]   en_point;
  logic [MULTI_W:0]     cnt_nxt;     // clock counter value after this edge
  logic                 r_valid, r_up, chg;
  logic [STEP_W-1:0]    nstep;

  assign ref_rise  = ref_s[1] & ~ref_s[2];
  assign searching = (state == ST_SAR) || (state == ST_LIN) || (state == ST_DIT1);
  assign en_point  = (state == ST_DIT2) ? (multi >> 1) : MULTI_W'(PFD_EN_CNT);
  assign cnt_clr   = (restart && !dco_en) || (seq == SEQ_TUNE && searching);
  assign locked    = (state == ST_DIT2);

  // PFD result of the current step
  assign r_valid = is_up | is_dn;
  assign r_up    = is_up;
  assign chg     = prev_valid && r_valid && (r_up != prev_up);
  // halve on a polarity change, and after two moves without one
  assign nstep   = (chg || uses3 == 2'd2) ? (step3 >> 1) : step3;

  // Counter value after this edge, mirrored from the clock counter
  always_comb begin
    if (cnt_clr)                     cnt_nxt = '0;
    else if (cnt >= multi)           cnt_nxt = (MULTI_W+1)'(1);
    else                             cnt_nxt = {1'b0, cnt} + (MULTI_W+1)'(1);
  end

  function automatic logic [MULTI_W:0] clamp_fra(input logic signed [MULTI_W+2:0] v,
                                                 input logic [MULTI_W-1:0] m);
    if (v < 1)                           return (MULTI_W+1)'(1);
    else if (v > $signed({3'b0, m}) + 1) return {1'b0, m} + (MULTI_W+1)'(1);
    else                                 return v[MULTI_W:0];
  endfunction

  always_ff @(posedge clk or negedge rstb) begin
    if (!rstb) begin
      state      <= ST_IDLE;
      ref_s      <= '0;
      restart    <= 1'b1;
      seq        <= SEQ_IDLE;
      stop_tog   <= 1'b0;
      tune1      <= SAR_BITS'(1) << (SAR_BITS-1);
      tune2      <= LIN_BITS'(1) << (LIN_BITS-1);
      tune3      <= 1'b0;
      tune4      <= 1'b0;
      sar_idx    <= 4'(SAR_BITS-1);
      fra3       <= '0;
      fra4       <= '0;
      step3      <= '0;
      uses3      <= '0;
      prev_up    <= 1'b0;
      prev_valid <= 1'b0;
      pfd_get    <= 1'b0;
      pfd_rb     <= 1'b0;
      pfd_rb2    <= 1'b0;
    end else if (restart && !dco_en) begin
      // A late edge after a stop: ignore it.
    end else begin
      pfd_rb2 <= 1'b1;
      ref_s   <= {ref_s[1:0], clk_in};
      tune3   <= (cnt_nxt >= fra3);
      tune4   <= (cnt_nxt >= fra4);

      if (restart) begin
        // First edge after the DCO was started by a reference edge.
        restart <= 1'b0;
        ref_s   <= '1;  // this reference edge is the one that started the DCO
        if (state == ST_IDLE) begin
          state      <= ST_SAR;
          tune1      <= SAR_BITS'(1) << (SAR_BITS-1);
          tune2      <= LIN_BITS'(1) << (LIN_BITS-1);
          sar_idx    <= 4'(SAR_BITS-1);
          fra3       <= {2'b0, multi[MULTI_W-1:1]};
          fra4       <= {2'b0, multi[MULTI_W-1:1]};
          step3      <= STEP_W'(multi >> 2);
          uses3      <= '0;
          prev_valid <= 1'b0;
          tune3      <= 1'b0;
          tune4      <= 1'b0;
        end
      end else begin
        // Arm the PFD
        if (!pfd_rb && seq == SEQ_IDLE && cnt == en_point) pfd_rb <= 1'b1;

        unique case (seq)
          SEQ_IDLE: if (ref_rise) begin
            seq     <= SEQ_GET;
            pfd_get <= 1'b1;
          end
          SEQ_GET: begin
            seq     <= SEQ_WAIT;
            pfd_get <= 1'b0;
          end
          SEQ_WAIT: seq <= SEQ_TUNE;
          SEQ_TUNE: begin
            seq    <= SEQ_IDLE;
            pfd_rb <= 1'b0;
            if (r_valid) begin
              prev_up    <= r_up;
              prev_valid <= 1'b1;
            end
            if (searching) begin
              stop_tog <= ~stop_tog;
              restart  <= 1'b1;
            end
            if (r_valid) begin
              unique case (state)
                ST_SAR: begin
                  if (r_up) tune1[sar_idx] <= 1'b0;
                  if (sar_idx != 0) begin
                    tune1[sar_idx - 4'd1] <= 1'b1;
                    sar_idx <= sar_idx - 4'd1;
                  end else begin
                    state      <= ST_LIN;
                    prev_valid <= 1'b0;
                  end
                end
                ST_LIN: begin
                  if (chg) begin
                    state      <= ST_DIT1;
                    prev_valid <= 1'b0;
                  end else if (r_up) begin
                    tune2 <= tune2 - LIN_BITS'(1);
                    if (tune2 == LIN_BITS'(1)) begin
                      state      <= ST_DIT1;
                      prev_valid <= 1'b0;
                    end
                  end else begin
                    tune2 <= tune2 + LIN_BITS'(1);
                    if (tune2 == {LIN_BITS{1'b1}} - LIN_BITS'(1)) begin
                      state      <= ST_DIT1;
                      prev_valid <= 1'b0;
                    end
                  end
                end
                ST_DIT1: begin
                  if (nstep == '0) begin
                    state      <= ST_DIT2;
                    prev_valid <= 1'b0;
                  end else begin
                    step3 <= nstep;
                    uses3 <= (nstep != step3) ? 2'd1 : uses3 + 2'd1;
                    fra3  <= clamp_fra(r_up ? $signed({2'b0, fra3}) + $signed((MULTI_W+3)'(nstep))
                                            : $signed({2'b0, fra3}) - $signed((MULTI_W+3)'(nstep)),
                                       multi);
                  end
                end
                ST_DIT2: begin
                  if (chg) fra4 <= {2'b0, multi[MULTI_W-1:1]};
                  else     fra4 <= clamp_fra(r_up ? $signed({2'b0, fra4}) + (MULTI_W+3)'(DIT2_STEP)
                                                  : $signed({2'b0, fra4}) - (MULTI_W+3)'(DIT2_STEP),
                                             multi);
                end
                default: ;
              endcase
            end
          end
          default: seq <= SEQ_IDLE;
        endcase
      end
    end
  end

  // The PFD command pulses never overlap: GET is issued while the PFD is armed.
  a_get_armed: assert property (@(posedge clk) disable iff (!rstb) pfd_get |-> pfd_rb)
    else $error("PFD_GET issued while the PFD is cleared");
endmodule
