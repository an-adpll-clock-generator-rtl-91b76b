// adpll_pkg: types and constants shared by the ADPLL clock generator.
//
// The control unit walks through five states. Their 4-bit codes are the
// values shown on the fsm[3:0] trace of the system simulation (IDLE=0,
// SAR=1, LIN=2, DIT1=4, DIT2=8), i.e. one-hot with IDLE as all zeros.
// Word widths follow the design: a 12-bit SAR word (TUNE1), a 4-bit linear
// word (TUNE2), two single dithering bits (TUNE3, TUNE4), a 12-bit
// multiplication factor (MULTI) and a 10-bit dithering step counter.
// The process corners select which delay figures the behavioural models of
// the oscillator and the adjustment line use: FF (1.1 V, -40 C), TT (1.0 V,
// 40 C) and SS (120 C).
package adpll_pkg;
  timeunit 1ps; timeprecision 1ps;

  localparam int unsigned SAR_BITS  = 12;  // TUNE1 width
  localparam int unsigned LIN_BITS  = 4;   // TUNE2 width
  localparam int unsigned MULTI_W   = 12;  // MULTI width
  localparam int unsigned STEP_W    = 10;  // DIT1 step counter width
  localparam int unsigned ADJ_BITS  = 4;   // ADJUST width

  typedef enum logic [3:0] {
    ST_IDLE = 4'd0,
    ST_SAR  = 4'd1,
    ST_LIN  = 4'd2,
    ST_DIT1 = 4'd4,
    ST_DIT2 = 4'd8
  } adpll_state_e;

  typedef enum logic [1:0] {
    CORNER_FF = 2'd0,
    CORNER_TT = 2'd1,
    CORNER_SS = 2'd2
  } adpll_corner_e;

endpackage
