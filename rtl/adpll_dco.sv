// adpll_dco: behavioural model of the digitally controlled oscillator (DCO).
// This is a simulation model, not synthesizable logic: the real DCO is a
// ring of standard cells whose frequency is set by gate delays.
//
// The oscillator is a ring with an enable NAND and four tuning stages in
// series:
//   SAR  - 12 binary-weighted delay paths selected by TUNE1[11:0]
//   LIN  - 8 buffers loaded by 16 varactor NANDs, controlled by the
//          thermometer code C[15:0] decoded from TUNE2[3:0]
//   DIT1 - one extra delay switched in by TUNE3 (coarse dither)
//   DIT2 - one extra load switched in by TUNE4 (fine dither)
// When DCO_EN is low the NAND holds the ring and CLK_DCO stays low; when it
// rises, CLK_DCO rises after the NAND/inverter delay, so the first DCO edge
// follows the enabling reference edge. The model checks DCO_EN before each
// rising edge, so a stop never cuts a cycle short into an extra edge.
//
// The period of each cycle is computed 1 ps after its rising edge, so it
// uses the control words the controller set on that edge:
//   T = T_MIN + sum(SAR weight of each set TUNE1 bit)
//       + (LIN delay(popcount C) - LIN delay(0)) + DIT1*TUNE3 + DIT2*TUNE4
// All numbers are the design's simulated figures in ps for the process
// corner CORNER (default typical, TT/1.0 V/40 C):
//               FF            TT            SS
//   T_MIN       1474          2387          4212
//   SAR bit 0   12 ... 19850  19 ... 31668  33 ... 52337 (bit 11)
//   LIN code 0  306 ... 353   482 ... 546   828 ... 924  (code 15)
//   DIT1        60            96            168
//   DIT2        10            13            17
// The full per-bit and per-code tables are below. The stage weights are
// treated as contributions to the full period because the design quotes
// the SAR range as the period range. The SS linear-stage delay for code 0
// is taken as the code-15 delay minus the stage's 96 ps range. The start
// delay START_DLY_PS and the 50% duty cycle are this model's choices.
module adpll_dco
  import adpll_pkg::*;
#(
  parameter adpll_corner_e CORNER       = CORNER_TT, // delay figures used
  parameter int unsigned   START_DLY_PS = 20         // DCO_EN rise to first CLK_DCO edge
) (
  input  logic                dco_en,
  input  logic [SAR_BITS-1:0] tune1,
  input  logic [LIN_BITS-1:0] tune2,
  input  logic                tune3,
  input  logic                tune4,
  output logic                clk_dco
);
  timeunit 1ps; timeprecision 1ps;

  // [corner][bit or code], corners in the order FF, TT, SS
  localparam int unsigned SAR_TAB [3][SAR_BITS] = '{
    '{12, 24, 45, 89, 166, 325, 644, 1284, 2555, 5059, 10065, 19850},
    '{19, 36, 71, 138, 264, 522, 1039, 2073, 4085, 8077, 16062, 31668},
    '{33, 61, 120, 239, 459, 902, 1758, 3487, 6763, 13358, 26551, 52337}};
  localparam int unsigned LIN_TAB [3][16] = '{
    '{306, 309, 311, 314, 317, 321, 324, 327, 331, 334, 337, 341, 344, 347, 350, 353},
    '{482, 485, 488, 492, 497, 501, 506, 510, 515, 519, 524, 528, 533, 537, 542, 546},
    '{828, 832, 836, 843, 850, 856, 863, 870, 877, 884, 890, 897, 905, 911, 917, 924}};
  localparam int unsigned T_MIN_TAB [3] = '{1474, 2387, 4212};
  localparam int unsigned DIT1_TAB  [3] = '{60, 96, 168};
  localparam int unsigned DIT2_TAB  [3] = '{10, 13, 17};

  localparam int unsigned T_MIN_PS = T_MIN_TAB[CORNER];
  localparam int unsigned DIT1_PS  = DIT1_TAB[CORNER];
  localparam int unsigned DIT2_PS  = DIT2_TAB[CORNER];

  logic [2**LIN_BITS-1:0] c;   // varactor controls of the linear stage

  adpll_therm_dec #(.IN_W(LIN_BITS)) u_lin_dec (.bin(tune2), .therm(c));

  function automatic int unsigned period_ps();
    int unsigned t, ones;
    t = T_MIN_PS;
    for (int i = 0; i < SAR_BITS; i++)
      if (tune1[i]) t += SAR_TAB[CORNER][i];
    ones = $countones(c);
    t += LIN_TAB[CORNER][ones] - LIN_TAB[CORNER][0];
    if (tune3) t += DIT1_PS;
    if (tune4) t += DIT2_PS;
    return t;
  endfunction

  int unsigned p;

  initial clk_dco = 1'b0;

  always begin : osc
    wait (dco_en);
    #(START_DLY_PS);
    while (dco_en) begin
      clk_dco = 1'b1;
      #1;
      p = period_ps();
      #(p / 2 - 1);
      clk_dco = 1'b0;
      #(p - p / 2);
    end
  end
endmodule
