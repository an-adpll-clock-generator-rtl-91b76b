// adpll_therm_dec: binary to thermometer decoder (LIN_DEC and ADJ_DEC).
//
// Output bit i is 1 when i is below the binary input, so a code k gives k
// ones filling from bit 0 upwards. Code 4'b1000 therefore yields
// 16'b0000_0000_1111_1111, the default setting of the DCO linear stage.
// The same decoder drives the 16 varactor controls C[15:0] of the DCO's
// linear stage and the 16 stage selects of the phase adjustment line.
// The mapping of code 4'b1000 follows the design; filling from bit 0 for
// the other codes (and reusing it for the adjustment line) is this
// implementation's choice. Purely combinational, no clock.
module adpll_therm_dec #(
  parameter int unsigned IN_W = 4
) (
  input  logic [IN_W-1:0]      bin,
  output logic [2**IN_W-1:0]   therm
);
  timeunit 1ps; timeprecision 1ps;

  always_comb begin
    for (int unsigned i = 0; i < 2**IN_W; i++)
      therm[i] = (i < 32'(bin));
  end
endmodule
