// adpll_adj: behavioural model of the phase adjustment circuit (ADJ).
// This is a simulation model, not synthesizable logic: the real circuit is
// a delay line of standard cells.
//
// The line deskews the sampling clock against the channel delay. ADJUST[3:0]
// is decoded into a 16-bit thermometer code that selects how many of the 16
// AND/MUX delay stages the clock passes through, giving 16 delay settings.
// The model delays every edge of CKI by the design's simulated delay for
// the selected code at the process corner CORNER: 203 to 2298 ps at FF,
// 331 to 3758 ps at TT (the default, steps of about 228 ps) and 601 to
// 6755 ps at SS. It keeps every edge (transport delay), so a clock whose
// half period is shorter than the delay still passes. A delay change takes
// effect for the next input edge; edges are never reordered.
module adpll_adj
  import adpll_pkg::*;
#(
  parameter adpll_corner_e CORNER = CORNER_TT  // delay figures used
) (
  input  logic [ADJ_BITS-1:0] adjust,
  input  logic                cki,
  output logic                cko
);
  timeunit 1ps; timeprecision 1ps;

  // [corner][code], corners in the order FF, TT, SS
  localparam longint unsigned DLY_TAB [3][16] = '{
    '{203, 341, 478, 622, 770, 897, 1040, 1193,
      1317, 1459, 1611, 1736, 1878, 2029, 2156, 2298},
    '{331, 557, 788, 1014, 1242, 1472, 1699, 1927,
      2156, 2384, 2613, 2841, 3071, 3299, 3526, 3758},
    '{601, 1011, 1422, 1831, 2241, 2651, 3061, 3470,
      3881, 4290, 4701, 5110, 5521, 5930, 6342, 6755}};

  logic [2**ADJ_BITS-1:0] sel;   // thermometer stage selects

  adpll_therm_dec #(.IN_W(ADJ_BITS)) u_adj_dec (.bin(adjust), .therm(sel));

  typedef struct {
    longint unsigned t;
    logic            v;
  } edge_t;

  edge_t           q[$];
  event            pushed;
  longint unsigned last_t;

  initial last_t = 0;

  always @(cki) begin
    longint unsigned t;
    t = longint'($time) + DLY_TAB[CORNER][$countones(sel)];
    if (t < last_t) t = last_t;
    last_t = t;
    q.push_back('{t, cki});
    ->pushed;
  end

  initial cko = 1'b0;

  always begin : drive
    edge_t e;
    if (q.size() == 0) @(pushed);
    e = q[0];
    if (e.t > longint'($time)) #(e.t - longint'($time));
    cko = e.v;
    void'(q.pop_front());
  end
endmodule
