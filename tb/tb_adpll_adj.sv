// tb_adpll_adj: checks the phase adjustment line model.
// For every ADJUST code one rising and one falling edge are sent and their
// delays compared with the typical-corner delay table (331 ps to 3758 ps).
// A 4 ns clock is then sent through the longest setting (3758 ps, more than
// a half period) and every edge must come out, 3758 ps late. Two more
// instances at the fast (FF) and slow (SS) process corners get the same
// edges and are checked against those corners' delays.
module tb_adpll_adj;
  timeunit 1ps; timeprecision 1ps;
  logic [3:0] adjust = 0;
  logic       cki = 0, cko;
  int checks = 0, failures = 0;
  int in_edges = 0, out_edges = 0;

  localparam longint D [16] = '{331, 557, 788, 1014, 1242, 1472, 1699, 1927,
                            2156, 2384, 2613, 2841, 3071, 3299, 3526, 3758};

  adpll_adj dut (.*);

  localparam longint D_FF [16] = '{203, 341, 478, 622, 770, 897, 1040, 1193,
                               1317, 1459, 1611, 1736, 1878, 2029, 2156, 2298};
  localparam longint D_SS [16] = '{601, 1011, 1422, 1831, 2241, 2651, 3061, 3470,
                               3881, 4290, 4701, 5110, 5521, 5930, 6342, 6755};
  logic   cko_ff, cko_ss;
  longint t_ff, t_ss;   // time of the last edge of each
  adpll_adj #(.CORNER(adpll_pkg::CORNER_FF)) u_ff (.adjust, .cki, .cko(cko_ff));
  adpll_adj #(.CORNER(adpll_pkg::CORNER_SS)) u_ss (.adjust, .cki, .cko(cko_ss));
  always @(posedge cko_ff or negedge cko_ff) t_ff = $time;
  always @(posedge cko_ss or negedge cko_ss) t_ss = $time;

  task automatic check_x(input string what, input int k, input longint t0);
    checks++;
    if (t_ff - t0 != D_FF[k] || t_ss - t0 != D_SS[k]) begin
      failures++;
      $display("FAIL code %0d %s delay FF %0d SS %0d expected %0d %0d", k, what, t_ff - t0, t_ss - t0, D_FF[k], D_SS[k]);
    end
  endtask

  always @(cki) in_edges++;
  always @(cko) out_edges++;

  initial begin
    longint t0;
    #1000;
    for (int k = 0; k < 16; k++) begin
      adjust = 4'(k);
      #10;
      t0 = $time; cki = 1;
      @(posedge cko);
      checks++;
      if ($time - t0 != D[k]) begin
        failures++;
        $display("FAIL code %0d rise delay %0d expected %0d", k, $time - t0, D[k]);
      end
      #8000;
      check_x("rise", k, t0);
      t0 = $time; cki = 0;
      @(negedge cko);
      checks++;
      if ($time - t0 != D[k]) begin
        failures++;
        $display("FAIL code %0d fall delay %0d expected %0d", k, $time - t0, D[k]);
      end
      #8000;
      check_x("fall", k, t0);
    end
    // transport: a 4 ns clock through the 3758 ps setting
    adjust = 4'hf;
    #10;
    in_edges = 0; out_edges = 0;
    fork
      repeat (40) begin #2000 cki = ~cki; end
      begin
        forever begin
          @(posedge cki); t0 = $time;
          @(posedge cko);
          checks++;
          if ($time - t0 != 3758) begin
            failures++;
            $display("FAIL fast clock delay %0d", $time - t0);
          end
        end
      end
    join_any
    disable fork;
    #10000;
    checks++;
    if (in_edges != out_edges) begin
      failures++;
      $display("FAIL edges in %0d out %0d", in_edges, out_edges);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
