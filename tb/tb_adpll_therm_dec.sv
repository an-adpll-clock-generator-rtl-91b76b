// tb_adpll_therm_dec: exhaustive check of the 4-to-16 thermometer decoder.
// Every code k must give exactly k ones filling from bit 0, and code 4'b1000
// must give 16'b0000_0000_1111_1111 (the linear stage's default).
module tb_adpll_therm_dec;
  timeunit 1ps; timeprecision 1ps;
  logic [3:0]  bin;
  logic [15:0] therm;
  int checks = 0, failures = 0;

  adpll_therm_dec #(.IN_W(4)) dut (.bin, .therm);

  initial begin
    for (int k = 0; k < 16; k++) begin
      logic [15:0] exp_v;
      bin = 4'(k);
      #10;
      exp_v = 16'((32'h1 << k) - 1);
      checks++;
      if (therm !== exp_v) begin
        failures++;
        $display("FAIL code %0d: got %b expected %b", k, therm, exp_v);
      end
    end
    bin = 4'b1000; #10;
    checks++;
    if (therm !== 16'b0000_0000_1111_1111) begin
      failures++;
      $display("FAIL default code: %b", therm);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
