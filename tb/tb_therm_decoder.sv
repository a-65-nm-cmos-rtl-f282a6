// tb_therm_decoder: exhaustive check of the binary-to-thermometer decoder.
// For every 7-bit code the expected gate word is built bit by bit from the
// rule "switch k is on (LOW) when k <= code", and the number of LOW bits is
// checked to be code+1.
module tb_therm_decoder;
  timeunit 1ns; timeprecision 1fs;

  logic [6:0]   code;
  logic [127:0] therm_n;
  int checks = 0, failures = 0;

  therm_decoder dut (.code(code), .therm_n(therm_n));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] exp_w;
    for (int c = 0; c < 128; c++) begin
      code = 7'(c);
      #1;
      exp_w = '1;
      for (int k = 0; k <= c; k++) exp_w[k] = 1'b0;
      checks++;
      if (therm_n !== exp_w) begin
        failures++;
        $display("FAIL code=%0d therm_n=%h exp=%h", c, therm_n, exp_w);
      end
      checks++;
      if ($countones(~therm_n) != c + 1) begin
        failures++;
        $display("FAIL code=%0d on-count=%0d", c, $countones(~therm_n));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
