// tb_clock_mux: for every select value and random tap words, the output must
// equal the selected tap.
module tb_clock_mux;
  timeunit 1ns; timeprecision 1fs;

  logic [15:0] taps;
  logic [3:0]  sel;
  logic        out;
  int checks = 0, failures = 0;

  clock_mux dut (.taps(taps), .sel(sel), .out(out));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      taps = 16'($urandom);
      sel  = 4'(i % 16);
      #1;
      checks++;
      if (out !== ((taps >> sel) & 16'h1) != 0) begin
        failures++;
        $display("FAIL taps=%h sel=%0d out=%b", taps, sel, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
