// tb_ring_oscillator: measures the oscillator period over many cycles and
// checks it against the 0.7512 ns default.
module tb_ring_oscillator;
  timeunit 1ns; timeprecision 1fs;

  logic osc;
  int checks = 0, failures = 0;

  ring_oscillator dut (.osc(osc));

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    real per;
    @(posedge osc); t0 = $realtime;
    repeat (1000) @(posedge osc);
    t1 = $realtime;
    per = (t1 - t0) / 1000.0;
    $display("period %f ns", per);
    checks++;
    if (per < 0.7511 || per > 0.7513) begin
      failures++;
      $display("FAIL period %f", per);
    end
    // duty cycle
    @(posedge osc); t0 = $realtime; @(negedge osc); t1 = $realtime;
    checks++;
    if ((t1 - t0) < 0.3755 || (t1 - t0) > 0.3757) begin
      failures++;
      $display("FAIL high time %f", t1 - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
