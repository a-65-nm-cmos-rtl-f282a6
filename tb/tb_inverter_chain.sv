// tb_inverter_chain: measures the pulse delay of a 128-stage line at several
// supplies.  The expected delay is 128 times the square-law stage delay,
// 10 ps * (V/(V-350)^2) / (800/450^2), recomputed here; it must also fall
// monotonically with the supply, keep the pulse polarity, and the output
// must stay LOW below the 500 mV logic threshold.
module tb_inverter_chain;
  timeunit 1ns; timeprecision 1fs;

  logic in = 1'b0, out;
  real  vdd_mv = 800.0;
  int checks = 0, failures = 0;

  inverter_chain dut (.in(in), .vdd_mv(vdd_mv), .out(out));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real exp_delay(input real v);
    return 128.0 * 0.010 * (v / ((v - 350.0) * (v - 350.0)))
                         / (800.0 / (450.0 * 450.0));
  endfunction

  initial begin
    real vs [6] = '{550.0, 600.0, 700.0, 800.0, 900.0, 1000.0};
    realtime t0, t1;
    real d, prev_d;
    prev_d = 1.0e9;
    foreach (vs[i]) begin
      vdd_mv = vs[i];
      #50;
      checks++;
      if (out !== 1'b0) begin failures++; $display("FAIL idle level"); end
      in = 1'b1; t0 = $realtime;
      @(posedge out); t1 = $realtime;
      d = t1 - t0;
      $display("vdd=%0.0f mV delay %f ns (model %f)", vs[i], d, exp_delay(vs[i]));
      checks++;
      if (d < exp_delay(vs[i]) - 0.005 || d > exp_delay(vs[i]) + 0.005) begin
        failures++;
        $display("FAIL delay at %0.0f mV", vs[i]);
      end
      checks++;
      if (d >= prev_d) begin failures++; $display("FAIL delay not falling with vdd"); end
      prev_d = d;
      #50 in = 1'b0;
      #50;
    end
    // below the detector's logic threshold the line cannot drive it
    vdd_mv = 450.0;
    #10 in = 1'b1;
    #200;
    checks++;
    if (out !== 1'b0) begin failures++; $display("FAIL output switched below threshold"); end
    in = 1'b0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
