// tb_pmos_switch_cell: checks the switch current in the off state, in the
// triode region (0.5 uA/mV times the dropout), in saturation (fixed at
// 150 uA above 300 mV) and with reversed bias (no current).
module tb_pmos_switch_cell;
  timeunit 1ns; timeprecision 1fs;

  logic a = 1'b1;
  real vin_mv = 1000.0, vout_mv = 800.0, i_ua;
  int checks = 0, failures = 0;

  pmos_switch_cell dut (.a(a), .vin_mv(vin_mv), .vout_mv(vout_mv), .i_ua(i_ua));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_i(input logic g, input real vo, input real exp_i);
    a = g; vout_mv = vo;
    #1;
    checks++;
    if (i_ua < exp_i - 0.001 || i_ua > exp_i + 0.001) begin
      failures++;
      $display("FAIL a=%b vout=%f i=%f exp=%f", g, vo, i_ua, exp_i);
    end
  endtask

  initial begin
    expect_i(1'b1, 800.0, 0.0);
    expect_i(1'b0, 800.0, 100.0);
    expect_i(1'b0, 900.0, 50.0);
    expect_i(1'b0, 600.0, 150.0);
    expect_i(1'b0, 200.0, 150.0);
    expect_i(1'b0, 1000.0, 0.0);
    expect_i(1'b0, 1100.0, 0.0);
    expect_i(1'b1, 200.0, 0.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
