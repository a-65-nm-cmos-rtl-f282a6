// tb_pmos_switch_array: random gate words on the 128-switch array; the total
// current must be (number of LOW gates) times the single-switch current at
// the applied dropout.
module tb_pmos_switch_array;
  timeunit 1ns; timeprecision 1fs;

  logic [127:0] in = '1;
  real vin_mv = 1000.0, vout_mv = 800.0, i_ua;
  int checks = 0, failures = 0;

  pmos_switch_array dut (.in(in), .vin_mv(vin_mv), .vout_mv(vout_mv), .i_ua(i_ua));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vds, per, exp_i;
    for (int i = 0; i < 100; i++) begin
      in = {$urandom, $urandom, $urandom, $urandom};
      if (i == 0) in = '1;
      if (i == 1) in = '0;
      vout_mv = real'($urandom_range(500, 950));
      #1;
      vds = vin_mv - vout_mv;
      per = (vds > 300.0) ? 150.0 : 0.5 * vds;
      exp_i = per * real'($countones(~in));
      checks++;
      if (i_ua < exp_i - 0.01 || i_ua > exp_i + 0.01) begin
        failures++;
        $display("FAIL on=%0d vout=%f i=%f exp=%f", $countones(~in), vout_mv, i_ua, exp_i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
