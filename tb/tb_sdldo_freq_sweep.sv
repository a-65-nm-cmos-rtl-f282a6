// tb_sdldo_freq_sweep: the whole regulator at each clock setting of the
// frequency sweep, from 665.6 MHz (freq_sel = 0) down to 10.4 MHz
// (freq_sel = 6).  At every setting the loop must hold Vout at Vref = 800 mV
// with a 10 mA (80 ohm) load and 220 pF: after a 10 -> 5 -> 10 mA load
// disturbance the 1 us running mean of Vout must settle within 30 mV of
// 800 mV in under 15 us, and the measured clock period must be the one the
// setting selects (2**(sel+1) ring periods of 0.7512 ns).
module tb_sdldo_freq_sweep;
  timeunit 1ns; timeprecision 1fs;

  logic         rst_n = 1'b1;
  logic [3:0]   freq_sel = 4'd6;
  real          vin_mv = 1000.0, vref_mv = 800.0, vout_mv, i_out_ua, i_load_ua;
  real          r_load_ohm = 80.0;
  logic         clk, pd_out;
  logic [6:0]   code, intg;
  logic [127:0] sw_gate_n;
  int checks = 0, failures = 0;

  sdldo_top dut (
    .rst_n(rst_n), .freq_sel(freq_sel), .vin_mv(vin_mv), .vref_mv(vref_mv),
    .vout_mv(vout_mv), .i_out_ua(i_out_ua), .clk(clk), .pd_out(pd_out),
    .code(code), .intg(intg), .sw_gate_n(sw_gate_n)
  );

  ldo_output_node #(.C_PF(220.0), .DT_NS(0.5), .V0_MV(0.0)) u_node (
    .i_sw_ua(i_out_ua), .r_load_ohm(r_load_ohm), .vout_mv(vout_mv),
    .i_load_ua(i_load_ua)
  );

  initial begin : watchdog
    #400us;
    failures++;
    $display("WATCHDOG");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real win [100];
  int  widx = 0;
  real vmean = 0.0;
  initial foreach (win[i]) win[i] = 0.0;
  always #10ns begin
    vmean = vmean + (vout_mv - win[widx]) / 100.0;
    win[widx] = vout_mv;
    widx = (widx + 1) % 100;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic settle(input real target, input real max_us, output real t_us);
    realtime t0, t_in;
    bit in_band;
    t0 = $realtime; in_band = 0; t_in = 0; t_us = -1.0;
    while (($realtime - t0) < max_us * 1000.0) begin
      #10ns;
      if (vmean > target - 30.0 && vmean < target + 30.0) begin
        if (!in_band) begin in_band = 1; t_in = $realtime; end
        if ($realtime - t_in >= 3000.0) begin
          t_us = (t_in - t0) / 1000.0;
          return;
        end
      end else in_band = 0;
    end
  endtask

  initial begin
    real t_us, per, exp_p;
    realtime t0;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;
    settle(800.0, 25.0, t_us);
    check("start-up settles", t_us >= 0.0);
    for (int s = 6; s >= 0; s--) begin
      freq_sel = 4'(s);
      repeat (3) @(posedge clk);
      t0 = $realtime;
      repeat (8) @(posedge clk);
      per   = ($realtime - t0) / 8.0;
      exp_p = 0.7512 * real'(1 << (s + 1));
      check("clock period", per > exp_p - 0.001 && per < exp_p + 0.001);
      r_load_ohm = 160.0;
      settle(800.0, 25.0, t_us);
      $display("sel=%0d %7.2f MHz: 10->5 mA settles in %6.2f us, code %0d",
               s, 1000.0 / per, t_us, code);
      check("10 -> 5 mA settles", t_us >= 0.0 && t_us < 15.0);
      r_load_ohm = 80.0;
      settle(800.0, 25.0, t_us);
      $display("sel=%0d %7.2f MHz: 5->10 mA settles in %6.2f us, code %0d",
               s, 1000.0 / per, t_us, code);
      check("5 -> 10 mA settles", t_us >= 0.0 && t_us < 15.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
