// tb_sdldo_top: closed-loop test of the whole regulator at its default sizes.
//
// The regulator (128 switches, two 128-inverter delay lines, 16-stage divider,
// KP = KI = 1) drives an off-chip node model: 220 pF capacitor and a
// resistive load R = Vout / Iload (80 ohm = 10 mA at 800 mV, 160 ohm = 5 mA),
// Vin = 1.0 V, clock 10.4 MHz (freq_sel = 6).  The test
// runs the operations the regulator is characterised with and checks them:
//   - start-up from 0 V to Vref = 800 mV at 10 mA;
//   - reference tracking 800 -> 600 -> 800 mV at 10 mA;
//   - load steps 10 -> 5 -> 10 mA at 800 mV;
//   - overload (40 ohm, 20 mA at 800 mV, more than 128 switches can give): the code must
//     saturate at 127 and recover;
//   - Vref below the detector's logic threshold: the reference line can no
//     longer clock the detector, so decisions stop;
//   - a frequency switch to 20.8 MHz (freq_sel = 5) with regulation kept.
// "Settled" means the 1 us running mean of Vout stays within 30 mV of the
// target; the settling time must be under 15 us (about 150 clocks).  The
// switch-array current is also checked against an independent count of the
// LOW gate bits.  Each mechanism is counted; one never seen is a failure.
module tb_sdldo_top;
  timeunit 1ns; timeprecision 1fs;

  logic         rst_n = 1'b1;
  logic [3:0]   freq_sel = 4'd6;
  real          vin_mv = 1000.0, vref_mv = 800.0, vout_mv, i_out_ua, i_load_ua;
  real          r_load_ohm = 80.0;   // 10 mA at 800 mV
  logic         clk, pd_out;
  logic [6:0]   code, intg;
  logic [127:0] sw_gate_n;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_pd_high = 0, n_pd_low = 0, n_code_up = 0, n_code_down = 0;
  int n_sat_max = 0, n_ref_edges = 0;
  logic [6:0] prev_code = '0;

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

  always @(posedge clk) begin
    if (pd_out) n_pd_high++; else n_pd_low++;
    if (code > prev_code) n_code_up++;
    if (code < prev_code) n_code_down++;
    if (code == 7'd127) n_sat_max++;
    prev_code <= code;
  end

  // running 1 us mean of Vout, sampled every 10 ns
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

  // Wait up to max_us for the running mean to enter and stay (for 3 us)
  // in_band target +- 30 mV; return the settling time in us (-1 if never).
  task automatic settle(input real target, input real max_us, output real t_us,
                        output real vmin, output real vmax);
    realtime t0, t_in;
    bit in_band;
    t0 = $realtime; in_band = 0; t_in = 0; vmin = 1.0e9; vmax = -1.0e9;
    t_us = -1.0;
    while (($realtime - t0) < max_us * 1000.0) begin
      #10ns;
      if (vout_mv < vmin) vmin = vout_mv;
      if (vout_mv > vmax) vmax = vout_mv;
      if (vmean > target - 30.0 && vmean < target + 30.0) begin
        if (!in_band) begin in_band = 1; t_in = $realtime; end
        if ($realtime - t_in >= 3000.0) begin
          t_us = (t_in - t0) / 1000.0;
          return;
        end
      end else in_band = 0;
    end
  endtask

  task automatic step_test(input string name, input real target, output real t_us);
    real vmin, vmax;
    settle(target, 25.0, t_us, vmin, vmax);
    $display("%-28s settle %6.2f us  min %6.1f mV  max %6.1f mV  code %0d  load %0.2f mA",
             name, t_us, vmin, vmax, code, i_load_ua / 1000.0);
    check({name, " settles"}, t_us >= 0.0 && t_us < 15.0);
  endtask

  initial begin
    real t_us;
    int  ref_edges_before;
    #1 rst_n = 1'b0;
    #20 rst_n = 1'b1;

    step_test("start-up to 800 mV", 800.0, t_us);

    // array current against the gate count
    begin
      real vds, per;
      @(negedge clk); #1;
      vds = vin_mv - vout_mv;
      per = (vds > 300.0) ? 150.0 : (vds > 0.0 ? 0.5 * vds : 0.0);
      check("array current", i_out_ua > per * $countones(~sw_gate_n) - 0.1 &&
                             i_out_ua < per * $countones(~sw_gate_n) + 0.1);
      check("switch count follows code", $countones(~sw_gate_n) == int'(code) + 1);
    end

    vref_mv = 600.0;
    step_test("tracking 800 -> 600 mV", 600.0, t_us);
    vref_mv = 800.0;
    step_test("tracking 600 -> 800 mV", 800.0, t_us);

    r_load_ohm = 160.0;
    step_test("load step 10 -> 5 mA", 800.0, t_us);
    r_load_ohm = 80.0;
    step_test("load step 5 -> 10 mA", 800.0, t_us);

    // overload: more than 128 switches can source
    r_load_ohm = 40.0;
    #10us;
    check("code saturates at 127 under overload", code == 7'd127);
    check("code held at 127, no wrap", intg == 7'd127);
    r_load_ohm = 80.0;
    step_test("recovery from overload", 800.0, t_us);

    // reference below the detector's logic threshold: no decisions
    ref_edges_before = n_ref_edges;
    vref_mv = 450.0;
    #3us;
    ref_edges_before = n_ref_edges;
    #5us;
    check("no detector clock below logic threshold", n_ref_edges == ref_edges_before);
    vref_mv = 800.0;
    #2us;
    check("detector clock resumes", n_ref_edges > ref_edges_before);
    step_test("recovery from low Vref", 800.0, t_us);

    // frequency switch
    freq_sel = 4'd5;
    step_test("at 20.8 MHz clock", 800.0, t_us);
    r_load_ohm = 160.0;
    step_test("load step at 20.8 MHz", 800.0, t_us);

    $display("mechanisms: pd_high=%0d pd_low=%0d code_up=%0d code_down=%0d sat_max=%0d ref_edges=%0d",
             n_pd_high, n_pd_low, n_code_up, n_code_down, n_sat_max, n_ref_edges);
    check("pd HIGH seen", n_pd_high > 0);
    check("pd LOW seen", n_pd_low > 0);
    check("code increments seen", n_code_up > 0);
    check("code decrements seen", n_code_down > 0);
    check("saturation seen", n_sat_max > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge dut.ref_pulse) n_ref_edges++;
endmodule
