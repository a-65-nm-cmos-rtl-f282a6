// tb_ldo_digital_controller: checks the PI update equations cycle by cycle.
// A random decision stream (with long runs so that both clamps are reached)
// drives the controller; an independent model of
//   Intg[n] = clamp(Intg[n-1] + KI*in), Output[n] = clamp(Intg[n] + KP*in)
// with in = -1 for a HIGH decision and +1 for LOW predicts intg, code and the
// number of LOW switch gates right after each rising edge (one-edge latency).
// Run once with the default gains (KP = 1, KI = 1).
module tb_ldo_digital_controller;
  timeunit 1ns; timeprecision 1fs;

  localparam int KP = 1, KI = 1, MAXV = 127;

  logic clk = 1'b0, rst_n = 1'b1, pd_in = 1'b0;
  logic [6:0]   code, intg;
  logic [127:0] sw_gate_n;
  int checks = 0, failures = 0;
  int m_intg, m_code, n_sat_hi, n_sat_lo;

  ldo_digital_controller dut (
    .clk(clk), .rst_n(rst_n), .pd_in(pd_in),
    .code(code), .intg(intg), .sw_gate_n(sw_gate_n)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clampi(input int v);
    return (v < 0) ? 0 : (v > MAXV) ? MAXV : v;
  endfunction

  task automatic check(input string what, input int got, input int exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s got=%0d exp=%0d at %0t", what, got, exp_v, $time);
    end
  endtask

  initial begin
    int run_len, in_v;
    logic dir;
    m_intg = 0; m_code = 0; n_sat_hi = 0; n_sat_lo = 0;
    #1 rst_n = 1'b0;
    #11;
    check("reset intg", int'(intg), 0);
    check("reset code", int'(code), 0);
    rst_n = 1'b1;
    dir = 1'b0;
    for (int blk = 0; blk < 60; blk++) begin
      // alternate long runs (drive to a clamp) and random chatter
      run_len = (blk % 3 == 0) ? 150 : 40;
      dir = ~dir;
      for (int i = 0; i < run_len; i++) begin
        @(negedge clk);
        pd_in = (blk % 3 == 0) ? dir : 1'($urandom_range(0, 1));
        in_v  = pd_in ? -1 : 1;
        m_intg = clampi(m_intg + KI * in_v);
        m_code = clampi(m_intg + KP * in_v);
        // before the edge the outputs still hold the previous values
        @(posedge clk);
        #1;
        check("intg", int'(intg), m_intg);
        check("code", int'(code), m_code);
        check("switches on", $countones(~sw_gate_n), m_code + 1);
        if (m_code == MAXV) n_sat_hi++;
        if (m_code == 0)    n_sat_lo++;
      end
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) begin
      failures++;
      $display("FAIL clamp not exercised hi=%0d lo=%0d", n_sat_hi, n_sat_lo);
    end
    // asynchronous reset mid-run
    @(negedge clk); #2 rst_n = 1'b0; #1;
    check("async reset code", int'(code), 0);
    $display("clamp at max seen %0d times, at zero %0d times", n_sat_hi, n_sat_lo);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
