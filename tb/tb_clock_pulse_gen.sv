// tb_clock_pulse_gen: for several frequency selections, measures the output
// period and checks it is 2**(sel+1) ring periods; sel = 6 must give the
// 10.4 MHz clock (96.1 ns) within 0.5 %.
module tb_clock_pulse_gen;
  timeunit 1ns; timeprecision 1fs;

  localparam real RING = 0.7512;
  logic rst_n = 1'b1, out;
  logic [3:0] sel = 4'd0;
  int checks = 0, failures = 0;

  clock_pulse_gen dut (.rst_n(rst_n), .sel(sel), .out(out));

  initial begin : watchdog
    #2ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t0, t1;
    real per, exp_p;
    int sels [8] = '{0, 1, 2, 3, 5, 6, 9, 12};
    #1 rst_n = 1'b0;
    #5 rst_n = 1'b1;
    foreach (sels[i]) begin
      sel = 4'(sels[i]);
      repeat (2) @(posedge out);
      t0 = $realtime;
      repeat (4) @(posedge out);
      t1 = $realtime;
      per   = (t1 - t0) / 4.0;
      exp_p = RING * real'(1 << (sels[i] + 1));
      $display("sel=%0d period %f ns (%f MHz)", sels[i], per, 1000.0 / per);
      checks++;
      if (per < exp_p * 0.999 - 0.002 || per > exp_p * 1.001 + 0.002) begin
        failures++;
        $display("FAIL sel=%0d period %f exp %f", sels[i], per, exp_p);
      end
      if (sels[i] == 6) begin
        checks++;
        if (1000.0 / per < 10.35 || 1000.0 / per > 10.45) begin
          failures++;
          $display("FAIL 10.4 MHz setting gives %f MHz", 1000.0 / per);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
