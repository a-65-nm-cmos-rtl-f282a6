// tb_bang_bang_pd: drives the detector with pairs of pulses whose arrival
// order is set by the test.  When the Vout-line pulse (inp) rises before the
// Vref-line pulse (inn) the decision must be HIGH, when it rises after it
// LOW; the decision may change only at a rising edge of inn.
module tb_bang_bang_pd;
  timeunit 1ns; timeprecision 1fs;

  logic inp = 1'b0, inn = 1'b0, rst_n = 1'b1, out;
  int checks = 0, failures = 0;

  bang_bang_pd dut (.inp(inp), .inn(inn), .rst_n(rst_n), .out(out));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lead_ps;
    logic exp_q, prev;
    #1 rst_n = 1'b0;
    #4;
    checks++; if (out !== 1'b0) begin failures++; $display("FAIL reset"); end
    rst_n = 1'b1;
    exp_q = 1'b0;
    for (int i = 0; i < 200; i++) begin
      lead_ps = $urandom_range(5, 500);
      if ($urandom_range(0, 1) == 1) begin
        // Vout line faster: inp first
        inp = 1'b1; #(lead_ps * 1ps);
        prev = out;
        checks++; if (out !== exp_q) begin failures++; $display("FAIL changed before inn edge"); end
        inn = 1'b1; exp_q = 1'b1;
      end else begin
        inn = 1'b1; exp_q = 1'b0;
        #(lead_ps * 1ps);
        inp = 1'b1;
      end
      #1;
      checks++;
      if (out !== exp_q) begin
        failures++;
        $display("FAIL pulse %0d out=%b exp=%b", i, out, exp_q);
      end
      #20 inp = 1'b0; inn = 1'b0;
      #1;
      checks++; if (out !== exp_q) begin failures++; $display("FAIL changed on falling edge"); end
      #20;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
