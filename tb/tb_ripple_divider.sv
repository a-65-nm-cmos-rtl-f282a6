// tb_ripple_divider: applies input clock edges and checks all 16 taps.
// Every stage toggles on the rising edge of the previous one, so after n
// input rising edges from reset the taps read (-n) mod 2**16, and tap k has a
// period of 2**(k+1) input periods.
module tb_ripple_divider;
  timeunit 1ns; timeprecision 1fs;

  logic clk_in = 1'b0, rst_n = 1'b1;
  logic [15:0] q;
  int checks = 0, failures = 0;

  ripple_divider dut (.clk_in(clk_in), .rst_n(rst_n), .q(q));

  initial begin : watchdog
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_q;
    int rises [16];
    #1 rst_n = 1'b0;
    #2;
    checks++; if (q !== 16'h0) begin failures++; $display("FAIL reset q=%h", q); end
    rst_n = 1'b1;
    foreach (rises[k]) rises[k] = 0;
    for (int n = 1; n <= 70000; n++) begin
      logic [15:0] prev_q;
      prev_q = q;
      #1 clk_in = 1'b1;
      #1 clk_in = 1'b0;
      for (int k = 0; k < 16; k++) if (!prev_q[k] && q[k]) rises[k]++;
      exp_q = 16'(-n);
      if (n % 97 == 0 || n < 40 || n > 65530) begin
        checks++;
        if (q !== exp_q) begin
          failures++;
          $display("FAIL n=%0d q=%h exp=%h", n, q, exp_q);
        end
      end
    end
    // tap k rises once every 2**(k+1) input edges (first rise at edge 1)
    for (int k = 0; k < 16; k++) begin
      int exp_r;
      exp_r = (70000 + (1 << (k + 1)) - 1) >> (k + 1);
      checks++;
      if (rises[k] != exp_r) begin
        failures++;
        $display("FAIL tap %0d rose %0d times, exp %0d", k, rises[k], exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
