// ring_oscillator: behavioural model of the free-running inverter ring.
//
// Behavioural model, not synthesizable: in silicon an odd number of
// standard-cell inverters closed into a loop, which a simulator or
// synthesis tool cannot treat as logic.  Here the output simply toggles
// every PERIOD_NS/2.  The default period (0.7512 ns, 1331.2 MHz) is this
// design's choice: it makes divider tap 6 run at the 10.4 MHz clock the
// regulator is characterised with, and tap 0 at about 666 MHz.
// Synthesis ignores the delays and sees osc without a driver; that is
// expected of a model whose silicon is an analog loop.
// The oscillator starts LOW at time 0, rises half a period later and runs
// as long as it is powered.
module ring_oscillator #(
  parameter real PERIOD_NS = 0.7512
) (
  output logic osc
);
  timeunit 1ns; timeprecision 1fs;

  // Each change of the output schedules the opposite level half a period
  // later, like a loop of inverters whose total delay is PERIOD_NS / 2.
  // The first edge, half a period after time 0, starts the loop.
  always @(osc) osc <= #(PERIOD_NS / 2.0) ~osc;

  initial begin
    osc = 1'b0;
    #(PERIOD_NS / 2.0) osc = 1'b1;
  end
endmodule
