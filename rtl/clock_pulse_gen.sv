// clock_pulse_gen: internal clock and pulse generator of the LDO.
//
// A ring oscillator drives a 16-flop ripple divider; a 16-to-1 multiplexer
// controlled by the 4-bit frequency selection input picks one divider tap.
// The same output is the controller clock and the pulse train sent into both
// delay lines.  Tap k runs at f_ring / 2**(k+1); with the default ring period
// sel = 6 gives 10.4 MHz.  The structure (ring, 16 D-FFs, 16-to-1 MUX,
// 4-bit select) follows the regulator; the ring frequency is this design's
// choice.  Contains a behavioural oscillator, so the block as a whole is a
// behavioural model; divider and multiplexer are synthesizable.
module clock_pulse_gen
#(
  parameter int unsigned N_DIV          = ldo_pkg::N_DIV,
  parameter real         RING_PERIOD_NS = 0.7512
) (
  input  logic                     rst_n,
  input  logic [$clog2(N_DIV)-1:0] sel,
  output logic                     out
);
  timeunit 1ns; timeprecision 1fs;

  logic             osc;
  logic [N_DIV-1:0] taps;

  ring_oscillator #(.PERIOD_NS(RING_PERIOD_NS)) u_ring (.osc(osc));

  ripple_divider #(.N_DIV(N_DIV)) u_div (
    .clk_in (osc),
    .rst_n  (rst_n),
    .q      (taps)
  );

  clock_mux #(.N(N_DIV)) u_mux (
    .taps (taps),
    .sel  (sel),
    .out  (out)
  );
endmodule
