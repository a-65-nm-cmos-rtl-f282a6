// sdldo_top: synthesizable digital LDO based on voltage-to-time conversion.
//
// The regulator compares Vout with Vref without an analog comparator: one
// pulse train is launched into two identical 128-inverter delay lines, one
// powered by Vref and one by Vout.  The line with the higher supply is
// faster, so a D flip-flop clocked by the Vref line and fed by the Vout line
// (the bang-bang phase detector) reads HIGH when Vout > Vref and LOW
// otherwise.  A PI controller clocked by the same pulse train turns that bit
// into a 7-bit count, decoded to a 128-bit thermometer code that switches
// 128 identical PMOS devices between Vin and Vout.  The output capacitor and
// the load are off-chip: Vout enters as vout_mv, and the array's total
// current leaves as i_out_ua for the node model outside.
//
// Every digital part is synthesizable; the delay lines, the ring oscillator
// and the PMOS switches are behavioural models of analog cells, and the
// analog quantities are real-valued ports in mV and uA.  Timing: each clock
// (pulse) rising edge starts a comparison; the detector decides about one
// delay-line delay later; the controller acts on that decision at the next
// rising edge.  freq_sel picks the clock (6 gives 10.4 MHz).
module sdldo_top
  import ldo_pkg::*;
#(
  parameter int unsigned VCDL_STAGES    = ldo_pkg::N_VCDL,
  parameter int          KP             = 1,
  parameter int          KI             = 1,
  parameter real         RING_PERIOD_NS = 0.7512
) (
  input  logic                  rst_n,
  input  logic [SEL_W-1:0]      freq_sel,
  input  real                   vin_mv,
  input  real                   vref_mv,
  input  real                   vout_mv,
  output real                   i_out_ua,
  output logic                  clk,
  output logic                  pd_out,
  output logic [CODE_W-1:0]     code,
  output logic [CODE_W-1:0]     intg,
  output logic [N_SWITCHES-1:0] sw_gate_n
);
  timeunit 1ns; timeprecision 1fs;

  logic ref_pulse, out_pulse;

  clock_pulse_gen #(.RING_PERIOD_NS(RING_PERIOD_NS)) u_clkgen (
    .rst_n (rst_n),
    .sel   (freq_sel),
    .out   (clk)
  );

  inverter_chain #(.N_STAGES(VCDL_STAGES)) u_vcdl_ref (
    .in     (clk),
    .vdd_mv (vref_mv),
    .out    (ref_pulse)
  );

  inverter_chain #(.N_STAGES(VCDL_STAGES)) u_vcdl_out (
    .in     (clk),
    .vdd_mv (vout_mv),
    .out    (out_pulse)
  );

  bang_bang_pd u_pd (
    .inp   (out_pulse),
    .inn   (ref_pulse),
    .rst_n (rst_n),
    .out   (pd_out)
  );

  ldo_digital_controller #(.KP(KP), .KI(KI)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .pd_in     (pd_out),
    .code      (code),
    .intg      (intg),
    .sw_gate_n (sw_gate_n)
  );

  pmos_switch_array #(.N(N_SWITCHES)) u_sw (
    .in      (sw_gate_n),
    .vin_mv  (vin_mv),
    .vout_mv (vout_mv),
    .i_ua    (i_out_ua)
  );
endmodule
