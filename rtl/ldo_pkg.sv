// ldo_pkg: constants and small helpers shared by the blocks of the
// synthesizable voltage-to-time-conversion digital LDO.
//
// The widths follow the regulator's main configuration: a 7-bit controller
// output decoded into a 128-bit thermometer code that drives 128 identical
// PMOS switches, two 128-inverter delay lines, and a 16-stage clock divider
// with a 16-to-1 tap multiplexer (4-bit frequency select).  Everything
// analog (voltages, currents) is carried as `real` values in millivolts and
// microamps inside the behavioural models; the synthesizable blocks only see
// logic.
package ldo_pkg;
  timeunit 1ns; timeprecision 1fs;

  localparam int unsigned CODE_W      = 7;            // controller output width
  localparam int unsigned N_SWITCHES  = 1 << CODE_W;  // 128 PMOS switches
  localparam int unsigned N_VCDL      = 128;          // inverters per delay line
  localparam int unsigned N_DIV       = 16;           // divider flip-flops
  localparam int unsigned SEL_W       = $clog2(N_DIV);// 4-bit frequency select

  typedef logic [CODE_W-1:0]     code_t;
  typedef logic [N_SWITCHES-1:0] therm_t;

endpackage
