// ldo_output_node: behavioural model of the off-chip output node.
// An ideal capacitor C_PF in parallel with a resistive load r_load_ohm (the
// load current at a given Vout is Vout / R, i.e. R = Vout / Iload) integrates
// the switch-array current minus the load current every DT_NS:
//   dV[mV] = (i_sw[uA] - 1000 * Vout[mV] / R[ohm]) * dt[ns] / C[pF].
// The node cannot go below 0 V.  Used only by testbenches.
module ldo_output_node #(
  parameter real C_PF  = 220.0,
  parameter real DT_NS = 0.5,
  parameter real V0_MV = 0.0
) (
  input  real i_sw_ua,
  input  real r_load_ohm,
  output real vout_mv,
  output real i_load_ua
);
  timeunit 1ns; timeprecision 1fs;

  initial begin
    vout_mv   = V0_MV;
    i_load_ua = 0.0;
    forever begin
      #(DT_NS * 1ns);
      i_load_ua = 1000.0 * vout_mv / r_load_ohm;
      vout_mv   = vout_mv + (i_sw_ua - i_load_ua) * DT_NS / C_PF;
      if (vout_mv < 0.0) vout_mv = 0.0;
    end
  end
endmodule
