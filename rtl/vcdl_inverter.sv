// vcdl_inverter: behavioural model of one inverter of a voltage-controlled
// delay line.
//
// Behavioural model, not synthesizable.  The output is the inverse of the
// input, delayed by a propagation delay that depends on the inverter's
// supply vdd_mv: t = T_NOM_NS * f(vdd) / f(V_NOM_MV) with
// f(V) = V / (V - VTH_MV)**2, a square-law estimate of a CMOS gate delay
// (load charge C*V over a saturation current proportional to (V-Vth)^2).
// Delays are transport delays, so pulses shorter than the delay still pass.
// The delay law and its constants are this design's choice; the regulator
// only relies on the delay falling monotonically as the supply rises.
module vcdl_inverter #(
  parameter real T_NOM_NS = 0.010,
  parameter real V_NOM_MV = 800.0,
  parameter real VTH_MV   = 350.0
) (
  input  logic a,
  input  real  vdd_mv,
  output logic y
);
  timeunit 1ns; timeprecision 1fs;

  function automatic real delay_ns(input real v);
    real vv;
    vv = (v < VTH_MV + 20.0) ? VTH_MV + 20.0 : v;  // keep the law finite
    return T_NOM_NS * (vv / ((vv - VTH_MV) * (vv - VTH_MV)))
                    / (V_NOM_MV / ((V_NOM_MV - VTH_MV) * (V_NOM_MV - VTH_MV)));
  endfunction

  // Schedule the inverse of the present input, then wait for the input to
  // change; the chain settles one line delay after time 0.
  always begin
    y <= #(delay_ns(vdd_mv)) ~a;
    @(a);
  end
endmodule
