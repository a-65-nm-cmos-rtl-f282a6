// pmos_switch_cell: behavioural model of the PMOS switch standard cell.
//
// Behavioural model, not synthesizable: the cell is an inverter cell with
// its NMOS removed, a single PMOS from Vin (source) to Vout (drain) whose
// gate is pin a.  With a LOW the device conducts; its current is modelled as
// a triode conductance G_UA_PER_MV times the dropout Vin - Vout, limited
// above VDSAT_MV where the device saturates.  Both constants are this
// design's choice: 100 uA per switch at the 200 mV dropout of a 1.0 V to
// 0.8 V regulator, so 128 switches give 12.8 mA.  With a HIGH, or with no
// dropout, the cell carries no current.  Units: mV in, uA out.
module pmos_switch_cell #(
  parameter real G_UA_PER_MV = 0.5,
  parameter real VDSAT_MV    = 300.0
) (
  input  logic a,
  input  real  vin_mv,
  input  real  vout_mv,
  output real  i_ua
);
  timeunit 1ns; timeprecision 1fs;

  real vds;
  always_comb begin
    vds = vin_mv - vout_mv;
    if (a || vds <= 0.0)     i_ua = 0.0;
    else if (vds < VDSAT_MV) i_ua = G_UA_PER_MV * vds;
    else                     i_ua = G_UA_PER_MV * VDSAT_MV;
  end
endmodule
