// inverter_chain: behavioural model of a voltage-controlled delay line (VCDL).
//
// Behavioural model, not synthesizable.  N_STAGES identical inverters
// (vcdl_inverter) in series, all powered by vdd_mv.  The regulator uses two
// identical chains, one powered by Vref and one by Vout, both fed by the same
// pulse train, so the supply difference becomes an arrival-time difference
// at the phase detector.  With an even N_STAGES the pulse keeps its polarity.
// The 128-stage length follows the regulator; the per-stage delay law is
// this design's (see vcdl_inverter): about 1.28 ns for the whole line at
// 800 mV, longer at lower supply.
//
// The pulse leaving the chain swings only to vdd_mv while the phase detector
// runs from Vin.  Below the detector's logic threshold VLOGIC_MV (taken as
// Vin/2 = 500 mV, this design's assumption) the pulse cannot switch it, and
// out is held LOW.
module inverter_chain #(
  parameter int unsigned N_STAGES  = 128,
  parameter real         T_NOM_NS  = 0.010,
  parameter real         V_NOM_MV  = 800.0,
  parameter real         VTH_MV    = 350.0,
  parameter real         VLOGIC_MV = 500.0
) (
  input  logic in,
  input  real  vdd_mv,
  output logic out
);
  timeunit 1ns; timeprecision 1fs;

  logic [N_STAGES:0] node;
  assign node[0] = in;

  for (genvar k = 0; k < N_STAGES; k++) begin : g_inv
    vcdl_inverter #(
      .T_NOM_NS (T_NOM_NS),
      .V_NOM_MV (V_NOM_MV),
      .VTH_MV   (VTH_MV)
    ) u_inv (
      .a      (node[k]),
      .vdd_mv (vdd_mv),
      .y      (node[k+1])
    );
  end

  assign out = (vdd_mv >= VLOGIC_MV) ? node[N_STAGES] : 1'b0;
endmodule
