// pmos_switch_array: behavioural model of the output switch array.
//
// Behavioural model, not synthesizable.  N identical pmos_switch_cell
// instances in parallel between Vin and Vout; gate k is in[k] (LOW = on),
// so the thermometer code from the controller sets how many conduct.  The
// output i_ua is the sum of the cell currents into the Vout node.  The
// 128-cell parallel structure follows the regulator.
module pmos_switch_array #(
  parameter int unsigned N           = 128,
  parameter real         G_UA_PER_MV = 0.5,
  parameter real         VDSAT_MV    = 300.0
) (
  input  logic [N-1:0] in,
  input  real          vin_mv,
  input  real          vout_mv,
  output real          i_ua
);
  timeunit 1ns; timeprecision 1fs;

  real i_cell [N];

  for (genvar k = 0; k < N; k++) begin : g_sw
    pmos_switch_cell #(
      .G_UA_PER_MV (G_UA_PER_MV),
      .VDSAT_MV    (VDSAT_MV)
    ) u_sw (
      .a       (in[k]),
      .vin_mv  (vin_mv),
      .vout_mv (vout_mv),
      .i_ua    (i_cell[k])
    );
  end

  always_comb begin
    i_ua = 0.0;
    for (int k = 0; k < int'(N); k++) i_ua += i_cell[k];
  end
endmodule
