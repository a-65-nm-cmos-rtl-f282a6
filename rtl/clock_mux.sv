// clock_mux: 16-to-1 multiplexer that picks the LDO clock from the divider.
//
// sel = k passes divider tap k, so a 4-bit frequency selection input steps
// the clock (which is also the pulse train of the delay lines) over 16
// octaves.  Width and select size follow the regulator's clock generator.
// Combinational; a select change while the taps toggle can give one short
// clock phase, which is acceptable for a test-only frequency setting.
module clock_mux #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]         taps,
  input  logic [$clog2(N)-1:0] sel,
  output logic                 out
);
  timeunit 1ns; timeprecision 1fs;

  assign out = taps[sel];
endmodule
