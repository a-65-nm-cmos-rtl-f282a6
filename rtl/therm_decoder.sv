// therm_decoder: binary-to-thermometer decoder for the PMOS switch gates.
//
// The controller produces a CODE_W-bit count; this block expands it into an
// N-bit thermometer code so that the number of conducting switches moves by
// exactly one per code step.  Bit k of the output is LOW (switch on) when
// k <= code, so code c turns on switches 0..c: c+1 switches, which uses all
// 2**CODE_W switches and keeps one switch on at code 0.  The active-low
// polarity follows from the switch gates being wired straight to the code
// bits; the exact code-to-count mapping is this design's choice.
// Purely combinational, no clock.
module therm_decoder
#(
  parameter int unsigned CODE_W = ldo_pkg::CODE_W,
  parameter int unsigned N      = 1 << CODE_W
) (
  input  logic [CODE_W-1:0] code,
  output logic [N-1:0]      therm_n
);
  timeunit 1ns; timeprecision 1fs;

  always_comb begin
    for (int unsigned k = 0; k < N; k++)
      therm_n[k] = !(k <= 32'(code));
  end
endmodule
