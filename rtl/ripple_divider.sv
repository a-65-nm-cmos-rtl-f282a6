// ripple_divider: 16-stage ripple frequency divider of the clock generator.
//
// Stage 0 is clocked by the ring oscillator, stage k by the Q of stage k-1;
// every stage feeds its inverted Q back to D, so it toggles on each rising
// edge of its clock and halves the frequency.  Tap q[k] therefore runs at
// f_in / 2**(k+1) with a 50 % duty cycle.  Stage count and structure follow
// the regulator's clock generator; the asynchronous active-low reset
// (all taps LOW) is this design's addition.
//
// Timing: q[k] changes after the rising edge of its stage clock, so the taps
// are ripple clocks, skewed by one flop delay per stage.
module ripple_divider #(
  parameter int unsigned N_DIV = 16
) (
  input  logic             clk_in,
  input  logic             rst_n,
  output logic [N_DIV-1:0] q
);
  timeunit 1ns; timeprecision 1fs;

  logic [N_DIV-1:0] stage_clk;   // clock of stage k: the oscillator or q[k-1]
  assign stage_clk = {q[N_DIV-2:0], clk_in};

  for (genvar k = 0; k < N_DIV; k++) begin : g_stage
    logic qk;
    always_ff @(posedge stage_clk[k] or negedge rst_n) begin
      if (!rst_n) qk <= 1'b0;
      else        qk <= ~qk;
    end
    assign q[k] = qk;
  end
endmodule
