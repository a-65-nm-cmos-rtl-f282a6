// bang_bang_pd: time-domain comparator of the LDO (a D flip-flop and a buffer).
//
// The pulse from the delay line powered by Vout goes to D; the pulse from the
// identical line powered by Vref goes through a buffer to the clock pin.  A
// higher supply makes a line faster, so when Vout > Vref the Vout edge has
// already arrived when the Vref edge clocks the flop and out goes HIGH; when
// Vout < Vref out goes LOW.  The structure (flop + clock buffer, port names
// inp/inn/out) is the regulator's own; the buffer is there in silicon to
// offset the flop's setup time and is a plain wire here.  The asynchronous
// active-low reset is this design's addition.
//
// Timing: out changes on the rising edge of inn (the Vref-line pulse).
module bang_bang_pd (
  input  logic inp,    // from the delay line powered by Vout
  input  logic inn,    // from the delay line powered by Vref
  input  logic rst_n,
  output logic out
);
  timeunit 1ns; timeprecision 1fs;

  logic clk_buf;
  assign clk_buf = inn;

  always_ff @(posedge clk_buf or negedge rst_n) begin
    if (!rst_n) out <= 1'b0;
    else        out <= inp;
  end
endmodule
