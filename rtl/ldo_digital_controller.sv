// ldo_digital_controller: proportional-integral controller of the LDO.
//
// Each rising clock edge takes the 1-bit bang-bang decision pd_in as
// Input[n] = -1 (pd_in HIGH: Vout above Vref) or +1 (pd_in LOW) and updates
//   Intg[n]   = Intg[n-1] + KI * Input[n]
//   Output[n] = Intg[n]   + KP * Input[n]
// The two equations and KP = 1 follow the regulator's control loop; KI = 1,
// the clamping of both values to 0..2**CODE_W-1 (no wrap-around, no integrator
// wind-up) and the reset value are this design's choices.  Output[n] is the
// 7-bit binary code, decoded by therm_decoder into the 128 active-low switch
// gates.
//
// Timing: intg, code and sw_gate_n change right after the clock edge that
// samples pd_in (one register stage).  rst_n is asynchronous, active low,
// and loads INIT_CODE into both registers.
module ldo_digital_controller
#(
  parameter int unsigned CODE_W    = ldo_pkg::CODE_W,
  parameter int          KP        = 1,
  parameter int          KI        = 1,
  parameter int unsigned INIT_CODE = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 pd_in,
  output logic [CODE_W-1:0]    code,
  output logic [CODE_W-1:0]    intg,
  output logic [(1<<CODE_W)-1:0] sw_gate_n
);
  timeunit 1ns; timeprecision 1fs;

  localparam int MAXV = (1 << CODE_W) - 1;

  function automatic logic [CODE_W-1:0] clamp(input int v);
    if (v < 0)    return '0;
    if (v > MAXV) return CODE_W'(MAXV);
    return CODE_W'(v);
  endfunction

  int                step;
  logic [CODE_W-1:0] intg_next, code_next;

  always_comb begin
    step      = pd_in ? -1 : 1;
    intg_next = clamp(int'(intg) + KI * step);
    code_next = clamp(int'(intg_next) + KP * step);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      intg <= CODE_W'(INIT_CODE);
      code <= CODE_W'(INIT_CODE);
    end else begin
      intg <= intg_next;
      code <= code_next;
    end
  end

  therm_decoder #(.CODE_W(CODE_W)) u_dec (
    .code    (code),
    .therm_n (sw_gate_n)
  );
endmodule
