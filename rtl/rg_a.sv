// rg_a: register RG_A of the class AE FSM.
//
// RG_A holds a'', the part of the state code that is formed, as in an
// ordinary (class A) Mealy FSM, by the transition functions d1..dR of CL_Phi.
// Its R bits are the feedback variables e1..eR; R is the length of the extra
// code columns that the state assignment adds to make all state codes
// mutually orthogonal.
//
// Interface: d is the transition-function vector D from CL_Phi, q is a''.
// Timing: one clock of latency, q follows d after each rising edge.
// Reset (an addition of this design): asynchronous, active low, to the
// feedback code RESET of the reset state.
module rg_a #(
  parameter int               R     = fsm_ae_pkg::SR_R,
  parameter logic [R-1:0]     RESET = fsm_ae_pkg::SR_RESET_A
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [R-1:0] d,
  output logic [R-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= RESET;
    else        q <= d;
  end

endmodule
