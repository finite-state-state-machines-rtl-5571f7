// rg_e: register RG_E of the class AE FSM.
//
// RG_E holds a', the part of the state code that is defined by the values of
// the input variables. On every rising clock edge it loads the present input
// vector, so a'_{t+1} = z_t: the FSM needs no transition logic at all for
// these L code bits. This is the whole of the class E idea.
//
// Interface: d is the FSM input vector z, q is a'. Width L equals the number
// of input variables (code variables g1..gL, one per input xj).
// Timing: one clock of latency, q follows d after each rising edge.
// Reset (an addition of this design, the structure itself has none):
// asynchronous, active low, to the code RESET of the reset state.
module rg_e #(
  parameter int               L     = fsm_ae_pkg::SR_L,
  parameter logic [L-1:0]     RESET = fsm_ae_pkg::SR_RESET_E
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [L-1:0] d,
  output logic [L-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= RESET;
    else        q <= d;
  end

endmodule
