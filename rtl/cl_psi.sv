// cl_psi: combinational circuit CL_Psi of the class AE FSM.
//
// CL_Psi forms the output functions y1..yN of the Mealy FSM,
// w_t = Psi(z_t, a_t), from the input vector z and the whole present state
// code a = {a', a''}.
//
// Like CL_Phi it is a two-level AND-OR array over the structure table (row
// format in fsm_ae_pkg): the AND term of a row matches the row's state cube
// and input-condition cube, and the OR plane collects Y_VAL of every row that
// fires. Output bits that the FSM leaves unspecified in a transition are
// written as 0 in Y_VAL. A state/input pair with no transition gives w = 0.
//
// What the circuit computes is fixed by the class AE model; building it as a
// table-driven array, so that one module serves any encoded FSM, is a choice
// of this design. Synthesis flattens the array for the table it is given.
//
// Interface: z (L bits), a = {a', a''} (L+R bits, a' in the upper bits),
// w (N bits). Purely combinational: w follows z within the same clock cycle
// (Mealy outputs).
module cl_psi #(
  parameter int                 L      = fsm_ae_pkg::SR_L,
  parameter int                 R      = fsm_ae_pkg::SR_R,
  parameter int                 N      = fsm_ae_pkg::SR_N,
  parameter int                 P      = fsm_ae_pkg::SR_P,
  parameter logic [L-1:0]       X_CARE [P] = fsm_ae_pkg::SR_X_CARE,
  parameter logic [L-1:0]       X_VAL  [P] = fsm_ae_pkg::SR_X_VAL,
  parameter logic [L+R-1:0]     S_CARE [P] = fsm_ae_pkg::SR_S_CARE,
  parameter logic [L+R-1:0]     S_VAL  [P] = fsm_ae_pkg::SR_S_VAL,
  parameter logic [N-1:0]       Y_VAL  [P] = fsm_ae_pkg::SR_Y_VAL
) (
  input  logic [L-1:0]   z,
  input  logic [L+R-1:0] a,
  output logic [N-1:0]   w
);

  always_comb begin
    w = '0;
    for (int p = 0; p < P; p++) begin
      if ((((z ^ X_VAL[p]) & X_CARE[p]) == '0) &&
          (((a ^ S_VAL[p]) & S_CARE[p]) == '0))
        w |= Y_VAL[p];
    end
  end

endmodule
