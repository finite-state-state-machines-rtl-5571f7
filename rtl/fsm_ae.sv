// fsm_ae: class AE Mealy finite state machine.
//
// The state code a_t of a class AE FSM is the concatenation {a'_t, a''_t}.
// a' (L bits, register RG_E) is simply the input vector of the previous
// clock cycle: a'_{t+1} = z_t, so no logic computes it. a'' (R bits, register
// RG_A) is formed by a conventional transition-function circuit,
// a''_{t+1} = Phi(z_t, a_t), and only has to separate states whose
// input-defined codes would otherwise collide. The outputs are Mealy
// outputs, w_t = Psi(z_t, a_t). When R is small the transition logic that a
// plain Mealy (class A) FSM would need for its whole state code mostly
// disappears.
//
//            z ----+-------------------------------+---------> CL_Psi --> w
//                  |--> RG_E --> a' ----+----------|--------->   ^
//                  |                    v          |             |
//                  +--> CL_Phi --> RG_A --> a'' ---+-------------+
//                          ^  (a', a'' fed back)
//
// The FSM itself is given by a structure table (parameters X_CARE .. Y_VAL,
// row format in fsm_ae_pkg). The state codes in that table are the rows of
// the ternary code matrix W of the class AE state assignment: for each state,
// its input-condition cube over g1..gL followed by its feedback code over
// e1..eR. The default table is the MCNC benchmark shiftreg.
//
// Interface: clk, rst_n (asynchronous, active low, to {RESET_E, RESET_A};
// the reset is a choice of this design), z the L input variables, w the N
// output functions, and the two halves of the present state code, a_e = a'
// and a_a = a'', brought out for observation.
// Timing: the state changes on each rising clock edge; w depends on z and the
// present state combinationally within the cycle.
module fsm_ae #(
  parameter int                 L       = fsm_ae_pkg::SR_L,
  parameter int                 R       = fsm_ae_pkg::SR_R,
  parameter int                 N       = fsm_ae_pkg::SR_N,
  parameter int                 P       = fsm_ae_pkg::SR_P,
  parameter logic [L-1:0]       X_CARE [P] = fsm_ae_pkg::SR_X_CARE,
  parameter logic [L-1:0]       X_VAL  [P] = fsm_ae_pkg::SR_X_VAL,
  parameter logic [L+R-1:0]     S_CARE [P] = fsm_ae_pkg::SR_S_CARE,
  parameter logic [L+R-1:0]     S_VAL  [P] = fsm_ae_pkg::SR_S_VAL,
  parameter logic [R-1:0]       D_VAL  [P] = fsm_ae_pkg::SR_D_VAL,
  parameter logic [N-1:0]       Y_VAL  [P] = fsm_ae_pkg::SR_Y_VAL,
  parameter logic [L-1:0]       RESET_E = fsm_ae_pkg::SR_RESET_E,
  parameter logic [R-1:0]       RESET_A = fsm_ae_pkg::SR_RESET_A
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [L-1:0] z,
  output logic [N-1:0] w,
  output logic [L-1:0] a_e,
  output logic [R-1:0] a_a
);

  logic [R-1:0]   d;       // transition functions d1..dR
  logic [L+R-1:0] a;       // present state code {a', a''}

  assign a = {a_e, a_a};

  rg_e #(.L(L), .RESET(RESET_E)) u_rg_e (
    .clk, .rst_n, .d(z), .q(a_e)
  );

  cl_phi #(
    .L(L), .R(R), .P(P),
    .X_CARE(X_CARE), .X_VAL(X_VAL), .S_CARE(S_CARE), .S_VAL(S_VAL),
    .D_VAL(D_VAL)
  ) u_cl_phi (
    .z, .a, .d
  );

  rg_a #(.R(R), .RESET(RESET_A)) u_rg_a (
    .clk, .rst_n, .d, .q(a_a)
  );

  cl_psi #(
    .L(L), .R(R), .N(N), .P(P),
    .X_CARE(X_CARE), .X_VAL(X_VAL), .S_CARE(S_CARE), .S_VAL(S_VAL),
    .Y_VAL(Y_VAL)
  ) u_cl_psi (
    .z, .a, .w
  );

endmodule
