// cl_phi: combinational circuit CL_Phi of the class AE FSM.
//
// CL_Phi forms the transition functions D = d1..dR, that is the feedback part
// of the next state code, a''_{t+1} = Phi(z_t, a_t), from the input vector z
// and the whole present state code a = {a', a''}.
//
// The circuit is a two-level AND-OR array built from a structure table (see
// fsm_ae_pkg for the row format). Each row is one transition of the encoded
// FSM: its AND term checks that the present state code lies in the row's
// state cube and that z lies in the row's input-condition cube; the OR plane
// collects D_VAL of every row whose term is true. Because the state codes are
// ternary and pairwise orthogonal, any register value lies in at most one
// state cube, and because the FSM is deterministic at most one transition of
// that state can fire: the immediate assertion below checks that.
// Rows that do not fire contribute zeros, so a state/input pair with no
// transition gives D = 0.
//
// What the circuit computes is fixed by the class AE model; building it as a
// table-driven array, so that one module serves any encoded FSM, is a choice
// of this design. Synthesis flattens the array for the table it is given.
//
// Interface: z (L bits), a = {a', a''} (L+R bits, a' in the upper bits),
// d (R bits). Purely combinational.
module cl_phi #(
  parameter int                 L      = fsm_ae_pkg::SR_L,
  parameter int                 R      = fsm_ae_pkg::SR_R,
  parameter int                 P      = fsm_ae_pkg::SR_P,
  parameter logic [L-1:0]       X_CARE [P] = fsm_ae_pkg::SR_X_CARE,
  parameter logic [L-1:0]       X_VAL  [P] = fsm_ae_pkg::SR_X_VAL,
  parameter logic [L+R-1:0]     S_CARE [P] = fsm_ae_pkg::SR_S_CARE,
  parameter logic [L+R-1:0]     S_VAL  [P] = fsm_ae_pkg::SR_S_VAL,
  parameter logic [R-1:0]       D_VAL  [P] = fsm_ae_pkg::SR_D_VAL
) (
  input  logic [L-1:0]   z,
  input  logic [L+R-1:0] a,
  output logic [R-1:0]   d
);

  logic [P-1:0] hit;

  always_comb begin
    d = '0;
    for (int p = 0; p < P; p++) begin
      hit[p] = (((z ^ X_VAL[p]) & X_CARE[p]) == '0) &&
               (((a ^ S_VAL[p]) & S_CARE[p]) == '0);
      if (hit[p]) d |= D_VAL[p];
    end
  end

  // Determinacy of the encoded FSM: at most one transition fires.
  always_comb begin
    assert ($countones(hit) <= 1)
      else $error("cl_phi: %0d transitions fire at once for z=%b a=%b",
                  $countones(hit), z, a);
  end

endmodule
