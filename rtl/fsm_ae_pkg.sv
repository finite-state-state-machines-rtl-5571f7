// fsm_ae_pkg: the default structure table of the class AE FSM.
//
// A class AE FSM is described to the RTL by a structure table of P rows.
// Row p reads: "if the present state code {a', a''} lies in the cube
// (S_CARE[p], S_VAL[p]) and the input vector z lies in the cube
// (X_CARE[p], X_VAL[p]), then the feedback part of the next state is
// D_VAL[p] and the outputs are Y_VAL[p]". A set bit in a CARE mask means the
// bit takes part in the comparison; a clear bit is a don't-care (the dash of
// the ternary code matrix W). The input-defined part a' of the next state is
// not in the table: it is always z itself.
//
// The default table is the MCNC benchmark "shiftreg" (1 input, 1 output,
// 8 states), one of the benchmarks on which the class AE method is
// evaluated. The benchmark itself is the standard MCNC one (the state is the
// last three input bits, the output is the oldest of them); its class AE
// encoding was worked out by hand with the splitting and state-assignment
// procedure described in the README:
//   * no state needs splitting (all transitions into state k share one
//     input value, k[2]);
//   * the single code column g1 is 0 for st0..st3 and 1 for st4..st7, so the
//     orthogonality graph is the complete bipartite graph between the two
//     halves, covered by T = 4 two-vertex cliques {st_j, st_j+4};
//   * R = ceil(log2 4) = 2 feedback bits, clique j gets code j.
// State st_k therefore has code {g1, e1, e2} = k, and the next-state rule
// st_k --x--> st_{4x + k/2} becomes a' <= x, a'' <= {k[2], k[1]}.
// The output of st_k is k[0].
package fsm_ae_pkg;

  localparam int SR_L = 1;   // input variables x1 (and code variables g1)
  localparam int SR_R = 2;   // feedback variables e1, e2
  localparam int SR_N = 1;   // output functions y1
  localparam int SR_P = 16;  // structure-table rows: 8 states x 2 inputs

  // Row p = 2*k + x describes state st_k under input x.
  localparam logic [SR_L-1:0] SR_X_CARE [SR_P] = '{
    1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1,
    1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1, 1'b1};
  localparam logic [SR_L-1:0] SR_X_VAL [SR_P] = '{
    1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1,
    1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1};
  localparam logic [SR_L+SR_R-1:0] SR_S_CARE [SR_P] = '{
    3'b111, 3'b111, 3'b111, 3'b111, 3'b111, 3'b111, 3'b111, 3'b111,
    3'b111, 3'b111, 3'b111, 3'b111, 3'b111, 3'b111, 3'b111, 3'b111};
  localparam logic [SR_L+SR_R-1:0] SR_S_VAL [SR_P] = '{
    3'b000, 3'b000, 3'b001, 3'b001, 3'b010, 3'b010, 3'b011, 3'b011,
    3'b100, 3'b100, 3'b101, 3'b101, 3'b110, 3'b110, 3'b111, 3'b111};
  localparam logic [SR_R-1:0] SR_D_VAL [SR_P] = '{
    2'b00, 2'b00, 2'b00, 2'b00, 2'b01, 2'b01, 2'b01, 2'b01,
    2'b10, 2'b10, 2'b10, 2'b10, 2'b11, 2'b11, 2'b11, 2'b11};
  localparam logic [SR_N-1:0] SR_Y_VAL [SR_P] = '{
    1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1,
    1'b0, 1'b0, 1'b1, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1};

  // Reset state st0.
  localparam logic [SR_L-1:0] SR_RESET_E = 1'b0;
  localparam logic [SR_R-1:0] SR_RESET_A = 2'b00;

endpackage
