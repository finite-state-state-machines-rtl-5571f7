// ex_fsm_pkg: a second, small class AE FSM used by the testbenches.
//
// Symbolic Mealy FSM, inputs z = {x1, x2}, one output y, states s0, s1, s2:
//   s0: x1=0 -> s0, y=0      x1=1 -> s1, y=1
//   s1: x2=1 -> s2, y=0      x2=0 -> s0, y=1
//   s2: 11   -> s2, y=1      x1=0 -> s1, y=0      10 -> s0, y=0
// Every state is entered under several different conditions, so splitting
// gives seven states, each entered under exactly one condition:
//   id split  G code (x1 x2)  E code   entered by
//   0  s0a    0-              00       0-  (from s0)
//   1  s0b    -0              01       -0  (from s1)
//   2  s0c    10              00       10  (from s2)
//   3  s1a    1-              10       1-  (from s0)
//   4  s1b    0-              10       0-  (from s2)
//   5  s2a    -1              01       -1  (from s1)
//   6  s2b    11              00       11  (from s2)
// Several G codes overlap (0- with -0 and 0-, for example), so the pure
// input-defined code is not enough. Rows orthogonal in G form the graph H;
// it is covered by the cliques {s0a,s0c,s2b} (code 00), {s0b,s2a} (01) and
// {s1a,s1b} (10), so R = 2 feedback bits.
package ex_fsm_pkg;

  localparam int EX_L = 2;
  localparam int EX_R = 2;
  localparam int EX_N = 1;
  localparam int EX_P = 16;
  localparam int EX_M = 7;   // states after splitting

  // Codes of the split states (the ternary matrix W).
  localparam logic [1:0] EX_G_CARE [EX_M] = '{2'b10, 2'b01, 2'b11, 2'b10, 2'b10, 2'b01, 2'b11};
  localparam logic [1:0] EX_G_VAL  [EX_M] = '{2'b00, 2'b00, 2'b10, 2'b10, 2'b00, 2'b01, 2'b11};
  localparam logic [1:0] EX_E      [EX_M] = '{2'b00, 2'b01, 2'b00, 2'b10, 2'b10, 2'b01, 2'b00};
  localparam int         EX_FAMILY [EX_M] = '{0, 0, 0, 1, 1, 2, 2};

  // Structure table: rows 0-5 states s0a/s0b/s0c, rows 6-9 s1a/s1b,
  // rows 10-15 s2a/s2b. State cubes over {g1, g2, e1, e2}.
  localparam logic [EX_L-1:0] EX_X_CARE [EX_P] = '{
    2'b10, 2'b10,  2'b10, 2'b10,  2'b10, 2'b10,
    2'b01, 2'b01,  2'b01, 2'b01,
    2'b11, 2'b10, 2'b11,  2'b11, 2'b10, 2'b11};
  localparam logic [EX_L-1:0] EX_X_VAL [EX_P] = '{
    2'b00, 2'b10,  2'b00, 2'b10,  2'b00, 2'b10,
    2'b01, 2'b00,  2'b01, 2'b00,
    2'b11, 2'b00, 2'b10,  2'b11, 2'b00, 2'b10};
  localparam logic [EX_L+EX_R-1:0] EX_S_CARE [EX_P] = '{
    4'b1011, 4'b1011,  4'b0111, 4'b0111,  4'b1111, 4'b1111,
    4'b1011, 4'b1011,  4'b1011, 4'b1011,
    4'b0111, 4'b0111, 4'b0111,  4'b1111, 4'b1111, 4'b1111};
  localparam logic [EX_L+EX_R-1:0] EX_S_VAL [EX_P] = '{
    4'b0000, 4'b0000,  4'b0001, 4'b0001,  4'b1000, 4'b1000,
    4'b1010, 4'b1010,  4'b0010, 4'b0010,
    4'b0101, 4'b0101, 4'b0101,  4'b1100, 4'b1100, 4'b1100};
  localparam logic [EX_R-1:0] EX_D_VAL [EX_P] = '{
    2'b00, 2'b10,  2'b00, 2'b10,  2'b00, 2'b10,
    2'b01, 2'b01,  2'b01, 2'b01,
    2'b00, 2'b10, 2'b00,  2'b00, 2'b10, 2'b00};
  localparam logic [EX_N-1:0] EX_Y_VAL [EX_P] = '{
    1'b0, 1'b1,  1'b0, 1'b1,  1'b0, 1'b1,
    1'b0, 1'b1,  1'b0, 1'b1,
    1'b1, 1'b0, 1'b0,  1'b1, 1'b0, 1'b0};

  localparam logic [EX_L-1:0] EX_RESET_E = 2'b00;  // s0a
  localparam logic [EX_R-1:0] EX_RESET_A = 2'b00;

  // Reference behaviour of the symbolic FSM.
  // Split state entered from symbolic state sym under input z.
  function automatic int ex_next_split(int sym, logic [1:0] z);
    case (sym)
      0:       return z[1] ? 3 : 0;
      1:       return z[0] ? 5 : 1;
      default: return (z == 2'b11) ? 6 : (z[1] ? 2 : 4);
    endcase
  endfunction

  function automatic logic ex_out(int sym, logic [1:0] z);
    case (sym)
      0:       return z[1];
      1:       return !z[0];
      default: return z == 2'b11;
    endcase
  endfunction

endpackage
