// tb_cl_phi: self-checking testbench of cl_phi, the circuit forming the
// transition functions D (the feedback part a'' of the next state).
//
// Two instances are checked exhaustively:
//  * the default structure table (benchmark shiftreg): for every state st_k,
//    coded k, and input x the expected value comes from the shift-register
//    rule st_k --x--> st_{4x + k/2}, output k[0];
//  * the table of ex_fsm_pkg: for every split state, every register value
//    its ternary code covers and every input, the expected value comes from
//    the symbolic FSM (ex_next_split / ex_out) and the list of state codes,
//    not from the structure table. Register values that are the code of no
//    state must give all zeros.
module tb_cl_phi;
  import ex_fsm_pkg::*;

  int checks = 0, failures = 0;
  bit done = 1'b0;

  // Default table: shiftreg (L=1, R=2, N=1).
  logic [0:0] sr_z;
  logic [2:0] sr_a;
  logic [1:0] sr_d;
  cl_phi u_sr (.z(sr_z), .a(sr_a), .d(sr_d));

  // Example table.
  logic [EX_L-1:0]      ex_z;
  logic [EX_L+EX_R-1:0] ex_a;
  logic [EX_R-1:0]  ex_d;
  cl_phi #(
    .L(EX_L), .R(EX_R), .P(EX_P),
    .X_CARE(EX_X_CARE), .X_VAL(EX_X_VAL), .S_CARE(EX_S_CARE), .S_VAL(EX_S_VAL),
    .D_VAL(EX_D_VAL)
  ) u_ex (.z(ex_z), .a(ex_a), .d(ex_d));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic bit in_cube(logic [1:0] v, logic [1:0] care, logic [1:0] val);
    return ((v ^ val) & care) == 2'b00;
  endfunction

  initial begin
    for (int k = 0; k < 8; k++)
      for (int x = 0; x < 2; x++) begin
        logic [2:0] kk;
        kk    = 3'(k);
        sr_a  = kk;
        sr_z  = 1'(x);
        #1 check(int'(sr_d), int'({k[2], k[1]}), $sformatf("shiftreg st%0d x=%0d", k, x));
      end

    for (int j = 0; j < EX_M; j++)
      for (int g = 0; g < 4; g++)
        if (in_cube(2'(g), EX_G_CARE[j], EX_G_VAL[j]))
          for (int zz = 0; zz < 4; zz++) begin
            ex_a = {2'(g), EX_E[j]};
            ex_z = 2'(zz);
            #1 check(int'(ex_d), int'(EX_E[ex_next_split(EX_FAMILY[j], 2'(zz))]),
                     $sformatf("example state %0d g=%0d z=%0d", j, g, zz));
          end

    // Register values that are no state's code: e = 11 is used by no clique.
    for (int g = 0; g < 4; g++)
      for (int zz = 0; zz < 4; zz++) begin
        ex_a = {2'(g), 2'b11};
        ex_z = 2'(zz);
        #1 check(int'(ex_d), 0, "unused code");
      end

    done = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    #100000;
    if (!done) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

endmodule
