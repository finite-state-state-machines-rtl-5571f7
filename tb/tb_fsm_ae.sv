// tb_fsm_ae: end-to-end testbench of the class AE FSM fsm_ae.
//
// Two FSMs run side by side on random input streams:
//  * the default build (benchmark shiftreg). Its reference is the behaviour
//    of a 3-bit shift register: the output is the input of three clock
//    cycles earlier, and the state code {a', a''} is the last three inputs,
//    newest first (the reset state st0 stands for three zeros);
//  * the example FSM of ex_fsm_pkg, whose reference is the symbolic,
//    unsplit three-state FSM. After every clock edge a' must equal the input
//    of the previous cycle and a'' the feedback code of the split state
//    the symbolic transition enters.
// The output is checked in every cycle just before the clock edge (Mealy:
// it depends on the present input), the state just after it.
//
// Mechanisms counted, each of which must occur at least once:
//  * every split state of the example is entered (split states in use);
//  * a cycle in which the input-defined part a' lies in the codes of two or
//    more states, so that only a'' tells them apart (class A part needed);
//  * every one of the eight shiftreg states is entered;
//  * an asynchronous reset in mid-run.
module tb_fsm_ae;
  import ex_fsm_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  int checks = 0, failures = 0;

  // shiftreg build, default parameters
  logic [0:0] sr_z, sr_w, sr_ae;
  logic [1:0] sr_aa;
  fsm_ae u_sr (.clk, .rst_n, .z(sr_z), .w(sr_w), .a_e(sr_ae), .a_a(sr_aa));

  // example build
  logic [EX_L-1:0] ex_z, ex_ae;
  logic [EX_R-1:0] ex_aa;
  logic [EX_N-1:0] ex_w;
  fsm_ae #(
    .L(EX_L), .R(EX_R), .N(EX_N), .P(EX_P),
    .X_CARE(EX_X_CARE), .X_VAL(EX_X_VAL), .S_CARE(EX_S_CARE), .S_VAL(EX_S_VAL),
    .D_VAL(EX_D_VAL), .Y_VAL(EX_Y_VAL), .RESET_E(EX_RESET_E), .RESET_A(EX_RESET_A)
  ) u_ex (.clk, .rst_n, .z(ex_z), .w(ex_w), .a_e(ex_ae), .a_a(ex_aa));

  always #5 clk = ~clk;

  // reference state
  logic [2:0] hist;          // last three shiftreg inputs, newest in bit 2
  int         sym, split;    // example: symbolic state and split state

  int split_seen [EX_M];
  int sr_seen [8];
  int n_ambiguous = 0, n_reset = 0;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  task automatic do_reset();
    rst_n = 1'b0;
    #1;
    hist  = 3'b000;
    sym   = 0;
    split = 0;
    check(int'({sr_ae, sr_aa}), 0, "shiftreg reset code");
    check(int'({ex_ae, ex_aa}), int'({EX_RESET_E, EX_RESET_A}), "example reset code");
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  function automatic int g_matches(logic [1:0] g);
    int n = 0;
    for (int j = 0; j < EX_M; j++)
      if (((g ^ EX_G_VAL[j]) & EX_G_CARE[j]) == 2'b00) n++;
    return n;
  endfunction

  initial begin
    foreach (split_seen[j]) split_seen[j] = 0;
    foreach (sr_seen[k]) sr_seen[k] = 0;
    sr_z = '0;
    ex_z = '0;
    @(negedge clk);
    do_reset();
    for (int cyc = 0; cyc < 600; cyc++) begin
      logic [1:0] zin;
      int         nsplit;
      if (cyc == 300) begin
        do_reset();
        n_reset++;
      end
      sr_z = 1'($urandom);
      zin  = 2'($urandom);
      ex_z = zin;
      #1;
      // Mealy outputs in the present state
      check(int'(sr_w), int'(hist[0]), "shiftreg output");
      check(int'(ex_w), int'(ex_out(sym, zin)), "example output");
      if (g_matches(ex_ae) >= 2) n_ambiguous++;
      nsplit = ex_next_split(sym, zin);
      @(posedge clk);
      #1;
      hist  = {sr_z, hist[2:1]};
      split = nsplit;
      sym   = EX_FAMILY[split];
      sr_seen[hist]++;
      split_seen[split]++;
      check(int'({sr_ae, sr_aa}), int'(hist), "shiftreg state code");
      check(int'(ex_ae), int'(zin), "example a' = previous input");
      check(int'(ex_aa), int'(EX_E[split]), "example a'' = feedback code");
      @(negedge clk);
    end

    for (int j = 0; j < EX_M; j++) begin
      checks++;
      if (split_seen[j] == 0) begin
        failures++;
        $display("FAIL split state %0d never entered", j);
      end
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (sr_seen[k] == 0) begin
        failures++;
        $display("FAIL shiftreg state st%0d never entered", k);
      end
    end
    checks++;
    if (n_ambiguous == 0) begin failures++; $display("FAIL no ambiguous a' cycle"); end
    checks++;
    if (n_reset == 0) begin failures++; $display("FAIL no mid-run reset"); end
    $display("mechanisms: ambiguous a' resolved by a'' %0d, mid-run resets %0d",
             n_ambiguous, n_reset);
    for (int j = 0; j < EX_M; j++) $display("  split state %0d entered %0d times", j, split_seen[j]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
