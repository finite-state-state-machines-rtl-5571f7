// tb_fsm_ae_shiftreg: fsm_ae with every parameter at its default, that is the
// class AE implementation of the benchmark shiftreg, run on a random input
// stream of 4000 bits.
//
// Reference: shiftreg is a 3-bit shift register. The output in each cycle
// must equal the input of three cycles earlier (zeros right after reset, the
// reset state st0 standing for three zeros), and after each clock edge the
// state code {a', a''} must be the last three inputs, newest in the top bit.
// Every one of the eight states must be entered.
module tb_fsm_ae_shiftreg;

  logic clk = 1'b0;
  logic rst_n;
  logic [0:0] z, w, a_e;
  logic [1:0] a_a;
  int checks = 0, failures = 0;
  logic [2:0] hist;
  int seen [8];

  fsm_ae dut (.clk, .rst_n, .z, .w, .a_e, .a_a);

  always #5 clk = ~clk;

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    foreach (seen[k]) seen[k] = 0;
    z     = '0;
    rst_n = 1'b0;
    hist  = 3'b000;
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      z = 1'($urandom);
      #1 check(int'(w), int'(hist[0]), "output = input three cycles back");
      @(posedge clk);
      #1;
      hist = {z, hist[2:1]};
      seen[hist]++;
      check(int'({a_e, a_a}), int'(hist), "state code = last three inputs");
      @(negedge clk);
    end
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL state st%0d never entered", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
