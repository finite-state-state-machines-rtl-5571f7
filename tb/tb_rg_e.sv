// tb_rg_e: self-checking testbench of rg_e, register RG_E (input-defined state bits).
//
// The register is built 5 bits wide with a reset code of 5'b10110. The test
// checks that the reset code appears while rst_n is low (asynchronously,
// before any clock edge), that after each rising edge q equals the value
// that was on d before the edge, and that a reset in mid-run takes effect
// again. Data are random.
module tb_rg_e;

  localparam int          W     = 5;
  localparam logic [W-1:0] RCODE = 5'b10110;

  logic         clk = 1'b0;
  logic         rst_n;
  logic [W-1:0] d, q, d_prev;
  int checks = 0, failures = 0;

  rg_e #(.L(W), .RESET(RCODE)) dut (.clk, .rst_n, .d, .q);

  always #5 clk = ~clk;

  task automatic check(input logic [W-1:0] got, input logic [W-1:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    rst_n = 1'b1;
    d     = 5'b01001;
    #2 rst_n = 1'b0;          // asynchronous: no clock edge before the check
    #1 check(q, RCODE, "asynchronous reset");
    @(negedge clk);
    check(q, RCODE, "reset held");
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      d = W'($urandom);
      d_prev = d;
      @(posedge clk);
      #1 check(q, d_prev, "load");
      @(negedge clk);
      if (i == 100) begin
        rst_n = 1'b0;
        #1 check(q, RCODE, "mid-run reset");
        @(negedge clk);
        rst_n = 1'b1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
