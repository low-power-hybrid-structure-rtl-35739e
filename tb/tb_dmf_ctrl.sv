// tb_dmf_ctrl: checks the sample counter of the hybrid matched filter.
// Drives en at random and compares phase (index mod M), rf_addr (index
// mod S) and primed (set after S accepted samples) every cycle against a
// count kept by the testbench.  Default sizes M = 4, S = 32.
module tb_dmf_ctrl;
  localparam int M = 4, S = 32;
  logic clk = 0, rst_n = 0, en = 0;
  logic [1:0] phase;
  logic [4:0] rf_addr;
  logic primed;
  int checks = 0, failures = 0, n = 0;

  dmf_ctrl #(.M(M), .S(S)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s after %0d samples: got %0d expected %0d", what, n, got, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 400; cyc++) begin
      en = ($urandom_range(0, 3) != 0);
      #1;
      check("phase", int'(phase), n % M);
      check("rf_addr", int'(rf_addr), n % S);
      check("primed", int'(primed), (n >= S) ? 1 : 0);
      @(posedge clk);
      if (en) n++;
      #1;
    end
    // asynchronous reset clears the state again
    rst_n = 0; #1;
    check("phase after reset", int'(phase), 0);
    check("primed after reset", int'(primed), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
