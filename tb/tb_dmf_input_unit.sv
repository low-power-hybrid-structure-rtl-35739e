// tb_dmf_input_unit: checks the input receiving unit (register file for
// the newest M samples plus per-phase shift chains).  Random samples are
// accepted at random cycles; before each clock edge every tap must equal
// x[k - M(q+1)] from the testbench's own sample history (zero before the
// first sample).  Default sizes XW = 4, M = 4, S = 32 (8 taps).
module tb_dmf_input_unit;
  localparam int XW = 4, M = 4, S = 32, L = S / M;
  logic clk = 0, rst_n = 0, en = 0;
  logic [1:0] phase = 0;
  logic signed [XW-1:0] x_in = 0;
  logic [L-1:0][XW-1:0] taps;
  int checks = 0, failures = 0, n = 0;
  int hist [$];

  dmf_input_unit #(.XW(XW), .M(M), .S(S)) dut (.*);

  always #5 clk = ~clk;

  function automatic int past(int back);   // x[n - back]
    return (n - back < 0) ? 0 : hist[n - back];
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      en    = ($urandom_range(0, 4) != 0);
      x_in  = XW'($urandom);
      phase = 2'(n % M);
      #1;
      for (int q = 0; q < L; q++) begin
        checks++;
        if (int'(signed'(taps[q])) != past(M * (q + 1))) begin
          failures++;
          $display("FAIL sample %0d tap %0d: got %0d expected %0d", n, q,
                   int'(signed'(taps[q])), past(M * (q + 1)));
        end
      end
      @(posedge clk);
      if (en) begin hist.push_back(int'(x_in)); n++; end
      #1;
    end
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
