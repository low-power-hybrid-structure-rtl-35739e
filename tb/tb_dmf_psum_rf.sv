// tb_dmf_psum_rf: checks the partial-sum register file.  The address steps
// modulo DEPTH with each enabled cycle, as dmf_ctrl drives it; once every
// entry has been written, the word read at an address must be the one
// written there DEPTH accepted samples earlier, and idle cycles (en low)
// must change nothing.  Default DEPTH = 32, W = 10.
module tb_dmf_psum_rf;
  localparam int W = 10, DEPTH = 32;
  logic clk = 0, en = 0;
  logic [4:0] addr = 0;
  logic [W-1:0] wdata = 0, rdata;
  int checks = 0, failures = 0, n = 0;
  logic [W-1:0] written [$];

  dmf_psum_rf #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    @(posedge clk); #1;
    for (int cyc = 0; cyc < 1000; cyc++) begin
      en    = ($urandom_range(0, 3) != 0);
      wdata = W'($urandom);
      addr  = 5'(n % DEPTH);
      #1;
      if (n >= DEPTH) begin
        checks++;
        if (rdata !== written[n - DEPTH]) begin
          failures++;
          $display("FAIL sample %0d: got %0h expected %0h", n, rdata, written[n - DEPTH]);
        end
      end
      @(posedge clk);
      if (en) begin written.push_back(wdata); n++; end
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
