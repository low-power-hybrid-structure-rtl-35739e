// tb_dmf_diff_acc: checks the differential-scheme accumulator
// y[k] = y[k-1] + z[k] (12-bit wrap-around) with random z and random
// enable; y must show the new sum one cycle after z is presented.
module tb_dmf_diff_acc;
  localparam int ZW = 11, YW = 12;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [ZW-1:0] z = 0;
  logic signed [YW-1:0] y;
  int checks = 0, failures = 0;
  int model = 0;

  dmf_diff_acc #(.ZW(ZW), .YW(YW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 2000; cyc++) begin
      en = ($urandom_range(0, 3) != 0);
      z  = ZW'($urandom);
      @(posedge clk);
      if (en) model = int'(signed'(YW'(model + int'(z))));
      #1;
      checks++;
      if (int'(y) != model) begin
        failures++;
        $display("FAIL cycle %0d: got %0d expected %0d", cyc, y, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
