// tb_dmf_add_unit: checks the carry-save add unit of one stage against
// plain integer arithmetic.  Nine addends with a mix of coefficients
// (-2, -1, 0, +1, +2), random and extreme samples and partial sums; the
// result must equal psum_in + sum(d * x) exactly (W = 11 bits holds it).
module tb_dmf_add_unit;
  import dmf_pkg::coef_t;
  localparam int XW = 4, NA = 9, W = 11, WI = 10;
  localparam coef_t [NA-1:0] CF = {3'sd1, -3'sd2, 3'sd0, 3'sd2, -3'sd1,
                                   3'sd2, 3'sd0, -3'sd2, 3'sd2};
  logic [NA-1:0][XW-1:0] x;
  logic [WI-1:0] psum_in;
  logic [W-1:0] psum_out;
  int checks = 0, failures = 0;
  logic clk = 0;

  dmf_add_unit #(.XW(XW), .NA(NA), .W(W), .WI(WI), .COEFS(CF)) dut (.*);

  always #5 clk = ~clk;

  task automatic run_one();
    int exp = int'(signed'(psum_in));
    #1;
    for (int a = 0; a < NA; a++) exp += int'(CF[a]) * int'(signed'(x[a]));
    checks++;
    if (int'(signed'(psum_out)) != exp) begin
      failures++;
      $display("FAIL got %0d expected %0d", int'(signed'(psum_out)), exp);
    end
  endtask

  initial begin
    // extremes: all samples at -8 or +7, partial sum at its limits
    for (int e = 0; e < 4; e++) begin
      for (int a = 0; a < NA; a++) x[a] = (e[0]) ? 4'sh7 : 4'sh8;
      psum_in = e[1] ? WI'(511) : WI'(-512);
      run_one();
    end
    for (int i = 0; i < 3000; i++) begin
      for (int a = 0; a < NA; a++) x[a] = XW'($urandom);
      psum_in = WI'($urandom);
      run_one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
