// tb_hybrid_dmf_sweep: the 128-tap, 4-bit, 4x filter built with each
// summation degree s = 8, 16, 32 and 64 (4 stages of 32 taps at the
// default; 16, 8 and 2 stages otherwise).  All four filters see the same
// stream of random samples, idle cycles and code replicas, and each
// output must equal the direct-form correlation computed by the
// testbench, one cycle after its sample.
module tb_hybrid_dmf_sweep;
  localparam int XW = 4, M = 4, N = 128, NC = N / M, YW = 12;
  localparam logic [NC-1:0] CODE = dmf_pkg::DEFAULT_CODE;
  localparam int NS = 4;
  localparam int SDEG [NS] = '{8, 16, 32, 64};

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic signed [XW-1:0] x_in = 0;
  logic y_valid [NS];
  logic signed [YW-1:0] y [NS];

  for (genvar v = 0; v < NS; v++) begin : g_dut
    hybrid_dmf #(.S(SDEG[v])) dut (
      .clk, .rst_n, .x_valid, .x_in, .y_valid(y_valid[v]), .y(y[v])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n = 0, n_peaks = 0;
  int hist [$];

  function automatic int coef(int i);
    return CODE[i / M] ? 1 : -1;
  endfunction

  function automatic int model();
    int acc = 0;
    for (int i = 0; i < N; i++)
      if (n - 1 - i >= 0) acc += coef(i) * hist[n - 1 - i];
    return acc;
  endfunction

  task automatic step(bit valid, int xv);
    x_valid = valid;
    x_in    = XW'(xv);
    @(posedge clk);
    if (valid) begin hist.push_back(xv); n++; end
    #1;
    if (valid) begin
      int exp = model();
      if (exp == 960) n_peaks++;
      for (int v = 0; v < NS; v++) begin
        checks++;
        if (!y_valid[v] || int'(y[v]) != exp) begin
          failures++;
          $display("FAIL s=%0d sample %0d: y=%0d expected %0d", SDEG[v], n - 1, y[v], exp);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 400; i++)
      step($urandom_range(0, 4) != 0, int'(signed'(XW'($urandom))));
    for (int i = N - 1; i >= 0; i--) step(1'b1, (coef(i) > 0) ? 7 : -8);
    for (int i = 0; i < 200; i++)
      step($urandom_range(0, 4) != 0, int'(signed'(XW'($urandom))));
    checks++;
    if (n_peaks == 0) begin failures++; $display("FAIL no correlation peak"); end
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
