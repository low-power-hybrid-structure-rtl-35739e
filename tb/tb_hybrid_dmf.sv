// tb_hybrid_dmf: end-to-end test of the hybrid matched filter at its
// default size (4-bit samples, 4x oversampling, 128 taps, summation degree
// 32, default 32-chip code).
//
// Every output is compared with the plain direct-form correlation
//   y[k] = sum_{i=0}^{127} c_i x[k-i],  c_i = chip[i/4] (+1/-1),
// computed by the testbench from its own copy of the input history, and
// must appear exactly one cycle after its sample (y_valid).  The stimulus
// is a sequence of phases:
//   1. random samples with random idle cycles (x_valid low: the filter
//      must hold);
//   2. the code itself, oversampled 4x, +7 for a +1 chip and -8 for a -1
//      chip, sent in the order that lines it up with the filter: the
//      largest possible output, +960 (the default code is balanced);
//   3. the same with +1 chips at -8 and -1 chips at +7: the most negative
//      output, -960;
//   4. random samples again.
// Counted events, each of which must occur: register files primed
// (first S samples done), idle cycles, every oversampling phase reused
// with a wrapped partial-sum address, positive and negative extremes.
module tb_hybrid_dmf;
  localparam int XW = 4, M = 4, N = 128, NC = N / M, YW = 12;
  localparam logic [NC-1:0] CODE = dmf_pkg::DEFAULT_CODE;

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic signed [XW-1:0] x_in = 0;
  logic y_valid;
  logic signed [YW-1:0] y;

  hybrid_dmf dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n = 0;
  int hist [$];
  int n_idle = 0, n_pos_peak = 0, n_neg_peak = 0, n_primed = 0, n_wraps = 0;

  function automatic int coef(int i);
    return CODE[i / M] ? 1 : -1;
  endfunction

  function automatic int model();
    int acc = 0;
    for (int i = 0; i < N; i++)
      if (n - 1 - i >= 0) acc += coef(i) * hist[n - 1 - i];
    return acc;
  endfunction

  // Present one sample (or an idle cycle) and check the output after it.
  task automatic step(bit valid, int xv);
    x_valid = valid;
    x_in    = XW'(xv);
    @(posedge clk);
    if (valid) begin hist.push_back(xv); n++; end
    if (!valid) n_idle++;
    if (dut.primed && n == N / 4 + 1) n_primed++;
    if (valid && dut.rf_addr == 0 && n > N / 4) n_wraps++;
    #1;
    checks++;
    if (y_valid !== valid) begin
      failures++;
      $display("FAIL y_valid=%0b after valid=%0b", y_valid, valid);
    end
    if (valid) begin
      int exp = model();
      checks++;
      if (int'(y) != exp) begin
        failures++;
        $display("FAIL sample %0d: y=%0d expected %0d", n - 1, y, exp);
      end
      if (int'(y) == 15 * N / 2) n_pos_peak++;
      if (int'(y) == -15 * N / 2) n_neg_peak++;
    end
  endtask

  // The code lined up with the filter: at the end x[k-i] = vp where
  // c_i = +1 and vn where c_i = -1.
  task automatic send_code(int vp, int vn);
    for (int i = N - 1; i >= 0; i--) step(1'b1, (coef(i) > 0) ? vp : vn);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 300; i++)
      step($urandom_range(0, 4) != 0, int'(signed'(XW'($urandom))));
    send_code(7, -8);
    for (int i = 0; i < 20; i++) step(1'b1, 0);
    send_code(-8, 7);
    for (int i = 0; i < 300; i++)
      step($urandom_range(0, 4) != 0, int'(signed'(XW'($urandom))));

    checks += 5;
    if (n_primed == 0)   begin failures++; $display("FAIL never primed"); end
    if (n_idle == 0)     begin failures++; $display("FAIL no idle cycle"); end
    if (n_wraps < 2)     begin failures++; $display("FAIL no address wrap"); end
    if (n_pos_peak == 0) begin failures++; $display("FAIL no +960 peak"); end
    if (n_neg_peak == 0) begin failures++; $display("FAIL no -960 peak"); end
    $display("events: primed=%0d idle=%0d wraps=%0d pos_peak=%0d neg_peak=%0d samples=%0d",
             n_primed, n_idle, n_wraps, n_pos_peak, n_neg_peak, n);
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
