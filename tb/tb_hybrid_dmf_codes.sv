// tb_hybrid_dmf_codes: the default-size filter built with codes that push
// the differential-coefficient adders to their extremes:
//   all chips +1      - every interior coefficient is zero (only the two
//                       end taps remain);
//   alternating chips - every interior coefficient is +2 or -2;
//   16 x +1, 16 x -1  - one sign change in the middle of the code.
// Random samples with idle cycles; every output is compared with the
// direct-form correlation of its own code, one cycle after its sample.
module tb_hybrid_dmf_codes;
  localparam int XW = 4, M = 4, N = 128, NC = N / M, YW = 12, NV = 3;
  localparam logic [NC-1:0] CODES [NV] = '{32'hFFFF_FFFF, 32'h5555_5555, 32'h0000_FFFF};

  logic clk = 0, rst_n = 0, x_valid = 0;
  logic signed [XW-1:0] x_in = 0;
  logic y_valid [NV];
  logic signed [YW-1:0] y [NV];

  for (genvar v = 0; v < NV; v++) begin : g_dut
    hybrid_dmf #(.CODE(CODES[v])) dut (
      .clk, .rst_n, .x_valid, .x_in, .y_valid(y_valid[v]), .y(y[v])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n = 0;
  int hist [$];

  function automatic int model(int v);
    int acc = 0;
    for (int i = 0; i < N; i++)
      if (n - 1 - i >= 0) acc += (CODES[v][i / M] ? 1 : -1) * hist[n - 1 - i];
    return acc;
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 800; cyc++) begin
      x_valid = ($urandom_range(0, 4) != 0);
      // a stretch of full-scale samples drives the sums to their limits
      x_in = (cyc >= 300 && cyc < 460) ? -4'sd8 : XW'($urandom);
      @(posedge clk);
      if (x_valid) begin hist.push_back(int'(x_in)); n++; end
      #1;
      if (x_valid) begin
        for (int v = 0; v < NV; v++) begin
          checks++;
          if (!y_valid[v] || int'(y[v]) != model(v)) begin
            failures++;
            $display("FAIL code %0d sample %0d: y=%0d expected %0d", v, n - 1, y[v], model(v));
          end
        end
      end
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
