// dmf_diff_acc: output accumulator of the differential coefficient scheme.
//
// With differential coefficients the filter datapath delivers
// z[k] = y[k] - y[k-1]; this block restores the filter output as
//   y[k] = y[k-1] + z[k].
// Both are two's complement; the register is YW bits and wraps modulo
// 2^YW, which is exact as long as every true y[k] fits in YW bits (the
// intermediate sums may wrap freely).
//
// Interface: z is added when en is high; y is the registered sum and so
// shows y[k] the cycle after z[k] was presented.  Reset (active-low,
// asynchronous) clears y, which together with an all-zero input history
// gives exact outputs from the first sample on.  The recursion follows the
// published scheme; widths, enable and reset are this design's own.
module dmf_diff_acc #(
  parameter int ZW = 11,
  parameter int YW = 12
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [ZW-1:0] z,
  output logic signed [YW-1:0] y
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= y + YW'(z);
  end

  initial begin
    assert (ZW <= YW) else $error("dmf_diff_acc: z wider than y");
  end

endmodule
