// dmf_psum_rf: partial-sum register file of one stage of the hybrid filter.
//
// In the global transposed-form chain a stage's partial sum v[k] is needed
// by the next stage S samples later, as v[k-S].  Instead of a delay line
// that moves every word every cycle, the S partial sums in flight sit in an
// S-entry register file: at each accepted sample the entry at addr is read
// (the value written S samples ago) and then overwritten with the new
// partial sum, so each word is written once per S samples.
//
// Interface: addr is the sample index modulo S from dmf_ctrl.  rdata is an
// asynchronous read of entry addr, showing the old contents during the
// cycle; wdata is written at the clock edge when en is high.  The array has
// no reset: the control unit's primed flag masks reads until every entry
// has been written once.  The published design gives the register file's
// role; its ports and timing here are this design's own.
module dmf_psum_rf #(
  parameter int W     = 10,
  parameter int DEPTH = dmf_pkg::S_DEG,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          en,
  input  logic [AW-1:0] addr,
  input  logic [W-1:0]  wdata,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) mem[addr] <= wdata;
  end

  assign rdata = mem[addr];

endmodule
