// dmf_ctrl: sequencing for the hybrid matched filter.
//
// One counter steps once per accepted input sample (en high).  It yields
//  - phase:   the sample index modulo M (the oversampling phase), which
//             selects the input register-file entry and the shift chain of
//             the input receiving unit;
//  - rf_addr: the sample index modulo S, the common read/write address of
//             the partial-sum register files (an entry written at sample k
//             is read back at sample k+S);
//  - primed:  low until S samples have been accepted after reset, i.e.
//             until every partial-sum entry has been written once; the
//             datapath reads zero in place of a partial sum while it is low.
// All outputs are registered and change on the clock edge that accepts a
// sample.  Reset is active-low and asynchronous, and clears everything.
// The published design only names its control part; the counter, the
// priming flag and the reset style are this design's own choices.
module dmf_ctrl #(
  parameter int M = dmf_pkg::M_OVS,
  parameter int S = dmf_pkg::S_DEG,
  localparam int PW = (M > 1) ? $clog2(M) : 1,
  localparam int AW = (S > 1) ? $clog2(S) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  output logic [PW-1:0] phase,
  output logic [AW-1:0] rf_addr,
  output logic          primed
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase   <= '0;
      rf_addr <= '0;
      primed  <= 1'b0;
    end else if (en) begin
      phase   <= (phase == PW'(M - 1)) ? '0 : phase + 1'b1;
      rf_addr <= (rf_addr == AW'(S - 1)) ? '0 : rf_addr + 1'b1;
      if (rf_addr == AW'(S - 1)) primed <= 1'b1;
    end
  end

endmodule
