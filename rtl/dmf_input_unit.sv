// dmf_input_unit: input receiving unit of the hybrid matched filter.
//
// Keeps the last S input samples, the window that every stage of the
// filter shares, but presents only the L = S/M samples that meet a
// non-zero differential coefficient: taps[q] = x[k - M*(q+1)], q = 0..L-1,
// where k is the sample now at x_in.  (The newest sample, x[k], goes to the
// adder straight from x_in.)
//
// Storage, as in the published design, is split in two:
//  - an M-entry register file holding the newest M samples, one entry per
//    oversampling phase; only the entry of the current phase is written;
//  - M shift-register chains of L-1 samples, one per phase; a chain shifts
//    only when a sample of its phase arrives, i.e. once every M samples,
//    taking in the sample the register file entry is about to lose.
// So per sample one register-file word and one chain move, and the rest of
// the window holds still.
//
// Interface: phase comes from dmf_ctrl (sample index mod M).  When en is
// high the sample on x_in is stored at the clock edge.  taps is
// combinational from the stored state and phase, valid in the same cycle
// as x_in.  Reset (active-low, asynchronous) clears the window to zero so
// that the filter starts from an all-zero history; this is this design's
// own choice.
module dmf_input_unit #(
  parameter int XW = dmf_pkg::XW,
  parameter int M  = dmf_pkg::M_OVS,
  parameter int S  = dmf_pkg::S_DEG,
  localparam int L  = S / M,
  localparam int PW = (M > 1) ? $clog2(M) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic [PW-1:0]         phase,
  input  logic signed [XW-1:0]  x_in,
  output logic [L-1:0][XW-1:0]  taps
);

  logic [XW-1:0] rf [M];                 // newest sample of each phase
  logic [XW-1:0] chain [M][L-1];         // older samples of each phase

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < M; p++) begin
        rf[p] <= '0;
        for (int j = 0; j < L - 1; j++) chain[p][j] <= '0;
      end
    end else if (en) begin
      rf[phase]       <= x_in;
      chain[phase][0] <= rf[phase];
      for (int j = 1; j < L - 1; j++) chain[phase][j] <= chain[phase][j-1];
    end
  end

  always_comb begin
    taps[0] = rf[phase];
    for (int q = 1; q < L; q++) taps[q] = chain[phase][q-1];
  end

  initial begin
    assert (S % M == 0 && L >= 2)
      else $error("dmf_input_unit: S must be a multiple of M with S/M >= 2");
  end

endmodule
