// hybrid_dmf: low-power hybrid digital matched filter for DSSS code
// acquisition.
//
// Computes, for every input sample x[k], the correlation with the
// spreading code
//   y[k] = sum_{i=0}^{N-1} c_i x[k-i],   c_i = +1/-1 = chip[i/M],
// where x is a signed XW-bit baseband sample taken M times per chip and
// N = N_TAPS.  With the defaults (4-bit samples, 4x oversampling, 128 taps,
// summation degree S = 32) this is the published design's main
// configuration.
//
// Structure (published scheme):
//  - Differential coefficients: y[k] = y[k-1] + z[k] with
//    z[k] = sum_{i=0}^{N} d_i x[k-i], d_i = c_i - c_{i-1}.  Only every M-th
//    d_i can be non-zero, and inside a chip run it is zero, so z needs at
//    most N/M + 1 small additions.  dmf_diff_acc performs the recursion.
//  - Hybrid form: the taps 1..N of z are cut into G = N/S stages of S taps.
//    Each stage adds its own taps in direct form over the shared window of
//    the last S samples (local direct form, dmf_add_unit) and adds the
//    partial sum the stage above produced S samples earlier (global
//    transposed form).  That S-sample delay is a register file per stage
//    (dmf_psum_rf) written once per S samples per entry, not a delay line.
//    Stage G-1 holds the highest taps and starts the chain; stage 0 also
//    adds the d_0 x[k] term, the remainder tap of the S-tap grouping, taken
//    straight from x_in, and yields z[k].
//  - The window is kept by dmf_input_unit (register file for the newest M
//    samples, shift chains clocked once every M samples); dmf_ctrl supplies
//    the phase, the register-file address and the priming flag.
// Stage g, for g = 0..G-1, uses the samples x[k - M(q+1)], q = 0..L-1
// (L = S/M), with coefficient e_c = d_{M c}, c = g L + q + 1.  Its partial
// sum is kept at the width that holds its worst case, growing towards the
// output as in a transposed filter.
//
// Interface and timing: one sample per clock when x_valid is high; x_valid
// low holds the whole filter.  y and y_valid are registered: y holds y[k]
// in the cycle after x[k] was presented with x_valid.  Reset is active-low
// and asynchronous and starts the filter from an all-zero history.
// CODE bit j is chip j (1 = +1, 0 = -1); chip 0 weighs the newest samples.
// Choices of this design, not of the published one: the valid/hold
// handshake, the reset and priming scheme, the word widths and the default
// code.
module hybrid_dmf #(
  parameter int XW     = dmf_pkg::XW,
  parameter int M      = dmf_pkg::M_OVS,
  parameter int N_TAPS = dmf_pkg::N_TAPS,
  parameter int S      = dmf_pkg::S_DEG,
  parameter logic [N_TAPS/M-1:0] CODE = (N_TAPS/M)'(dmf_pkg::DEFAULT_CODE),
  localparam int NC = N_TAPS / M,   // chips in the code
  localparam int G  = N_TAPS / S,   // stages
  localparam int L  = S / M,        // non-zero addends per stage
  localparam int YW = dmf_pkg::sum_width(N_TAPS * (1 << (XW - 1)))
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 x_valid,
  input  logic signed [XW-1:0] x_in,
  output logic                 y_valid,
  output logic signed [YW-1:0] y
);
  import dmf_pkg::*;

  localparam int PW = (M > 1) ? $clog2(M) : 1;
  localparam int AW = (S > 1) ? $clog2(S) : 1;
  localparam int XMAX = 1 << (XW - 1);           // largest |x|

  // Worst-case magnitude of stage g's partial sum (|d| <= 2).
  function automatic int psum_bound(int g);
    return 2 * XMAX * L * (G - g) + ((g == 0) ? XMAX : 0);
  endfunction

  localparam int WMAX = sum_width(psum_bound(0));

  // Coefficients of stage g: [q] for window sample q, [L] for x_in.
  function automatic coef_t [L:0] stage_coefs(int g);
    coef_t [L:0] cf;
    logic [MAX_CHIPS-1:0] code_ext = MAX_CHIPS'(CODE);
    for (int q = 0; q < L; q++) cf[q] = chip_diff(code_ext, NC, g * L + q + 1);
    cf[L] = (g == 0) ? chip_diff(code_ext, NC, 0) : coef_t'(0);
    return cf;
  endfunction

  // ---------------------------------------------------------------- control
  logic [PW-1:0] phase;
  logic [AW-1:0] rf_addr;
  logic          primed;

  dmf_ctrl #(.M(M), .S(S)) u_ctrl (
    .clk, .rst_n, .en(x_valid), .phase, .rf_addr, .primed
  );

  // ------------------------------------------------------ input receiving
  logic [L-1:0][XW-1:0] taps;

  dmf_input_unit #(.XW(XW), .M(M), .S(S)) u_input (
    .clk, .rst_n, .en(x_valid), .phase, .x_in, .taps
  );

  // ------------------------------------------------------- stage chain
  // psum[g]: stage g's new partial sum; carry[g]: stage g+1's partial sum
  // of S samples ago, as read from its register file (zero for the top
  // stage and before priming).  Both sign-extended to WMAX bits.
  logic [WMAX-1:0] psum  [G];
  logic [WMAX-1:0] carry [G];

  for (genvar g = 0; g < G; g++) begin : g_stage
    localparam int W  = sum_width(psum_bound(g));
    localparam int WI = (g == G - 1) ? 1 : sum_width(psum_bound(g + 1));
    localparam int NA = (g == 0) ? L + 1 : L;
    localparam coef_t [L:0] CF = stage_coefs(g);

    logic [NA-1:0][XW-1:0] xs;
    logic [W-1:0]          sum;

    if (g == 0) begin : g_direct
      assign xs = {x_in, taps};
    end else begin : g_window
      assign xs = taps;
    end

    dmf_add_unit #(
      .XW(XW), .NA(NA), .W(W), .WI(WI), .COEFS(CF[NA-1:0])
    ) u_add (
      .x(xs), .psum_in(carry[g][WI-1:0]), .psum_out(sum)
    );

    assign psum[g] = WMAX'(signed'(sum));

    if (g == G - 1) begin : g_head
      assign carry[g] = '0;
    end else begin : g_link
      logic [WI-1:0] rd;
      dmf_psum_rf #(.W(WI), .DEPTH(S)) u_rf (
        .clk, .en(x_valid), .addr(rf_addr),
        .wdata(psum[g + 1][WI-1:0]), .rdata(rd)
      );
      assign carry[g] = primed ? WMAX'(signed'(rd)) : '0;
    end
  end

  // ------------------------------------------------ differential recursion
  dmf_diff_acc #(.ZW(WMAX), .YW(YW)) u_acc (
    .clk, .rst_n, .en(x_valid), .z(psum[0]), .y
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= x_valid;
  end

  initial begin
    assert (N_TAPS % S == 0 && S % M == 0 && S / M >= 2 && NC <= MAX_CHIPS)
      else $error("hybrid_dmf: need S | N_TAPS, M | S, S/M >= 2");
  end

endmodule
