// dmf_add_unit: local direct-form adder of one stage of the hybrid filter.
//
// Computes, in one cycle,
//   psum_out = psum_in + sum_a COEFS[a] * x[a]          (modulo 2^W)
// where each x[a] is a signed XW-bit sample and each COEFS[a] is a fixed
// differential coefficient in {-2, -1, 0, +1, +2}.  psum_in is the partial
// sum handed on by the previous stage of the global transposed-form chain.
//
// How, following the published add unit:
//  - addends whose coefficient is zero are left out (their row is the
//    constant zero, which synthesis removes);
//  - a factor of two is a one-bit left shift of the row;
//  - a negative coefficient uses the one's complement of the sample; the
//    missing +1 goes into the correction constant;
//  - sign-bit inversion: each row carries its sample with the sign bit
//    inverted, i.e. as the unsigned value x + 2^(XW-1), so no sign
//    extension is needed; the 2^(XW-1) offsets go into the constant too;
//  - all rows, psum_in (sign-extended) and the one correction constant,
//    known at elaboration, are reduced by a linear carry-save array of
//    full adders, and a single carry-propagate adder ends the sum.
// Folding the +1s and the offsets into one constant row, rather than into
// empty bit positions of the rows, is this design's own simplification.
//
// Samples whose coefficient is zero are not read at all.
//
// W must hold every value the true sum can take; the adders then work
// modulo 2^W and the result is exact.  Purely combinational.
module dmf_add_unit #(
  parameter int XW = dmf_pkg::XW,
  parameter int NA = dmf_pkg::S_DEG / dmf_pkg::M_OVS,
  parameter int W  = 11,
  parameter int WI = 10,
  parameter dmf_pkg::coef_t [NA-1:0] COEFS = '{default: dmf_pkg::coef_t'(2)}
) (
  input  logic [NA-1:0][XW-1:0] x,
  input  logic [WI-1:0]         psum_in,
  output logic [W-1:0]          psum_out
);

  localparam int NR = NA + 2;  // addend rows, psum_in, constant

  // Sum over the non-zero coefficients of (+1 if negative) - 2^(XW-1),
  // each scaled by the coefficient's magnitude.
  function automatic int correction();
    int k = 0;
    for (int a = 0; a < NA; a++) begin
      int d = int'(COEFS[a]);
      int mag = (d < 0) ? -d : d;
      if (d != 0) k += mag * (((d < 0) ? 1 : 0) - (1 << (XW - 1)));
    end
    return k;
  endfunction

  localparam int K = correction();

  logic [W-1:0] rows [NR];

  for (genvar a = 0; a < NA; a++) begin : g_row
    localparam int D = int'(COEFS[a]);
    if (D == 0) begin : g_zero
      assign rows[a] = '0;
    end else begin : g_term
      localparam bit NEG = (D < 0);
      localparam int SH  = (D == 2 || D == -2) ? 1 : 0;
      logic [XW-1:0] u;
      // sign bit inverted; for a negative coefficient, ones' complement too
      assign u = NEG ? {x[a][XW-1], ~x[a][XW-2:0]} : {~x[a][XW-1], x[a][XW-2:0]};
      assign rows[a] = W'(u) << SH;
    end
  end

  assign rows[NA]     = W'(signed'(psum_in));
  assign rows[NA + 1] = W'(K);

  // Linear carry-save array, then one carry-propagate addition.
  logic [W-1:0] cs_s, cs_c;
  always_comb begin
    cs_s = rows[0];
    cs_c = rows[1];
    for (int r = 2; r < NR; r++) begin
      logic [W-1:0] ns, nc;
      ns   = cs_s ^ cs_c ^ rows[r];
      nc   = ((cs_s & cs_c) | (cs_s & rows[r]) | (cs_c & rows[r])) << 1;
      cs_s = ns;
      cs_c = nc;
    end
    psum_out = cs_s + cs_c;
  end

  initial begin
    assert (WI <= W) else $error("dmf_add_unit: psum_in wider than psum_out");
    for (int a = 0; a < NA; a++)
      assert (int'(COEFS[a]) >= -2 && int'(COEFS[a]) <= 2)
        else $error("dmf_add_unit: coefficient out of range");
  end

endmodule
