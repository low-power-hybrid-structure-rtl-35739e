// dmf_pkg: constants and elaboration-time helpers shared by the hybrid
// digital matched filter (DMF).
//
// The filter correlates a 4-bit, 4x oversampled baseband stream with a
// 32-chip spreading code, i.e. a 128-tap FIR whose coefficients are +1/-1
// and constant over each run of 4 taps.  The sizes below (4-bit input,
// 4 samples per chip, 128 taps, summation degree 32) are the figures of the
// published design.  The default spreading code is this design's own
// choice: a 31-chip m-sequence (x^5 + x^2 + 1) padded with one chip, bit j
// giving chip j, with 1 meaning +1 and 0 meaning -1.
//
// Differential coefficients: with c_i = chip[i/M] the filter
//   y[k] = sum_{i=0}^{N-1} c_i x[k-i]
// is rewritten as y[k] = y[k-1] + sum_{i=0}^{N} d_i x[k-i] with
//   d_0 = c_0, d_i = c_i - c_{i-1}, d_N = -c_{N-1}.
// Only d_i at i = M*c can be non-zero; chip_diff() returns that value
// e_c = d_{M*c} for chip boundary c = 0..NC (NC = N/M chips).
package dmf_pkg;

  localparam int XW     = 4;    // input word length (bits)
  localparam int M_OVS  = 4;    // oversampling rate (samples per chip)
  localparam int N_TAPS = 128;  // filter length (taps)
  localparam int S_DEG  = 32;   // summation degree: taps summed per stage

  localparam int MAX_CHIPS = 256;  // largest code the helpers accept

  localparam logic [31:0] DEFAULT_CODE = 32'h4B3E_3750;

  // A differential coefficient, always one of -2, -1, 0, +1, +2.
  typedef logic signed [2:0] coef_t;

  // Chip j as +1 / -1.
  function automatic int chip_val(logic [MAX_CHIPS-1:0] code, int j);
    return code[j] ? 1 : -1;
  endfunction

  // Differential coefficient at chip boundary c of an nc-chip code.
  function automatic coef_t chip_diff(logic [MAX_CHIPS-1:0] code, int nc, int c);
    int v;
    if (c == 0)       v = chip_val(code, 0);
    else if (c == nc) v = -chip_val(code, nc - 1);
    else              v = chip_val(code, c) - chip_val(code, c - 1);
    return coef_t'(v);
  endfunction

  // Bits of a two's complement word holding every value in [-bound, bound].
  function automatic int sum_width(int bound);
    return $clog2(bound + 1) + 1;
  endfunction

endpackage
