// cap_slicer: 16-CAP slicer with a reduced-constellation (RCA) error mode.
//
// Each dimension is sliced independently to the nearest of the levels
// -3, -1, +1, +3 (thresholds -2, 0, +2 in constellation units; one unit is
// 2**SYM_FRAC in the YW-bit input). The decisions go to the decoder and to
// the feedback filter in both modes.
// The slicer error e = q - ref drives adaptation and the signal monitor:
//   16-CAP mode: ref is the 16-CAP decision;
//   RCA mode:    ref is sign(q) * R with R = E[a^2]/E[|a|] = 5/2 units, the
//                4-point reduced constellation used for blind start-up.
// Purely combinational. The document gives the two constellation modes and
// the levels; R, the error sign convention and the word formats are this
// design's choices.
module cap_slicer
  import dat_pkg::*;
(
  input  logic signed [YW-1:0] q_i,
  input  logic signed [YW-1:0] q_q,
  input  logic                 rca_mode,
  output sym_t                 dec_i,
  output sym_t                 dec_q,
  output logic signed [YW-1:0] err_i,
  output logic signed [YW-1:0] err_q
);

  localparam logic signed [YW-1:0] UNIT  = YW'(1) <<< SYM_FRAC;
  localparam logic signed [YW-1:0] RCA_R = (YW'(5) <<< SYM_FRAC) >>> 1;

  function automatic sym_t slice(input logic signed [YW-1:0] q);
    if (q >= 2 * UNIT)  return sym_t'(3);
    if (q >= 0)         return sym_t'(1);
    if (q >= -2 * UNIT) return sym_t'(-1);
    return sym_t'(-3);
  endfunction

  function automatic logic signed [YW-1:0] error(input logic signed [YW-1:0] q,
                                                 input sym_t d, input logic rca);
    if (rca) return q[YW-1] ? q + RCA_R : q - RCA_R;
    return q - YW'(d) * UNIT;
  endfunction

  assign dec_i = slice(q_i);
  assign dec_q = slice(q_q);
  assign err_i = error(q_i, dec_i, rca_mode);
  assign err_q = error(q_q, dec_q, rca_mode);

endmodule
