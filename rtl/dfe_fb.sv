// dfe_fb: complex adaptive feedback filter of the decision feedback
// equalizer, symbol rate.
//
// z(n) = sum_{k=1..NT} b_k * a^(n-k) over the last NT complex decisions
// a^ = a_i + j a_q (levels +-1, +-3 in BXF-bit words). Each complex product
// is formed in strength-reduced form with three real multiplications
// instead of four:
//   k1 = b_r (a_r + a_i),  k2 = a_r (b_i - b_r),  k3 = a_i (b_r + b_i)
//   Re = k1 - k3,          Im = k1 + k2.
// The receiver subtracts z from the FSLE outputs before the slicer. The
// coefficients adapt by complex LMS, b_k <- b_k + 2**-MU_SHIFT e conj(a^(n-k)),
// with e = slicer input - reference replaced by its power-of-two
// approximation, so each update term is a shifted small integer.
//
// Timing: z is combinational from the registered decision history and
// coefficients. On sym_en the update (if upd_en) uses the history before the
// shift, and the current decision dec_i/dec_q is pushed into the history.
// The document gives the tap count, precisions, the complex structure and
// that a strength-reduced architecture is used; the particular three-
// multiplier form, the number formats and the step size are this design's.
module dfe_fb
  import dat_pkg::*;
#(
  parameter int NT       = dat_pkg::N_FB,
  parameter int BWF      = dat_pkg::BW_FB,
  parameter int BREG     = 14,
  parameter int MU_SHIFT = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  sym_en,
  input  logic                  upd_en,
  input  sym_t                  dec_i,
  input  sym_t                  dec_q,
  input  pot_t                  err_i,
  input  pot_t                  err_q,
  output logic signed [YW-1:0]  z_i,
  output logic signed [YW-1:0]  z_q
);

  // One coefficient LSB (of the BWF-bit word) in equalizer output units:
  // a coefficient of 1.0 is 2**(BWF-1) LSBs and equals 2**SYM_FRAC units.
  localparam int ZSH = SYM_FRAC - (BWF - 1);

  sym_t hist_i [NT];
  sym_t hist_q [NT];
  logic signed [BREG-1:0] br [NT];
  logic signed [BREG-1:0] bi [NT];

  // Filter with three real multipliers per tap.
  always_comb begin
    logic signed [BWF:0] cr, ci, cs, cd;
    logic signed [BX_FB:0] as;
    logic signed [BWF+BX_FB+1:0] k1, k2, k3;
    logic signed [YW-1:0] sr, si;
    sr = '0;
    si = '0;
    for (int k = 0; k < NT; k++) begin
      cr = (BWF+1)'($signed(br[k][BREG-1 -: BWF]));
      ci = (BWF+1)'($signed(bi[k][BREG-1 -: BWF]));
      cs = cr + ci;
      cd = ci - cr;
      as = (BX_FB+1)'(hist_i[k]) + (BX_FB+1)'(hist_q[k]);
      k1 = (BWF+BX_FB+2)'(cr) * (BWF+BX_FB+2)'(as);
      k2 = (BWF+BX_FB+2)'(hist_i[k]) * (BWF+BX_FB+2)'(cd);
      k3 = (BWF+BX_FB+2)'(hist_q[k]) * (BWF+BX_FB+2)'(cs);
      sr = sr + YW'(k1 - k3);
      si = si + YW'(k1 + k2);
    end
    z_i = sr <<< ZSH;
    z_q = si <<< ZSH;
  end

  // Shift of a decision by a power-of-two error, aligned to the register.
  function automatic logic signed [47:0] pot_mul(input pot_t e, input sym_t a);
    logic signed [47:0] t;
    t = (48'(a) <<< e.exp) <<< (BREG - BWF);
    t = t >>> (ZSH + MU_SHIFT);
    if (e.zero) t = '0;
    return e.neg ? -t : t;
  endfunction

  function automatic logic signed [BREG-1:0] sat(input logic signed [47:0] v);
    if (v > 48'(2 ** (BREG - 1) - 1)) return BREG'(2 ** (BREG - 1) - 1);
    if (v < -48'(2 ** (BREG - 1)))    return BREG'(-(2 ** (BREG - 1)));
    return BREG'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NT; k++) begin
        hist_i[k] <= '0;
        hist_q[k] <= '0;
        br[k] <= '0;
        bi[k] <= '0;
      end
    end else if (sym_en) begin
      if (upd_en) begin
        for (int k = 0; k < NT; k++) begin
          br[k] <= sat(48'(br[k]) + pot_mul(err_i, hist_i[k]) + pot_mul(err_q, hist_q[k]));
          bi[k] <= sat(48'(bi[k]) + pot_mul(err_q, hist_i[k]) - pot_mul(err_i, hist_q[k]));
        end
      end
      hist_i[0] <= dec_i;
      hist_q[0] <= dec_q;
      for (int k = 1; k < NT; k++) begin
        hist_i[k] <= hist_i[k-1];
        hist_q[k] <= hist_q[k-1];
      end
    end
  end

endmodule
