// mult_energy: relative energy of a multiplication by a constant coefficient.
//
// For a B_w-bit two's complement coefficient w:
//   N1 = number of non-zero bits of w,
//   N2 = B_w minus the number of trailing zeros of w (0 for w = 0),
//   E_m(w) = E_max * (eta*N1 + (1-eta)*N2) / B_w with eta = 0.9.
// Since only ratios of E_m within one filter (same B_w) are used, the
// module outputs em = 9*N1 + N2 = 10*B_w*E_m/E_max, an exact integer.
// The coefficient is given as a BW_MAX-bit word whose low BW_MAX-bw bits
// are zero when the precision is bw; its trailing-zero count then exceeds
// that of the bw-bit word by BW_MAX-bw, so N2 = BW_MAX - tz for w != 0
// whatever bw is. Combinational. The model and eta follow the document.
module mult_energy
  import dat_pkg::*;
#(
  parameter int BW_MAX = dat_pkg::FF_BW
) (
  input  logic signed [BW_MAX-1:0] w,
  output logic [BWW-1:0]           n1,
  output logic [BWW-1:0]           n2,
  output logic [EMW-1:0]           em
);

  always_comb begin
    int ones;
    int tz;
    ones = 0;
    tz   = BW_MAX;
    for (int b = 0; b < BW_MAX; b++) ones += int'(w[b]);
    for (int b = BW_MAX - 1; b >= 0; b--) if (w[b]) tz = b;
    n1 = BWW'(ones);
    n2 = BWW'(BW_MAX - tz);
    em = EMW'(9 * ones + BW_MAX - tz);
  end

endmodule
