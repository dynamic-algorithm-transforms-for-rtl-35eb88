// sma_bw_calc: optimum coefficient precision from the number of powered-up
// taps ("compute optimum B_w").
//
// B_w = B_w,max + (1/2) log2(n/N), n = sum of alpha_k: one bit is dropped
// for each four-fold reduction of the active filter length. The fractional
// part is rounded toward B_w,max (precision is never cut below what the
// formula asks), i.e. B_w = BW_MAX - j with j the largest integer such that
// n * 4**j <= N. With N = 48 and B_w,max = 10 this gives 10 bits for 13 to
// 48 taps and 9 bits for 4 to 12 taps, matching the converged
// configurations the document tabulates. Combinational.
module sma_bw_calc
  import dat_pkg::*;
#(
  parameter int N      = dat_pkg::FF_N,
  parameter int BW_MAX = dat_pkg::FF_BW
) (
  input  logic [N-1:0]     alpha,
  output logic [BWW-1:0]   bw,
  output logic [$clog2(N+1)-1:0] n_active
);

  always_comb begin
    int n;
    int j;
    n = 0;
    for (int b = 0; b < N; b++) n += int'(alpha[b]);
    j = 0;
    for (int t = 1; t < BW_MAX; t++)
      if (n > 0 && (n << (2 * t)) <= N) j = t;
    n_active = ($clog2(N+1))'(n);
    bw = BWW'(BW_MAX - j);
  end

endmodule
