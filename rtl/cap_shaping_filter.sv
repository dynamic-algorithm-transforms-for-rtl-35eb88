// cap_shaping_filter: the two digital CAP shaping filters of the transmitter
// and the subtraction of their outputs.
//
// Symbols a_r, a_i (one per SPS samples, zero-stuffed in between) pass
// through an in-phase filter g_I(t) = p(t) cos(2 pi fc t) and a quadrature
// filter g_Q(t) = p(t) sin(2 pi fc t), where p(t) is a square-root
// raised-cosine pulse with excess bandwidth 0.38 and fc = 12.96 MHz at
// fs = 51.84 MHz (fc = fs/4, SPS = 4 samples per symbol). The output is
// tx = g_I * a_r - g_Q * a_i, for the DAC.
// Coefficients are computed at elaboration from that formula, centred on
// the middle of SPAN taps and quantised to CW bits with the largest
// magnitude at 2**(CW-1)-1. Timing: sym_en loads a new symbol together with
// a valid sample; tx is registered and valid the clock after x_valid.
// The pulse, fc, excess bandwidth and fs are the document's; the filter
// length SPAN and the coefficient width CW are this design's choices.
module cap_shaping_filter
  import dat_pkg::*;
#(
  parameter int SPAN = 48,
  parameter int CW   = 10,
  parameter int SPS  = dat_pkg::FF_SPS,
  parameter int TXW  = CW + BX_FB + $clog2(SPAN) + 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   x_valid,   // one output sample per valid
  input  logic                   sym_en,    // a_r/a_i enter on this sample
  input  sym_t                   a_r,
  input  sym_t                   a_i,
  output logic signed [TXW-1:0]  tx
);

  localparam real PI    = 3.14159265358979;
  localparam real ALPHA = 0.38;

  // Square-root raised-cosine pulse, tau in symbol periods.
  function automatic real srrc(input real tau);
    real den;
    if (tau == 0.0) return 1.0 - ALPHA + 4.0 * ALPHA / PI;
    den = PI * tau * (1.0 - (4.0 * ALPHA * tau) ** 2);
    if (den == 0.0)
      return ALPHA / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * ALPHA)) +
                                   (1.0 - 2.0 / PI) * $cos(PI / (4.0 * ALPHA)));
    return ($sin(PI * tau * (1.0 - ALPHA)) +
            4.0 * ALPHA * tau * $cos(PI * tau * (1.0 + ALPHA))) / den;
  endfunction

  // Tap k of the in-phase (q = 0) or quadrature (q = 1) filter, unscaled.
  function automatic real tap(input int k, input bit q);
    real t;   // time in samples from the centre
    t = real'(k) - real'(SPAN - 1) / 2.0;
    return srrc(t / real'(SPS)) *
           (q ? $sin(2.0 * PI * t / real'(SPS)) : $cos(2.0 * PI * t / real'(SPS)));
  endfunction

  function automatic real peak();
    real m = 0.0;
    for (int k = 0; k < SPAN; k++) begin
      if (tap(k, 1'b0) > m)  m = tap(k, 1'b0);
      if (-tap(k, 1'b0) > m) m = -tap(k, 1'b0);
      if (tap(k, 1'b1) > m)  m = tap(k, 1'b1);
      if (-tap(k, 1'b1) > m) m = -tap(k, 1'b1);
    end
    return m;
  endfunction

  function automatic int qtap(input int k, input bit q);
    return int'($rtoi(tap(k, q) * real'(2 ** (CW - 1) - 1) / peak() +
                      (tap(k, q) >= 0.0 ? 0.5 : -0.5)));
  endfunction

  typedef logic signed [CW-1:0] coef_t;
  typedef coef_t coef_arr_t [SPAN];

  function automatic coef_arr_t make_coefs(input bit q);
    coef_arr_t c;
    for (int k = 0; k < SPAN; k++) c[k] = CW'(qtap(k, q));
    return c;
  endfunction

  localparam coef_arr_t GI = make_coefs(1'b0);
  localparam coef_arr_t GQ = make_coefs(1'b1);

  sym_t line_r [SPAN];
  sym_t line_i [SPAN];

  logic signed [TXW-1:0] sum;

  always_comb begin
    sum = '0;
    for (int k = 0; k < SPAN; k++)
      sum = sum + TXW'(GI[k]) * TXW'(line_r[k]) - TXW'(GQ[k]) * TXW'(line_i[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < SPAN; k++) begin
        line_r[k] <= '0;
        line_i[k] <= '0;
      end
      tx <= '0;
    end else if (x_valid) begin
      line_r[0] <= sym_en ? a_r : '0;
      line_i[0] <= sym_en ? a_i : '0;
      for (int k = 1; k < SPAN; k++) begin
        line_r[k] <= line_r[k-1];
        line_i[k] <= line_i[k-1];
      end
      tx <= sum;
    end
  end

endmodule
