// fsle: reconfigurable fractionally-spaced linear equalizer (the feedforward
// part of the CAP receiver's equalizer).
//
// Two N-tap reconfigurable LMS filters, in-phase and quadrature, read the
// same ADC stream at SPS samples per symbol (51.84 MS/s for 12.96 Mbaud),
// so the taps are spaced T/SPS. A modulo-SPS sample counter produces
// sym_tick on every SPS-th valid sample; on that tick both filter outputs
// are registered (the 1/T samplers) and the weight updates, if upd_en, are
// applied with the errors err_i / err_q of the previous symbol.
// Each filter has its own alpha/beta vectors and precision, as the
// document reports separate configurations for the two filters.
// The symbol phase is fixed by reset (no timing recovery inside); the
// coefficient preset port is this design's.
module fsle
  import dat_pkg::*;
#(
  parameter int N        = dat_pkg::FF_N,
  parameter int SPS      = dat_pkg::FF_SPS,
  parameter int MU_SHIFT = 6
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [FF_BX-1:0]    x_in,
  input  logic                       x_valid,
  output logic                       sym_tick,
  input  logic                       upd_en,
  input  pot_t                       err_i,
  input  pot_t                       err_q,
  input  logic [N-1:0]               alpha_i,
  input  logic [N-1:0]               alpha_q,
  input  logic [N-1:0]               beta_i,
  input  logic [N-1:0]               beta_q,
  input  logic [BWW-1:0]             bw_i,
  input  logic [BWW-1:0]             bw_q,
  output logic signed [YW-1:0]       y_i,
  output logic signed [YW-1:0]       y_q,
  output logic signed [FF_BW-1:0]    w_i [N],
  output logic signed [FF_BW-1:0]    w_q [N],
  input  logic                       load_en,
  input  logic                       load_q,     // 0: in-phase, 1: quadrature
  input  logic [$clog2(N)-1:0]       load_idx,
  input  logic signed [FF_WW-1:0]    load_val
);

  localparam logic [$clog2(SPS)-1:0] LAST = $clog2(SPS)'(SPS - 1);
  logic [$clog2(SPS)-1:0] phase;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       phase <= '0;
    else if (x_valid) phase <= (phase == LAST) ? '0 : phase + 1'b1;
  end

  assign sym_tick = x_valid && (phase == LAST);

  recon_lms_filter #(.N(N), .MU_SHIFT(MU_SHIFT)) u_fi (
    .clk, .rst_n, .x_in, .x_valid, .sym_en(sym_tick), .upd_en, .err(err_i),
    .alpha(alpha_i), .beta(beta_i), .bw(bw_i), .y(y_i), .w_q(w_i),
    .load_en(load_en && !load_q), .load_idx, .load_val
  );

  recon_lms_filter #(.N(N), .MU_SHIFT(MU_SHIFT)) u_fq (
    .clk, .rst_n, .x_in, .x_valid, .sym_en(sym_tick), .upd_en, .err(err_q),
    .alpha(alpha_q), .beta(beta_q), .bw(bw_q), .y(y_q), .w_q(w_q),
    .load_en(load_en && load_q), .load_idx, .load_val
  );

endmodule
