// sma: signal monitoring algorithm block of the DAT-based receiver.
//
// Watches the slicer errors and reconfigures the two FSLE filters:
//   sma_err_monitor  |e_i|, |e_q| accumulated over L symbols, compared with
//                    the thresholds of the SNR window (always powered);
//   sma_tap_select   powers taps down or up (alpha_k, beta_k) only when a
//                    comparator result leaves the window;
//   sma_bw_calc      one per filter, coefficient precision B_w from the
//                    number of powered-up taps.
// Outputs alpha/beta/bw go straight to the FSLE. Timing is that of the
// sub-blocks: new results every L symbols, a reconfiguration within 2N+4
// clocks after that.
module sma
  import dat_pkg::*;
#(
  parameter int N          = dat_pkg::FF_N,
  parameter int L          = dat_pkg::L_SMA,
  parameter int SNR_LO_CDB = 2150,
  parameter int SNR_HI_CDB = 2350
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     sym_en,
  input  logic signed [YW-1:0]     err_i,
  input  logic signed [YW-1:0]     err_q,
  input  logic signed [FF_BW-1:0]  w_i [N],
  input  logic signed [FF_BW-1:0]  w_q [N],
  output logic [N-1:0]             alpha_i,
  output logic [N-1:0]             alpha_q,
  output logic [N-1:0]             beta_i,
  output logic [N-1:0]             beta_q,
  output logic [BWW-1:0]           bw_i,
  output logic [BWW-1:0]           bw_q,
  output logic [$clog2(N+1)-1:0]   n_i,
  output logic [$clog2(N+1)-1:0]   n_q,
  output logic                     eval,
  output snr_state_e               state_i,
  output snr_state_e               state_q,
  output logic                     pd_i,
  output logic                     pd_q,
  output logic                     pu_i,
  output logic                     pu_q,
  output logic                     busy
);

  sma_err_monitor #(.L(L), .SNR_LO_CDB(SNR_LO_CDB), .SNR_HI_CDB(SNR_HI_CDB)) u_mon (
    .clk, .rst_n, .sym_en, .err_i, .err_q, .eval, .state_i, .state_q,
    .sum_i(), .sum_q()
  );

  sma_tap_select #(.N(N)) u_sel (
    .clk, .rst_n, .eval, .state_i, .state_q, .w_i, .w_q,
    .alpha_i, .alpha_q, .beta_i, .beta_q, .busy, .pd_i, .pd_q, .pu_i, .pu_q
  );

  sma_bw_calc #(.N(N), .BW_MAX(FF_BW)) u_bwi (.alpha(alpha_i), .bw(bw_i), .n_active(n_i));
  sma_bw_calc #(.N(N), .BW_MAX(FF_BW)) u_bwq (.alpha(alpha_q), .bw(bw_q), .n_active(n_q));

endmodule
