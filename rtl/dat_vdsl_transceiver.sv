// dat_vdsl_transceiver: digital part of a 51.84 Mb/s 16-CAP VDSL transceiver
// with a DAT-based (dynamically reconfigured, low-energy) receive equalizer.
//
// Transmit path: 4 data bits per symbol -> scrambler -> 16-CAP encoder ->
// in-phase/quadrature shaping filters -> tx_sample for the DAC (51.84 MS/s).
// Receive path: dat_vdsl_rx, from ADC samples to descrambled data, with the
// PGA gain code as an output. The two paths share only clock and reset; the
// DAC, transmit low-pass filter, PGA, ADC and the ADC's timing recovery are
// outside, so their signals are ports.
//
// Transmit timing: tx_valid marks one output sample; every SPS-th valid
// sample (phase 0) takes tx_data (tx_ready is high in that cycle), and the
// scrambled, encoded symbol enters the shaping filters on the next valid
// sample. Receive timing: see dat_vdsl_rx.
module dat_vdsl_transceiver
  import dat_pkg::*;
#(
  parameter int N           = dat_pkg::FF_N,
  parameter int L           = dat_pkg::L_SMA,
  parameter int RCA_SYMBOLS = dat_pkg::RCA_SYMS,
  parameter int TX_SPAN     = 48,
  parameter int TX_CW       = 10,
  parameter int TXW         = TX_CW + BX_FB + $clog2(TX_SPAN) + 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // transmitter
  input  logic [3:0]               tx_data,
  input  logic                     tx_valid,
  output logic                     tx_ready,
  output logic signed [TXW-1:0]    tx_sample,
  // receiver
  input  logic signed [FF_BX-1:0]  adc_data,
  input  logic                     adc_valid,
  output logic [5:0]               pga_gain,
  output logic [3:0]               rx_data,
  output logic                     rx_valid,
  input  logic                     load_en,
  input  logic                     load_q,
  input  logic [$clog2(N)-1:0]     load_idx,
  input  logic signed [FF_WW-1:0]  load_val,
  output logic                     sym_valid,
  output sym_t                     dec_i,
  output sym_t                     dec_q,
  output logic signed [YW-1:0]     err_i,
  output logic signed [YW-1:0]     err_q,
  output logic                     rca_mode,
  output logic [N-1:0]             alpha_i,
  output logic [N-1:0]             alpha_q,
  output logic [N-1:0]             beta_i,
  output logic [N-1:0]             beta_q,
  output logic [BWW-1:0]           bw_i,
  output logic [BWW-1:0]           bw_q,
  output logic [$clog2(N+1)-1:0]   n_i,
  output logic [$clog2(N+1)-1:0]   n_q,
  output logic                     sma_eval,
  output snr_state_e               state_i,
  output snr_state_e               state_q,
  output logic                     pd_i,
  output logic                     pd_q,
  output logic                     pu_i,
  output logic                     pu_q
);

  // ---------------- transmitter ----------------
  localparam logic [$clog2(FF_SPS)-1:0] LAST = $clog2(FF_SPS)'(FF_SPS - 1);
  logic [$clog2(FF_SPS)-1:0] tx_phase;
  logic [3:0]                scr;
  sym_t                      a_r, a_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        tx_phase <= '0;
    else if (tx_valid) tx_phase <= (tx_phase == LAST) ? '0 : tx_phase + 1'b1;
  end

  assign tx_ready = tx_valid && (tx_phase == '0);

  scrambler u_scr (.clk, .rst_n, .en(tx_ready), .din(tx_data), .dout(scr));

  cap_encoder u_enc (.bits(scr), .a_r, .a_i);

  cap_shaping_filter #(.SPAN(TX_SPAN), .CW(TX_CW), .TXW(TXW)) u_shape (
    .clk, .rst_n, .x_valid(tx_valid), .sym_en(tx_valid && tx_phase == 1),
    .a_r, .a_i, .tx(tx_sample)
  );

  // ---------------- receiver ----------------
  dat_vdsl_rx #(.N(N), .L(L), .RCA_SYMBOLS(RCA_SYMBOLS)) u_rx (
    .clk, .rst_n, .adc_data, .adc_valid, .pga_gain, .rx_data, .rx_valid,
    .load_en, .load_q, .load_idx, .load_val, .sym_valid, .dec_i, .dec_q,
    .err_i, .err_q, .rca_mode, .alpha_i, .alpha_q, .beta_i, .beta_q,
    .bw_i, .bw_q, .n_i, .n_q, .sma_eval, .state_i, .state_q,
    .pd_i, .pd_q, .pu_i, .pu_q
  );

endmodule
