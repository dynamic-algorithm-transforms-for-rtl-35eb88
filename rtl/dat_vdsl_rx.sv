// dat_vdsl_rx: DAT-based 16-CAP receiver for 51.84 Mb/s VDSL (digital part).
//
// ADC samples (51.84 MS/s, FF_BX bits) enter the reconfigurable FSLE, whose
// in-phase and quadrature outputs are taken once per symbol (12.96 Mbaud).
// The feedback filter's estimate of the trailing intersymbol interference is
// subtracted, the 16-CAP slicer decides, and the decoder and descrambler
// recover 4 bits per symbol (51.84 Mb/s). The slicer errors, reduced to a
// power of two, adapt the FSLE and the feedback filter, and feed the signal
// monitoring block (sma), which powers FSLE taps down or up (alpha, beta)
// and sets the coefficient precision (bw) to keep SNR_o in its window.
// pga_control sets the gain of the analog PGA ahead of the ADC.
//
// Start-up uses the reduced constellation algorithm: for the first
// RCA_SYMBOLS symbols the adaptation error is taken against a 4-point
// constellation, then against the 16-point one (rca_mode falls).
// The feedback filter is frozen during that period and adapts only in
// 16-CAP mode.
//
// Timing: one ADC sample per adc_valid. sym_tick (every SPS-th sample)
// registers the FSLE outputs; the slicer, feedback subtraction and error are
// combinational from those registers, and the weight updates and decision
// history are applied on the following sym_tick. rx_data is valid for one
// clock when rx_valid is high, two symbols after the one it decodes.
// The block structure, sizes, RCA switch point and SNR window are the
// document's; fixed-point formats, step sizes and the control details listed
// in the sub-blocks are this design's.
module dat_vdsl_rx
  import dat_pkg::*;
#(
  parameter int N           = dat_pkg::FF_N,
  parameter int L           = dat_pkg::L_SMA,
  parameter int RCA_SYMBOLS = dat_pkg::RCA_SYMS,
  parameter int PGA_WIN     = 1024,
  parameter int MU_FF       = 6,
  parameter int MU_FB       = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // ADC side
  input  logic signed [FF_BX-1:0]  adc_data,
  input  logic                     adc_valid,
  output logic [5:0]               pga_gain,
  // received data
  output logic [3:0]               rx_data,
  output logic                     rx_valid,
  // coefficient preset (one coefficient per clock)
  input  logic                     load_en,
  input  logic                     load_q,
  input  logic [$clog2(N)-1:0]     load_idx,
  input  logic signed [FF_WW-1:0]  load_val,
  // status
  output logic                     sym_valid,   // one pulse per decided symbol
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

  logic                     sym_tick;
  logic                     y_ok;       // FSLE outputs hold a symbol
  logic signed [YW-1:0]     y_i, y_q, z_i, z_q, q_i, q_q;
  logic signed [FF_BW-1:0]  w_i [N];
  logic signed [FF_BW-1:0]  w_q [N];
  pot_t                     perr_i, perr_q;
  logic [$clog2(RCA_SYMBOLS+1)-1:0] rca_cnt;
  logic [3:0]               bits;

  pga_control #(.WIN(PGA_WIN)) u_pga (
    .clk, .rst_n, .x(adc_data), .x_valid(adc_valid), .gain(pga_gain), .step()
  );

  fsle #(.N(N), .MU_SHIFT(MU_FF)) u_fsle (
    .clk, .rst_n, .x_in(adc_data), .x_valid(adc_valid), .sym_tick,
    .upd_en(y_ok), .err_i(perr_i), .err_q(perr_q),
    .alpha_i, .alpha_q, .beta_i, .beta_q, .bw_i, .bw_q,
    .y_i, .y_q, .w_i, .w_q, .load_en, .load_q, .load_idx, .load_val
  );

  dfe_fb #(.MU_SHIFT(MU_FB)) u_dfe (
    .clk, .rst_n, .sym_en(sym_tick && y_ok), .upd_en(!rca_mode),
    .dec_i, .dec_q, .err_i(perr_i), .err_q(perr_q), .z_i, .z_q
  );

  assign q_i = y_i - z_i;
  assign q_q = y_q - z_q;

  cap_slicer u_slicer (.q_i, .q_q, .rca_mode, .dec_i, .dec_q, .err_i, .err_q);

  assign perr_i = pot_of(err_i);
  assign perr_q = pot_of(err_q);
  assign sym_valid = sym_tick && y_ok;

  sma #(.N(N), .L(L)) u_sma (
    .clk, .rst_n, .sym_en(sym_valid), .err_i, .err_q, .w_i, .w_q,
    .alpha_i, .alpha_q, .beta_i, .beta_q, .bw_i, .bw_q, .n_i, .n_q,
    .eval(sma_eval), .state_i, .state_q, .pd_i, .pd_q, .pu_i, .pu_q, .busy()
  );

  cap_decoder u_dec (.dec_i, .dec_q, .bits);

  descrambler u_descr (.clk, .rst_n, .en(sym_valid), .din(bits), .dout(rx_data));

  // RCA start-up and output strobe.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_ok     <= 1'b0;
      rca_cnt  <= '0;
      rca_mode <= 1'b1;
      rx_valid <= 1'b0;
    end else begin
      rx_valid <= sym_valid;
      if (sym_tick) y_ok <= 1'b1;
      if (sym_valid && rca_mode) begin
        if (rca_cnt == ($clog2(RCA_SYMBOLS+1))'(RCA_SYMBOLS - 1)) rca_mode <= 1'b0;
        rca_cnt <= rca_cnt + 1'b1;
      end
    end
  end

endmodule
