// sma_err_monitor: always-on front end of the signal monitoring block.
//
// For each slicer dimension it accumulates |e(n)| over L symbols (clipped
// to EW bits); every L symbols (the 1/LT sampler) the two sums are latched,
// the accumulators restart, and a threshold comparator classifies each sum:
//   sum > TH_DEFICIT -> SNR_DEFICIT (SNR_o below SNR_LO),
//   sum < TH_SURPLUS -> SNR_SURPLUS (SNR_o above SNR_HI),
//   otherwise        -> SNR_OK.
// The thresholds follow from SNR_o = 10 / MSE for 16-CAP (signal power 10,
// so each dimension carries an error variance of 5/SNR_o) and, taking the
// error as Gaussian, E|e| = sqrt(2/pi) * sigma. They are computed at
// elaboration from the window limits in hundredths of a dB.
//
// Timing: sym_en marks one symbol; err_i/err_q are sampled on it. eval
// pulses for one cycle after the L-th symbol; state_i/state_q and
// sum_i/sum_q are valid from then until the next eval.
// The window L = 4096 and the 21.5-23.5 dB window are the document's; the
// Gaussian mean-absolute-error relation and the clipping are this design's.
module sma_err_monitor
  import dat_pkg::*;
#(
  parameter int L          = dat_pkg::L_SMA,
  parameter int SNR_LO_CDB = 2150,
  parameter int SNR_HI_CDB = 2350,
  parameter int EW         = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   sym_en,
  input  logic signed [YW-1:0]   err_i,
  input  logic signed [YW-1:0]   err_q,
  output logic                   eval,
  output snr_state_e             state_i,
  output snr_state_e             state_q,
  output logic [EW+$clog2(L):0]  sum_i,
  output logic [EW+$clog2(L):0]  sum_q
);

  localparam int AW = EW + $clog2(L) + 1;
  localparam real PI = 3.14159265358979;
  localparam real MEAN_ABS_LO =
      $sqrt(2.0 / PI) * $sqrt(5.0 / (10.0 ** (real'(SNR_LO_CDB) / 1000.0)));
  localparam real MEAN_ABS_HI =
      $sqrt(2.0 / PI) * $sqrt(5.0 / (10.0 ** (real'(SNR_HI_CDB) / 1000.0)));
  localparam logic [AW-1:0] TH_DEFICIT =
      AW'(longint'(real'(L) * MEAN_ABS_LO * real'(2 ** SYM_FRAC)));
  localparam logic [AW-1:0] TH_SURPLUS =
      AW'(longint'(real'(L) * MEAN_ABS_HI * real'(2 ** SYM_FRAC)));

  function automatic logic [EW-1:0] abs_clip(input logic signed [YW-1:0] e);
    logic [YW-1:0] m;
    m = e[YW-1] ? YW'(-e) : YW'(e);
    return (m > YW'(2 ** EW - 1)) ? EW'(2 ** EW - 1) : EW'(m);
  endfunction

  function automatic snr_state_e classify(input logic [AW-1:0] s);
    if (s > TH_DEFICIT) return SNR_DEFICIT;
    if (s < TH_SURPLUS) return SNR_SURPLUS;
    return SNR_OK;
  endfunction

  logic [AW-1:0]          acc_i, acc_q;
  logic [$clog2(L)-1:0]   cnt;
  logic [AW-1:0]          nxt_i, nxt_q;

  assign nxt_i = acc_i + AW'(abs_clip(err_i));
  assign nxt_q = acc_q + AW'(abs_clip(err_q));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_i   <= '0;
      acc_q   <= '0;
      cnt     <= '0;
      eval    <= 1'b0;
      sum_i   <= '0;
      sum_q   <= '0;
      state_i <= SNR_OK;
      state_q <= SNR_OK;
    end else begin
      eval <= 1'b0;
      if (sym_en) begin
        if (cnt == $clog2(L)'(L - 1)) begin
          cnt     <= '0;
          acc_i   <= '0;
          acc_q   <= '0;
          sum_i   <= nxt_i;
          sum_q   <= nxt_q;
          state_i <= classify(nxt_i);
          state_q <= classify(nxt_q);
          eval    <= 1'b1;
        end else begin
          cnt   <= cnt + 1'b1;
          acc_i <= nxt_i;
          acc_q <= nxt_q;
        end
      end
    end
  end

endmodule
