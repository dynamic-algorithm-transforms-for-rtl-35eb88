// sma_tap_select: energy-optimum tap selection ("compute optimum alpha_k and
// beta_k") for the two FSLE filters.
//
// The energy-optimum configuration powers down the taps with the smallest
// |w_k|^2 / E_m(w_k) first. Rather than computing the Lagrange threshold,
// taps are powered down one at a time until the SNR lands in its window.
// Each time the error monitor reports (eval), each filter f in {I, Q} acts
// on its own comparator result:
//   SNR_SURPLUS: search the powered-up taps of f for the smallest
//                w^2/E_m(w) (one tap per clock, ratios compared by cross
//                multiplication) and power that tap down; the weight updates
//                stay on so the remaining taps can re-adapt. The last tap is
//                never powered down.
//   SNR_OK:      the filter has converged: all weight updates are powered
//                down (beta = 0).
//   SNR_DEFICIT: if the previous action powered a tap down, that tap is
//                powered up again and the configuration is locked (a later
//                surplus only stops the updates); otherwise, the channel has
//                worsened: all taps and updates are powered up and the lock
//                is cleared.
// beta_k = alpha_k AND (updates of f enabled).
//
// Timing: a search takes N clocks per filter (I first, then Q) after eval;
// busy is high meanwhile. alpha/beta change on single clock edges.
// pd_i/pd_q pulse when a tap is powered down, pu_i/pu_q when taps are
// powered up. The ordering rule and the one-tap-at-a-time search are the
// document's; the undo-and-lock rule on a deficit (to stop the
// configuration from oscillating around the window) is this design's.
module sma_tap_select
  import dat_pkg::*;
#(
  parameter int N = dat_pkg::FF_N
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     eval,
  input  snr_state_e               state_i,
  input  snr_state_e               state_q,
  input  logic signed [FF_BW-1:0]  w_i [N],
  input  logic signed [FF_BW-1:0]  w_q [N],
  output logic [N-1:0]             alpha_i,
  output logic [N-1:0]             alpha_q,
  output logic [N-1:0]             beta_i,
  output logic [N-1:0]             beta_q,
  output logic                     busy,
  output logic                     pd_i,
  output logic                     pd_q,
  output logic                     pu_i,
  output logic                     pu_q
);

  localparam int IW = $clog2(N);
  localparam int MW = 2 * FF_BW + EMW;

  typedef enum logic [1:0] {IDLE, SCAN, APPLY} scan_e;

  logic [N-1:0]  alpha   [2];
  logic          adapt   [2];
  logic          locked  [2];
  logic          last_v  [2];
  logic [IW-1:0] last_ix [2];
  logic          pend    [2];

  scan_e         st;
  logic          sf;          // filter being searched: 0 = I, 1 = Q
  logic [IW-1:0] k;
  logic          best_v;
  logic [IW-1:0] best_ix;
  logic [2*FF_BW-1:0] best_w2;
  logic [EMW-1:0]     best_em;

  // Metric of the tap under inspection.
  logic signed [FF_BW-1:0] wk;
  logic [2*FF_BW-1:0]      wk2;
  logic [EMW-1:0]          emk, emk_nz, best_em_nz;
  logic                    better;

  assign wk = sf ? w_q[k] : w_i[k];
  assign wk2 = (2*FF_BW)'(wk * wk);

  logic [BWW-1:0] n1_unused, n2_unused;
  mult_energy #(.BW_MAX(FF_BW)) u_em (.w(wk), .n1(n1_unused), .n2(n2_unused), .em(emk));

  // A zero coefficient has E_m = 0; treat it as E_m = 1 so that its ratio
  // is 0 and it is chosen first.
  assign emk_nz     = (emk == '0) ? EMW'(1) : emk;
  assign best_em_nz = (best_em == '0) ? EMW'(1) : best_em;
  assign better = !best_v ||
                  (MW'(wk2) * MW'(best_em_nz) < MW'(best_w2) * MW'(emk_nz));

  function automatic int popcount(input logic [N-1:0] v);
    int c = 0;
    for (int b = 0; b < N; b++) c += int'(v[b]);
    return c;
  endfunction

  assign alpha_i = alpha[0];
  assign alpha_q = alpha[1];
  assign beta_i  = alpha[0] & {N{adapt[0]}};
  assign beta_q  = alpha[1] & {N{adapt[1]}};
  assign busy    = (st != IDLE) || pend[0] || pend[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int f = 0; f < 2; f++) begin
        alpha[f]   <= '1;
        adapt[f]   <= 1'b1;
        locked[f]  <= 1'b0;
        last_v[f]  <= 1'b0;
        last_ix[f] <= '0;
        pend[f]    <= 1'b0;
      end
      st      <= IDLE;
      sf      <= 1'b0;
      k       <= '0;
      best_v  <= 1'b0;
      best_ix <= '0;
      best_w2 <= '0;
      best_em <= '0;
      pd_i    <= 1'b0;
      pd_q    <= 1'b0;
      pu_i    <= 1'b0;
      pu_q    <= 1'b0;
    end else begin
      pd_i <= 1'b0;
      pd_q <= 1'b0;
      pu_i <= 1'b0;
      pu_q <= 1'b0;
      case (st)
        IDLE: begin
          if (eval) begin
            for (int f = 0; f < 2; f++) begin
              snr_state_e s;
              s = (f == 0) ? state_i : state_q;
              case (s)
                SNR_OK: adapt[f] <= 1'b0;
                SNR_SURPLUS: begin
                  if (locked[f]) begin
                    adapt[f] <= 1'b0;
                  end else if (popcount(alpha[f]) > 1) begin
                    adapt[f] <= 1'b1;
                    pend[f]  <= 1'b1;
                  end
                end
                default: begin  // SNR_DEFICIT
                  adapt[f] <= 1'b1;
                  if (last_v[f]) begin
                    alpha[f][last_ix[f]] <= 1'b1;
                    last_v[f] <= 1'b0;
                    locked[f] <= 1'b1;
                    if (f == 0) pu_i <= 1'b1; else pu_q <= 1'b1;
                  end else if (alpha[f] != '1) begin
                    alpha[f]  <= '1;
                    locked[f] <= 1'b0;
                    if (f == 0) pu_i <= 1'b1; else pu_q <= 1'b1;
                  end else begin
                    locked[f] <= 1'b0;
                  end
                end
              endcase
            end
          end else if (pend[0] || pend[1]) begin
            sf     <= !pend[0];
            k      <= '0;
            best_v <= 1'b0;
            st     <= SCAN;
          end
        end
        SCAN: begin
          if (alpha[sf][k] && better) begin
            best_v  <= 1'b1;
            best_ix <= k;
            best_w2 <= wk2;
            best_em <= emk;
          end
          if (k == IW'(N - 1)) st <= APPLY;
          else                 k  <= k + 1'b1;
        end
        default: begin  // APPLY
          if (best_v) begin
            alpha[sf][best_ix] <= 1'b0;
            last_v[sf]  <= 1'b1;
            last_ix[sf] <= best_ix;
            if (sf == 1'b0) pd_i <= 1'b1; else pd_q <= 1'b1;
          end
          pend[sf] <= 1'b0;
          st <= IDLE;
        end
      endcase
    end
  end

endmodule
