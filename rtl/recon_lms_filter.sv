// recon_lms_filter: N-tap reconfigurable LMS adaptive filter.
//
// A tapped delay line holds x(n) .. x(n-N+1); a chain of recon_tap
// instances forms y = sum_k alpha_k * w_k * x(n-k+1) (eq. 2.1). The filter
// runs at the sample rate (x_valid) and its output is taken once per symbol:
// on sym_en the sum is registered into y and the delay line is copied into
// a snapshot, which is the data the next weight update pairs with the
// error of that output (eq. 2.2 with a one-symbol update delay).
// The per-tap controls alpha (F-block) and beta (WUD-block) and the active
// coefficient precision bw come from the signal monitoring block.
//
// Timing: y is valid from the clock edge after sym_en until the next sym_en.
// An update (upd_en) is applied on a sym_en edge: give upd_en in the same
// cycle as sym_en, with err derived from the y of the previous symbol.
// load_en/load_idx/load_val preset one coefficient per cycle.
// The structure follows the reconfigurable architecture of the document;
// the snapshot register and the one-symbol update delay are this design's.
module recon_lms_filter
  import dat_pkg::*;
#(
  parameter int N        = dat_pkg::FF_N,
  parameter int BX       = dat_pkg::FF_BX,
  parameter int BW_MAX   = dat_pkg::FF_BW,
  parameter int WW       = dat_pkg::FF_WW,
  parameter int MU_SHIFT = 6
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic signed [BX-1:0]        x_in,
  input  logic                        x_valid,
  input  logic                        sym_en,
  input  logic                        upd_en,
  input  pot_t                        err,
  input  logic [N-1:0]                alpha,
  input  logic [N-1:0]                beta,
  input  logic [BWW-1:0]              bw,
  output logic signed [YW-1:0]        y,
  output logic signed [BW_MAX-1:0]    w_q [N],
  input  logic                        load_en,
  input  logic [$clog2(N)-1:0]        load_idx,
  input  logic signed [WW-1:0]        load_val
);

  logic signed [BX-1:0] dline [N];   // dline[k] = x(n-k)
  logic signed [BX-1:0] xsnap [N];
  logic signed [YW-1:0] acc   [N+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < N; k++) dline[k] <= '0;
    end else if (x_valid) begin
      dline[0] <= x_in;
      for (int k = 1; k < N; k++) dline[k] <= dline[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y <= '0;
      for (int k = 0; k < N; k++) xsnap[k] <= '0;
    end else if (sym_en) begin
      y <= acc[N];
      xsnap <= dline;
    end
  end

  assign acc[0] = '0;

  for (genvar k = 0; k < N; k++) begin : g_tap
    recon_tap #(.BX(BX), .BW_MAX(BW_MAX), .WW(WW), .ACCW(YW), .MU_SHIFT(MU_SHIFT)) u_tap (
      .clk      (clk),
      .rst_n    (rst_n),
      .x        (dline[k]),
      .x_wud    (xsnap[k]),
      .alpha    (alpha[k]),
      .beta     (beta[k]),
      .bw       (bw),
      .upd_en   (upd_en && sym_en),
      .err      (err),
      .acc_in   (acc[k]),
      .acc_out  (acc[k+1]),
      .w_q      (w_q[k]),
      .load_en  (load_en && (load_idx == k)),
      .load_val (load_val)
    );
  end

endmodule
