// recon_tap: one reconfigurable LMS tap (the "configurable tap" of the
// reconfigurable adaptive filter).
//
// F-block: acc_out = acc_in + w_k * x(n-k+1). When alpha is 0 the
// coefficient input of the multiplier is forced to zero and the adder is
// bypassed (acc_out = acc_in), which is how the tap is powered down in the
// filtering path. The coefficient used by the multiplier is the weight
// register's BW_MAX most significant bits with the LSBs below the active
// precision bw cleared.
//
// WUD-block: on upd_en, w_k <- w_k - 2**-MU_SHIFT * pot(e) * x_wud, where
// pot(e) is the power-of-two approximation of the slicer error, so the
// product is a shift of x_wud. When beta is 0 the register is not written
// (the update path is powered down). The error is taken as
// e = slicer input - decision, hence the minus sign.
//
// Timing: acc_out is combinational in acc_in, x, alpha and the registered
// weight; the weight changes on the clock edge after upd_en. load_en
// overwrites the weight register (coefficient preset) and has priority.
// The alpha/beta gating, the coefficient register and the power-of-two
// error follow the document; the register width WW, the fixed-point scaling
// and the preset port are this design's choices.
module recon_tap
  import dat_pkg::*;
#(
  parameter int BX       = dat_pkg::FF_BX,
  parameter int BW_MAX   = dat_pkg::FF_BW,
  parameter int WW       = dat_pkg::FF_WW,
  parameter int ACCW     = dat_pkg::YW,
  parameter int MU_SHIFT = 6
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [BX-1:0]     x,        // F-block data x(n-k+1)
  input  logic signed [BX-1:0]     x_wud,    // data paired with the error
  input  logic                     alpha,
  input  logic                     beta,
  input  logic [BWW-1:0]           bw,
  input  logic                     upd_en,
  input  pot_t                     err,
  input  logic signed [ACCW-1:0]   acc_in,
  output logic signed [ACCW-1:0]   acc_out,
  output logic signed [BW_MAX-1:0] w_q,
  input  logic                     load_en,
  input  logic signed [WW-1:0]     load_val
);

  // Shift that aligns pot(e)*x (error units 2**-SYM_FRAC of a level, data
  // with BX-1 fraction bits) to the weight register LSB
  // (BW_MAX-3 + WW-BW_MAX fraction bits).
  localparam int DSH = SYM_FRAC + (BX - 1) - (BW_MAX - 3) - (WW - BW_MAX);

  logic signed [WW-1:0] w_reg;
  logic signed [BW_MAX-1:0] coef_f;
  logic signed [BX+BW_MAX-1:0] prod;

  // Clear the BW_MAX-bw least significant coefficient bits.
  logic [BW_MAX-1:0] prec_mask;
  always_comb
    for (int b = 0; b < BW_MAX; b++)
      prec_mask[b] = (b >= BW_MAX - int'(bw));

  assign w_q    = w_reg[WW-1 -: BW_MAX] & prec_mask;
  assign coef_f = alpha ? w_q : '0;
  assign prod   = coef_f * x;
  assign acc_out = alpha ? acc_in + ACCW'(prod) : acc_in;

  // Weight update: shift instead of multiply.
  logic signed [47:0] step;
  logic signed [47:0] w_next;
  always_comb begin
    step = (48'(x_wud) <<< err.exp) >>> (DSH + MU_SHIFT);
    if (err.zero) step = '0;
    w_next = err.neg ? 48'(w_reg) + step : 48'(w_reg) - step;
    if (w_next > 48'(2 ** (WW - 1) - 1)) w_next = 48'(2 ** (WW - 1) - 1);
    if (w_next < -48'(2 ** (WW - 1)))    w_next = -48'(2 ** (WW - 1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                w_reg <= '0;
    else if (load_en)          w_reg <= load_val;
    else if (upd_en && beta)   w_reg <= WW'(w_next);
  end

endmodule
