// dat_pkg: types, sizes and helper functions shared by the DAT-based 16-CAP
// VDSL equalizer.
//
// Number formats (the document gives only the bit counts B_x = 8 and
// B_w = 10 for the feedforward filter and B_x = 3, B_w = 8 for the feedback
// filter; the binary-point positions are this design's choice):
//   * ADC samples x: FF_BX-bit two's complement, 7 fraction bits (range +-1).
//   * FSLE coefficients at full precision: FF_BW bits, 7 fraction bits
//     (range +-4); the weight register keeps FF_WW-FF_BW extra LSBs so that
//     small LMS steps accumulate.
//   * Equalizer outputs, slicer inputs and errors: YW-bit integers in which
//     one constellation unit (the distance from 0 to the level +1) is
//     2**SYM_FRAC.
// Slicer errors reach the weight-update blocks as a power of two
// (sign, exponent), so every weight update is a shift and an add.
package dat_pkg;

  localparam int FF_BX       = 8;     // FSLE data precision (bits)
  localparam int FF_BW   = 10;    // FSLE coefficient precision, worst case
  localparam int FF_WW       = 16;    // FSLE weight register width
  localparam int FF_N     = 48;    // taps per FSLE filter
  localparam int FF_SPS      = 4;     // samples per symbol: 51.84 MS/s / 12.96 Mbaud
  localparam int YW       = 24;    // equalizer output / error width
  localparam int SYM_FRAC = 12;    // log2 of one constellation unit in YW words
  localparam int N_FB     = 10;    // feedback filter taps
  localparam int BW_FB    = 8;     // feedback coefficient precision
  localparam int BX_FB    = 3;     // feedback data precision (decisions)
  localparam int L_SMA    = 4096;  // SMA averaging window (symbols)
  localparam int RCA_SYMS = 32768; // symbols spent in 4-CAP (RCA) mode
  localparam int BWW      = 4;     // width of a precision (B_w) value
  localparam int EMW      = 7;     // width of an energy-model value

  // A 16-CAP level per dimension: -3, -1, +1, +3.
  typedef logic signed [BX_FB-1:0] sym_t;

  // Power-of-two approximation of an error: value = (neg ? -1 : +1) * 2**exp,
  // or 0 when zero is set.
  typedef struct packed {
    logic       zero;
    logic       neg;
    logic [4:0] exp;
  } pot_t;

  // Result of the SMA threshold comparator for one slicer dimension.
  typedef enum logic [1:0] {
    SNR_OK      = 2'd0,  // SNR inside the window: no reconfiguration
    SNR_SURPLUS = 2'd1,  // SNR above the window: taps can be powered down
    SNR_DEFICIT = 2'd2   // SNR below the window: taps must be powered up
  } snr_state_e;

  // Power-of-two approximation of e: the sign of e and the position of the
  // most significant one of |e| (truncation toward zero).
  function automatic pot_t pot_of(input logic signed [YW-1:0] e);
    pot_t        p;
    logic [YW-1:0] mag;
    mag   = e[YW-1] ? YW'(-e) : YW'(e);
    p.zero = (mag == '0);
    p.neg  = e[YW-1];
    p.exp  = '0;
    for (int b = 0; b < YW; b++)
      if (mag[b]) p.exp = 5'(b);
    return p;
  endfunction

endpackage
