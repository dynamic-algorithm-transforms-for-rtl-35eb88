# Energy-scalable adaptive equalizer for 51.84 Mb/s VDSL

An adaptive equalizer has to be sized for the worst line it may meet: the
longest cable and the most crosstalk. On most lines it then has far more taps
and coefficient bits than the required slicer SNR calls for. This design
watches the slicer error while it runs and **switches off equalizer taps one
at a time** while the SNR is above a target window, lowering the coefficient
precision as the number of active taps drops. When the line gets worse, it
switches taps back on. Each powered-down tap saves the energy of its multiply
and add and of its weight update. Taps are removed in the order that costs
the least SNR per unit of energy saved.

This technique is known as a *dynamic algorithm transform*. A cheap monitor (the
signal monitoring algorithm, SMA) observes the input statistics and
reconfigures an expensive signal-processing datapath (here, the feed-forward
equalizer).

The RTL contains:

- a digital 16-CAP VDSL transmitter: scrambler, encoder and passband shaping
  filters;
- the receiver: PGA gain control, a fractionally spaced feed-forward equalizer
  with reconfigurable taps, a complex decision-feedback filter, the slicer,
  decoder and descrambler, blind start-up with a reduced constellation, and
  the SMA.

The top module, `dat_vdsl_transceiver`, places the transmitter and the receiver
side by side. The analog parts (DAC, transmit filter, PGA, ADC) and the
sampling-clock recovery stay outside the design. Their signals are ports.

## Signal path

```
 tx_data(4b) -> scrambler -> cap_encoder -> cap_shaping_filter -> tx_sample  (to DAC)

 adc_data(8b) -> fsle (2 x 48 taps, T/4) --y--(-)--> cap_slicer -> cap_decoder -> descrambler -> rx_data
          |                                  ^  z         | dec, err
          +-> pga_control -> pga_gain        |            |
                                        dfe_fb <----------+ (decisions, power-of-two error)
                                 sma <--- err_i, err_q
                                  |  alpha, beta, B_w
                                  +--> fsle
```

- One clock is one 51.84 MHz sample. A symbol (12.96 Mbaud) lasts 4 clocks.
- The transmitter asks for 4 bits with `tx_ready` every 4th clock and produces
  one `tx_sample` each clock.
- The receiver takes one `adc_data` sample each clock.
- The FSLE output is taken once per symbol. After the decoder and descrambler,
  `rx_valid` delivers 4 bits.

The FSLE is a pair of 48-tap filters: in-phase and quadrature, at 4 samples
per symbol, with 8-bit data and 10-bit coefficients. The feedback filter is
a complex 10-tap filter at symbol rate, with 3-bit decisions and 8-bit
coefficients. The SMA reconfigures only the FSLE. The feedback filter is small
enough that trimming it is not worth the effort.

## The reconfigurable tap (`recon_tap`)

Each tap has two 1-bit controls:

- **alpha** gates the filter part. With alpha = 0, a zero goes into the
  multiplier and the adder is bypassed, so the partial sum passes through
  unchanged.
- **beta** gates the weight update. With beta = 0, the weight register holds
  its value.

The weight register is 16 bits wide. Its top 10 bits are the coefficient. The
input `bw` (9 or 10) masks the coefficient's low bits to zero, which is how the
precision is reduced.

The update is sign-LMS with a power-of-two error. The error is replaced by
sign·2^k, where k is the position of its leading one (`dat_pkg::pot_of`). The
step size is 2^-MU_SHIFT. Together these turn the update multiplier into a
barrel shift of the data sample. The sum saturates.

`recon_lms_filter` chains N taps behind a sample delay line. It registers the
output once per symbol and updates all weights with the data vector captured
for that output. This is an LMS with one symbol of update delay. `fsle` holds
two such filters and a free-running symbol-phase counter.

Number formats:

| signal | format |
|---|---|
| ADC sample x | 8 bits, 7 fraction bits |
| FSLE coefficient | 10 bits, 7 fraction bits (range about ±4) |
| y, z, slicer error | 24 bits, 12 fraction bits: one constellation unit = 4096 |

## Choosing which tap to switch off (`sma`, `sma_tap_select`, `mult_energy`)

This is the part that needs the most explanation.

**Energy of a multiplication.** The energy of one multiply with coefficient w
is modelled as proportional to `0.9·N1(w) + 0.1·N2(w)`, where:

- N1 is the number of ones in the two's-complement word (partial products
  that really switch);
- N2 is the span from the lowest set bit to the MSB.

`mult_energy` outputs the integer `9·N1 + N2`.

**SNR monitor.** The SNR is measured indirectly (`sma_err_monitor`).
|e_i| and |e_q| are summed over L = 4096 symbols. At the end of each window,
each sum is compared with two constants:

- **deficit:** the sum is above the level that matches a slicer SNR of 21.5 dB;
- **surplus:** the sum is below the level for 23.5 dB;
- **ok:** otherwise.

The constants assume Gaussian slicer noise. For 16-CAP with signal power 10,
E|e| = sqrt(2/π)·sqrt(5/SNR) per dimension. The 2 dB window keeps the
controller from toggling a tap on and off.

**Tap selection.** `sma_tap_select` runs once per window:

- **Surplus:** in each filter, power down the active tap with the smallest
  w²/E_m(w).
  - The sequential scan takes one tap per clock, 48 clocks per filter, and
    compares ratios by cross-multiplication.
  - A zero coefficient counts as E_m = 1, so it goes first.
  - The filter keeps at least one tap.
  - Removing small, cheap taps first costs the least MSE per unit of energy
    saved.
  - This is not simply trimming the ends of the filter. Taps in the middle of
    the response can go too.
- **Ok:** the filter has converged. All weight updates stop (beta = 0), and
  taps that are off never update.
- **Deficit right after a power-down:** the last tap removed comes back, the
  configuration is locked, and updates resume. A later surplus then only
  stops the updates.
- **Deficit otherwise:** the line has changed, for example a longer cable or
  more crosstalk. All taps power up, updates resume, and the search starts
  again from the full filter.

Each filter follows its own comparator: the in-phase filter follows the
|e_i| sum and the quadrature filter the |e_q| sum.

**Precision rule.** `sma_bw_calc` sets the precision from the number n of
active taps:

```
B_w = B_w,max + ½·log2(n/N)
```

This is one bit less for every 4-fold reduction in length. The log term is
rounded toward zero: B_w = 10 − j, with j the largest integer where n·4^j ≤ 48.
That gives 10 bits for 13–48 taps and 9 bits for 4–12 taps.

## Start-up (`dat_vdsl_rx`, `cap_slicer`)

The equalizer adapts blindly with the reduced-constellation algorithm (RCA).

**RCA phase.** For the first RCA_SYMBOLS = 32768 symbols, the slicer error is
taken against a 4-point constellation at ±2.5 units: e = q − 2.5·sign(q). The
value 2.5 is E[a²]/E|a| for the levels ±1, ±3.

During this phase:

- the feedback filter is frozen;
- the SMA keeps running. The large RCA error reads as a deficit, so all taps
  stay on.

Without the freeze, the feedback filter tends to settle on a useless
solution while decisions are still mostly wrong.

**16-CAP phase.** After the RCA period, the slicer switches to the 16-point
error and the feedback filter starts adapting. The 4-point error is the same
under 90° rotations, so the blind phase can settle with a rotated
constellation.

**Coarse start.** The testbenches avoid the rotation by loading the FSLE with
a coarse solution first: the matched filters of the shaping pulses, through
the `load_*` ports. In a deployed system, the decision rotation would be
resolved by the framing above this layer.

## Transmitter

- **`scrambler` / `descrambler`:** self-synchronising, with polynomial
  1 + x⁻¹⁸ + x⁻²³. They process 4 bits per symbol, MSB first. The descrambler
  locks after 23 bits.
- **`cap_encoder` / `cap_decoder`:** Gray mapping per axis (00→−3, 01→−1,
  11→+1, 10→+3). Bits [3:2] go on the in-phase axis and bits [1:0] on the
  quadrature axis.
- **`cap_shaping_filter`:** square-root raised-cosine pulses with roll-off
  0.38. They are multiplied by cos/sin of a carrier at fs/4 (12.96 MHz), and the
  output is tx = g_I * a_r − g_Q * a_i.
  - The span is 48 samples (12 symbols) and the coefficients are 10 bits.
  - The coefficients are computed at elaboration from the pulse formula.
- **`pga_control`:** compares the mean |x| over 1024 samples with 32 ± 4 ADC
  steps. It moves the 6-bit gain code one step per window.

## Where this design makes its own choices

The architecture, the tap structure, the energy model, the selection order,
the precision rule, the SNR window, L and the sizes follow the method. The
following are choices of this implementation:

- step sizes: 2^-6 for the FSLE and 2^-8 for the feedback filter;
- weight-register widths and number formats;
- the RCA level 2.5;
- the Gaussian link from E|e| to SNR;
- the one-symbol update delay;
- the deficit/lock recovery rule;
- the feedback filter's update, a plain complex sign-LMS. Its datapath uses
  the 3-multiplier strength-reduced complex product;
- the scrambler polynomial and bit mapping;
- the shaping-filter span and coefficient width;
- the PGA loop.

The following are not included:

- **Timing recovery.** The symbol phase is a free-running counter, so the
  receiver assumes a correctly timed ADC clock.
- **DAC, transmit filter, PGA and ADC.** These are analog parts and appear as
  ports.

## Parameters

| module | parameter | default |
|---|---|---|
| `fsle`, `recon_lms_filter`, `sma*` | N (taps per FSLE filter) | 48 |
| `recon_tap` | BX / BW_MAX / WW | 8 / 10 / 16 |
| `dfe_fb` | NT / BWF | 10 / 8 |
| `sma_err_monitor` | L, SNR window (centi-dB) | 4096, 2150–2350 |
| `dat_vdsl_rx` | RCA_SYMBOLS | 32768 |
| `cap_shaping_filter` | SPAN / CW | 48 / 10 |

The shared constants and types are in `rtl/dat_pkg.sv`:

- `pot_t`, the power-of-two error;
- `snr_state_e`;
- `sym_t`, a 3-bit CAP level.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. To run one with Verilator:

```
verilator --binary --timing -Irtl -Itb rtl/dat_pkg.sv rtl/*.sv \
    tb/tb_vdsl_channel.sv tb/tb_dat_vdsl_full.sv --top tb_dat_vdsl_full
./obj_dir/Vtb_dat_vdsl_full
```

For other testbenches, replace the last file and the `--top` name. Only the two
system-level testbenches need `tb/tb_vdsl_channel.sv`.

`tb_vdsl_channel` is a behavioural line model. It scales the transmit samples
and adds a short echo and Gaussian noise of settable level. It then applies the
PGA gain and quantises to the 8-bit ADC.

**`tb_dat_vdsl_transceiver`** runs the whole loop with L = 256 and an
8192-symbol RCA period:

1. Coarse start, blind start-up, and the switch to 16-CAP. The channel level
   is below the PGA target, so the gain loop takes a few steps.
2. Low noise: taps are powered down until the SNR is inside the window, and
   the updates stop.
3. Heavy noise: the deficit brings all taps back.
4. A quiet line: the filters end at a few taps with 9-bit coefficients.

The testbench checks the received bits against the transmitted bits. It finds
the delay once, and also allows for the 90° ambiguity of blind start-up. It
counts each mechanism (mode switch, power-down, power-up, each comparator
result, update stop, precision cut, PGA steps, feedback filter activity), and
a mechanism that never occurs is a failure.

**`tb_dat_vdsl_full`** runs the same sequence with every parameter at its
default (L = 4096, 32768 RCA symbols), about 500 000 symbols. It ends with the
noise raised step by step until the comparator reports an SNR inside the
window. It takes a few seconds with Verilator.

**Fixed random sequences.** The transmit data and the channel noise come from
fixed xorshift sequences in the testbench, so every run is the same
whatever seed the simulator uses. This matters for the reduced-size run. With
other data and noise sequences, the blind start-up with the shorter RCA period
failed to reach a usable equalizer in about one run in eight (1 of 8 seeds
tried). The receiver has no detector for a failed start-up and no restart.

In these runs, the filters settle at 4–8 taps of 48 with 9-bit coefficients on
a clean line. This is the behaviour expected for short loops.
