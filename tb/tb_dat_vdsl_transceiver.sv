// tb_dat_vdsl_transceiver: end-to-end run of the transceiver. The
// transmitter's samples pass through a behavioural channel (echo, noise,
// PGA gain, 8-bit ADC) back into the receiver. The FSLE filters are preset
// to the matched filters of the shaping pulses (a coarse start), then the
// receiver adapts blindly with the reduced constellation, switches to
// 16-CAP, and the monitoring block trims the filters:
//   phase 1  low noise:       surplus SNR -> taps powered down, then
//                             converged (updates off);
//   phase 2  heavy noise:     deficit -> taps powered up again;
//   phase 3  noiseless line:  taps down to few, precision cut to 9 bits.
// Received bits are compared with the transmitted bits (alignment found
// once), and each mechanism is counted; one that never happens is a
// failure. Parameters L and RCA_SYMBOLS are reduced to keep the run short.
module tb_dat_vdsl_transceiver;
  import dat_pkg::*;
  localparam int L = 256, RCA = 8192;

  localparam int unsigned DATA_SEED = 32'h9e3779b9, NOISE_SEED = 32'h2545f491;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [3:0] tx_data, rx_data;
  logic tx_ready, rx_valid, load_en, load_q, sym_valid, rca_mode, sma_eval;
  logic pd_i, pd_q, pu_i, pu_q;
  logic signed [19:0] tx_sample;
  logic signed [7:0] adc_data;
  logic [5:0] pga_gain, load_idx;
  logic signed [15:0] load_val;
  sym_t dec_i, dec_q;
  logic signed [23:0] err_i, err_q;
  logic [47:0] alpha_i, alpha_q, beta_i, beta_q;
  logic [3:0] bw_i, bw_q;
  logic [5:0] n_i, n_q;
  snr_state_e state_i, state_q;
  real noise = 0.0;
  int checks = 0, failures = 0;

  dat_vdsl_transceiver #(.L(L), .RCA_SYMBOLS(RCA)) dut (
    .clk, .rst_n, .tx_data, .tx_valid(1'b1), .tx_ready, .tx_sample,
    .adc_data, .adc_valid(1'b1), .pga_gain, .rx_data, .rx_valid,
    .load_en, .load_q, .load_idx, .load_val, .sym_valid, .dec_i, .dec_q,
    .err_i, .err_q, .rca_mode, .alpha_i, .alpha_q, .beta_i, .beta_q,
    .bw_i, .bw_q, .n_i, .n_q, .sma_eval, .state_i, .state_q,
    .pd_i, .pd_q, .pu_i, .pu_q);

  tb_vdsl_channel #(.DELAY(0), .SCALE(1.0 / 46.0), .SEED(NOISE_SEED)) ch (
    .clk, .valid(1'b1), .tx(tx_sample), .gain(pga_gain), .noise_rms(noise), .adc(adc_data));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // mechanism counters
  int n_rca_switch = 0, n_pd = 0, n_pu = 0, n_conv = 0, n_bw = 0, n_surplus = 0;
  int n_deficit = 0, n_ok = 0, n_pga = 0, n_dfe = 0;
  logic rca_d = 1'b1;
  snr_state_e st [2];
  assign st[0] = state_i;
  assign st[1] = state_q;
  logic [5:0] gain_d = 6'd32;   // the PGA gain code after reset
  always @(posedge clk) if (rst_n) begin
    rca_d <= rca_mode;
    gain_d <= pga_gain;
    if (rca_d && !rca_mode) n_rca_switch++;
    if (pd_i || pd_q) n_pd++;
    if (pu_i || pu_q) n_pu++;
    if (sma_eval) begin
      foreach (st[f])
        case (st[f])
          SNR_SURPLUS: n_surplus++;
          SNR_DEFICIT: n_deficit++;
          default:     n_ok++;
        endcase
    end
    if (sma_eval && beta_i == '0 && !rca_mode) n_conv++;
    if (sma_eval && (bw_i < 4'd10 || bw_q < 4'd10)) n_bw++;
    if (gain_d != pga_gain) n_pga++;
    if (sym_valid && dut.u_rx.z_i != 0) n_dfe++;
  end

  // transmitted / received bit streams
  logic [3:0] txq [$];
  logic [3:0] rxq [$];
  always @(posedge clk) if (rst_n) begin
    if (tx_ready) txq.push_back(tx_data);
    if (rx_valid) rxq.push_back(rx_data);
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // transmit data from a fixed xorshift sequence (independent of the
  // simulator's seed, so every run sees the same data and noise)
  int unsigned data_rng = DATA_SEED;
  always @(negedge clk) if (tx_ready) begin
    data_rng ^= data_rng << 13;
    data_rng ^= data_rng >> 17;
    data_rng ^= data_rng << 5;
    tx_data <= data_rng[7:4];
  end

  // compare the received stream with the transmitted one from rx index lo
  // Blind start-up leaves the constellation with a multiple-of-90-degree
  // phase ambiguity; rot(b, r) is what the receiver delivers for
  // transmitted bits b after a rotation by r * 90 degrees.
  function automatic int lvl(input logic [1:0] g);
    case (g)
      2'b00: return -3;
      2'b01: return -1;
      2'b11: return 1;
      default: return 3;
    endcase
  endfunction
  function automatic logic [1:0] gry(input int a);
    if (a >= 2) return 2'b10;
    if (a >= 0) return 2'b11;
    if (a >= -2) return 2'b01;
    return 2'b00;
  endfunction
  function automatic logic [3:0] rot(input logic [3:0] b, input int r);
    int ar, ai, t;
    ar = lvl(b[3:2]); ai = lvl(b[1:0]);
    for (int k = 0; k < r; k++) begin t = ar; ar = -ai; ai = t; end
    return {gry(ar), gry(ai)};
  endfunction
  int rotation = 0;

  function automatic int bit_errors(input int off, input int lo, input int hi);
    int e = 0;
    for (int i = lo; i < hi && i < rxq.size(); i++)
      if (i - off >= 0 && i - off < txq.size()) e += $countones(rxq[i] ^ rot(txq[i - off], rotation));
    return e;
  endfunction

  task automatic run_symbols(input int n);
    int c = 0;
    while (c < n) begin
      @(negedge clk);
      if (sym_valid) c++;
    end
  endtask

  initial begin : main
    int off, best, e, lo;
    load_en = 0; load_q = 0; load_idx = 0; load_val = 0; tx_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // coarse start: matched filters of the shaping pulses
    for (int f = 0; f < 2; f++)
      for (int k = 0; k < 48; k++) begin
        @(negedge clk);
        load_en = 1; load_q = f[0]; load_idx = 6'(k);
        load_val = 16'(f != 0 ? 4 * int'(dut.u_shape.GI[k]) : -4 * int'(dut.u_shape.GQ[k]));
      end
    @(negedge clk); load_en = 0;
    noise = 0.6;
    run_symbols(RCA + 2 * L);
    check(!rca_mode, "16-CAP mode after the RCA period");
    // alignment of received and transmitted data
    best = 1 << 30; off = 0;
    for (int r = 0; r < 4; r++)
      for (int o = 0; o < 40; o++) begin
        int rsave;
        rsave = rotation; rotation = r;
        e = bit_errors(o, rxq.size() - 400, rxq.size());
        if (e < best) begin best = e; off = o; end
        else rotation = rsave;
      end
    $display("data offset %0d symbols, rotation %0d degrees, %0d bit errors in 400 symbols",
             off, 90 * rotation, best);
    check(best == 0, "error-free data after start-up");
    // phase 1: surplus SNR
    run_symbols(40 * L);
    $display("phase 1: taps I %0d Q %0d, bw %0d/%0d, state %s", n_i, n_q, bw_i, bw_q, state_i.name());
    check(n_i < 48 && n_q < 48, "taps powered down");
    lo = rxq.size();
    // phase 2: heavy noise
    noise = 8.0;
    run_symbols(12 * L);
    $display("phase 2: taps I %0d Q %0d, state %s", n_i, n_q, state_i.name());
    // phase 3: noiseless
    noise = 0.0;
    run_symbols(60 * L);
    $display("phase 3: taps I %0d Q %0d, bw %0d/%0d, state %s", n_i, n_q, bw_i, bw_q, state_i.name());
    e = bit_errors(off, rxq.size() - 20 * L, rxq.size());
    $display("bit errors in the last %0d symbols: %0d", 20 * L, e);
    check(e == 0, "error-free data at the final configuration");
    $display("mechanisms: rca_switch=%0d power_down=%0d power_up=%0d surplus=%0d ok=%0d deficit=%0d converged=%0d bw_cut=%0d pga_steps=%0d dfe_active=%0d",
             n_rca_switch, n_pd, n_pu, n_surplus, n_ok, n_deficit, n_conv, n_bw, n_pga, n_dfe);
    check(n_rca_switch == 1, "RCA to 16-CAP switch");
    check(n_pd > 0, "tap power-down");
    check(n_pu > 0, "tap power-up");
    check(n_surplus > 0 && n_ok > 0 && n_deficit > 0, "all comparator results");
    check(n_conv > 0, "weight updates stopped after convergence");
    check(n_bw > 0, "coefficient precision reduced");
    check(n_pga > 0, "PGA gain steps");
    check(n_dfe > 0, "feedback filter active");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
