// tb_sma_tap_select: with N = 8 and fixed coefficients, a sequence of
// comparator results must power taps down in increasing order of
// w^2/E_m(w) (reference computed here in floating point), undo and lock on
// a deficit after a power-down, restore all taps on a later deficit, never
// power down the last tap, and clear beta for converged or idle taps.
module tb_sma_tap_select;
  import dat_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic eval, busy, pd_i, pd_q, pu_i, pu_q;
  snr_state_e state_i, state_q;
  logic signed [9:0] w_i [N];
  logic signed [9:0] w_q [N];
  logic [N-1:0] alpha_i, alpha_q, beta_i, beta_q;
  int checks = 0, failures = 0;
  int npd = 0, npu = 0;

  sma_tap_select #(.N(N)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (pd_i || pd_q) npd++;
    if (pu_i || pu_q) npu++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real ratio(input int w);
    int n1, tz, e;
    logic [9:0] b;
    b = 10'(w);
    n1 = $countones(b);
    tz = 10;
    for (int j = 9; j >= 0; j--) if (b[j]) tz = j;
    e = 9 * n1 + (10 - tz);
    if (e == 0) return 0.0;
    return real'(w * w) / real'(e);
  endfunction

  // index of the powered-up tap with the smallest ratio
  function automatic int argmin(input logic [N-1:0] a, input bit q);
    int best = -1;
    for (int k = 0; k < N; k++)
      if (a[k] && (best < 0 || ratio(q ? w_q[k] : w_i[k]) < ratio(q ? w_q[best] : w_i[best])))
        best = k;
    return best;
  endfunction

  task automatic step(input snr_state_e si, input snr_state_e sq);
    int cyc;
    @(negedge clk); eval = 1; state_i = si; state_q = sq;
    @(negedge clk); eval = 0;
    cyc = 0;
    while (busy) begin @(negedge clk); cyc++; end
    check(cyc <= 2 * N + 4, "search time");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [N-1:0] a0, a1;
    int m, m2;
    eval = 0; state_i = SNR_OK; state_q = SNR_OK;
    w_i = '{10'sd3, -10'sd200, 10'sd64, 10'sd5, -10'sd7, 10'sd300, 10'sd0, -10'sd96};
    w_q = '{10'sd100, 10'sd99, -10'sd40, 10'sd1, 10'sd250, -10'sd2, 10'sd17, 10'sd128};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(alpha_i == '1 && alpha_q == '1 && beta_i == '1 && beta_q == '1, "reset: all powered up");
    // surplus on I, converged on Q
    m = argmin(alpha_i, 0);
    step(SNR_SURPLUS, SNR_OK);
    check(alpha_i == ~(N'(1) << m), $sformatf("first power-down (tap %0d)", m));
    check(beta_i == alpha_i, "I updates on for active taps");
    check(alpha_q == '1 && beta_q == '0, "Q converged: updates off");
    m2 = argmin(alpha_i, 0);
    step(SNR_SURPLUS, SNR_OK);
    check(alpha_i == ~((N'(1) << m) | (N'(1) << m2)), "second power-down");
    // deficit: undo the last one and lock
    step(SNR_DEFICIT, SNR_OK);
    check(alpha_i == ~(N'(1) << m), "deficit restores the last tap");
    step(SNR_SURPLUS, SNR_OK);
    check(alpha_i == ~(N'(1) << m), "locked: no further power-down");
    check(beta_i == '0, "locked surplus: updates off");
    step(SNR_OK, SNR_OK);
    check(beta_i == '0, "ok: updates off");
    // the channel worsens: all taps back
    step(SNR_DEFICIT, SNR_OK);
    check(alpha_i == '1 && beta_i == '1, "deficit without a pending undo: all taps on");
    // Q: power down until one tap is left, in ratio order
    for (int r = 0; r < N + 2; r++) begin
      a0 = alpha_q;
      m = argmin(alpha_q, 1);
      step(SNR_OK, SNR_SURPLUS);
      if ($countones(a0) > 1) check(alpha_q == (a0 & ~(N'(1) << m)), $sformatf("Q order step %0d", r));
      else                    check(alpha_q == a0, "last tap kept");
      check(beta_q == alpha_q, "Q beta follows alpha while searching");
    end
    check($countones(alpha_q) == 1, "one tap left");
    check(npd == 2 + N - 1 && npu == 2, $sformatf("event counts pd=%0d pu=%0d", npd, npu));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
