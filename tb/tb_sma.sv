// tb_sma: the monitoring block in a closed loop with a behavioural
// equalizer whose slicer error grows as taps are powered down
// (mean |e| = base + slope * powered-down taps). With N = 8 and L = 16 it
// must power taps down until the SNR enters its window and then stop the
// weight updates; on a worse channel restore taps; with a clean channel go
// down to one tap and cut the coefficient precision to 9 bits.
module tb_sma;
  import dat_pkg::*;
  localparam int N = 8, L = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sym_en, eval, busy, pd_i, pd_q, pu_i, pu_q;
  logic signed [23:0] err_i, err_q;
  logic signed [9:0] w_i [N];
  logic signed [9:0] w_q [N];
  logic [N-1:0] alpha_i, alpha_q, beta_i, beta_q;
  logic [3:0] bw_i, bw_q;
  logic [3:0] n_i, n_q;
  snr_state_e state_i, state_q;
  int checks = 0, failures = 0;

  sma #(.N(N), .L(L)) dut (.*);

  int base, slope = 120;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_windows(input int nw);
    for (int s = 0; s < nw * L; s++) begin
      int mi, mq;
      mi = base + slope * (N - $countones(alpha_i)) + $urandom_range(0, 20) - 10;
      mq = base + slope * (N - $countones(alpha_q)) + $urandom_range(0, 20) - 10;
      @(negedge clk);
      sym_en = 1;
      err_i = 1'($urandom) ? 24'(mi) : -24'(mi);
      err_q = 1'($urandom) ? 24'(mq) : -24'(mq);
      @(negedge clk);
      sym_en = 0;
      repeat (5) @(negedge clk);   // 2N+4 clocks of search fit in a window
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    sym_en = 0; err_i = 0; err_q = 0;
    w_i = '{10'sd3, -10'sd200, 10'sd64, 10'sd5, -10'sd7, 10'sd300, 10'sd1, -10'sd96};
    w_q = '{10'sd100, 10'sd99, -10'sd40, 10'sd1, 10'sd250, -10'sd2, 10'sd17, 10'sd128};
    repeat (2) @(posedge clk);
    rst_n = 1;
    // base 200: 8 taps -> 200 (surplus), 7 -> 320, 6 -> 440 (surplus),
    // 5 -> 560 (inside the window, 488..615 per symbol)
    base = 200;
    run_windows(8);
    check(n_i == 5 && n_q == 5, $sformatf("settled at 5 taps (I %0d, Q %0d)", n_i, n_q));
    check(state_i == SNR_OK && beta_i == '0 && beta_q == '0, "converged: updates off");
    check(bw_i == 4'd10, "10-bit coefficients at 5 of 8 taps");
    check(!dut.u_sel.adapt[0], "adapt off");
    // worse channel
    base = 700;
    run_windows(3);
    check(n_i == N && n_q == N, "worse channel: all taps restored");
    check(beta_i == '1, "updates back on");
    // clean channel
    base = 0; slope = 40;
    run_windows(12);
    check(n_i == 1 && n_q == 1, $sformatf("clean channel: one tap left (%0d)", n_i));
    check(bw_i == 4'd9 && bw_q == 4'd9, "precision reduced to 9 bits");
    check(alpha_i[5] == 1'b1, "largest-ratio tap of I kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
