// tb_sma_err_monitor: with L = 16, windows of errors of chosen size must
// produce one eval per 16 symbols, exact sums of |e| (with clipping), and the
// surplus / ok / deficit classification for the 21.5-23.5 dB window.
module tb_sma_err_monitor;
  import dat_pkg::*;
  localparam int L = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sym_en, eval;
  logic signed [23:0] err_i, err_q;
  snr_state_e state_i, state_q;
  logic [20:0] sum_i, sum_q;
  int checks = 0, failures = 0;

  sma_err_monitor #(.L(L)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // mean |e| per symbol, in 2^-12 units, at a given SNR (Gaussian error)
  function automatic real mean_abs(input real snr_db);
    return $sqrt(2.0 / 3.14159265358979) * $sqrt(5.0 * $exp(-snr_db / 10.0 * $ln(10.0))) * 4096.0;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int mi, mq, si, sq, evals, gap;
    real lo, hi;
    lo = mean_abs(23.5) * L;   // below: surplus
    hi = mean_abs(21.5) * L;   // above: deficit
    sym_en = 0; err_i = 0; err_q = 0; evals = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < 40; w++) begin
      mi = (w % 4 == 0) ? 150 : (w % 4 == 1) ? 550 : (w % 4 == 2) ? 1500 : 200000;
      mq = (w % 3 == 0) ? 560 : (w % 3 == 1) ? 100 : 900;
      si = 0; sq = 0;
      for (int s = 0; s < L; s++) begin
        int vi, vq;
        vi = mi + $urandom_range(0, 40) - 20;
        vq = mq + $urandom_range(0, 40) - 20;
        si += (vi > 65535) ? 65535 : vi;
        sq += vq;
        gap = $urandom_range(0, 3);
        repeat (gap) begin
          @(negedge clk); sym_en = 0;
          @(posedge clk); #1; check(!eval, "no eval between symbols");
        end
        @(negedge clk);
        sym_en = 1;
        err_i = ($urandom_range(0, 1) == 1) ? 24'(vi) : -24'(vi);
        err_q = ($urandom_range(0, 1) == 1) ? 24'(vq) : -24'(vq);
        @(negedge clk); sym_en = 0;
        #1;
        if (s == L - 1) begin
          evals++;
          check(eval, "eval after L symbols");
          check(int'(sum_i) == si && int'(sum_q) == sq, "sums");
          check(state_i == (real'(si) > hi ? SNR_DEFICIT : real'(si) < lo ? SNR_SURPLUS : SNR_OK), "state_i");
          check(state_q == (real'(sq) > hi ? SNR_DEFICIT : real'(sq) < lo ? SNR_SURPLUS : SNR_OK), "state_q");
        end else check(!eval, "no early eval");
      end
    end
    check(evals == 40, "eval count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
