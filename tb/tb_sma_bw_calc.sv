// tb_sma_bw_calc: B_w for every count of powered-up taps (random placement)
// against B_w,max + 0.5*log2(n/N) rounded toward B_w,max, and against the
// (taps, B_w) pairs of the document's converged configurations.
module tb_sma_bw_calc;
  import dat_pkg::*;
  logic [47:0] alpha;
  logic [3:0] bw;
  logic [5:0] n_active;
  int checks = 0, failures = 0;

  sma_bw_calc dut (.*);

  function automatic logic [47:0] with_ones(input int n);
    logic [47:0] a = '0;
    int placed = 0;
    while (placed < n) begin
      int b = $urandom_range(0, 47);
      if (!a[b]) begin a[b] = 1'b1; placed++; end
    end
    return a;
  endfunction

  int tab_n [19] = '{48, 16, 10, 12, 14, 8, 27, 13, 9, 11, 7, 6, 15, 17, 23, 41, 42, 44, 45};
  int tab_b [19] = '{10, 10, 9, 9, 10, 9, 10, 10, 9, 9, 9, 9, 10, 10, 10, 10, 10, 10, 10};

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int ref_bw;
    for (int n = 1; n <= 48; n++) begin
      alpha = with_ones(n);
      #1;
      ref_bw = 10 + int'($ceil(0.5 * $ln(real'(n) / 48.0) / $ln(2.0) - 1e-9));
      checks += 2;
      if (int'(bw) != ref_bw) begin failures++; $display("FAIL bw n=%0d got %0d exp %0d", n, bw, ref_bw); end
      if (int'(n_active) != n) begin failures++; $display("FAIL n n=%0d", n); end
    end
    for (int t = 0; t < 19; t++) begin
      alpha = with_ones(tab_n[t]);
      #1;
      checks++;
      if (int'(bw) != tab_b[t]) begin failures++; $display("FAIL table n=%0d", tab_n[t]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
