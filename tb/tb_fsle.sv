// tb_fsle: checks the FSLE pair: symbol tick once every 4 valid samples
// (also with gaps in the sample stream), separate in-phase and quadrature
// filters sharing one input stream, and per-filter updates.
module tb_fsle;
  import dat_pkg::*;
  localparam int N = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [7:0] x_in;
  logic x_valid, sym_tick, upd_en, load_en, load_q;
  pot_t err_i, err_q;
  logic [N-1:0] alpha_i, alpha_q, beta_i, beta_q;
  logic [3:0] bw_i, bw_q;
  logic signed [23:0] y_i, y_q;
  logic signed [9:0] w_i [N];
  logic signed [9:0] w_q [N];
  logic [2:0] load_idx;
  logic signed [15:0] load_val;
  int checks = 0, failures = 0;

  fsle #(.N(N)) dut (.*);

  int wi [N], wq [N], dl [N];
  int nval, nticks, yi_r, yq_r;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    x_in = 0; x_valid = 0; upd_en = 0; load_en = 0; load_q = 0; err_i = '0; err_q = '0;
    err_i.zero = 1; err_q.zero = 1;
    alpha_i = '1; alpha_q = '1; beta_i = '1; beta_q = '1; bw_i = 10; bw_q = 10;
    load_idx = 0; load_val = 0;
    foreach (dl[k]) dl[k] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 2; f++)
      for (int k = 0; k < N; k++) begin
        @(negedge clk);
        load_en = 1; load_q = f[0]; load_idx = 3'(k);
        load_val = 16'($urandom_range(0, 30000) - 15000);
        if (f == 0) wi[k] = int'(load_val) >>> 6; else wq[k] = int'(load_val) >>> 6;
      end
    @(negedge clk); load_en = 0;
    nval = 0; nticks = 0;
    for (int c = 0; c < 600; c++) begin
      @(negedge clk);
      x_valid = ($urandom_range(0, 3) != 0);
      x_in = 8'($urandom);
      #1;
      if (x_valid) begin
        check(sym_tick == ((nval % 4) == 3), "tick cadence");
        if (sym_tick) begin
          yi_r = 0; yq_r = 0;
          for (int k = 0; k < N; k++) begin yi_r += wi[k] * dl[k]; yq_r += wq[k] * dl[k]; end
          nticks++;
        end
        for (int k = N - 1; k > 0; k--) dl[k] = dl[k-1];
        dl[0] = int'(x_in);
        nval++;
      end else check(!sym_tick, "no tick without sample");
      @(posedge clk); #1;
      if (x_valid && (nval % 4) == 0) begin
        check(int'(y_i) == yi_r, "y_i");
        check(int'(y_q) == yq_r, "y_q");
      end
    end
    check(nticks == nval / 4, "tick count");
    // An update on the quadrature filter only.
    @(negedge clk);
    x_valid = 1; upd_en = 1; err_q = '{zero: 1'b0, neg: 1'b1, exp: 5'd14};
    while (!sym_tick) begin @(negedge clk); end
    @(negedge clk); upd_en = 0; x_valid = 0;
    begin
      int same_i, diff_q;
      same_i = 1; diff_q = 0;
      for (int k = 0; k < N; k++) begin
        if (int'(w_i[k]) != wi[k]) same_i = 0;
        if (int'(w_q[k]) != wq[k]) diff_q = 1;
      end
      check(same_i == 1, "in-phase weights untouched");
      check(diff_q == 1, "quadrature weights updated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
