// tb_recon_lms_filter: runs an 8-tap reconfigurable LMS filter on random
// data with random tap enables, precisions and power-of-two errors, against
// a behavioural reference of eqs. (2.1)/(2.2) with the same update timing
// (update on a symbol edge using the data snapshot of the previous symbol).
module tb_recon_lms_filter;
  import dat_pkg::*;
  localparam int N = 8, SPS = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [7:0]  x_in;
  logic               x_valid, sym_en, upd_en, load_en;
  pot_t               err;
  logic [N-1:0]       alpha, beta;
  logic [3:0]         bw;
  logic signed [23:0] y;
  logic signed [9:0]  w_q [N];
  logic [2:0]         load_idx;
  logic signed [15:0] load_val;
  int checks = 0, failures = 0;

  recon_lms_filter #(.N(N), .MU_SHIFT(6)) dut (.*);

  int wr [N];       // reference weight registers
  int dl [N];       // reference delay line
  int sn [N];       // reference snapshot
  int yr;

  function automatic int coef(input int w, input int b);
    int c = (w >>> 6) & ~((1 << (10 - b)) - 1);
    return (c >= 512) ? c - 1024 : c;
  endfunction

  function automatic int floordiv(input longint a, input longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return int'(q);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    x_in = 0; x_valid = 0; sym_en = 0; upd_en = 0; load_en = 0; err = '0;
    alpha = '1; beta = '1; bw = 10; load_idx = 0; load_val = 0;
    foreach (dl[k]) begin dl[k] = 0; sn[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N; k++) begin
      @(negedge clk);
      load_en = 1; load_idx = 3'(k); load_val = 16'($urandom_range(0, 40000) - 20000);
      wr[k] = int'(load_val);
    end
    @(negedge clk); load_en = 0;
    for (int s = 0; s < 400; s++) begin
      for (int p = 0; p < SPS; p++) begin
        @(negedge clk);
        x_valid = 1; x_in = 8'($urandom);
        sym_en = (p == SPS - 1);
        if (sym_en) begin
          upd_en = (s > 0);
          err.zero = ($urandom_range(0, 7) == 0); err.neg = 1'($urandom);
          err.exp = 5'($urandom_range(6, 14));
          if (s % 50 == 10) begin alpha = N'($urandom); beta = N'($urandom); bw = 4'($urandom_range(7, 10)); end
          // reference: output from current delay line, update with old snapshot
          yr = 0;
          for (int k = 0; k < N; k++) if (alpha[k]) yr += coef(wr[k], bw) * dl[k];
          if (upd_en)
            for (int k = 0; k < N; k++) if (beta[k] && !err.zero) begin
              int st;
              st = floordiv(longint'(sn[k]) * (longint'(1) << err.exp), 4096);
              wr[k] = err.neg ? wr[k] + st : wr[k] - st;
              if (wr[k] > 32767) wr[k] = 32767;
              if (wr[k] < -32768) wr[k] = -32768;
            end
          sn = dl;
        end
        for (int k = N - 1; k > 0; k--) dl[k] = dl[k-1];
        dl[0] = int'(x_in);
        @(posedge clk); #1;
        if (sym_en) begin
          check_y: begin
            checks++;
            if (int'(y) != yr) begin failures++; $display("FAIL y s=%0d got %0d exp %0d", s, y, yr); end
          end
          for (int k = 0; k < N; k++) begin
            checks++;
            if (int'(w_q[k]) != coef(wr[k], bw)) begin failures++; $display("FAIL w[%0d] s=%0d got %0d exp %0d e=%p", k, s, w_q[k], coef(wr[k], bw), err); end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
