// tb_recon_tap: checks one reconfigurable LMS tap against integer reference
// arithmetic: F-block product and bypass (alpha), precision masking (bw),
// shift-based weight update and its gating (beta), preset and saturation.
module tb_recon_tap;
  import dat_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic signed [7:0]  x, x_wud;
  logic               alpha, beta, upd_en, load_en;
  logic [3:0]         bw;
  pot_t               err;
  logic signed [23:0] acc_in, acc_out;
  logic signed [9:0]  w_q;
  logic signed [15:0] load_val;
  int checks = 0, failures = 0;

  recon_tap #(.MU_SHIFT(6)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic int floordiv(input longint a, input longint b);
    longint q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return int'(q);
  endfunction

  longint stp, nw;
  int w_ref;   // reference weight register
  int mask_ref;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = 0; x_wud = 0; alpha = 1; beta = 1; upd_en = 0; load_en = 0; bw = 10;
    err = '{zero: 1'b1, neg: 1'b0, exp: 5'd0}; acc_in = 0; load_val = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(w_q == 0, "reset weight");
    // Preset and F-block checks with random data.
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      load_en = 1; load_val = 16'($urandom); w_ref = int'(load_val);
      @(negedge clk);
      load_en = 0;
      x = 8'($urandom); acc_in = 24'($urandom_range(0, 200000)) - 24'd100000;
      alpha = ($urandom_range(0, 3) != 0);
      bw = 4'($urandom_range(7, 10));
      #1;
      mask_ref = (w_ref >>> 6) & ~((1 << (10 - bw)) - 1);
      if (mask_ref >= 512) mask_ref -= 1024;
      check(int'(w_q) == mask_ref, $sformatf("precision mask w=%0d bw=%0d", w_ref, bw));
      if (alpha) check(int'(acc_out) == int'(acc_in) + mask_ref * int'(x), "F-block sum");
      else       check(acc_out == acc_in, "F-block bypass");
    end
    // Weight update checks.
    bw = 10;
    @(negedge clk); load_en = 1; load_val = 16'sd1000; w_ref = 1000;
    @(negedge clk); load_en = 0;
    for (int i = 0; i < 400; i++) begin
      x_wud = 8'($urandom);
      err.zero = ($urandom_range(0, 9) == 0);
      err.neg  = 1'($urandom);
      err.exp  = 5'($urandom_range(0, 16));
      beta = ($urandom_range(0, 4) != 0);
      upd_en = ($urandom_range(0, 4) != 0);
      stp = err.zero ? 0 : floordiv(longint'(x_wud) * (longint'(1) << err.exp), 4096);
      nw = err.neg ? w_ref + stp : w_ref - stp;
      if (nw > 32767) nw = 32767;
      if (nw < -32768) nw = -32768;
      if (beta && upd_en) w_ref = int'(nw);
      @(negedge clk);
      check(int'(dut.w_reg) == w_ref, $sformatf("update i=%0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
