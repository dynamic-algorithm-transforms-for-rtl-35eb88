// tb_dfe_fb: checks the complex feedback filter against a reference that
// uses the plain four-multiplication complex product, and checks the
// complex LMS update b += 2^-MU e conj(a) with power-of-two errors.
module tb_dfe_fb;
  import dat_pkg::*;
  localparam int NT = 10;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic sym_en, upd_en;
  sym_t dec_i, dec_q;
  pot_t err_i, err_q;
  logic signed [23:0] z_i, z_q;
  int checks = 0, failures = 0;

  dfe_fb #(.MU_SHIFT(8)) dut (.*);

  int hr [NT], hq [NT];   // decision history
  int br [NT], bi [NT];   // reference registers (14 bits)
  int zr, zq;

  function automatic sym_t rnd_level();
    int v = 2 * $urandom_range(0, 3) - 3;
    return sym_t'(v);
  endfunction

  function automatic int pv(input pot_t e, input int a);
    // a * e / 2^MU in register units: register LSB is half an output unit
    longint t;
    if (e.zero) return 0;
    t = longint'(a) * (longint'(1) << e.exp) * 2;
    t = (t >= 0) ? t / 256 : -((-t + 255) / 256);
    return e.neg ? -int'(t) : int'(t);
  endfunction

  function automatic int sat(input int v);
    if (v > 8191) return 8191;
    if (v < -8192) return -8192;
    return v;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    sym_en = 0; upd_en = 0; dec_i = 1; dec_q = 1; err_i = '0; err_q = '0;
    foreach (hr[k]) begin hr[k] = 0; hq[k] = 0; br[k] = 0; bi[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int s = 0; s < 600; s++) begin
      @(negedge clk);
      sym_en = 1; upd_en = (s % 7 != 3);
      dec_i = rnd_level(); dec_q = rnd_level();
      err_i.zero = ($urandom_range(0, 9) == 0); err_i.neg = 1'($urandom); err_i.exp = 5'($urandom_range(6, 13));
      err_q.zero = ($urandom_range(0, 9) == 0); err_q.neg = 1'($urandom); err_q.exp = 5'($urandom_range(6, 13));
      // reference output before the edge
      zr = 0; zq = 0;
      for (int k = 0; k < NT; k++) begin
        int cr, ci;
        cr = br[k] >>> 6; ci = bi[k] >>> 6;
        zr += (cr * hr[k] - ci * hq[k]) * 32;
        zq += (cr * hq[k] + ci * hr[k]) * 32;
      end
      #1;
      if (s > 0) begin
        checks += 2;
        if (int'(z_i) != zr || int'(z_q) != zq) begin
          failures++; $display("FAIL z s=%0d got %0d,%0d exp %0d,%0d", s, z_i, z_q, zr, zq);
        end
      end
      if (upd_en)
        for (int k = 0; k < NT; k++) begin
          int nr, ni;
          nr = sat(br[k] + pv(err_i, hr[k]) + pv(err_q, hq[k]));
          ni = sat(bi[k] + pv(err_q, hr[k]) - pv(err_i, hq[k]));
          br[k] = nr; bi[k] = ni;
        end
      for (int k = NT - 1; k > 0; k--) begin hr[k] = hr[k-1]; hq[k] = hq[k-1]; end
      hr[0] = int'(dec_i); hq[0] = int'(dec_q);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
