// tb_cap_shaping_filter: impulse responses of the in-phase and quadrature
// paths against square-root raised-cosine passband pulses computed here in
// an algebraically different form (within one LSB of quantisation), symmetry
// of the two pulses, and superposition for a random 16-CAP symbol stream.
module tb_cap_shaping_filter;
  import dat_pkg::*;
  localparam int SPAN = 48, SPS = 4;
  localparam real PI = 3.14159265358979, A = 0.38;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic x_valid, sym_en;
  sym_t a_r, a_i;
  logic signed [19:0] tx;
  int checks = 0, failures = 0;

  cap_shaping_filter #(.SPAN(SPAN)) dut (.*);

  function automatic real p_alt(input real tau);
    return (4.0 * A / PI) * ($cos((1.0 + A) * PI * tau) +
           $sin((1.0 - A) * PI * tau) / (4.0 * A * tau)) / (1.0 - (4.0 * A * tau) ** 2);
  endfunction

  function automatic real fabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int hi [SPAN], hq [SPAN];
  real ri [SPAN], rq [SPAN];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic impulse(input int r, input int i, output int h [SPAN]);
    @(negedge clk); x_valid = 1; sym_en = 1; a_r = sym_t'(r); a_i = sym_t'(i);
    @(negedge clk); sym_en = 0; a_r = 0; a_i = 0;
    for (int k = 0; k < SPAN; k++) begin
      @(posedge clk); #1; h[k] = int'(tx);
      @(negedge clk);
    end
    repeat (SPAN) @(negedge clk);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    real pk;
    x_valid = 0; sym_en = 0; a_r = 0; a_i = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    impulse(1, 0, hi);
    impulse(0, -1, hq);      // tx = gI*a_r - gQ*a_i, so a_i = -1 gives +gQ
    pk = 0.0;
    for (int k = 0; k < SPAN; k++) begin
      real t;
      t = real'(k) - real'(SPAN - 1) / 2.0;
      ri[k] = p_alt(t / SPS) * $cos(PI * t / 2.0);
      rq[k] = p_alt(t / SPS) * $sin(PI * t / 2.0);
      if (fabs(ri[k]) > pk) pk = fabs(ri[k]);
      if (fabs(rq[k]) > pk) pk = fabs(rq[k]);
    end
    for (int k = 0; k < SPAN; k++) begin
      check(fabs(real'(hi[k]) - ri[k] * 511.0 / pk) <= 1.0, $sformatf("gI[%0d]=%0d", k, hi[k]));
      check(fabs(real'(hq[k]) - rq[k] * 511.0 / pk) <= 1.0, $sformatf("gQ[%0d]=%0d", k, hq[k]));
      check(hi[k] == hi[SPAN-1-k], "gI even");
      check(hq[k] == -hq[SPAN-1-k], "gQ odd");
    end
    // superposition over a random symbol stream
    begin
      int ar [$], ai [$], expv, n;
      n = 0;
      for (int s = 0; s < 60; s++)
        for (int p = 0; p < SPS; p++) begin
          @(negedge clk);
          x_valid = 1; sym_en = (p == 0);
          if (sym_en) begin
            a_r = sym_t'(2 * $urandom_range(0, 3) - 3); a_i = sym_t'(2 * $urandom_range(0, 3) - 3);
          end
          ar.push_front(sym_en ? int'(a_r) : 0); ai.push_front(sym_en ? int'(a_i) : 0);
          @(posedge clk); #1;
          // tx now reflects the line before this sample entered
          expv = 0;
          for (int k = 0; k + 1 < ar.size() && k < SPAN; k++)
            expv += hi[k] * ar[k+1] - hq[k] * ai[k+1];
          if (s > 12) check(int'(tx) == expv, "superposition");
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
