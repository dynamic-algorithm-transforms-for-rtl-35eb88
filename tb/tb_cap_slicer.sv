// tb_cap_slicer: random slicer inputs in both modes; decisions against the
// nearest-level rule computed by distance, errors against q - reference.
module tb_cap_slicer;
  import dat_pkg::*;
  logic signed [23:0] q_i, q_q, err_i, err_q;
  logic rca_mode;
  sym_t dec_i, dec_q;
  int checks = 0, failures = 0;

  cap_slicer dut (.*);

  function automatic int nearest(input int q);
    int best = -3;
    for (int l = -3; l <= 3; l += 2)
      if ((q - l * 4096) * (q - l * 4096) < (q - best * 4096) * (q - best * 4096) ||
          ((q - l * 4096) == -(q - best * 4096) && l > best)) best = l;
    return best;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int qi, qq, di, dq, ri, rq;
    for (int i = 0; i < 4000; i++) begin
      qi = $urandom_range(0, 40000) - 20000;
      qq = $urandom_range(0, 40000) - 20000;
      if (i < 8) begin qi = (i - 4) * 4096; qq = -qi; end   // thresholds and levels
      rca_mode = 1'(i % 2);
      q_i = 24'(qi); q_q = 24'(qq);
      #1;
      di = nearest(qi); dq = nearest(qq);
      ri = rca_mode ? (qi < 0 ? -10240 : 10240) : di * 4096;
      rq = rca_mode ? (qq < 0 ? -10240 : 10240) : dq * 4096;
      checks += 4;
      if (int'(dec_i) != di) begin failures++; $display("FAIL dec_i q=%0d", qi); end
      if (int'(dec_q) != dq) begin failures++; $display("FAIL dec_q q=%0d", qq); end
      if (int'(err_i) != qi - ri) begin failures++; $display("FAIL err_i q=%0d", qi); end
      if (int'(err_q) != qq - rq) begin failures++; $display("FAIL err_q q=%0d", qq); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
