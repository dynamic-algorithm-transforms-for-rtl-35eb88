// tb_mult_energy: exhaustive check of the multiplier energy model over all
// 10-bit coefficients: N1 (non-zero bits), N2 (eq. 2.7 evaluated literally
// as B_w minus a sum of products over the bits) and em = 9*N1 + N2.
module tb_mult_energy;
  import dat_pkg::*;
  logic signed [9:0] w;
  logic [3:0] n1, n2;
  logic [6:0] em;
  int checks = 0, failures = 0;

  mult_energy dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int r1, r2, prod;
    for (int v = 0; v < 1024; v++) begin
      w = 10'(v);
      #1;
      r1 = 0;
      for (int j = 0; j < 10; j++) r1 += (v >> j) & 1;
      // eq. (2.7): bit j = 0 is the MSB, j = 9 the LSB
      r2 = 10;
      for (int j = 0; j < 10; j++) begin
        prod = 1;
        for (int i = j; i < 10; i++) prod *= 1 - ((v >> (9 - i)) & 1);
        r2 -= prod;
      end
      checks += 3;
      if (int'(n1) != r1) begin failures++; $display("FAIL n1 w=%0d", v); end
      if (int'(n2) != r2) begin failures++; $display("FAIL n2 w=%0d", v); end
      if (int'(em) != 9 * r1 + r2) begin failures++; $display("FAIL em w=%0d", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
