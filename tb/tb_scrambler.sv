// tb_scrambler: scrambler output against a bit-serial reference of the
// x^23 + x^18 + 1 self-synchronising scrambler; scrambler -> descrambler
// returns the data; a descrambler starting from a different state recovers
// the data after 23 bits (self-synchronisation).
module tb_scrambler;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en;
  logic [3:0] din, scr, back, back2;
  int checks = 0, failures = 0;

  scrambler   u_s (.clk, .rst_n, .en, .din, .dout(scr));
  descrambler u_d (.clk, .rst_n, .en, .din(scr), .dout(back));
  descrambler u_d2 (.clk, .rst_n, .en, .din(scr), .dout(back2));

  logic [22:0] ref_s;
  logic [3:0] hist [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    logic [3:0] exp_scr;
    int differs;
    ref_s = '1; en = 0; din = 0; differs = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    u_d2.s = 23'h5a5a5;   // out of step on purpose
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = 1; din = (i < 300) ? 4'h0 : 4'($urandom);
      for (int b = 3; b >= 0; b--) begin
        exp_scr[b] = din[b] ^ ref_s[17] ^ ref_s[22];
        ref_s = {ref_s[21:0], exp_scr[b]};
      end
      hist.push_back(din);
      @(posedge clk); #1;
      checks++;
      if (scr != exp_scr) begin failures++; $display("FAIL scrambler i=%0d", i); end
      if (i < 300 && scr != 0) differs++;
      if (i > 0) begin
        logic [3:0] prev;
        prev = hist[i-1];
        if (i > 8) begin
          checks++;
          if (back != prev) begin failures++; $display("FAIL descrambled i=%0d", i); end
          checks++;
          if (back2 != prev) begin failures++; $display("FAIL self-sync i=%0d", i); end
        end
      end
      en = 0;
      @(negedge clk);
    end
    checks++;
    if (differs < 100) begin failures++; $display("FAIL all-zero input not whitened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
