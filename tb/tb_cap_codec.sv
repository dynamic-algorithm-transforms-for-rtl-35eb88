// tb_cap_codec: the 16 four-bit words map onto 16 distinct points of the
// square constellation with levels +-1, +-3, neighbouring levels differ in
// one bit (Gray), and the decoder inverts the encoder.
module tb_cap_codec;
  import dat_pkg::*;
  logic [3:0] bits, back;
  sym_t a_r, a_i;
  int checks = 0, failures = 0;

  cap_encoder enc (.bits, .a_r, .a_i);
  cap_decoder dec (.dec_i(a_r), .dec_q(a_i), .bits(back));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : main
    int seen [16];
    int code_of [int];
    foreach (seen[i]) seen[i] = 0;
    for (int v = 0; v < 16; v++) begin
      bits = 4'(v);
      #1;
      check(a_r inside {-3, -1, 1, 3} && a_i inside {-3, -1, 1, 3}, "levels");
      seen[(int'(a_r) + 3) / 2 * 4 + (int'(a_i) + 3) / 2]++;
      check(back == bits, "decoder inverts encoder");
      code_of[int'(a_r) * 10 + int'(a_i)] = v;
    end
    foreach (seen[i]) check(seen[i] == 1, "each point used once");
    // horizontally and vertically adjacent points differ in one bit
    for (int r = -3; r <= 1; r += 2)
      for (int i = -3; i <= 3; i += 2) begin
        check($countones(4'(code_of[r * 10 + i] ^ code_of[(r + 2) * 10 + i])) == 1, "gray I");
        check($countones(4'(code_of[i * 10 + r] ^ code_of[i * 10 + r + 2])) == 1, "gray Q");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
