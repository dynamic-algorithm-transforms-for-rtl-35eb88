// descrambler: self-synchronising descrambler of the CAP receiver, four bits
// (one 16-CAP symbol) per enabled clock.
//
// Inverse of scrambler.sv: each output bit is the received bit XOR the
// received bits TAP_A and TAP_B bit times earlier (default x^23 + x^18 + 1).
// Because it is fed with received bits only, it locks by itself after TAP_B
// error-free bits and multiplies each bit error by three. din[3] is the
// first bit in time; dout is registered (valid the clock after en). The
// polynomial is this design's assumption; the document only names the block.
module descrambler #(
  parameter int TAP_A = 18,
  parameter int TAP_B = 23
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [3:0] din,
  output logic [3:0] dout
);

  logic [TAP_B-1:0] s;   // s[0] = most recent received bit

  logic [TAP_B-1:0] s_next;
  logic [3:0]       o;

  // Four bit times per symbol, din[3] first.
  always_comb begin
    s_next = s;
    for (int b = 3; b >= 0; b--) begin
      o[b]   = din[b] ^ s_next[TAP_A-1] ^ s_next[TAP_B-1];
      s_next = {s_next[TAP_B-2:0], din[b]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s    <= '0;
      dout <= '0;
    end else if (en) begin
      s    <= s_next;
      dout <= o;
    end
  end

endmodule
