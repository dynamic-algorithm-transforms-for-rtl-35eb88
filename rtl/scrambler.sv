// scrambler: self-synchronising data scrambler of the CAP transmitter,
// four bits (one 16-CAP symbol) per enabled clock.
//
// Generator 1 + x^-TAP_A + x^-TAP_B (default x^23 + x^18 + 1): each output
// bit is the input bit XOR the scrambled bits sent TAP_A and TAP_B bit times
// earlier. din[3] is the first bit in time. The state leaves reset at SEED
// (non-zero, so that an idle all-zero input is still whitened). Output is registered: dout is
// valid the clock after en. The document names the scrambler but gives no
// polynomial; the one used here is a common choice for DSL links and is
// this design's assumption. The matching descrambler is descrambler.sv.
module scrambler #(
  parameter int TAP_A = 18,
  parameter int TAP_B = 23,
  parameter logic [TAP_B-1:0] SEED = '1   // state after reset
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  logic [3:0] din,
  output logic [3:0] dout
);

  logic [TAP_B-1:0] s;   // s[0] = most recent scrambled bit

  logic [TAP_B-1:0] s_next;
  logic [3:0]       o;

  // Four bit times per symbol, din[3] first.
  always_comb begin
    s_next = s;
    for (int b = 3; b >= 0; b--) begin
      o[b]   = din[b] ^ s_next[TAP_A-1] ^ s_next[TAP_B-1];
      s_next = {s_next[TAP_B-2:0], o[b]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s    <= SEED;
      dout <= '0;
    end else if (en) begin
      s    <= s_next;
      dout <= o;
    end
  end

endmodule
