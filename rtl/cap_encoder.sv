// cap_encoder: maps four bits onto one 16-CAP symbol a = a_r + j a_i with
// levels -3, -1, +1, +3 per dimension (the square 16-point constellation).
// bits[3:2] select a_r and bits[1:0] select a_i, each with the Gray code
// 00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3, so neighbouring levels differ in
// one bit. Combinational. The constellation is the document's; the bit
// assignment is this design's choice (cap_decoder.sv is its inverse).
module cap_encoder
  import dat_pkg::*;
(
  input  logic [3:0] bits,
  output sym_t       a_r,
  output sym_t       a_i
);

  function automatic sym_t level(input logic [1:0] g);
    case (g)
      2'b00:   return sym_t'(-3);
      2'b01:   return sym_t'(-1);
      2'b11:   return sym_t'(1);
      default: return sym_t'(3);
    endcase
  endfunction

  assign a_r = level(bits[3:2]);
  assign a_i = level(bits[1:0]);

endmodule
