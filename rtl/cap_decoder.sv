// cap_decoder: maps a 16-CAP decision (dec_i, dec_q in {-3,-1,+1,+3}) back
// to four bits, inverse of cap_encoder: per dimension -3 -> 00, -1 -> 01,
// +1 -> 11, +3 -> 10, in-phase bits in [3:2]. Combinational. The bit
// assignment is this design's choice; the document only names the decoder.
module cap_decoder
  import dat_pkg::*;
(
  input  sym_t       dec_i,
  input  sym_t       dec_q,
  output logic [3:0] bits
);

  function automatic logic [1:0] gray(input sym_t a);
    if (a >= sym_t'(2))  return 2'b10;
    if (a >= sym_t'(0))  return 2'b11;
    if (a >= sym_t'(-2)) return 2'b01;
    return 2'b00;
  endfunction

  assign bits = {gray(dec_i), gray(dec_q)};

endmodule
