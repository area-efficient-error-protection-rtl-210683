// secded_enc: SECDED check-byte generator for one 64-bit word.
//
// Produces the 8 check bits the ECC array keeps for each word of a dirty line
// (8 bits per 64 data bits, as the document states for SECDED). The code is an
// extended Hamming (72,64) code, a choice of this design: check bit k (k<7) is
// the XOR of all data bits whose codeword position has bit k set, and check
// bit 7 is the parity of the whole Hamming codeword. Purely combinational.
module secded_enc
  import l2ecc_pkg::*;
(
  input  word_t data_i,
  output chk_t  chk_o
);

  always_comb chk_o = secded_encode(data_i);

endmodule
