// sha256_maj: the SHA-256 majority function Maj(x,y,z), each output bit is the
// value held by at least two of the three input bits. Combinational, 32 bits;
// in the round it is applied to A, B, C.
module sha256_maj
  import sha256_pkg::*;
(
  input  word_t x,
  input  word_t y,
  input  word_t z,
  output word_t f
);
  always_comb f = (x & y) | (y & z) | (x & z);
endmodule
