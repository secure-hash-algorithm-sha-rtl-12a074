// sha256_ch: the SHA-256 choose function Ch(x,y,z) = (x & y) | (~x & z).
// Each bit of x chooses between the bits of y (x=1) and z (x=0). Purely
// combinational, 32 bits wide; in the round it is applied to E, F, G. Kept as a
// small module of its own, as the design builds its datapath from such blocks.
module sha256_ch
  import sha256_pkg::*;
(
  input  word_t x,
  input  word_t y,
  input  word_t z,
  output word_t f
);
  always_comb f = (x & y) | (~x & z);
endmodule
