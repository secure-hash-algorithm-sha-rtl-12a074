// sha256_sigma1: the message-schedule function sigma1 applied to W[t-2],
// sigma1(x) = ROTR17(x) ^ ROTR19(x) ^ SHR10(x). Combinational.
module sha256_sigma1
  import sha256_pkg::*;
(
  input  word_t x,
  output word_t f
);
  always_comb f = {x[16:0], x[31:17]} ^ {x[18:0], x[31:19]} ^ (x >> 10);
endmodule
