// sha256_sigma0: the message-schedule function sigma0 applied to W[t-15],
// sigma0(x) = ROTR7(x) ^ ROTR18(x) ^ SHR3(x). The plain shift is by 3 as in
// FIPS 180-4, which is what makes the result SHA-256. Combinational.
module sha256_sigma0
  import sha256_pkg::*;
(
  input  word_t x,
  output word_t f
);
  always_comb f = {x[6:0], x[31:7]} ^ {x[17:0], x[31:18]} ^ (x >> 3);
endmodule
