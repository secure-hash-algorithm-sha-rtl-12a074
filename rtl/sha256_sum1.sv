// sha256_sum1: the SHA-256 big sigma-1 function applied to working variable E,
// SUM1(x) = ROTR6(x) ^ ROTR11(x) ^ ROTR25(x). Combinational wiring and XORs.
module sha256_sum1
  import sha256_pkg::*;
(
  input  word_t x,
  output word_t f
);
  always_comb f = {x[5:0], x[31:6]} ^ {x[10:0], x[31:11]} ^ {x[24:0], x[31:25]};
endmodule
