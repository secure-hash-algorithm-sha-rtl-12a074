// sha256_sum0: the SHA-256 big sigma-0 function applied to working variable A,
// SUM0(x) = ROTR2(x) ^ ROTR13(x) ^ ROTR22(x). Combinational wiring and XORs.
module sha256_sum0
  import sha256_pkg::*;
(
  input  word_t x,
  output word_t f
);
  always_comb f = {x[1:0], x[31:2]} ^ {x[12:0], x[31:13]} ^ {x[21:0], x[31:22]};
endmodule
