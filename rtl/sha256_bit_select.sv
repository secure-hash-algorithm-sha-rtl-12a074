// sha256_bit_select: the bit selection block. It hands the message scheduler
// word sel_i (0..15) of the registered 512-bit block, word 0 being bits
// 511:480, so that W_0..W_15 are the block's words in big-endian order. The
// index comes from the round counter (the select-word count). Combinational.
module sha256_bit_select
  import sha256_pkg::*;
(
  input  block_t     block_i,
  input  logic [3:0] sel_i,
  output word_t      word_o
);
  always_comb word_o = block_i[511 - 32*sel_i -: 32];
endmodule
