// sha256_hash_regs: the chaining value H0..H7, the final addition and the
// final-hash output register.
//
// init_i loads the FIPS 180-4 initial value. After the 64th round the working
// variables are added into H in two cycles through a bank of four shared 32-bit
// adders: fin_half_i = 0 updates H0..H3 with A..D, fin_half_i = 1 updates H4..H7
// with E..H. Sharing the adders over two cycles is this design's reading of the
// two-cycle final-hash step and of arithmetic resource sharing. out_ld_i then
// copies H into the digest register (the final hash), which holds still while
// the next block is computed. h_o feeds the working-variable load of the next
// block, so blocks chain without host action. init_i wins over fin_en_i.
module sha256_hash_regs
  import sha256_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  init_i,
  input  logic  fin_en_i,
  input  logic  fin_half_i,
  input  hash_t wv_i,
  input  logic  out_ld_i,
  output hash_t h_o,
  output hash_t digest_o
);
  word_t hr  [8];
  word_t sum [4];

  // Four shared adders; the half select steers their operands.
  always_comb begin
    for (int i = 0; i < 4; i++) begin
      sum[i] = hr[4*fin_half_i + i] + hword(wv_i, 4*fin_half_i + i);
    end
  end

  always_ff @(posedge clk) begin
    if (rst || init_i) begin
      for (int i = 0; i < 8; i++) hr[i] <= hword(IV, i);
    end else if (fin_en_i) begin
      for (int i = 0; i < 4; i++) hr[4*fin_half_i + i] <= sum[i];
    end
  end

  always_ff @(posedge clk) begin
    if (rst)           digest_o <= '0;
    else if (out_ld_i) digest_o <= h_o;
  end

  always_comb begin
    for (int i = 0; i < 8; i++) h_o[255 - 32*i -: 32] = hr[i];
  end
endmodule
