// sha256_core: the SHA-256 block engine, padding block, message scheduler,
// compression function and hash registers under one controller.
//
// A pulse on start_i (while busy_o is low) takes msg_i and len_i, pads them
// when pad_en_i is high (final block of a message of len_i bits, at most 447
// bits in this block) or uses msg_i as a finished block when it is low, and
// runs the 64 rounds. Each round the message scheduler produces W_t from the
// block word t (t < 16) or from its 16-word window, and the compression
// function updates A..H with it in the same cycle. Afterwards A..H are added
// into H0..H7 in two cycles and H is copied to digest_o, with a done_o pulse
// 69 cycles after the start edge. H0..H7 carry over to the next start, so a
// long message is hashed by starting one block after another; init_i (when
// idle) restarts from the initial value. len_err_o reports a padded final
// block whose tail was too long; its digest is not meaningful.
module sha256_core
  import sha256_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        start_i,
  input  logic        pad_en_i,
  input  logic        init_i,
  input  block_t      msg_i,
  input  logic [63:0] len_i,
  output logic        busy_o,
  output logic        done_o,
  output logic        len_err_o,
  output hash_t       digest_o
);
  logic   pad_ld, wv_ld, round_en, fin_en, fin_half, out_ld;
  round_t t;
  block_t block;
  word_t  word, w;
  hash_t  h, wv;

  sha256_controller u_ctrl (
    .clk, .rst, .start_i, .busy_o,
    .pad_ld_o(pad_ld), .wv_ld_o(wv_ld), .round_en_o(round_en), .t_o(t),
    .fin_en_o(fin_en), .fin_half_o(fin_half), .out_ld_o(out_ld), .done_o
  );

  sha256_padding u_pad (
    .clk, .rst, .ld_i(pad_ld), .pad_en_i, .msg_i, .len_i,
    .block_o(block), .len_err_o
  );

  sha256_bit_select u_sel (.block_i(block), .sel_i(t[3:0]), .word_o(word));

  sha256_msg_scheduler u_sched (
    .clk, .rst, .en_i(round_en), .t_i(t), .word_i(word), .w_o(w)
  );

  sha256_compress u_comp (
    .clk, .rst, .ld_i(wv_ld), .en_i(round_en), .t_i(t), .w_i(w), .h_i(h), .wv_o(wv)
  );

  sha256_hash_regs u_hash (
    .clk, .rst, .init_i(init_i && !busy_o), .fin_en_i(fin_en), .fin_half_i(fin_half),
    .wv_i(wv), .out_ld_i(out_ld), .h_o(h), .digest_o
  );
endmodule
