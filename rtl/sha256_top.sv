// sha256_top: SHA-256 hash accelerator with a 32-bit command/text port.
//
// The host writes a message block word by word into the host interface and
// issues a hash command; the core pads the block (or takes it as it is), runs
// the 64 SHA-256 rounds computing one message word per round, adds the result
// into the chaining value and presents the 256-bit digest, which the host reads
// back one word at a time on text_o. From the edge that takes a hash command
// to the edge after which cmd_o shows digest_valid is 70 clock cycles.
// Ports: clk, synchronous active-high rst, cmd_i/cmd_w_i/text_i in, text_o and
// cmd_o = {busy, digest_valid, length_error, buffer_full} out; see
// sha256_host_if for the command codes.
module sha256_top
  import sha256_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [2:0] cmd_i,
  input  logic       cmd_w_i,
  input  word_t      text_i,
  output word_t      text_o,
  output logic [3:0] cmd_o
);
  block_t      msg;
  logic [63:0] len;
  logic        start, pad_en, init, busy, done, len_err;
  hash_t       digest;

  sha256_host_if u_host (
    .clk, .rst, .cmd_i, .cmd_w_i, .text_i, .text_o, .cmd_o,
    .msg_o(msg), .len_o(len), .start_o(start), .pad_en_o(pad_en), .init_o(init),
    .digest_i(digest), .busy_i(busy), .done_i(done), .len_err_i(len_err)
  );

  sha256_core u_core (
    .clk, .rst, .start_i(start), .pad_en_i(pad_en), .init_i(init),
    .msg_i(msg), .len_i(len), .busy_o(busy), .done_o(done),
    .len_err_o(len_err), .digest_o(digest)
  );
endmodule
