// sha256_host_if: the host side of the accelerator. It decodes the 32-bit
// command port, holds the message block (the MSG buffer) and the message
// length, starts the core and returns the digest one word at a time.
//
// A command is taken on a clock edge where cmd_w_i is high; cmd_i selects it
// (codes in sha256_pkg::cmd_e):
//   INIT      start a new message: H0..H7 <= IV, buffer cleared
//   WRITE     text_i becomes the next message word (word 0 = first 32 bits,
//             big-endian); writes past word 15 are dropped (buffer_full)
//   LEN       text_i = low word of the message length in bits (padding)
//   LEN_HI    text_i = high word of the message length
//   HASH_PAD  hash the buffer as the last block of the message, padded
//   HASH_RAW  hash the buffer as a complete block (earlier blocks of a long
//             message, or a block the host padded itself)
//   READ      text_o <= digest word text_i[2:0] (0 = H0), on the next edge
// Every command but READ is ignored while busy. A HASH command resets the
// write pointer and starts the core on the next edge; the digest and the
// length error are reported when the core finishes.
// cmd_o = {busy, digest_valid, length_error, buffer_full}; digest_valid and
// length_error rise in the cycle of the core's done pulse.
// The port names and widths are those of the accelerator's simulation; the
// command codes and the status bits are this design's own choices.
module sha256_host_if
  import sha256_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic [2:0]  cmd_i,
  input  logic        cmd_w_i,
  input  word_t       text_i,
  output word_t       text_o,
  output logic [3:0]  cmd_o,
  output block_t      msg_o,
  output logic [63:0] len_o,
  output logic        start_o,
  output logic        pad_en_o,
  output logic        init_o,
  input  hash_t       digest_i,
  input  logic        busy_i,
  input  logic        done_i,
  input  logic        len_err_i
);
  word_t      buf_q [16];
  logic [4:0] wptr;
  logic [63:0] len_q;
  logic       valid_q, err_q;
  logic       busy;
  cmd_e       cmd;

  always_comb begin
    cmd  = cmd_e'(cmd_i);
    busy = busy_i || start_o;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 16; i++) buf_q[i] <= '0;
      wptr     <= '0;
      len_q    <= '0;
      valid_q  <= 1'b0;
      err_q    <= 1'b0;
      start_o  <= 1'b0;
      pad_en_o <= 1'b0;
      init_o   <= 1'b0;
      text_o   <= '0;
    end else begin
      start_o <= 1'b0;
      init_o  <= 1'b0;
      if (done_i) begin
        valid_q <= 1'b1;
        err_q   <= len_err_i;
      end
      if (cmd_w_i && cmd == CMD_READ) text_o <= hword(digest_i, int'(text_i[2:0]));
      if (cmd_w_i && !busy) begin
        unique case (cmd)
          CMD_INIT: begin
            for (int i = 0; i < 16; i++) buf_q[i] <= '0;
            wptr    <= '0;
            len_q   <= '0;
            valid_q <= 1'b0;
            err_q   <= 1'b0;
            init_o  <= 1'b1;
          end
          CMD_WRITE: if (!wptr[4]) begin
            buf_q[wptr[3:0]] <= text_i;
            wptr             <= wptr + 1'b1;
          end
          CMD_LEN:    len_q[31:0]  <= text_i;
          CMD_LEN_HI: len_q[63:32] <= text_i;
          CMD_HASH_PAD, CMD_HASH_RAW: begin
            start_o  <= 1'b1;
            pad_en_o <= (cmd == CMD_HASH_PAD);
            wptr     <= '0;
            valid_q  <= 1'b0;
            err_q    <= 1'b0;
          end
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    for (int i = 0; i < 16; i++) msg_o[511 - 32*i -: 32] = buf_q[i];
    len_o = len_q;
    // the done pulse shows at once, the registered flags hold it afterwards
    cmd_o = {busy, valid_q || done_i, err_q || (done_i && len_err_i), wptr[4]};
  end

  // a start is one cycle long and is never sent to a busy core
  a_start_pulse: assert property (@(posedge clk) disable iff (rst) start_o |=> !start_o);
  a_start_idle:  assert property (@(posedge clk) disable iff (rst) start_o |-> !busy_i);
endmodule
