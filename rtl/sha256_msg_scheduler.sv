// sha256_msg_scheduler: computes one message word W_t per cycle, in the same
// cycle in which the round uses it, instead of expanding all 64 words first.
//
// A 16-word window holds W[t-16]..W[t-1] (win[0] is the oldest). The scheduler
// mux picks, for round t:
//   t < 16 : word_i, word t of the block from the bit selection block;
//   t >= 16: sigma1(W[t-2]) + W[t-7] + sigma0(W[t-15]) + W[t-16];
//   zero (the default input) when no round is active.
// On each clock with en_i high the window shifts by one and takes W_t. So only
// 16 words of storage are needed and only one word register changes per
// cycle. W_t (w_o) is combinational from t_i, word_i and the window.
module sha256_msg_scheduler
  import sha256_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   en_i,
  input  round_t t_i,
  input  word_t  word_i,
  output word_t  w_o
);
  word_t win [16];
  word_t s0, s1, w_new;

  sha256_sigma0 u_sigma0 (.x(win[1]),  .f(s0));
  sha256_sigma1 u_sigma1 (.x(win[14]), .f(s1));

  always_comb begin
    w_new = s1 + win[9] + s0 + win[0];
    if (!en_i)           w_o = '0;
    else if (t_i < 6'd16) w_o = word_i;
    else                  w_o = w_new;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 16; i++) win[i] <= '0;
    end else if (en_i) begin
      for (int i = 0; i < 15; i++) win[i] <= win[i+1];
      win[15] <= w_o;
    end
  end
endmodule
