// sha256_compress: the compression function's working variables A..H and the
// round logic that updates them.
//
// ld_i loads A..H from the chaining value h_i (word 0 -> A). On each clock with
// en_i high one round is done with W_t (w_i) and K_t from the constant table:
//   T1 = H + SUM1(E) + Ch(E,F,G) + K_t + W_t,   T2 = SUM0(A) + Maj(A,B,C)
//   H<=G  G<=F  F<=E  E<=D+T1  D<=C  C<=B  B<=A  A<=T1+T2
// The functions are the small combinational blocks sha256_sum0/sum1/ch/maj and
// the table is sha256_k_rom, read with the round number t_i. wv_o presents
// A..H with A at bits 255:224.
module sha256_compress
  import sha256_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   ld_i,
  input  logic   en_i,
  input  round_t t_i,
  input  word_t  w_i,
  input  hash_t  h_i,
  output hash_t  wv_o
);
  word_t a, b, c, d, e, f, g, h;
  word_t k, sum0, sum1, ch, maj, t1, t2;

  sha256_k_rom u_k    (.addr_i(t_i), .k_o(k));
  sha256_sum0  u_sum0 (.x(a), .f(sum0));
  sha256_sum1  u_sum1 (.x(e), .f(sum1));
  sha256_ch    u_ch   (.x(e), .y(f), .z(g), .f(ch));
  sha256_maj   u_maj  (.x(a), .y(b), .z(c), .f(maj));

  always_comb begin
    t1 = h + sum1 + ch + k + w_i;
    t2 = sum0 + maj;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      {a, b, c, d, e, f, g, h} <= '0;
    end else if (ld_i) begin
      {a, b, c, d, e, f, g, h} <= h_i;
    end else if (en_i) begin
      h <= g;
      g <= f;
      f <= e;
      e <= d + t1;
      d <= c;
      c <= b;
      b <= a;
      a <= t1 + t2;
    end
  end

  assign wv_o = {a, b, c, d, e, f, g, h};
endmodule
