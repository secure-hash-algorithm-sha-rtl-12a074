// tb_sha256_compress: loads a random chaining value into A..H, runs 64 rounds
// with random W_t and checks A..H after every round against the reference
// round (T1/T2 update), with constants derived in the testbench. A cycle
// with neither ld_i nor en_i must hold the variables.
module tb_sha256_compress;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;

  logic   clk = 0, rst = 1, ld = 0, en = 0;
  round_t t = '0;
  word_t  w = '0;
  hash_t  h = '0, wv;
  int checks = 0, failures = 0;
  word_t  kt [64];

  sha256_compress dut (.clk, .rst, .ld_i(ld), .en_i(en), .t_i(t), .w_i(w), .h_i(h), .wv_o(wv));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] v [8];
    logic [31:0] t1, t2;
    for (int i = 0; i < 64; i++) kt[i] = kconst(i);
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 10; n++) begin
      for (int i = 0; i < 8; i++) begin
        v[i] = $urandom();
        h[255 - 32*i -: 32] = v[i];
      end
      ld = 1;
      @(posedge clk); #1 ld = 0;
      checks++;
      if (wv !== h) failures++;
      for (int r = 0; r < 64; r++) begin
        en = 1;
        t = round_t'(r);
        w = $urandom();
        t1 = v[7] + f_sum1(v[4]) + f_ch(v[4], v[5], v[6]) + kt[r] + w;
        t2 = f_sum0(v[0]) + f_maj(v[0], v[1], v[2]);
        for (int i = 7; i > 0; i--) v[i] = v[i-1];
        v[4] = v[4] + t1;
        v[0] = t1 + t2;
        @(posedge clk); #1;
        checks++;
        if (wv !== pack8(v)) begin
          failures++;
          if (failures < 10) $display("FAIL round %0d: %h expected %h", r, wv, pack8(v));
        end
      end
      en = 0;
      @(posedge clk); #1;
      checks++;
      if (wv !== pack8(v)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
