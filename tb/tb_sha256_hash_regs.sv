// tb_sha256_hash_regs: checks that reset and init load the initial hash value,
// that the two final-addition cycles add A..D into H0..H3 and then E..H into
// H4..H7 (and nothing else), and that the digest register copies H only on
// out_ld_i and otherwise holds.
module tb_sha256_hash_regs;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;

  logic  clk = 0, rst = 1, init = 0, fin_en = 0, half = 0, out_ld = 0;
  hash_t wv = '0, h, dig;
  int checks = 0, failures = 0;

  sha256_hash_regs dut (.clk, .rst, .init_i(init), .fin_en_i(fin_en), .fin_half_i(half),
                        .wv_i(wv), .out_ld_i(out_ld), .h_o(h), .digest_o(dig));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    w8_t e, v;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    chk(h === pack8(iv()), "reset value");
    chk(dig === '0, "digest after reset");
    e = iv();
    for (int n = 0; n < 20; n++) begin
      for (int i = 0; i < 8; i++) v[i] = $urandom();
      wv = pack8(v);
      fin_en = 1; half = 0;
      @(posedge clk); #1;
      for (int i = 0; i < 4; i++) e[i] = e[i] + v[i];
      chk(h === pack8(e), "first half");
      half = 1;
      @(posedge clk); #1;
      fin_en = 0;
      for (int i = 4; i < 8; i++) e[i] = e[i] + v[i];
      chk(h === pack8(e), "second half");
      chk(dig !== h, "digest holds before out_ld");
      out_ld = 1;
      @(posedge clk); #1 out_ld = 0;
      chk(dig === pack8(e), "digest load");
      wv = ~wv;
      @(posedge clk); #1;
      chk(h === pack8(e) && dig === pack8(e), "hold");
    end
    init = 1;
    @(posedge clk); #1 init = 0;
    chk(h === pack8(iv()), "init");
    chk(dig === pack8(e), "digest kept over init");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
