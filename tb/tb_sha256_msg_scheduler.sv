// tb_sha256_msg_scheduler: runs the scheduler through 64 rounds for random
// message blocks, feeding word t of the block for t < 16 as the bit selection
// block does, and compares each W_t with the fully expanded schedule of the
// reference model. With en_i low the output must be the default zero.
module tb_sha256_msg_scheduler;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;

  logic   clk = 0, rst = 1, en = 0;
  round_t t = '0;
  word_t  word = '0, w;
  int checks = 0, failures = 0;

  sha256_msg_scheduler dut (.clk, .rst, .en_i(en), .t_i(t), .word_i(word), .w_o(w));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int n = 0; n < 20; n++) begin
      w16_t m;
      w64_t e;
      for (int j = 0; j < 16; j++) m[j] = $urandom();
      e = expand(m);
      en = 0;
      #1 checks++;
      if (w !== 32'd0) failures++;
      for (int i = 0; i < 64; i++) begin
        en = 1;
        t = round_t'(i);
        word = (i < 16) ? m[i] : $urandom();   // ignored for t >= 16
        #1 checks++;
        if (w !== e[i]) begin
          failures++;
          if (failures < 10) $display("FAIL W[%0d] = %h, expected %h", i, w, e[i]);
        end
        @(posedge clk); #1;
      end
      en = 0;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
