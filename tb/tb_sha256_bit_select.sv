// tb_sha256_bit_select: for random blocks, selects each of the 16 words and
// compares with the word sliced out bit by bit (word 0 = bits 511:480).
module tb_sha256_bit_select;
  import sha256_pkg::*;

  block_t     blk;
  logic [3:0] sel;
  word_t      w;
  int checks = 0, failures = 0;

  sha256_bit_select dut (.block_i(blk), .sel_i(sel), .word_o(w));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int i = 0; i < 16; i++) blk[32*i +: 32] = $urandom();
      for (int j = 0; j < 16; j++) begin
        word_t e;
        sel = 4'(j);
        for (int b = 0; b < 32; b++) e[31 - b] = blk[511 - 32*j - b];
        #1;
        checks++;
        if (w !== e) begin
          failures++;
          if (failures < 10) $display("FAIL word %0d = %h, expected %h", j, w, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
