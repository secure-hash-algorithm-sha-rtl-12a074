// tb_sha256_padding: checks the padding block. For every tail length r from 0
// to 447 bits (plus lengths of several blocks with the same tail) it loads a
// random message and compares the registered block with one padded bit by bit
// in the testbench: message bits kept, a 1, zeros, 64-bit length. Lengths with
// a tail above 447 must raise len_err_o; with pad_en_i low the message must
// pass unchanged. The block must change only on an edge with ld_i high.
module tb_sha256_padding;
  import sha256_pkg::*;

  logic        clk = 0, rst = 1, ld = 0, pad_en = 0;
  block_t      msg, blk;
  logic [63:0] len;
  logic        err;
  int checks = 0, failures = 0;

  sha256_padding dut (.clk, .rst, .ld_i(ld), .pad_en_i(pad_en), .msg_i(msg), .len_i(len),
                      .block_o(blk), .len_err_o(err));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic block_t rnd_block();
    block_t b;
    for (int i = 0; i < 16; i++) b[32*i +: 32] = $urandom();
    return b;
  endfunction

  function automatic block_t ref_pad(block_t m, logic [63:0] l);
    block_t b = '0;
    int r = int'(l % 512);
    for (int i = 0; i < r; i++) b[511 - i] = m[511 - i];
    b[511 - r] = 1'b1;
    for (int i = 0; i < 64; i++) b[i] = l[i];
    return b;
  endfunction

  task automatic apply(input logic pe, input logic [63:0] l);
    msg = rnd_block();
    len = l;
    pad_en = pe;
    ld = 1;
    @(posedge clk); #1;
    ld = 0;
  endtask

  initial begin
    msg = '0; len = '0;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int r = 0; r <= 447; r++) begin
      apply(1, 64'(r));
      checks++;
      if (blk !== ref_pad(msg, len) || err !== 1'b0) begin
        failures++;
        if (failures < 10) $display("FAIL pad r=%0d", r);
      end
    end
    for (int i = 0; i < 200; i++) begin
      logic [63:0] l;
      l = {$urandom(), $urandom()};
      if (l[8:0] > 447) l[8:0] = l[8:0] - 9'd100;
      apply(1, l);
      checks++;
      if (blk !== ref_pad(msg, len) || err !== 1'b0) failures++;
    end
    for (int r = 448; r < 512; r++) begin
      apply(1, 64'(r) + 64'd1024);
      checks++;
      if (err !== 1'b1) failures++;
    end
    for (int i = 0; i < 50; i++) begin
      apply(0, {$urandom(), $urandom()});
      checks++;
      if (blk !== msg || err !== 1'b0) failures++;
    end
    // hold: no load, block keeps its value
    begin
      block_t prev;
      prev = blk;
      msg = rnd_block(); pad_en = 1; len = 64'd8;
      repeat (3) @(posedge clk);
      #1 checks++;
      if (blk !== prev) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
