// tb_sha256_core: hashes whole messages through the core and compares the
// digests with the reference model and with published test vectors:
// "" , "abc" and the 56-byte "abcdbcde...nopq" (two finished blocks sent
// unpadded). Then 40 random messages of 0 to 200 bytes, so single padded
// blocks, chained blocks and tails the host pads itself all occur. Every
// block must finish 69 cycles after its start edge. A final block with a tail
// over 447 bits must report len_err_o.
module tb_sha256_core;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;

  logic        clk = 0, rst = 1, start = 0, pad_en = 0, init = 0;
  block_t      msg = '0;
  logic [63:0] len = '0;
  logic        busy, done, len_err;
  hash_t       digest;
  int checks = 0, failures = 0;
  int n_pad = 0, n_raw = 0, n_err = 0;

  sha256_core dut (.clk, .rst, .start_i(start), .pad_en_i(pad_en), .init_i(init),
                   .msg_i(msg), .len_i(len), .busy_o(busy), .done_o(done),
                   .len_err_o(len_err), .digest_o(digest));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one block; returns cycles from the start edge to the done pulse
  task automatic run_block(input job_t j);
    int cyc = 0;
    msg = j.blk; len = j.len; pad_en = j.pad; start = 1;
    @(posedge clk); #1 start = 0;
    cyc = 1;
    while (!done) begin
      @(posedge clk); #1 cyc++;
    end
    chk(cyc == 69, $sformatf("block latency %0d, expected 69", cyc));
    if (j.pad) n_pad++; else n_raw++;
  endtask

  task automatic hash_msg(input byte unsigned m[$], input logic [255:0] expect_known,
                          input bit use_known);
    job_t jobs[$];
    w8_t  e = sha256(m);
    plan(m, jobs);
    init = 1;
    @(posedge clk); #1 init = 0;
    foreach (jobs[i]) run_block(jobs[i]);
    chk(digest === pack8(e), $sformatf("digest of %0d bytes: %h expected %h", m.size(), digest, pack8(e)));
    chk(len_err === 1'b0, "no length error");
    if (use_known) chk(digest === expect_known, "published vector");
  endtask

  initial begin
    byte unsigned m[$];
    @(posedge clk); @(posedge clk); #1 rst = 0;
    m = {};
    hash_msg(m, 256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855, 1);
    m = {8'h61, 8'h62, 8'h63};
    hash_msg(m, 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad, 1);
    m = {};
    begin
      string s = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";
      for (int i = 0; i < s.len(); i++) m.push_back(s[i]);
    end
    hash_msg(m, 256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1, 1);
    for (int n = 0; n < 40; n++) begin
      int l;
      l = $urandom_range(0, 200);
      m = {};
      for (int i = 0; i < l; i++) m.push_back(8'($urandom()));
      hash_msg(m, '0, 0);
    end
    // tail too long for one padded block
    begin
      job_t j;
      j.blk = '0; j.pad = 1; j.len = 64'd460;
      run_block(j);
      chk(len_err === 1'b1, "len_err for a 460-bit tail");
      n_err++;
    end
    chk(n_pad > 0 && n_raw > 0 && n_err > 0, "padded, unpadded and error cases all seen");
    $display("padded blocks %0d, unpadded blocks %0d, length errors %0d", n_pad, n_raw, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
