// tb_sha256_top: end-to-end test of the accelerator through its command port,
// at its only configuration. A host task writes each message block word by
// word, sets the length, issues HASH_PAD for a final block with at most 447
// message bits or HASH_RAW for whole blocks and for tails it pads itself,
// waits for digest_valid and reads the eight digest words back over text_o.
// Messages: the published vectors "", "abc" and the 56-byte two-block vector,
// a 32-byte string of '6' characters, then random messages up to 250 bytes.
// Each hash command must reach digest_valid 70 cycles after the edge that
// takes it. Mechanisms counted, each must occur: padded blocks, unpadded
// chained blocks, a length error, a dropped write to a full buffer, a command
// ignored while busy, and init.
module tb_sha256_top;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;

  logic       clk = 0, rst = 1;
  logic [2:0] cmd_i = '0;
  logic       cmd_w_i = 0;
  word_t      text_i = '0, text_o;
  logic [3:0] cmd_o;
  int checks = 0, failures = 0;
  int n_pad = 0, n_raw = 0, n_err = 0, n_full = 0, n_ignored = 0, n_init = 0;

  sha256_top dut (.clk, .rst, .cmd_i, .cmd_w_i, .text_i, .text_o, .cmd_o);

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic issue(input cmd_e c, input word_t d);
    cmd_i = c; text_i = d; cmd_w_i = 1;
    @(posedge clk); #1 cmd_w_i = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // write one block, hash it, check the 70-cycle latency
  task automatic send_block(input job_t j, input bit poke_busy);
    int cyc;
    for (int i = 0; i < 16; i++) issue(CMD_WRITE, j.blk[511 - 32*i -: 32]);
    if (!cmd_o[0]) chk(0, "buffer not full after 16 words");
    if (j.pad) begin
      issue(CMD_LEN_HI, word_t'(j.len >> 32));
      issue(CMD_LEN, word_t'(j.len));
    end
    issue(j.pad ? CMD_HASH_PAD : CMD_HASH_RAW, '0);
    cyc = 1;
    if (poke_busy) begin
      // a write while busy must not land in the (now empty) buffer
      issue(CMD_WRITE, 32'hffffffff);
      cyc++;
      chk(cmd_o[0] === 1'b0, "write ignored while busy");
      n_ignored++;
    end
    while (!cmd_o[2]) begin
      @(posedge clk); #1 cyc++;
    end
    chk(cyc == 70, $sformatf("hash command to digest_valid took %0d cycles, expected 70", cyc));
    if (j.pad) n_pad++; else n_raw++;
  endtask

  task automatic hash_msg(input byte unsigned m[$], input logic [255:0] known, input bit use_known);
    job_t  jobs[$];
    w8_t   e;
    hash_t got;
    e = sha256(m);
    plan(m, jobs);
    issue(CMD_INIT, '0);
    n_init++;
    foreach (jobs[i]) send_block(jobs[i], (i == 0) && (m.size() % 3 == 0));
    chk(cmd_o[1] === 1'b0, "no length error");
    for (int i = 0; i < 8; i++) begin
      issue(CMD_READ, word_t'(i));
      got[255 - 32*i -: 32] = text_o;
    end
    chk(got === pack8(e), $sformatf("digest of %0d bytes: %h expected %h", m.size(), got, pack8(e)));
    if (use_known) chk(got === known, "published vector");
  endtask

  initial begin
    byte unsigned m[$];
    string s;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    m = {};
    hash_msg(m, 256'he3b0c44298fc1c149afbf4c8996fb92427ae41e4649b934ca495991b7852b855, 1);
    m = {8'h61, 8'h62, 8'h63};
    hash_msg(m, 256'hba7816bf8f01cfea414140de5dae2223b00361a396177a9cb410ff61f20015ad, 1);
    s = "abcdbcdecdefdefgefghfghighijhijkijkljklmklmnlmnomnopnopq";
    m = {};
    for (int i = 0; i < s.len(); i++) m.push_back(s[i]);
    hash_msg(m, 256'h248d6a61d20638b8e5c026930c3e6039a33ce45964ff2167f6ecedd419db06c1, 1);
    m = {};
    for (int i = 0; i < 32; i++) m.push_back(8'h36);
    hash_msg(m, '0, 0);
    for (int n = 0; n < 25; n++) begin
      int l;
      l = $urandom_range(0, 250);
      m = {};
      for (int i = 0; i < l; i++) m.push_back(8'($urandom()));
      hash_msg(m, '0, 0);
    end
    // a 17th word is dropped
    issue(CMD_INIT, '0);
    n_init++;
    for (int i = 0; i < 17; i++) issue(CMD_WRITE, word_t'(i));
    chk(cmd_o[0] === 1'b1, "buffer full");
    n_full++;
    // a final block whose tail is too long for padding
    issue(CMD_LEN, 32'd480);
    issue(CMD_HASH_PAD, '0);
    while (!cmd_o[2]) @(posedge clk);
    #1 chk(cmd_o[1] === 1'b1, "length error reported");
    if (cmd_o[1]) n_err++;
    $display("padded %0d, unpadded %0d, length errors %0d, full drops %0d, busy ignores %0d, inits %0d",
             n_pad, n_raw, n_err, n_full, n_ignored, n_init);
    chk(n_pad > 0, "padded block seen");
    chk(n_raw > 0, "unpadded chained block seen");
    chk(n_err > 0, "length error seen");
    chk(n_full > 0, "full buffer seen");
    chk(n_ignored > 0, "ignored command seen");
    chk(n_init > 0, "init seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
