// tb_sha256_host_if: checks the command decoder and message buffer against a
// small stand-in for the core (busy for 10 cycles after start, then a done
// pulse with a known digest and length-error flag). Covered: word writes and
// the buffer-full drop, the length register, both hash commands (start pulse,
// pad_en), commands ignored while busy, digest_valid and length_error status,
// reading all eight digest words, and init clearing the buffer.
module tb_sha256_host_if;
  import sha256_pkg::*;

  logic        clk = 0, rst = 1;
  logic [2:0]  cmd = '0;
  logic        cmd_w = 0;
  word_t       text = '0, text_o;
  logic [3:0]  cmd_o;
  block_t      msg;
  logic [63:0] len;
  logic        start, pad_en, init;
  hash_t       digest;
  logic        busy = 0, done = 0, len_err = 0;
  int checks = 0, failures = 0;
  int starts = 0, inits = 0;

  sha256_host_if dut (.clk, .rst, .cmd_i(cmd), .cmd_w_i(cmd_w), .text_i(text), .text_o,
    .cmd_o, .msg_o(msg), .len_o(len), .start_o(start), .pad_en_o(pad_en), .init_o(init),
    .digest_i(digest), .busy_i(busy), .done_i(done), .len_err_i(len_err));

  always #5 clk = ~clk;

  // core stand-in
  int cnt = 0;
  logic err_next = 0;
  always @(posedge clk) begin
    done <= 1'b0;
    if (rst) begin
      busy <= 1'b0;
      cnt  <= 0;
    end else if (start) begin
      starts++;
      busy <= 1'b1;
      cnt  <= 10;
    end else if (busy) begin
      cnt <= cnt - 1;
      if (cnt == 1) begin
        busy    <= 1'b0;
        done    <= 1'b1;
        len_err <= err_next;
      end
    end
    if (init && !rst) inits++;
  end

  task automatic chk(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  task automatic issue(input cmd_e c, input word_t d);
    cmd = c; text = d; cmd_w = 1;
    @(posedge clk); #1 cmd_w = 0;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t w [16];
    block_t e;
    for (int i = 0; i < 8; i++) digest[255 - 32*i -: 32] = 32'h1000_0000 * (i + 1) + 32'h55;
    @(posedge clk); @(posedge clk); #1 rst = 0;
    chk(cmd_o === 4'b0000, "status after reset");
    issue(CMD_INIT, '0);
    @(posedge clk); #1;
    chk(inits == 1, "init pulse");
    for (int i = 0; i < 16; i++) begin
      w[i] = $urandom();
      e[511 - 32*i -: 32] = w[i];
      chk(cmd_o[0] === 1'b0, "not full before 16 words");
      issue(CMD_WRITE, w[i]);
    end
    chk(cmd_o[0] === 1'b1, "full after 16 words");
    issue(CMD_WRITE, 32'hdeadbeef);
    chk(msg === e, "buffer holds 16 words, 17th dropped");
    issue(CMD_LEN_HI, 32'h0000_0abc);
    issue(CMD_LEN, 32'd300);
    chk(len === {32'h0000_0abc, 32'd300}, "length register, both words");
    issue(CMD_LEN_HI, 32'd0);
    chk(len === 64'd300, "length high word cleared");
    err_next = 1;
    issue(CMD_HASH_PAD, '0);
    chk(start === 1'b1 && pad_en === 1'b1, "start with padding");
    chk(cmd_o[3] === 1'b1 && cmd_o[0] === 1'b0, "busy, pointer reset");
    @(posedge clk); #1;
    chk(start === 1'b0, "start is one pulse");
    issue(CMD_WRITE, 32'h12345678);   // ignored while busy
    issue(CMD_LEN, 32'd7);            // ignored while busy
    chk(msg === e && len === 64'd300, "commands ignored while busy");
    while (cmd_o[3]) @(posedge clk);
    #1 chk(cmd_o[2] === 1'b1 && cmd_o[1] === 1'b1, "digest_valid and length_error");
    for (int i = 0; i < 8; i++) begin
      issue(CMD_READ, word_t'(i));
      chk(text_o === 32'h1000_0000 * (i + 1) + 32'h55, $sformatf("read word %0d", i));
    end
    err_next = 0;
    issue(CMD_WRITE, 32'hcafef00d);
    chk(msg[511:480] === 32'hcafef00d, "writing restarts at word 0");
    issue(CMD_HASH_RAW, '0);
    chk(start === 1'b1 && pad_en === 1'b0, "start without padding");
    chk(cmd_o[2] === 1'b0, "valid cleared by start");
    while (cmd_o[3]) @(posedge clk);
    #1 chk(cmd_o[2:1] === 2'b10, "valid, no error");
    issue(CMD_INIT, '0);
    chk(msg === '0 && len === '0 && cmd_o === 4'b0000, "init clears");
    @(posedge clk); #1;
    chk(inits == 2 && starts == 2, "pulse counts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
