// tb_sha256_controller: checks the cycle plan of one block. Starting at the
// clock edge that samples start_i (edge 0), the outputs sampled just before
// each edge n must be: pad_ld at n=0, wv_ld at 1, round_en with t=n-2 for
// n=2..65, fin_en with half 0 at 66 and half 1 at 67, out_ld at 68, and done
// high for exactly the one cycle after edge 68, i.e. 69 cycles per block in
// the core. busy must cover edges 1..68, and a start during busy is ignored.
module tb_sha256_controller;
  import sha256_pkg::*;

  logic   clk = 0, rst = 1, start = 0;
  logic   busy, pad_ld, wv_ld, round_en, fin_en, fin_half, out_ld, done;
  round_t t;
  int checks = 0, failures = 0;

  sha256_controller dut (.clk, .rst, .start_i(start), .busy_o(busy), .pad_ld_o(pad_ld),
    .wv_ld_o(wv_ld), .round_en_o(round_en), .t_o(t), .fin_en_o(fin_en),
    .fin_half_o(fin_half), .out_ld_o(out_ld), .done_o(done));

  always #5 clk = ~clk;

  task automatic chk(input logic ok, input int n, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL edge %0d: %s", n, what);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); @(posedge clk); #1 rst = 0;
    for (int blk = 0; blk < 3; blk++) begin
      int done_edge = -1;
      start = 1;
      for (int n = 0; n < 75; n++) begin
        #4;  // just before edge n
        chk(pad_ld === (n == 0), n, "pad_ld");
        chk(wv_ld === (n == 1), n, "wv_ld");
        chk(round_en === (n >= 2 && n <= 65), n, "round_en");
        if (n >= 2 && n <= 65) chk(t === round_t'(n - 2), n, "t");
        chk(fin_en === (n == 66 || n == 67), n, "fin_en");
        if (n == 66 || n == 67) chk(fin_half === (n == 67), n, "fin_half");
        chk(out_ld === (n == 68), n, "out_ld");
        chk(busy === (n >= 1 && n <= 68), n, "busy");
        if (done && done_edge < 0) done_edge = n;
        @(posedge clk); #1;
        // a start held during the block must be ignored until idle
        start = (n < 30);
      end
      start = 0;
      chk(done_edge == 69, done_edge, "done one cycle after edge 68 (69 cycles)");
      repeat (2) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
