// tb_sha256_sigma0: self-checking test of sha256_sigma0. Drives 2000 random operands plus a few
// corner values (all zeros, all ones, single bits) and compares the output
// with the reference function f_sig0 of sha256_ref_pkg, written independently.
// The block is combinational; a time-based watchdog ends a stuck run.
module tb_sha256_sigma0;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;

  word_t x;
  word_t f;
  int checks = 0, failures = 0;

  sha256_sigma0 dut (.x(x), .f(f));

  task automatic check();
    #1;
    checks++;
    if (f !== f_sig0(x)) begin
      failures++;
      if (failures < 10) $display("FAIL sha256_sigma0(%h) = %h, expected %h", x, f, f_sig0(x));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      x = (32'd1 << i);
      check();
    end
    x = 32'hffffffff;
    check();
    x = 32'h0;
    check();
    for (int i = 0; i < 2000; i++) begin
      x = $urandom();
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
