// tb_sha256_k_rom: checks all 64 round constants. The expected K_t is computed
// here from first principles: the first 32 fractional bits of the cube root of
// the (t+1)-th prime, found exactly with integer arithmetic (kconst in
// sha256_ref_pkg). Also spot-checks K_0 and K_63 against their known values.
module tb_sha256_k_rom;
  import sha256_pkg::*;
  import sha256_ref_pkg::*;

  round_t addr;
  word_t  k;
  int checks = 0, failures = 0;

  sha256_k_rom dut (.addr_i(addr), .k_o(k));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 64; t++) begin
      addr = round_t'(t);
      #1;
      checks++;
      if (k !== kconst(t)) begin
        failures++;
        $display("FAIL K[%0d] = %h, expected %h", t, k, kconst(t));
      end
    end
    addr = 6'd0;  #1; checks++; if (k !== 32'h428a2f98) failures++;
    addr = 6'd63; #1; checks++; if (k !== 32'hc67178f2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
