// sha256_padding: the padding block. On the clock edge where ld_i is high it
// registers one 512-bit block built from the message buffer.
//
// With pad_en_i high the block is the final block of a message of len_i bits:
// r = len_i mod 512 message bits are kept (the first one at bit 511), a single
// 1 bit follows them, then zeros, and bits 63:0 hold len_i, as FIPS 180-4
// pads. This needs r <= 447; for a longer tail len_err_o is set with the
// block, and the host has to pad such a message itself and send the blocks
// with pad_en_i low, which registers msg_i unchanged. Whole earlier blocks of
// a long message are sent the same way. Padding a message in one cycle and only
// for one block is how the design is described; the error flag and the
// pass-through are this design's own.
module sha256_padding
  import sha256_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ld_i,
  input  logic        pad_en_i,
  input  block_t      msg_i,
  input  logic [63:0] len_i,
  output block_t      block_o,
  output logic        len_err_o
);
  logic [8:0] r;        // message bits in the final block
  block_t     keep;     // mask of the r kept bits
  block_t     padded;

  always_comb begin
    r      = len_i[8:0];
    keep   = ~({512{1'b1}} >> r);
    padded = (msg_i & keep) | (block_t'(1) << (10'd511 - 10'(r)));
    padded[63:0] = len_i;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      block_o   <= '0;
      len_err_o <= 1'b0;
    end else if (ld_i) begin
      block_o   <= pad_en_i ? padded : msg_i;
      len_err_o <= pad_en_i && (r > 9'd447);
    end
  end
endmodule
