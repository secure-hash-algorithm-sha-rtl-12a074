// sha256_pkg: widths, types and constants shared by the SHA-256 accelerator.
//
// word_t is the 32-bit word every SHA-256 operation works on; block_t is one
// 512-bit message block with its first message bit at bit 511; hash_t holds
// eight words H0..H7 (or A..H) with word 0 at bits 255:224. IV is the initial
// hash value of FIPS 180-4, which the hash registers load on init. The host
// command codes are this design's own encoding of the 3-bit cmd_i port.
package sha256_pkg;

  typedef logic [31:0]  word_t;
  typedef logic [511:0] block_t;
  typedef logic [255:0] hash_t;
  typedef logic [5:0]   round_t;

  localparam int unsigned ROUNDS = 64;

  // Initial hash value H(0), FIPS 180-4 section 5.3.3.
  localparam hash_t IV = {
    32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
    32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19
  };

  // Host command codes on cmd_i (acted on when cmd_w_i is high).
  typedef enum logic [2:0] {
    CMD_NOP      = 3'b000,
    CMD_INIT     = 3'b001,  // start a new message: H <= IV, clear buffer
    CMD_WRITE    = 3'b010,  // text_i -> next message word of the buffer
    CMD_LEN      = 3'b011,  // text_i = message length in bits, low word
    CMD_HASH_PAD = 3'b100,  // hash the buffer as the final, padded block
    CMD_HASH_RAW = 3'b101,  // hash the buffer as a complete block
    CMD_READ     = 3'b110,  // text_o <= digest word text_i[2:0]
    CMD_LEN_HI   = 3'b111   // text_i = message length in bits, high word
  } cmd_e;

  // Word i (0 = most significant) of a packed eight-word value.
  function automatic word_t hword(input hash_t h, input int unsigned i);
    return h[255 - 32*i -: 32];
  endfunction

endpackage
