// sha256_ref_pkg: a plain software model of SHA-256 for the testbenches.
// It works on unpacked arrays of words and loops, independent of the RTL's
// structure: rotations are written as shift pairs, the message schedule is
// expanded in full before the rounds, and padding is done on a byte queue.
// The round constants are derived from the cube roots of the first 64 primes
// at simulation time (see tb_sha256_k_rom), so no table is shared with the RTL.
package sha256_ref_pkg;

  function automatic logic [31:0] rr(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic logic [31:0] f_ch(input logic [31:0] x, y, z);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = x[i] ? y[i] : z[i];
    return r;
  endfunction

  function automatic logic [31:0] f_maj(input logic [31:0] x, y, z);
    logic [31:0] r;
    for (int i = 0; i < 32; i++) r[i] = (int'(x[i]) + int'(y[i]) + int'(z[i])) >= 2;
    return r;
  endfunction

  function automatic logic [31:0] f_sum0(input logic [31:0] x);
    return rr(x, 2) ^ rr(x, 13) ^ rr(x, 22);
  endfunction
  function automatic logic [31:0] f_sum1(input logic [31:0] x);
    return rr(x, 6) ^ rr(x, 11) ^ rr(x, 25);
  endfunction
  function automatic logic [31:0] f_sig0(input logic [31:0] x);
    return rr(x, 7) ^ rr(x, 18) ^ (x >> 3);
  endfunction
  function automatic logic [31:0] f_sig1(input logic [31:0] x);
    return rr(x, 17) ^ rr(x, 19) ^ (x >> 10);
  endfunction

  // n-th prime, n = 0..63
  function automatic int nth_prime(input int n);
    int c = 0;
    for (int p = 2; ; p++) begin
      bit is_p = 1;
      for (int q = 2; q * q <= p; q++) if (p % q == 0) is_p = 0;
      if (is_p) begin
        if (c == n) return p;
        c++;
      end
    end
  endfunction

  // First 32 fractional bits of cbrt(p), exact: the largest v with
  // v^3 <= p * 2^96, taking its low 32 bits.
  function automatic logic [31:0] kconst(input int n);
    int          p = nth_prime(n);
    real         r = $pow(real'(p), 1.0 / 3.0);
    logic [47:0] v = 48'(longint'(r * 4294967296.0));
    logic [159:0] lim = 160'(p) << 96;
    while (160'(v) * 160'(v) * 160'(v) > lim) v--;
    while (160'(v + 1) * 160'(v + 1) * 160'(v + 1) <= lim) v++;
    return v[31:0];
  endfunction

  typedef logic [31:0] w8_t [8];
  typedef logic [31:0] w16_t [16];
  typedef logic [31:0] w64_t [64];

  function automatic w8_t iv();
    w8_t h = '{32'h6a09e667, 32'hbb67ae85, 32'h3c6ef372, 32'ha54ff53a,
               32'h510e527f, 32'h9b05688c, 32'h1f83d9ab, 32'h5be0cd19};
    return h;
  endfunction

  function automatic w64_t expand(input w16_t m);
    w64_t w;
    for (int t = 0; t < 64; t++)
      w[t] = (t < 16) ? m[t] : f_sig1(w[t-2]) + w[t-7] + f_sig0(w[t-15]) + w[t-16];
    return w;
  endfunction

  // One compression: returns the new chaining value.
  function automatic w8_t compress(input w8_t h, input w16_t m);
    w64_t w = expand(m);
    logic [31:0] v [8];
    logic [31:0] t1, t2;
    for (int i = 0; i < 8; i++) v[i] = h[i];
    for (int t = 0; t < 64; t++) begin
      t1 = v[7] + f_sum1(v[4]) + f_ch(v[4], v[5], v[6]) + kconst(t) + w[t];
      t2 = f_sum0(v[0]) + f_maj(v[0], v[1], v[2]);
      for (int i = 7; i > 0; i--) v[i] = v[i-1];
      v[4] = v[4] + t1;
      v[0] = t1 + t2;
    end
    for (int i = 0; i < 8; i++) h[i] = h[i] + v[i];
    return h;
  endfunction

  // Full SHA-256 of a byte string.
  function automatic w8_t sha256(input byte unsigned msg[$]);
    byte unsigned b[$] = msg;
    longint unsigned bits = 64'(msg.size()) * 8;
    w8_t h = iv();
    b.push_back(8'h80);
    while (b.size() % 64 != 56) b.push_back(8'h00);
    for (int i = 7; i >= 0; i--) b.push_back(8'(bits >> (8 * i)));
    for (int blk = 0; blk < b.size() / 64; blk++) begin
      w16_t m;
      for (int j = 0; j < 16; j++)
        m[j] = {b[64*blk+4*j], b[64*blk+4*j+1], b[64*blk+4*j+2], b[64*blk+4*j+3]};
      h = compress(h, m);
    end
    return h;
  endfunction

  function automatic logic [255:0] pack8(input w8_t h);
    logic [255:0] r;
    for (int i = 0; i < 8; i++) r[255 - 32*i -: 32] = h[i];
    return r;
  endfunction

  function automatic w8_t unpack8(input logic [255:0] r);
    w8_t h;
    for (int i = 0; i < 8; i++) h[i] = r[255 - 32*i -: 32];
    return h;
  endfunction

  // How a host feeds a byte string to the accelerator: whole 64-byte blocks as
  // they are, then the tail as a padded block if it has at most 55 bytes;
  // a longer tail is padded here and sent as one or two finished blocks.
  typedef struct {
    logic [511:0]    blk;
    bit              pad;
    longint unsigned len;
  } job_t;

  function automatic void plan(input byte unsigned msg[$], output job_t jobs[$]);
    int n = msg.size();
    int full = n / 64;
    int tail = n % 64;
    longint unsigned bits = 64'(n) * 8;
    jobs = {};
    for (int b = 0; b < full; b++) begin
      job_t j;
      for (int i = 0; i < 64; i++) j.blk[511 - 8*i -: 8] = msg[64*b + i];
      j.pad = 0;
      j.len = bits;
      jobs.push_back(j);
    end
    if (tail <= 55) begin
      job_t j;
      j.blk = '0;
      for (int i = 0; i < tail; i++) j.blk[511 - 8*i -: 8] = msg[64*full + i];
      j.pad = 1;
      j.len = bits;
      jobs.push_back(j);
    end else begin
      job_t j1, j2;
      j1.blk = '0;
      for (int i = 0; i < tail; i++) j1.blk[511 - 8*i -: 8] = msg[64*full + i];
      j1.blk[511 - 8*tail] = 1'b1;
      j1.pad = 0;
      j1.len = bits;
      j2.blk = '0;
      j2.blk[63:0] = bits;
      j2.pad = 0;
      j2.len = bits;
      jobs.push_back(j1);
      jobs.push_back(j2);
    end
  endfunction

endpackage
