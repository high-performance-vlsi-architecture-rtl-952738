// aes_ref_pkg: reference models used by the testbenches only.
//
// Written independently of the RTL: the S-box is found by brute-force
// search for the inverse in GF(2^8) (polynomial 0x11b) followed by the
// affine transform, MixColumns uses a general GF(2^8) multiplier, and the
// GHASH product is a carry-less 128x128 multiply of the bit-reflected
// operands followed by reduction modulo x^128 + x^7 + x^2 + x + 1.
package aes_ref_pkg;

  typedef logic [127:0] blk_t;

  function automatic logic [7:0] ref_gmul(input logic [7:0] a, input logic [7:0] b);
    logic [15:0] p;
    p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic logic [7:0] ref_sbox(input logic [7:0] x);
    logic [7:0] inv, r;
    inv = 8'h00;
    for (int b = 1; b < 256; b++) if (ref_gmul(x, 8'(b)) == 8'h01) inv = 8'(b);
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  function automatic blk_t ref_round(input blk_t s, input blk_t k, input bit last);
    logic [7:0] a [16];
    logic [7:0] b [16];
    blk_t o;
    for (int i = 0; i < 16; i++) a[i] = ref_sbox(s[127-8*i -: 8]);
    // ShiftRows: byte (row r, col c) at index 4c + r
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) b[4*c+r] = a[4*((c+r)%4)+r];
    if (!last)
      for (int c = 0; c < 4; c++) begin
        logic [7:0] x0, x1, x2, x3;
        x0 = b[4*c]; x1 = b[4*c+1]; x2 = b[4*c+2]; x3 = b[4*c+3];
        b[4*c]   = ref_gmul(x0,2) ^ ref_gmul(x1,3) ^ x2 ^ x3;
        b[4*c+1] = x0 ^ ref_gmul(x1,2) ^ ref_gmul(x2,3) ^ x3;
        b[4*c+2] = x0 ^ x1 ^ ref_gmul(x2,2) ^ ref_gmul(x3,3);
        b[4*c+3] = ref_gmul(x0,3) ^ x1 ^ x2 ^ ref_gmul(x3,2);
      end
    for (int i = 0; i < 16; i++) o[127-8*i -: 8] = b[i];
    return o ^ k;
  endfunction

  // AES-128 key schedule; returns round key r
  function automatic blk_t ref_round_key(input blk_t key, input int r);
    logic [31:0] w [44];
    logic [7:0]  rc;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t;
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]) ^ rc, ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        rc = ref_gmul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  // GF(2^128) product with GCM bit order, by carry-less multiply and reduction
  function automatic blk_t ref_gf128_mul(input blk_t x, input blk_t y);
    logic [127:0] a, b, r;
    logic [254:0] p;
    for (int i = 0; i < 128; i++) begin a[i] = x[127-i]; b[i] = y[127-i]; end
    p = '0;
    for (int i = 0; i < 128; i++) if (b[i]) p ^= 255'(a) << i;
    for (int i = 254; i >= 128; i--)
      if (p[i]) p ^= (255'h87 | (255'h1 << 128)) << (i - 128);
    for (int i = 0; i < 128; i++) r[127-i] = p[i];
    return r;
  endfunction

endpackage
