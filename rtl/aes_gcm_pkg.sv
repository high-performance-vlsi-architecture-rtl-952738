// aes_gcm_pkg: shared types and finite-field helper functions for the
// sub-pipelined AES-128-GCM design.
//
// The S-box is computed in the composite field GF(((2^2)^2)^2) rather than
// read from a table. The tower used here is
//   GF(2^2)          : x^2 + x + 1
//   GF((2^2)^2)      : x^2 + x + phi,    phi    = {10}
//   GF(((2^2)^2)^2)  : x^2 + x + lambda, lambda = {1100}
// The isomorphic mapping (delta) and the merged inverse mapping plus AES
// affine transform are the 8x8 bit matrices that belong to this tower; they
// were derived by mapping the root {42} (in the composite field) of the AES
// polynomial x^8+x^4+x^3+x+1. The tower and its constants follow common
// practice; the source architecture names the operations but not the
// constants. Everything here is combinational and synthesizable.
package aes_gcm_pkg;

  typedef logic [127:0] block_t;
  typedef block_t       rk_array_t [0:10];

  localparam int unsigned NR           = 10;  // AES-128 rounds
  localparam int unsigned ROUND_STAGES = 6;   // register stages per round

  // ---------------- GF(2^2) ----------------
  function automatic logic [1:0] gf2_mul(input logic [1:0] a, input logic [1:0] b);
    gf2_mul[1] = (a[1] & b[1]) ^ (a[0] & b[1]) ^ (a[1] & b[0]);
    gf2_mul[0] = (a[1] & b[1]) ^ (a[0] & b[0]);
  endfunction

  // multiply by phi = {10}
  function automatic logic [1:0] gf2_mul_phi(input logic [1:0] a);
    gf2_mul_phi = {a[1] ^ a[0], a[1]};
  endfunction

  // ---------------- GF((2^2)^2) ----------------
  function automatic logic [3:0] gf4_mul(input logic [3:0] a, input logic [3:0] b);
    logic [1:0] t;
    t = gf2_mul(a[1:0], b[1:0]);
    gf4_mul[3:2] = gf2_mul(a[3:2] ^ a[1:0], b[3:2] ^ b[1:0]) ^ t;
    gf4_mul[1:0] = gf2_mul_phi(gf2_mul(a[3:2], b[3:2])) ^ t;
  endfunction

  function automatic logic [3:0] gf4_sq(input logic [3:0] a);
    gf4_sq = {a[3], a[3] ^ a[2], a[2] ^ a[1], a[3] ^ a[1] ^ a[0]};
  endfunction

  // multiply by the constant lambda = {1100}
  function automatic logic [3:0] gf4_mul_lambda(input logic [3:0] a);
    gf4_mul_lambda = {a[2] ^ a[0], a[3] ^ a[2] ^ a[1] ^ a[0], a[3], a[2]};
  endfunction

  // multiplicative inverse in GF((2^2)^2), 0 maps to 0
  function automatic logic [3:0] gf4_inv(input logic [3:0] q);
    gf4_inv[3] = q[3] ^ (q[3] & q[2] & q[1]) ^ (q[3] & q[0]) ^ q[2];
    gf4_inv[2] = (q[3] & q[2] & q[1]) ^ (q[3] & q[2] & q[0]) ^ (q[3] & q[0]) ^ q[2] ^ (q[2] & q[1]);
    gf4_inv[1] = q[3] ^ (q[3] & q[2] & q[1]) ^ (q[3] & q[1] & q[0]) ^ q[2] ^ (q[2] & q[0]) ^ q[1];
    gf4_inv[0] = (q[3] & q[2] & q[1]) ^ (q[3] & q[2] & q[0]) ^ (q[3] & q[1]) ^ (q[3] & q[1] & q[0])
               ^ (q[3] & q[0]) ^ q[2] ^ (q[2] & q[1]) ^ (q[2] & q[1] & q[0]) ^ q[1] ^ q[0];
  endfunction

  // ---------------- field mappings ----------------
  // isomorphic mapping delta: GF(2^8) polynomial basis -> composite field
  function automatic logic [7:0] iso_map(input logic [7:0] a);
    iso_map[7] = a[7] ^ a[5];
    iso_map[6] = a[7] ^ a[6] ^ a[4] ^ a[3] ^ a[2] ^ a[1];
    iso_map[5] = a[3] ^ a[2];
    iso_map[4] = a[6] ^ a[5] ^ a[4];
    iso_map[3] = a[4] ^ a[2];
    iso_map[2] = a[7] ^ a[4];
    iso_map[1] = a[7] ^ a[4] ^ a[2] ^ a[1];
    iso_map[0] = a[6] ^ a[5] ^ a[4] ^ a[0];
  endfunction

  // inverse isomorphic mapping delta^-1 merged with the AES affine transform
  function automatic logic [7:0] inv_iso_affine(input logic [7:0] a);
    inv_iso_affine[7] = a[5] ^ a[4] ^ a[3] ^ a[2];
    inv_iso_affine[6] = ~(a[5] ^ a[4]);
    inv_iso_affine[5] = ~(a[6] ^ a[4] ^ a[2]);
    inv_iso_affine[4] = a[5] ^ a[4] ^ a[3] ^ a[2] ^ a[1] ^ a[0];
    inv_iso_affine[3] = a[5] ^ a[4] ^ a[3] ^ a[1] ^ a[0];
    inv_iso_affine[2] = a[6] ^ a[5] ^ a[4] ^ a[3] ^ a[0];
    inv_iso_affine[1] = ~(a[7] ^ a[6] ^ a[5] ^ a[4] ^ a[2] ^ a[0]);
    inv_iso_affine[0] = ~(a[7] ^ a[6] ^ a[5] ^ a[4] ^ a[3] ^ a[1] ^ a[0]);
  endfunction

  // ---------------- composite-field inversion steps ----------------
  // The S-box is split into the same steps in sbox_sp (one per register
  // stage); this unpipelined form serves the key schedule.
  function automatic logic [3:0] cf_d(input logic [3:0] ah, input logic [3:0] al);
    cf_d = gf4_mul_lambda(gf4_sq(ah)) ^ gf4_mul(ah ^ al, al);
  endfunction

  function automatic logic [7:0] sbox_comb(input logic [7:0] x);
    logic [7:0] c;
    logic [3:0] dinv;
    c    = iso_map(x);
    dinv = gf4_inv(cf_d(c[7:4], c[3:0]));
    sbox_comb = inv_iso_affine({gf4_mul(c[7:4], dinv), gf4_mul(c[7:4] ^ c[3:0], dinv)});
  endfunction

  // ---------------- AES helpers ----------------
  function automatic logic [7:0] xtime(input logic [7:0] a);
    xtime = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction


  // ShiftRows: out(row r, col c) = in(row r, col (c + r) mod 4)
  function automatic block_t shift_rows(input block_t s);
    for (int unsigned c = 0; c < 4; c++)
      for (int unsigned r = 0; r < 4; r++)
        shift_rows[127 - 8*(4*c + r) -: 8] = s[127 - 8*(4*((c + r) % 4) + r) -: 8];
  endfunction

endpackage
