// sbox_sp: sub-pipelined composite-field AES S-box.
//
// The byte is mapped into GF(((2^2)^2)^2) and split into a high nibble ah
// and a low nibble al, so that its inverse is
//   d     = lambda*ah^2 + (ah + al)*al          (in GF((2^2)^2))
//   inv   = { ah * d^-1 , (ah + al) * d^-1 }
// followed by the inverse mapping and the AES affine transform.
// The work is cut into the first five stages of a round unit:
//   stage 1  isomorphic mapping delta                        -> register
//   stage 2  square, x lambda, GF((2^2)^2) multiply, XOR     -> register
//   stage 3  GF(2^4) inversion                               -> register
//   stage 4  two GF((2^2)^2) multipliers (8-bit result)      -> register
//   stage 5  inverse mapping + affine (combinational output; the round
//            unit registers it after ShiftRows)
// Timing: out_byte = S(in_byte) four clock edges after in_byte is applied,
// one new byte per cycle. The data registers carry no reset: validity is
// tracked by the enclosing pipeline. The stage split follows the source
// architecture; the field constants are this design's choice (see
// aes_gcm_pkg).
module sbox_sp
  import aes_gcm_pkg::*;
(
  input  logic       clk,
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);

  typedef struct packed {
    logic [3:0] d;    // value to invert (stage 2) or its inverse (stage 3)
    logic [3:0] ah;   // high nibble
    logic [3:0] ahl;  // ah ^ al
  } inv_stage_t;

  logic [7:0] s1_q;
  inv_stage_t s2_q, s3_q;
  logic [7:0] s4_q;

  always_ff @(posedge clk) begin
    // stage 1: into the composite field
    s1_q      <= iso_map(in_byte);
    // stage 2: square, constant multiplier, GF((2^2)^2) multiplier, XOR
    s2_q.d    <= cf_d(s1_q[7:4], s1_q[3:0]);
    s2_q.ah   <= s1_q[7:4];
    s2_q.ahl  <= s1_q[7:4] ^ s1_q[3:0];
    // stage 3: GF(2^4) inversion
    s3_q.d    <= gf4_inv(s2_q.d);
    s3_q.ah   <= s2_q.ah;
    s3_q.ahl  <= s2_q.ahl;
    // stage 4: two multipliers give the 8-bit inverse
    s4_q      <= {gf4_mul(s3_q.ah, s3_q.d), gf4_mul(s3_q.ahl, s3_q.d)};
  end

  // stage 5 (combinational part): back to GF(2^8) and affine transform
  assign out_byte = inv_iso_affine(s4_q);

endmodule
