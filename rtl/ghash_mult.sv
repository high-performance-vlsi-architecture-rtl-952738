// ghash_mult: GF(2^128) multiplier of the GHASH function (multH).
//
// Computes z = x * h in GF(2^128) with the GCM field polynomial
// 1 + x + x^2 + x^7 + x^128 and GCM's reflected bit order: bit 127 of the
// vector (the first bit of the block) is the coefficient of x^0.
// It is the bit-parallel shift-and-add form: for each bit of x, taken from
// the x^0 end, the running multiple v = h*x^i is added into z, and v is
// multiplied by x (a right shift, folding the dropped x^127 term back in
// with the constant 0xE1 << 120). Fully combinational, one product per
// clock when registered by the caller. The single-cycle parallel structure
// is this design's choice.
module ghash_mult
  import aes_gcm_pkg::*;
(
  input  block_t x,
  input  block_t h,
  output block_t z
);

  localparam block_t R = {8'hE1, 120'd0};

  always_comb begin
    block_t v;
    z = '0;
    v = h;
    for (int i = 127; i >= 0; i--) begin
      if (x[i]) z ^= v;
      v = v[0] ? ((v >> 1) ^ R) : (v >> 1);
    end
  end

endmodule
