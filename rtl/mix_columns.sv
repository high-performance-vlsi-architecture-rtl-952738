// mix_columns: AES MixColumns on a 128-bit state (byte 0 in bits [127:120],
// columns of four consecutive bytes). Each column is treated as a
// polynomial over GF(2^8) and multiplied by {03}x^3+{01}x^2+{01}x+{02};
// the constant multipliers are built from xtime and XOR only, no general
// multipliers. Purely combinational.
module mix_columns
  import aes_gcm_pkg::*;
(
  input  block_t state_in,
  output block_t state_out
);

  always_comb begin
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a0, a1, a2, a3;
      a0 = state_in[127 - 32*c -: 8];
      a1 = state_in[119 - 32*c -: 8];
      a2 = state_in[111 - 32*c -: 8];
      a3 = state_in[103 - 32*c -: 8];
      state_out[127 - 32*c -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      state_out[119 - 32*c -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      state_out[111 - 32*c -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      state_out[103 - 32*c -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
  end

endmodule
