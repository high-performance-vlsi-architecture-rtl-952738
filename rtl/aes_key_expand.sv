// aes_key_expand: AES-128 key schedule for the pipelined core.
//
// A one-cycle load pulse stores the cipher key as round key 0; the
// following ten cycles each derive the next round key
//   w4 = w0 ^ SubWord(RotWord(w3)) ^ Rcon, w5 = w4 ^ w1, ...
// with four composite-field S-boxes (the same arithmetic as the datapath,
// unpipelined) and a shifting Rcon. All eleven round keys stay in
// registers so that every round of the pipeline reads its own key; ready
// rises after the tenth key is written and stays high until the next load.
// The schedule itself is the standard AES one; computing one round key per
// cycle is this design's choice. rst is synchronous and active high.
module aes_key_expand
  import aes_gcm_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      load,
  input  block_t    key,
  output rk_array_t rk,
  output logic      ready
);

  logic [3:0] idx_q;      // index of the next round key to produce, 1..10
  logic       busy_q;
  logic [7:0] rcon_q;
  block_t     prev, next;

  assign prev = rk[idx_q - 4'd1];

  always_comb begin
    logic [31:0] t;
    t = {sbox_comb(prev[23:16]), sbox_comb(prev[15:8]),
         sbox_comb(prev[7:0]),   sbox_comb(prev[31:24])};
    t[31:24] ^= rcon_q;
    next[127:96] = prev[127:96] ^ t;
    next[95:64]  = prev[95:64]  ^ next[127:96];
    next[63:32]  = prev[63:32]  ^ next[95:64];
    next[31:0]   = prev[31:0]   ^ next[63:32];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q <= 1'b0;
      ready  <= 1'b0;
      idx_q  <= 4'd1;
      rcon_q <= 8'h01;
      for (int i = 0; i <= 10; i++) rk[i] <= '0;
    end else if (load) begin
      rk[0]  <= key;
      busy_q <= 1'b1;
      ready  <= 1'b0;
      idx_q  <= 4'd1;
      rcon_q <= 8'h01;
    end else if (busy_q) begin
      rk[idx_q] <= next;
      rcon_q    <= xtime(rcon_q);
      idx_q     <= idx_q + 4'd1;
      if (idx_q == 4'd10) begin
        busy_q <= 1'b0;
        ready  <= 1'b1;
      end
    end
  end

endmodule
