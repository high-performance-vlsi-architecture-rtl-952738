// gcm_incr: GCM counter block generator (the incr function).
//
// load sets the counter to J0 = IV || 0^31 || 1 for a 96-bit IV; each inc
// pulse adds one to the low 32 bits modulo 2^32 (inc32), leaving the IV
// part unchanged. ctr is the registered counter block; it changes on the
// clock edge after load or inc. load has priority over inc.
module gcm_incr
  import aes_gcm_pkg::*;
(
  input  logic        clk,
  input  logic        load,
  input  logic [95:0] iv,
  input  logic        inc,
  output block_t      ctr
);

  always_ff @(posedge clk) begin
    if (load)     ctr <= {iv, 32'd1};
    else if (inc) ctr <= {ctr[127:32], ctr[31:0] + 32'd1};
  end

endmodule
