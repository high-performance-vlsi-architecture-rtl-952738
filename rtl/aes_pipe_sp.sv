// aes_pipe_sp: sub-pipelined AES-128 encryption core.
//
// The input block is XORed with round key 0 and then passes ten round units
// (aes_round_sp), the tenth without MixColumns. With registers between the
// rounds and six register stages inside each round, the core takes one
// block per clock and returns E_K(block) NR*6 = 60 cycles later. A valid bit
// travels alongside the data so the caller knows which outputs are real.
// Round keys rk[0..10] come from aes_key_expand and must be stable while
// blocks are in flight. Only the valid chain is reset (rst, synchronous,
// active high); the data registers are not.
module aes_pipe_sp
  import aes_gcm_pkg::*;
#(
  parameter int unsigned NRND = NR
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      in_valid,
  input  block_t    in_block,
  input  rk_array_t rk,
  output logic      out_valid,
  output block_t    out_block
);

  localparam int unsigned LAT = NRND * ROUND_STAGES;

  block_t stage [0:NRND];
  logic [LAT-1:0] valid_q;

  assign stage[0] = in_block ^ rk[0];

  for (genvar r = 1; r <= NRND; r++) begin : g_round
    aes_round_sp #(.LAST(r == NRND)) u_round (
      .clk       (clk),
      .state_in  (stage[r-1]),
      .rk        (rk[r]),
      .state_out (stage[r])
    );
  end

  always_ff @(posedge clk) begin
    if (rst) valid_q <= '0;
    else     valid_q <= {valid_q[LAT-2:0], in_valid};
  end

  assign out_valid = valid_q[LAT-1];
  assign out_block = stage[NRND];

endmodule
