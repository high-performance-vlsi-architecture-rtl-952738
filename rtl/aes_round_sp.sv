// aes_round_sp: one AES round unit cut into six register stages.
//
// Stages 1-4 are the sixteen sub-pipelined composite-field S-boxes
// (sbox_sp). Stage 5 finishes the S-box (inverse isomorphic mapping and
// affine transform) and applies ShiftRows, which is only byte routing.
// Stage 6 applies MixColumns and AddRoundKey; with LAST = 1 MixColumns is
// left out, as in the final AES round, but the stage register stays so that
// every round has the same six-cycle latency.
// Timing: state_out = Round(state_in, rk) six clock edges after state_in;
// a new state can enter every cycle. rk is sampled at stage 6, i.e. five
// edges after the state entered, and is expected to be held constant for
// an operation. No reset: the enclosing pipeline tracks validity.
module aes_round_sp
  import aes_gcm_pkg::*;
#(
  parameter bit LAST = 1'b0
) (
  input  logic   clk,
  input  block_t state_in,
  input  block_t rk,
  output block_t state_out
);

  block_t sub_bytes;   // stage-5 combinational S-box outputs
  block_t s5_q;        // after ShiftRows
  block_t mixed;

  for (genvar i = 0; i < 16; i++) begin : g_sbox
    sbox_sp u_sbox (
      .clk      (clk),
      .in_byte  (state_in[127 - 8*i -: 8]),
      .out_byte (sub_bytes[127 - 8*i -: 8])
    );
  end

  always_ff @(posedge clk) s5_q <= shift_rows(sub_bytes);

  if (LAST) begin : g_last
    assign mixed = s5_q;
  end else begin : g_mix
    mix_columns u_mix (.state_in(s5_q), .state_out(mixed));
  end

  always_ff @(posedge clk) state_out <= mixed ^ rk;

endmodule
