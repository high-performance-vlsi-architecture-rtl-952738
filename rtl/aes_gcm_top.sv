// aes_gcm_top: AES-128-GCM authenticated encryption and decryption around
// the sub-pipelined AES core.
//
// One operation, started by a one-cycle start pulse, runs these phases:
//   KEYEXP  the key schedule derives the eleven round keys (10 cycles);
//   HKEY    the all-zero block and J0 = IV||0^31||1 enter the AES pipeline
//           back to back; 60 cycles later they give the hash subkey
//           H = E_K(0) and E_K(J0);
//   AAD     once H is known, m AAD blocks are taken (aad_valid/aad_ready)
//           and folded into GHASH, X = (X ^ A_i) * H, one per cycle;
//   TEXT    n text blocks are taken (text_valid/text_ready); for each, the
//           next counter block (inc32) enters the AES pipeline and the text
//           block waits in a FIFO. When the keystream block leaves the
//           pipeline 60 cycles later it is XORed with the waiting text to
//           give text_out, and the ciphertext (text_out when encrypting,
//           text_in when decrypting) is folded into GHASH;
//   LEN     the block len(A)||len(C) (in bits, 64 bits each) is folded in;
//   TAG     tag = X ^ E_K(J0); tag_ok compares it with tag_in (used when
//           decrypting); done rises and stays high until the next start.
// The AES pipeline accepts a block every cycle, so text blocks offered
// back to back are processed at one per cycle after a 61-cycle fill.
// Interface: single clock, synchronous active-high rst. text_out is
// registered and valid for one cycle with text_out_valid, in input order.
// AAD and text lengths are whole 128-bit blocks (m and n blocks).
// The phases, the handshakes, the FIFO, the decrypt/tag_in ports and the
// block-count lengths are this design's choices; the data flow (counter,
// E_K, XOR, multH chain, tag = GHASH ^ E_K(J0)) follows GCM.
module aes_gcm_top
  import aes_gcm_pkg::*;
#(
  parameter int unsigned CNT_W      = 16,
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic             decrypt,
  input  block_t           key,
  input  logic [95:0]      iv,
  input  logic [CNT_W-1:0] m,
  input  logic [CNT_W-1:0] n,
  input  block_t           aad,
  input  logic             aad_valid,
  output logic             aad_ready,
  input  block_t           text_in,
  input  logic             text_valid,
  output logic             text_ready,
  output block_t           text_out,
  output logic             text_out_valid,
  input  block_t           tag_in,
  output block_t           tag,
  output logic             tag_ok,
  output logic             done
);

  typedef enum logic [2:0] {S_IDLE, S_KEYEXP, S_J0, S_AAD, S_TEXT, S_LEN, S_TAG} state_e;

  state_e           state_q;
  logic             dec_q;
  logic [CNT_W-1:0] m_q, n_q, aad_cnt_q, iss_cnt_q, proc_cnt_q;
  logic [1:0]       out_sel_q;        // 0: next output is H, 1: E_K(J0), 2: keystream
  logic             h_ok_q, j0_ok_q;
  block_t           h_q, ekj0_q, x_q;

  // ---------------- sub-blocks ----------------
  rk_array_t rk;
  logic      keys_ready;
  logic      go;

  assign go = start && (state_q == S_IDLE);

  aes_key_expand u_keys (
    .clk(clk), .rst(rst), .load(go), .key(key), .rk(rk), .ready(keys_ready)
  );

  block_t ctr;
  logic   ctr_inc;
  gcm_incr u_ctr (.clk(clk), .load(go), .iv(iv), .inc(ctr_inc), .ctr(ctr));

  logic   pipe_in_valid, pipe_out_valid;
  block_t pipe_in, pipe_out;
  aes_pipe_sp u_aes (
    .clk(clk), .rst(rst), .in_valid(pipe_in_valid), .in_block(pipe_in), .rk(rk),
    .out_valid(pipe_out_valid), .out_block(pipe_out)
  );

  logic   aad_fire, text_fire, ks_fire;
  block_t fifo_rd;
  logic   fifo_empty, fifo_full;
  sync_fifo #(.WIDTH(128), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk(clk), .rst(rst), .push(text_fire), .wr_data(text_in), .pop(ks_fire),
    .rd_data(fifo_rd), .empty(fifo_empty), .full(fifo_full)
  );

  block_t ghash_in, ghash_prod, ct_blk;
  logic   ghash_en;
  ghash_mult u_mult (.x(x_q ^ ghash_in), .h(h_q), .z(ghash_prod));

  // ---------------- control ----------------
  assign aad_ready  = (state_q == S_AAD) && h_ok_q && (aad_cnt_q != m_q);
  assign text_ready = (state_q == S_TEXT) && (iss_cnt_q != n_q) && !fifo_full;
  assign aad_fire   = aad_valid && aad_ready;
  assign text_fire  = text_valid && text_ready;
  assign ks_fire    = pipe_out_valid && (out_sel_q == 2'd2);
  assign ct_blk     = dec_q ? fifo_rd : (fifo_rd ^ pipe_out);

  always_comb begin
    pipe_in_valid = 1'b0;
    pipe_in       = ctr;
    ctr_inc       = 1'b0;
    if (state_q == S_KEYEXP && keys_ready) begin
      pipe_in_valid = 1'b1;             // all-zero block for H
      pipe_in       = '0;
    end else if (state_q == S_J0) begin
      pipe_in_valid = 1'b1;             // J0 for the tag mask
      ctr_inc       = 1'b1;
    end else if (text_fire) begin
      pipe_in_valid = 1'b1;             // counter block for keystream
      ctr_inc       = 1'b1;
    end

    ghash_en = 1'b1;
    if (aad_fire)               ghash_in = aad;
    else if (ks_fire)           ghash_in = ct_blk;
    else if (state_q == S_LEN)  ghash_in = {(64'(m_q) << 7), (64'(n_q) << 7)};
    else begin
      ghash_in = '0;
      ghash_en = 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q        <= S_IDLE;
      dec_q          <= 1'b0;
      m_q            <= '0;
      n_q            <= '0;
      aad_cnt_q      <= '0;
      iss_cnt_q      <= '0;
      proc_cnt_q     <= '0;
      out_sel_q      <= '0;
      h_ok_q         <= 1'b0;
      j0_ok_q        <= 1'b0;
      h_q            <= '0;
      ekj0_q         <= '0;
      x_q            <= '0;
      tag            <= '0;
      tag_ok         <= 1'b0;
      done           <= 1'b0;
      text_out       <= '0;
      text_out_valid <= 1'b0;
    end else begin
      text_out_valid <= 1'b0;
      if (ghash_en) x_q <= ghash_prod;

      if (pipe_out_valid) begin
        unique case (out_sel_q)
          2'd0:    begin h_q    <= pipe_out; h_ok_q  <= 1'b1; out_sel_q <= 2'd1; end
          2'd1:    begin ekj0_q <= pipe_out; j0_ok_q <= 1'b1; out_sel_q <= 2'd2; end
          default: begin
            text_out       <= fifo_rd ^ pipe_out;
            text_out_valid <= 1'b1;
            proc_cnt_q     <= proc_cnt_q + 1'b1;
          end
        endcase
      end
      if (aad_fire)  aad_cnt_q <= aad_cnt_q + 1'b1;
      if (text_fire) iss_cnt_q <= iss_cnt_q + 1'b1;

      unique case (state_q)
        S_IDLE: if (start) begin
          state_q    <= S_KEYEXP;
          dec_q      <= decrypt;
          m_q        <= m;
          n_q        <= n;
          aad_cnt_q  <= '0;
          iss_cnt_q  <= '0;
          proc_cnt_q <= '0;
          out_sel_q  <= '0;
          h_ok_q     <= 1'b0;
          j0_ok_q    <= 1'b0;
          x_q        <= '0;
          done       <= 1'b0;
          tag_ok     <= 1'b0;
        end
        S_KEYEXP: if (keys_ready) state_q <= S_J0;
        S_J0:     state_q <= S_AAD;
        S_AAD:    if (h_ok_q && aad_cnt_q == m_q) state_q <= S_TEXT;
        S_TEXT:   if (j0_ok_q && proc_cnt_q == n_q) state_q <= S_LEN;
        S_LEN:    state_q <= S_TAG;
        S_TAG: begin
          tag     <= x_q ^ ekj0_q;
          tag_ok  <= ((x_q ^ ekj0_q) == tag_in);
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default:  state_q <= S_IDLE;
      endcase
    end
  end

  // the GHASH input sources never compete, and keystream never overtakes text
  a_ghash_onehot: assert property (@(posedge clk) disable iff (rst) !(aad_fire && ks_fire));
  a_ks_has_text:  assert property (@(posedge clk) disable iff (rst) ks_fire |-> !fifo_empty);

endmodule
