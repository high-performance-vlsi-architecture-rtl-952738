// tb_aes_gcm_top: end-to-end test of the AES-128-GCM design at its default
// parameters. Expected ciphertexts and tags are standard AES-GCM results
// (NIST SP 800-38D); two come from the GCM specification's test cases 1
// and 2, the rest were computed with an independent AES-GCM library.
//
// Operations run:
//   four single-block encryptions with a one-block AAD (same AAD and IV,
//   two keys), one of them checked for exact cycle timing;
//   decryption with a matching tag (tag_ok = 1) and with one ciphertext
//   byte changed (different plaintext and tag, tag_ok = 0);
//   8-block text with 2-block AAD, encrypted and decrypted, with an idle
//   cycle after every block and further random idle cycles on both input
//   streams;
//   3 blocks without AAD; an empty message (m = n = 0, GMAC of nothing).
// Mechanisms counted (each must occur): AAD and text idle cycles seen by a
// ready input, text offered before the design is ready for it,
// back-to-back keystream outputs (several blocks in the pipeline at once),
// decryption, tag mismatch, empty AAD, empty text.
// Timing checked with back-to-back inputs: each text block leaves 61
// cycles after it was accepted (60 pipeline + 1 output register), and
// done is high 136 + m + n cycles after the cycle in which start is high
// for n >= 1, and 76 + m cycles after it for n = 0.
module tb_aes_gcm_top;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rst, start, decrypt;
  logic [127:0] key, aad, text_in, text_out, tag_in, tag;
  logic [95:0]  iv;
  logic [15:0]  m, n;
  logic         aad_valid, aad_ready, text_valid, text_ready, text_out_valid, tag_ok, done;

  aes_gcm_top dut (.*);

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // mechanism counters
  int n_aad_idle = 0, n_text_idle = 0, n_text_wait = 0, n_b2b = 0;
  int n_dec = 0, n_mismatch = 0, n_m0 = 0, n_n0 = 0;
  logic prev_out_valid = 1'b0;

  logic [127:0] aad_v [8];
  logic [127:0] txt_v [8];
  logic [127:0] exp_v [8];
  int           fire_cycle [$];
  int           n_out;
  bit           gaps;

  always @(posedge clk) if (!rst) begin
    if (aad_ready && !aad_valid) n_aad_idle++;
    if (text_ready && !text_valid) n_text_idle++;
    if (text_valid && !text_ready) n_text_wait++;
    if (text_out_valid && prev_out_valid) n_b2b++;
    prev_out_valid <= text_out_valid;
    if (text_valid && text_ready) fire_cycle.push_back(cycle);
    if (text_out_valid) begin
      int c0;
      c0 = fire_cycle.pop_front();
      checks++;
      if (text_out !== exp_v[n_out]) begin
        failures++; $display("block %0d: got %032h exp %032h", n_out, text_out, exp_v[n_out]);
      end
      if (!gaps) begin
        checks++;
        if (cycle - c0 != 61) begin failures++; $display("block latency %0d", cycle - c0); end
      end
      n_out++;
    end
  end

  task automatic drive_aad(input int cnt);
    for (int i = 0; i < cnt; i++) begin
      while (gaps && ($urandom % 3 == 0)) begin aad_valid = 1'b0; @(posedge clk); #1; end
      aad = aad_v[i]; aad_valid = 1'b1;
      do @(posedge clk); while (!aad_ready);
      #1 aad_valid = 1'b0;
      if (gaps) begin @(posedge clk); #1; end
    end
  endtask

  task automatic drive_text(input int cnt);
    for (int i = 0; i < cnt; i++) begin
      while (gaps && ($urandom % 3 == 0)) begin text_valid = 1'b0; @(posedge clk); #1; end
      text_in = txt_v[i]; text_valid = 1'b1;
      do @(posedge clk); while (!text_ready);
      #1 text_valid = 1'b0;
      if (gaps) begin @(posedge clk); #1; end
    end
  endtask

  task automatic run_op(input logic [127:0] k, input logic [95:0] v, input bit dec,
                        input int mm, input int nn, input logic [127:0] exp_tag,
                        input logic [127:0] tin, input bit exp_ok, input bit with_gaps,
                        input bit check_time);
    int t0, t_done;
    gaps = with_gaps; n_out = 0;
    key = k; iv = v; decrypt = dec; m = 16'(mm); n = 16'(nn); tag_in = tin;
    start = 1'b1; t0 = cycle;
    @(posedge clk); #1 start = 1'b0;
    fork
      drive_aad(mm);
      begin
        // offer the first text block early, before the design wants it
        if (!with_gaps && nn > 0) begin text_in = txt_v[0]; text_valid = 1'b1; end
        drive_text(nn);
      end
    join
    while (!done) @(posedge clk);
    t_done = cycle;
    #1;
    checks += 3;
    if (n_out != nn) begin failures++; $display("%0d text blocks out, expected %0d", n_out, nn); end
    if (tag !== exp_tag) begin failures++; $display("tag %032h exp %032h", tag, exp_tag); end
    if (tag_ok !== exp_ok) begin failures++; $display("tag_ok %0b exp %0b", tag_ok, exp_ok); end
    if (check_time) begin
      int exp_t;
      exp_t = (nn > 0) ? 136 + mm + nn : 76 + mm;
      checks++;
      if (t_done - t0 != exp_t) begin
        failures++; $display("done after %0d cycles, expected %0d", t_done - t0, exp_t);
      end
      $display("m=%0d n=%0d: done %0d cycles after start", mm, nn, t_done - t0);
    end
    if (dec) n_dec++;
    if (dec && !exp_ok) n_mismatch++;
    if (mm == 0) n_m0++;
    if (nn == 0) n_n0++;
    repeat (3) @(posedge clk);
    #1;
  endtask

  localparam logic [127:0] K1  = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] K2  = 128'h0123456789abcdef0123456789abcdef;
  localparam logic [127:0] AAD = 128'hfedcba987654321fedcba98765432100;
  localparam logic [95:0]  IV  = 96'hffeeddccbbaa998877665544;
  localparam logic [127:0] KM  = 128'h82b70eee7f1a5039bef07ec2347f066e;
  localparam logic [95:0]  IVM = 96'hd08f5dc7512447e340430002;

  logic [127:0] mp [8] = '{128'h5a1d830bb7ce09d6bbc004e7175c643c, 128'h7decb0b580ec37bc9712dd2e6aaeb94b,
                           128'hae8d2f9fa29c5a284c9ef7521829cf10, 128'h79b080e9d74a1c10fcab6a4243d33656,
                           128'hdebe4c1ed79648e856e8f9a2f58c95f0, 128'hce4b39c15bffad5c2dfb8bb820b6119c,
                           128'hba8ff88796ae5b05f280a68ced93b6b2, 128'h8cb0d1b358e6baab485565b9f49028d5};
  logic [127:0] mc [8] = '{128'he0d8d620af2072ec22c9d3bc73459868, 128'hd28356a27034f7dcac2cd143fe350cc4,
                           128'hdc189c062f7a8a8be33d308c7b847d7c, 128'h479017cd8231f6a0af144b048d293d61,
                           128'h9244a20ca4edc040d90ee59393adef26, 128'h200d996ef8863e94ded186de8c2bf202,
                           128'hb5938963dc979a862b228c9d1b837786, 128'hb13bef9bfd83d3a26114caed8a06b281};

  initial begin
    rst = 1'b1; start = 1'b0; decrypt = 1'b0; key = '0; iv = '0; m = '0; n = '0;
    aad = '0; aad_valid = 1'b0; text_in = '0; text_valid = 1'b0; tag_in = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    @(posedge clk); #1;

    // single-block encryptions, AAD and IV shared
    aad_v[0] = AAD;
    txt_v[0] = 128'h0123456789abcdef0123456789abcdef; exp_v[0] = 128'h5459ae52f843a513f237f18ab4bec861;
    run_op(K1, IV, 0, 1, 1, 128'h859d9f1bb1212094b65dafd86e511e3b, '0, 0, 0, 1);
    txt_v[0] = 128'h0abcdef0123456789abcdef123456789; exp_v[0] = 128'h5fc635c563dc3e8469a86a1c1e506207;
    run_op(K1, IV, 0, 1, 1, 128'hb9394c8e92d8d75fca5b4869b290b0e7, '0, 0, 0, 0);
    txt_v[0] = 128'h09876543210fedcbaabcdef123456789; exp_v[0] = 128'h0a428cf37bca14b8a28411c00b453718;
    run_op(K2, IV, 0, 1, 1, 128'hd94628659f7f037a86ceaba988bc7766, '0, 0, 0, 0);
    txt_v[0] = 128'h43210fedcba98765abcdef5678901234; exp_v[0] = 128'h40e4e65d916c7e16a3f52067509042a5;
    run_op(K2, IV, 0, 1, 1, 128'h799bb6e29a956668d46bb0f9b24c364d, '0, 0, 0, 0);

    // decryption, matching tag
    txt_v[0] = 128'h5459ae52f843a513f237f18ab4bec861; exp_v[0] = 128'h0123456789abcdef0123456789abcdef;
    run_op(K1, IV, 1, 1, 1, 128'h859d9f1bb1212094b65dafd86e511e3b,
           128'h859d9f1bb1212094b65dafd86e511e3b, 1, 0, 1);
    // decryption of a changed ciphertext: the tag no longer matches
    txt_v[0] = 128'h5459ae52f843a580f237f18ab4bec861; exp_v[0] = 128'h0123456789abcd7c0123456789abcdef;
    run_op(K1, IV, 1, 1, 1, 128'h242cfa59766d63b55b078401cbdd5ba4,
           128'h859d9f1bb1212094b65dafd86e511e3b, 0, 0, 0);

    // 2 AAD blocks, 8 text blocks
    aad_v[0] = 128'h6b6e545594a065685d64c4980bb8d454;
    aad_v[1] = 128'h4a8721a99a01ad219eb59cf6a15ef6f1;
    txt_v = mp; exp_v = mc;
    run_op(KM, IVM, 0, 2, 8, 128'hca6e2ca1cf777ed46e0416d9b92f30fd, '0, 0, 0, 1);
    run_op(KM, IVM, 0, 2, 8, 128'hca6e2ca1cf777ed46e0416d9b92f30fd, '0, 0, 1, 0);
    txt_v = mc; exp_v = mp;
    run_op(KM, IVM, 1, 2, 8, 128'hca6e2ca1cf777ed46e0416d9b92f30fd,
           128'hca6e2ca1cf777ed46e0416d9b92f30fd, 1, 1, 0);
    // no AAD, 3 blocks
    txt_v = mp; exp_v = mc;
    run_op(KM, IVM, 0, 0, 3, 128'hf822f6f0a25a0150f2ed76242ec2e4e7, '0, 0, 0, 1);
    // GCM specification test cases 1 (empty) and 2 (one zero block)
    run_op('0, '0, 0, 0, 0, 128'h58e2fccefa7e3061367f1d57a4e7455a, '0, 0, 0, 1);
    txt_v[0] = '0; exp_v[0] = 128'h0388dace60b6a392f328c2b971b2fe78;
    run_op('0, '0, 0, 0, 1, 128'hab6e47d42cec13bdf53a67b21257bddf, '0, 0, 0, 1);

    $display("mechanisms: aad_idle=%0d text_idle=%0d text_wait=%0d back_to_back=%0d decrypt=%0d tag_mismatch=%0d m0=%0d n0=%0d",
             n_aad_idle, n_text_idle, n_text_wait, n_b2b, n_dec, n_mismatch, n_m0, n_n0);
    checks += 8;
    if (n_aad_idle == 0) failures++;
    if (n_text_idle == 0) failures++;
    if (n_text_wait == 0) failures++;
    if (n_b2b == 0) failures++;
    if (n_dec == 0) failures++;
    if (n_mismatch == 0) failures++;
    if (n_m0 == 0) failures++;
    if (n_n0 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
