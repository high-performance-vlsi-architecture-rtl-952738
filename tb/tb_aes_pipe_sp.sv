// tb_aes_pipe_sp: runs the AES-128 pipeline with the FIPS-197 appendix C.1
// key. It first sends the known plaintext alone and checks the known
// ciphertext and the 60-cycle latency, then streams 64 random blocks on
// consecutive cycles, with a gap in the middle, and checks every output
// against the reference cipher, in order, and that outputs come out one
// per cycle with the same gap pattern as the inputs.
module tb_aes_pipe_sp;
  import aes_ref_pkg::*;
  import aes_gcm_pkg::rk_array_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int LAT = 60;
  localparam int N   = 64;
  localparam logic [127:0] KEY = 128'h000102030405060708090a0b0c0d0e0f;

  logic rst, in_valid, out_valid;
  logic [127:0] in_block, out_block;
  rk_array_t rk;
  int checks = 0, failures = 0;
  int cycle = 0;
  int in_cycle [$];
  logic [127:0] exp_q [$];

  aes_pipe_sp dut (.clk(clk), .rst(rst), .in_valid(in_valid), .in_block(in_block), .rk(rk),
                   .out_valid(out_valid), .out_block(out_block));

  function automatic logic [127:0] ref_encrypt(input logic [127:0] p);
    logic [127:0] s;
    s = p ^ ref_round_key(KEY, 0);
    for (int r = 1; r <= 10; r++) s = ref_round(s, ref_round_key(KEY, r), r == 10);
    return s;
  endfunction

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (!rst && in_valid) in_cycle.push_back(cycle);
    if (!rst && out_valid) begin
      int c0;
      logic [127:0] e;
      checks += 2;
      if (exp_q.size() == 0) begin failures++; $display("unexpected output"); end
      else begin
        e = exp_q.pop_front();
        c0 = in_cycle.pop_front();
        if (out_block !== e) begin failures++; $display("got %032h exp %032h", out_block, e); end
        if (cycle - c0 != LAT) begin failures++; $display("latency %0d", cycle - c0); end
      end
    end
  end

  initial begin
    for (int r = 0; r <= 10; r++) rk[r] = ref_round_key(KEY, r);
    rst = 1'b1; in_valid = 1'b0; in_block = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    // FIPS-197 C.1
    in_valid = 1'b1; in_block = 128'h00112233445566778899aabbccddeeff;
    exp_q.push_back(128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    @(posedge clk); #1 in_valid = 1'b0;
    repeat (LAT + 5) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) begin
      in_valid = (i != N/2);
      in_block = {$urandom, $urandom, $urandom, $urandom};
      if (in_valid) exp_q.push_back(ref_encrypt(in_block));
      @(posedge clk); #1;
    end
    in_valid = 1'b0;
    repeat (LAT + 5) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("%0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
