// tb_aes_key_expand: expands the FIPS-197 appendix A key and a random key,
// checks all eleven round keys against the reference schedule, the known
// last round key of the FIPS key, and that ready rises exactly eleven
// clock edges after the load edge (load edge plus ten round-key cycles).
module tb_aes_key_expand;
  import aes_ref_pkg::*;
  import aes_gcm_pkg::rk_array_t;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, load, ready;
  logic [127:0] key;
  rk_array_t rk;
  int checks = 0, failures = 0;

  aes_key_expand dut (.clk(clk), .rst(rst), .load(load), .key(key), .rk(rk), .ready(ready));

  task automatic expand_and_check(input logic [127:0] k);
    int cycles;
    key = k; load = 1'b1;
    @(posedge clk); #1;
    load = 1'b0;
    cycles = 1;
    while (!ready && cycles < 100) begin @(posedge clk); #1; cycles++; end
    checks++;
    if (cycles != 11) begin failures++; $display("ready after %0d edges, expected 11", cycles); end
    for (int r = 0; r <= 10; r++) begin
      checks++;
      if (rk[r] !== ref_round_key(k, r)) begin
        failures++; $display("key %032h round %0d: got %032h exp %032h", k, r, rk[r], ref_round_key(k, r));
      end
    end
  endtask

  initial begin
    rst = 1'b1; load = 1'b0; key = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    expand_and_check(128'h2b7e151628aed2a6abf7158809cf4f3c);
    checks++;
    if (rk[10] !== 128'hd014f9a8c9ee2589e13f0cc8b6630ca6) begin failures++; $display("FIPS rk10 %032h", rk[10]); end
    expand_and_check({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
