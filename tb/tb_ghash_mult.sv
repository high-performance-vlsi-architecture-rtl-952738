// tb_ghash_mult: checks the GF(2^128) multiplier on the GCM specification's
// test case 2 product (X1 = C * H) and on random operand pairs against a
// carry-less multiply-and-reduce reference. Also checks that 1 (the block
// 80..00) is the identity and that the product commutes.
module tb_ghash_mult;
  import aes_ref_pkg::*;

  logic [127:0] x, h, z, e;
  int checks = 0, failures = 0;

  ghash_mult dut (.x(x), .h(h), .z(z));

  initial begin
    h = 128'h66e94bd4ef8a2c3b884cfa59ca342b2e;
    x = 128'h0388dace60b6a392f328c2b971b2fe78;
    #1 checks++;
    if (z !== 128'h5e2ec746917062882c85b0685353deb7) begin failures++; $display("TC2 X1 %032h", z); end
    x = {1'b1, 127'd0};
    #1 checks++;
    if (z !== h) begin failures++; $display("identity %032h", z); end
    for (int t = 0; t < 100; t++) begin
      logic [127:0] z1;
      x = {$urandom, $urandom, $urandom, $urandom};
      h = {$urandom, $urandom, $urandom, $urandom};
      #1;
      e = ref_gf128_mul(x, h);
      checks++;
      if (z !== e) begin failures++; $display("%032h*%032h got %032h exp %032h", x, h, z, e); end
      z1 = z;
      {x, h} = {h, x};
      #1 checks++;
      if (z !== z1) begin failures++; $display("not commutative"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
