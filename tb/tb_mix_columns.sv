// tb_mix_columns: checks MixColumns on the textbook column db 13 53 45 ->
// 8e 4d a1 bc and on random states against a reference built from a
// general GF(2^8) multiplier.
module tb_mix_columns;
  import aes_ref_pkg::*;

  logic [127:0] s, o, e;
  int checks = 0, failures = 0;

  mix_columns dut (.state_in(s), .state_out(o));

  function automatic logic [127:0] ref_mix(input logic [127:0] x);
    logic [127:0] r;
    for (int c = 0; c < 4; c++) begin
      logic [7:0] a [4];
      for (int k = 0; k < 4; k++) a[k] = x[127 - 8*(4*c+k) -: 8];
      for (int k = 0; k < 4; k++)
        r[127 - 8*(4*c+k) -: 8] = ref_gmul(a[k], 2) ^ ref_gmul(a[(k+1)%4], 3) ^ a[(k+2)%4] ^ a[(k+3)%4];
    end
    return r;
  endfunction

  initial begin
    s = {32'hdb135345, 32'hf20a225c, 32'h01010101, 32'hc6c6c6c6};
    #1;
    checks++;
    if (o !== {32'h8e4da1bc, 32'h9fdc589d, 32'h01010101, 32'hc6c6c6c6}) begin
      failures++; $display("known vector: got %032h", o);
    end
    for (int t = 0; t < 200; t++) begin
      s = {$urandom, $urandom, $urandom, $urandom};
      #1;
      e = ref_mix(s);
      checks++;
      if (o !== e) begin failures++; $display("in %032h got %032h expected %032h", s, o, e); end
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
