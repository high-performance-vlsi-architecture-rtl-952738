// tb_sbox_sp: streams all 256 byte values through the sub-pipelined S-box,
// one per cycle, and checks every result against the brute-force reference
// exactly four clock edges later (the S-box's register depth).
module tb_sbox_sp;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;
  logic [7:0] expect_tab [256];

  sbox_sp dut (.clk(clk), .in_byte(in_byte), .out_byte(out_byte));

  initial begin
    for (int i = 0; i < 256; i++) expect_tab[i] = ref_sbox(8'(i));
    for (int i = 0; i < 256 + 4; i++) begin
      in_byte = 8'(i);
      @(posedge clk); #1;
      if (i >= 3) begin
        checks++;
        if (out_byte !== expect_tab[i-3]) begin
          failures++;
          $display("S(%02h): got %02h expected %02h", i-3, out_byte, expect_tab[i-3]);
        end
      end
    end
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
