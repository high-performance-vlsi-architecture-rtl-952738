// tb_gcm_incr: checks that load gives J0 = IV || 0^31 || 1, that each inc
// adds one to the low 32 bits only, that the count wraps modulo 2^32
// without touching the IV part, and that load wins over inc.
module tb_gcm_incr;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic load, inc;
  logic [95:0] iv;
  logic [127:0] ctr;
  int checks = 0, failures = 0;

  gcm_incr dut (.clk(clk), .load(load), .iv(iv), .inc(inc), .ctr(ctr));

  task automatic check(input logic [127:0] e);
    checks++;
    if (ctr !== e) begin failures++; $display("ctr %032h expected %032h", ctr, e); end
  endtask

  initial begin
    iv = 96'hffeeddccbbaa998877665544; load = 1'b1; inc = 1'b1;
    @(posedge clk); #1;
    check({iv, 32'd1});
    load = 1'b0;
    for (int i = 2; i < 40; i++) begin
      inc = (i % 3 != 0);
      @(posedge clk); #1;
    end
    // 38 cycles with inc on 25 of them (i = 2..39 less the 13 multiples of 3)
    check({iv, 32'd26});
    inc = 1'b0;
    @(posedge clk); #1;
    check({iv, 32'd26});
    // wrap-around: stepping 2^32 times is too slow, so the low word is
    // forced close to its maximum and the carry behaviour is checked
    iv = 96'h0123456789abcdef01234567;
    load = 1'b1; @(posedge clk); #1; load = 1'b0;
    force dut.ctr[31:0] = 32'hfffffffe;
    @(posedge clk); #1;
    release dut.ctr[31:0];
    inc = 1'b1;
    @(posedge clk); #1; check({iv, 32'hffffffff});
    @(posedge clk); #1; check({iv, 32'h00000000});
    @(posedge clk); #1; check({iv, 32'h00000001});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
