// tb_aes_round_sp: feeds a new random state every cycle into a normal round
// and a last round (no MixColumns) and checks each output against the
// reference round exactly six clock edges later. The round key is the
// FIPS-197 round-1 key throughout, and the first state is the FIPS-197
// round-1 input, whose known result is checked as well.
module tb_aes_round_sp;
  import aes_ref_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int LAT = 6;
  localparam int N   = 100;

  logic [127:0] s, rk, o_mid, o_last;
  logic [127:0] hist [N];
  int checks = 0, failures = 0;

  aes_round_sp #(.LAST(1'b0)) dut_mid  (.clk(clk), .state_in(s), .rk(rk), .state_out(o_mid));
  aes_round_sp #(.LAST(1'b1)) dut_last (.clk(clk), .state_in(s), .rk(rk), .state_out(o_last));

  initial begin
    rk = 128'ha0fafe1788542cb123a339392a6c7605;
    // FIPS-197 appendix B, round 1 input and round key
    hist[0] = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    for (int i = 1; i < N; i++) hist[i] = {$urandom, $urandom, $urandom, $urandom};
    for (int i = 0; i < N + LAT; i++) begin
      s = hist[i % N];
      @(posedge clk); #1;
      if (i == LAT - 1) begin
        checks++;
        if (o_mid !== 128'ha49c7ff2689f352b6b5bea43026a5049) begin
          failures++; $display("FIPS round 1: got %032h", o_mid);
        end
      end
      if (i >= LAT - 1 && i - (LAT - 1) < N) begin
        logic [127:0] e1, e2;
        e1 = ref_round(hist[i - (LAT - 1)], rk, 1'b0);
        e2 = ref_round(hist[i - (LAT - 1)], rk, 1'b1);
        checks += 2;
        if (o_mid  !== e1) begin failures++; $display("mid  %0d: got %032h exp %032h", i, o_mid, e1); end
        if (o_last !== e2) begin failures++; $display("last %0d: got %032h exp %032h", i, o_last, e2); end
      end
    end
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
