// Sequence-length measurement for the LED snow LFSR (32 bits, taps 1, 5,
// 18, 30, seeded with all ones): counts clocks until the register returns
// to the seed. The tap set is not a maximal-length one: the expected period,
// 25,165,812 clocks (about 0.5 s at 50 MHz), was found by stepping the
// recurrence s' = {s[0]^s[4]^s[17]^s[29], s[31:1]} in software. Also checks
// that the register never reaches the all-zero lock-up state.
module lfsr_period_tb;
  localparam int unsigned EXPECTED = 25_165_812;

  logic        clk = 1'b0;
  logic        pre = 1'b1;
  logic [31:0] u;
  int checks = 0, failures = 0;
  int unsigned n = 0;
  bit zero_seen = 1'b0;

  lfsr #(.M(32), .TAP1(1), .TAP2(5), .TAP3(18), .TAP4(30)) dut (
    .clk(clk), .pre(pre), .u0(32'hFFFF_FFFF), .u(u));

  always #5 clk = ~clk;

  initial begin
    repeat (EXPECTED + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d steps", n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    pre = 1'b0;
    checks++;
    if (u != 32'hFFFF_FFFF) begin failures++; $display("FAIL seed not loaded"); end
    do begin
      @(posedge clk); #1;
      n++;
      if (u == '0) zero_seen = 1'b1;
    end while (u != 32'hFFFF_FFFF && n < EXPECTED + 10);
    $display("sequence length from the all-ones seed: %0d clocks (2^32 = 4294967296)", n);
    checks++;
    if (n != EXPECTED) begin failures++; $display("FAIL period %0d expected %0d", n, EXPECTED); end
    checks++;
    if (zero_seen) begin failures++; $display("FAIL all-zero state reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
