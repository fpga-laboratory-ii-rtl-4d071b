// Testbench for lfsr: checks the synchronous preload and 2000 consecutive
// shift steps against a bit-level reference model, for the generic default
// taps (1, 2, 17, 29) and for the taps of the LED snow top (1, 5, 18, 30).
// It also works the pre-lab example: from state 0x2AE4D1C3 with taps
// 1, 5, 18, 30 the next state is computed by hand below.
module lfsr_tb;
  import snow_ref_pkg::*;

  logic        clk = 1'b0;
  logic        pre;
  logic [31:0] u0;
  logic [31:0] ua, ub;
  int checks = 0, failures = 0;

  lfsr dut_a (.clk(clk), .pre(pre), .u0(u0), .u(ua));                              // defaults
  lfsr #(.M(32), .TAP1(1), .TAP2(5), .TAP3(18), .TAP4(30)) dut_b (.clk(clk), .pre(pre), .u0(u0), .u(ub));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [31:0] ea, eb;
    // hand example: state 0010 1010 1110 0100 1101 0001 1100 0011
    // taps (bits 0,4,17,29) = 1,0,0,1 -> feedback 0; shifted right gives 0x157268E1
    pre = 1'b1; u0 = 32'h2AE4_D1C3;
    @(posedge clk); #1;
    chk(ub, 32'h2AE4_D1C3, "preload");
    pre = 1'b0;
    @(posedge clk); #1;
    chk(ub, 32'h1572_68E1, "worked example next state");

    foreach (u0[i]) u0[i] = 1'b1;     // seed all ones as the top level does
    pre = 1'b1;
    @(posedge clk); #1;
    pre = 1'b0;
    ea = 32'hFFFF_FFFF; eb = 32'hFFFF_FFFF;
    chk(ua, ea, "all-ones preload a"); chk(ub, eb, "all-ones preload b");
    for (int n = 0; n < 2000; n++) begin
      @(posedge clk); #1;
      ea = lfsr_next(ea, 32, 1, 2, 17, 29);
      eb = lfsr_next(eb, 32, 1, 5, 18, 30);
      chk(ua, ea, "default taps step");
      chk(ub, eb, "snow taps step");
    end
    // preload in the middle of running wins over shifting
    u0 = 32'h0000_0001; pre = 1'b1;
    @(posedge clk); #1;
    chk(ua, 32'h1, "re-preload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
