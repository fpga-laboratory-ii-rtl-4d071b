// Testbench for clk_div: with CLK_DIV = 7 the ce pulse must appear after
// edges 7, 14, 21, ... and be exactly one clock wide; with the default
// CLK_DIV = 2,000,000 the first two pulses must follow edges 2,000,000 and
// 4,000,000 and ce must be low in between.
module clk_div_tb;
  logic clk = 1'b0;
  logic ce7, ce_def;
  int checks = 0, failures = 0;
  int pulses_def = 0;

  clk_div #(.CLK_DIV(7)) dut7   (.clk(clk), .ce(ce7));
  clk_div                dutdef (.clk(clk), .ce(ce_def));

  always #5 clk = ~clk;

  initial begin
    repeat (4_100_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic got, logic exp, int edge_no, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s after edge %0d: got %b expected %b", what, edge_no, got, exp);
    end
  endtask

  initial begin
    #1;
    chk(ce7, 1'b0, 0, "power-up ce7");
    chk(ce_def, 1'b0, 0, "power-up ce default");
    for (int e = 1; e <= 4_000_001; e++) begin
      @(posedge clk); #1;
      if (e <= 200) chk(ce7, (e % 7) == 0, e, "ce7");
      if (ce_def) begin
        pulses_def++;
        chk(1'b1, (e == 2_000_000) || (e == 4_000_000), e, "default ce position");
      end
    end
    chk(1'b1, pulses_def == 2, 0, "default ce count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
