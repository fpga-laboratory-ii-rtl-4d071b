// Testbench for load_gen: load must be high from power-up through the
// CYCLES-th clock edge, low from the next edge, and stay low. Runs the
// default (10 cycles) and a 3-cycle instance side by side.
module load_gen_tb;
  logic clk = 1'b0;
  logic load10, load3;
  int checks = 0, failures = 0;

  load_gen             dut10 (.clk(clk), .load(load10));
  load_gen #(.CYCLES(3)) dut3 (.clk(clk), .load(load3));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic got, logic exp, int edge_no, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s after edge %0d: got %b expected %b", what, edge_no, got, exp);
    end
  endtask

  initial begin
    #1;
    chk(load10, 1'b1, 0, "power-up 10");
    chk(load3,  1'b1, 0, "power-up 3");
    for (int e = 1; e <= 100; e++) begin
      @(posedge clk); #1;
      chk(load10, e <= 10, e, "load 10");
      chk(load3,  e <= 3,  e, "load 3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
