// End-to-end testbench for led_snow at a reduced display divider
// (CLK_DIV = 16, so the run covers thousands of display updates).
// led_snow_checker predicts every LED value from an independent model.
// The run switches key[0] between snow and gaussian mode several times;
// preload, both display modes, lit snow LEDs and mode switches must each
// occur, and with over a thousand gaussian updates all eight LED
// positions must be seen. The mid-row positions 3 and 4 (variate in
// [-1, 1)) must hold about 68% of them, as a normal distribution does.
module led_snow_tb;
  localparam int unsigned DIV = 16;

  logic       clk = 1'b0;
  logic [1:0] key = 2'b11;
  logic [7:0] led;

  led_snow #(.CLK_DIV(DIV)) dut (.clk(clk), .key(key), .led(led));
  led_snow_checker #(.CLK_DIV(DIV)) chk (.clk(clk), .key(key), .led(led));

  always #10 clk = ~clk;   // 50 MHz

  initial begin
    int c, f;
    repeat (300000) @(posedge clk);
    chk.report(c, f);
    f++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    int c, f, mid, total;
    for (int phase = 0; phase < 8; phase++) begin
      key[0] = (phase % 2 == 0);
      repeat (DIV * ((phase % 2 == 0) ? 50 : 2000) + 3) @(negedge clk);
    end
    chk.report(c, f);
    total = 0;
    foreach (chk.pos_hist[i]) total += chk.pos_hist[i];
    mid = chk.pos_hist[3] + chk.pos_hist[4];
    c += 2;
    if (chk.pos_seen != 8'hFF) begin f++; $display("FAIL not all LED positions seen"); end
    if (mid * 100 < total * 62 || mid * 100 > total * 74) begin
      f++; $display("FAIL central fraction %0d/%0d", mid, total);
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
