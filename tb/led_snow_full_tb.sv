// Full-size testbench for led_snow with every parameter at its default
// (CLK_DIV = 2,000,000, i.e. 25 display updates per second at 50 MHz).
// It runs 8,000,004 clocks, 160 ms of board time: power-up preload, then a
// snow update, a switch to gaussian mode, two gaussian updates and a switch
// back to snow for the fourth update. led_snow_checker compares the LEDs
// after every clock edge with an independent model.
module led_snow_full_tb;
  logic       clk = 1'b0;
  logic [1:0] key = 2'b11;
  logic [7:0] led;

  led_snow dut (.clk(clk), .key(key), .led(led));
  led_snow_checker chk (.clk(clk), .key(key), .led(led));

  always #10 clk = ~clk;

  initial begin
    int c, f;
    repeat (9_000_000) @(posedge clk);
    chk.report(c, f);
    f++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end

  initial begin
    int c, f;
    repeat (3_000_000) @(negedge clk);
    key[0] = 1'b0;                       // KEY0 pressed: gaussian display
    repeat (4_000_000) @(negedge clk);
    key[0] = 1'b1;                       // released: snow again
    repeat (1_000_004) @(negedge clk);
    chk.report(c, f);
    c++;
    if (chk.n_snow != 2 || chk.n_gauss != 2) begin
      f++; $display("FAIL expected 2 snow and 2 gaussian updates, saw %0d and %0d", chk.n_snow, chk.n_gauss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", c, f);
    $finish;
  end
endmodule
