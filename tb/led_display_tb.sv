// Testbench for led_display: drives random LFSR words and normal variates in
// both modes, with ce pulses at random times, and compares the LEDs with a
// reference model: snow lights LED i when nibble i is below 2; gaussian
// lights the single LED floor(n1 / 2^13) + 4. Also checks that the LEDs hold
// between enables and that clear turns them off. Every one of the eight
// gaussian positions must be reached.
module led_display_tb;
  import snow_ref_pkg::*;

  logic               clk = 1'b0;
  logic               ce, clear, mode_snow;
  logic [31:0]        rand_q;
  logic signed [17:0] n1;
  logic [7:0]         led;
  logic [7:0]         exp_led;
  logic [7:0]         pos_seen;
  int checks = 0, failures = 0;

  led_display dut (.clk(clk), .ce(ce), .clear(clear), .mode_snow(mode_snow),
                   .rand_q(rand_q), .n1(n1), .led(led));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %b expected %b (rand %h n1 %0d)", what, got, exp, rand_q, n1);
    end
  endtask

  initial begin
    int pos;
    pos_seen = '0;
    ce = 1'b0; clear = 1'b1; mode_snow = 1'b1; rand_q = '0; n1 = '0;
    @(posedge clk); #1;
    chk(led, 8'h00, "clear");
    clear = 1'b0;
    exp_led = 8'h00;
    for (int n = 0; n < 20000; n++) begin
      mode_snow = (n / 1000) % 2 == 0;
      rand_q    = $urandom;
      n1        = 18'($signed($urandom_range(60929)) - 30464);   // -30464 .. 30465
      ce        = ($urandom_range(3) == 0);
      if (ce) begin
        if (mode_snow) begin
          exp_led = 8'h00;
          for (int i = 0; i < 8; i++) exp_led[i] = (rand_q[4*i +: 4] < 4'd2);
        end else begin
          pos = int'($floor(real'(n1) / 8192.0)) + 4;
          exp_led = 8'h00; exp_led[pos] = 1'b1;
          pos_seen[pos] = 1'b1;
        end
      end
      @(posedge clk); #1;
      chk(led, exp_led, ce ? "update" : "hold");
    end
    checks++;
    if (pos_seen != 8'hFF) begin
      failures++;
      $display("FAIL not every gaussian LED position reached: %b", pos_seen);
    end
    // cross-check against the shared reference model for a few words
    for (int n = 0; n < 200; n++) begin
      mode_snow = 1'b1; rand_q = $urandom; ce = 1'b1;
      @(posedge clk); #1;
      chk(led, led_model(1'b1, rand_q), "snow vs model");
    end
    ce = 1'b0; clear = 1'b1;
    @(posedge clk); #1;
    chk(led, 8'h00, "clear after run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
