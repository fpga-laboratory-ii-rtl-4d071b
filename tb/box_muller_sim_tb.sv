// Workload testbench: the LFSR feeding the Box-Muller generator, run the
// way the generator was originally evaluated in simulation. A 50 MHz clock,
// a 32-bit LFSR with taps 1, 5, 18, 30 preloaded with all ones by a load
// pulse from 25 ns to 50 ns, and the 9-bit slices b0 = bits 8:0 and
// b1 = bits 17:9 feeding u and v.
//
// Phase 1 covers the first 20 us (1000 clocks). On every clock it compares
// n1 and n2 with the exact Box-Muller values for the same b0 and b1, scaled
// by 2^13. They must agree within the table rounding bound (185). Outputs
// off by 144 or more, which the original simulation flagged with a warning,
// are counted and reported; they are not failures.
//
// Phase 2 runs 2 ms (100,000 clocks) and checks the statistics. b0 and b1
// must average about 255.5. n1 and n2 divided by 2^13 must have a mean
// near 0 and a variance near 1. About 68% of them must fall within one
// standard deviation.
module box_muller_sim_tb;
  import snow_ref_pkg::*;

  logic               clk = 1'b0;
  logic               load = 1'b0;
  logic [31:0]        rand_q;
  logic [8:0]         b0, b1;
  logic signed [17:0] n1, n2;
  int checks = 0, failures = 0;

  lfsr #(.M(32), .TAP1(1), .TAP2(5), .TAP3(18), .TAP4(30)) urnd (
    .clk(clk), .pre(load), .u0(32'hFFFF_FFFF), .u(rand_q));
  gaussian grnd (.u(b0), .v(b1), .n1(n1), .n2(n2));

  assign b0 = rand_q[8:0];
  assign b1 = rand_q[17:9];

  initial forever begin
    clk = 1'b0; #10ns;
    clk = 1'b1; #10ns;
  end

  initial begin
    #25ns load = 1'b1;
    #25ns load = 1'b0;
  end

  initial begin
    #3ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %t", what, $time);
    end
  endtask

  initial begin
    real a, b, x, y, r, s1 = 0, s2 = 0, q1 = 0, q2 = 0, su = 0, sv = 0, m1, m2, v1, v2;
    int nx, ny, dx, dy, warn = 0, n_in = 0, n = 0;
    @(posedge load);
    @(posedge clk); #1ns;
    chk(rand_q == 32'hFFFF_FFFF, "seed");
    @(negedge load);
    @(negedge clk);
    for (int k = 0; k < 101000; k++) begin
      @(posedge clk); #1ns;
      if (k < 1000) begin
        a = uval(int'(b0)); b = uval(int'(b1));
        r = $sqrt(-2.0 * $ln(a));
        x = r * $cos(2.0 * PI * b);
        y = r * $sin(2.0 * PI * b);
        nx = $rtoi(x * 8192.0 + ((x < 0) ? -0.5 : 0.5));
        ny = $rtoi(y * 8192.0 + ((y < 0) ? -0.5 : 0.5));
        dx = nx - int'(n1); if (dx < 0) dx = -dx;
        dy = ny - int'(n2); if (dy < 0) dy = -dy;
        if (dx >= 144) warn++;
        if (dy >= 144) warn++;
        chk(dx < 185 && dy < 185, "precision");
      end else begin
        x = real'(n1) / 8192.0; y = real'(n2) / 8192.0;
        s1 += x; s2 += y; q1 += x * x; q2 += y * y;
        su += real'(b0); sv += real'(b1);
        if (x >= -1.0 && x < 1.0) n_in++;
        if (y >= -1.0 && y < 1.0) n_in++;
        n++;
      end
    end
    m1 = s1 / n; m2 = s2 / n;
    v1 = q1 / n - m1 * m1; v2 = q2 / n - m2 * m2;
    $display("first 20 us: %0d of 2000 outputs off by >=144 (units of 2^-13)", warn);
    $display("n1 mean %f var %f, n2 mean %f var %f, b0 mean %f, b1 mean %f, within 1 sigma %f",
             m1, v1, m2, v2, su / n, sv / n, real'(n_in) / (2.0 * n));
    chk(m1 > -0.05 && m1 < 0.05 && m2 > -0.05 && m2 < 0.05, "mean");
    chk(v1 > 0.93 && v1 < 1.07 && v2 > 0.93 && v2 < 1.07, "variance");
    chk(su / n > 250.0 && su / n < 261.0 && sv / n > 250.0 && sv / n < 261.0, "uniform mean");
    chk(real'(n_in) / (2.0 * n) > 0.65 && real'(n_in) / (2.0 * n) < 0.72, "one-sigma fraction");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
