// Testbench for gaussian: exhaustive over all 512 x 512 input pairs, for
// the default instance (round-to-nearest tables) and for one with
// round-down tables. For every pair it checks n1 and n2 exactly against the
// product of the independently computed table values, and checks that both
// stay within the fixed-point error bound of the exact Box-Muller values
// scaled by 2^13 (|error| < 185 to nearest, < 366 rounded down). It reports
// how many outputs are off by 144 or more, the precision the original
// design flagged with a warning; for the default instance these must be
// fewer than 0.1% of the outputs.
module gaussian_tb;
  import snow_ref_pkg::*;

  logic [8:0]         u, v;
  logic signed [17:0] n1, n2, n1_n, n2_n;
  int checks = 0, failures = 0;
  int warn144 = 0, warn144_n = 0;
  int max_err_n = 0;
  int max_err = 0;

  gaussian #(.ROUND_NEAREST(1'b0)) dut (.u(u), .v(v), .n1(n1), .n2(n2));
  gaussian dut_n (.u(u), .v(v), .n1(n1_n), .n2(n2_n));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("nearest tables: largest error %0d, outputs off by >=144: %0d", max_err_n, warn144_n);
    chk(int'(warn144_n < 524), 1, "fewer than 0.1% of outputs off by 144 or more");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s u=%0d v=%0d: got %0d expected %0d", what, u, v, got, exp);
    end
  endtask

  initial begin
    int lq[512], sq[512], cq[512], ln_[512], sn_[512], cn_[512];
    int ex, ey, f1, f2;
    real r, z1, z2;
    int e1, e2;
    for (int i = 0; i < 512; i++) begin
      lq[i] = ln_q(i); sq[i] = sin_q(i); cq[i] = cos_q(i);
      ln_[i] = ln_n(i); sn_[i] = sin_n(i); cn_[i] = cos_n(i);
    end
    for (int i = 0; i < 512; i++) begin
      for (int j = 0; j < 512; j++) begin
        u = 9'(i); v = 9'(j); #1;
        chk(int'(n1), lq[i] * cq[j], "n1 exact");
        chk(int'(n2), lq[i] * sq[j], "n2 exact");
        r  = $sqrt(-2.0 * $ln(uval(i)));
        z1 = r * $cos(2.0 * PI * uval(j));
        z2 = r * $sin(2.0 * PI * uval(j));
        chk(int'(n1_n), ln_[i] * cn_[j], "n1 exact, nearest tables");
        chk(int'(n2_n), ln_[i] * sn_[j], "n2 exact, nearest tables");
        f1 = $rtoi(z1 * 8192.0 + ((z1 < 0) ? -0.5 : 0.5));
        f2 = $rtoi(z2 * 8192.0 + ((z2 < 0) ? -0.5 : 0.5));
        e1 = f1 - int'(n1);
        e2 = f2 - int'(n2);
        ex = f1 - int'(n1_n); if (ex < 0) ex = -ex;
        ey = f2 - int'(n2_n); if (ey < 0) ey = -ey;
        if (ex > max_err_n) max_err_n = ex;
        if (ey > max_err_n) max_err_n = ey;
        if (ex >= 144) warn144_n++;
        if (ey >= 144) warn144_n++;
        chk(int'(ex < 185 && ey < 185), 1, "precision bound, nearest tables");
        if (e1 < 0) e1 = -e1;
        if (e2 < 0) e2 = -e2;
        if (e1 > max_err) max_err = e1;
        if (e2 > max_err) max_err = e2;
        if (e1 >= 144) warn144++;
        if (e2 >= 144) warn144++;
        chk(int'(e1 < 366 && e2 < 366), 1, "precision bound");
      end
    end
    $display("round-down tables: largest error %0d (units of 2^-13), outputs off by >=144: %0d of %0d",
             max_err, warn144, 2 * 512 * 512);
    $display("nearest tables: largest error %0d, outputs off by >=144: %0d", max_err_n, warn144_n);
    chk(int'(warn144_n < 524), 1, "fewer than 0.1% of outputs off by 144 or more");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
