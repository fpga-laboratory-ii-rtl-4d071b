// Testbench for ln_rom, both roundings. An instance with ROUND_NEAREST = 0
// must hold the published sample entries (addresses 0, 1, 2, 3, 45, 509,
// 510, 511) and every entry floor(64 * sqrt(-2 ln((i + 0.5) / 512))),
// computed with real arithmetic. The default instance (round to nearest) is
// checked against the same value rounded to nearest.
module ln_rom_tb;
  import snow_ref_pkg::*;

  logic [8:0]        addr;
  logic signed [8:0] data, data_n;
  int checks = 0, failures = 0;

  ln_rom #(.ROUND_NEAREST(1'b0)) dut (.addr(addr), .data(data));
  ln_rom dut_n (.addr(addr), .data(data_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int a, int exp, string what);
    addr = 9'(a);
    #1;
    checks++;
    if (int'(data) != exp) begin
      failures++;
      $display("FAIL %s addr %0d: got %0d expected %0d", what, a, data, exp);
    end
  endtask

  initial begin
    static int sample_addr[8] = '{0, 1, 2, 3, 45, 509, 510, 511};
    static int sample_val [8] = '{238, 218, 208, 202, 140, 6, 4, 2};
    foreach (sample_addr[k]) chk(sample_addr[k], sample_val[k], "sample");
    for (int i = 0; i < 512; i++) chk(i, ln_q(i), "formula");
    for (int i = 0; i < 512; i++) begin
      addr = 9'(i); #1;
      checks++;
      if (int'(data_n) != ln_n(i)) begin
        failures++;
        $display("FAIL nearest addr %0d: got %0d expected %0d", i, data_n, ln_n(i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
