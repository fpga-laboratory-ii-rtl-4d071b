// Testbench for sine_rom, both roundings. An instance with ROUND_NEAREST = 0
// must hold the published sample entries (stored as 9-bit words, so 508 is
// -4); for every address its sine port must equal floor(128 sin(2 pi v)) and
// its cosine port floor(128 cos(2 pi v)), computed with real arithmetic.
// The default instance (round to nearest) is checked against the same
// values rounded to nearest.
module sine_rom_tb;
  import snow_ref_pkg::*;

  logic [8:0]        addr;
  logic signed [8:0] s, c, s_n, c_n;
  int checks = 0, failures = 0;

  sine_rom #(.ROUND_NEAREST(1'b0)) dut (.addr(addr), .sin_q(s), .cos_q(c));
  sine_rom dut_n (.addr(addr), .sin_q(s_n), .cos_q(c_n));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(int got, int exp, int a, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s addr %0d: got %0d expected %0d", what, a, got, exp);
    end
  endtask

  initial begin
    static int sample_addr[8] = '{0, 1, 2, 3, 45, 509, 510, 511};
    static int sample_word[8] = '{0, 2, 3, 5, 67, 508, 509, 511};
    foreach (sample_addr[k]) begin
      addr = 9'(sample_addr[k]); #1;
      chk(int'($unsigned(s)), sample_word[k], sample_addr[k], "sample word");
    end
    for (int i = 0; i < 512; i++) begin
      addr = 9'(i); #1;
      chk(int'(s), sin_q(i), i, "sine");
      chk(int'(c), cos_q(i), i, "cosine");
      chk(int'(s_n), sin_n(i), i, "sine nearest");
      chk(int'(c_n), cos_n(i), i, "cosine nearest");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
