// Reference models for the LED snow testbenches, written directly from the
// arithmetic (real-valued math, bit loops), independent of the RTL.
package snow_ref_pkg;

  localparam real PI = 3.141592653589793;

  // next state of a Fibonacci LFSR: shift towards bit 0, new MSB = XOR of taps
  function automatic logic [31:0] lfsr_next(logic [31:0] s, int m, int t1, int t2, int t3, int t4);
    logic [31:0] n;
    logic fb;
    fb = s[t1-1] ^ s[t2-1] ^ s[t3-1] ^ s[t4-1];
    n = s;
    for (int k = 0; k < m - 1; k++) n[k] = s[k+1];
    n[m-1] = fb;
    return n;
  endfunction

  function automatic real uval(int i);
    return (i + 0.5) / 512.0;
  endfunction

  // floor(64 sqrt(-2 ln u))
  function automatic int ln_q(int i);
    return int'($floor(64.0 * $sqrt(-2.0 * $ln(uval(i)))));
  endfunction

  // floor(128 sin(2 pi v))
  function automatic int sin_q(int i);
    return int'($floor(128.0 * $sin(2.0 * PI * uval(i))));
  endfunction

  // floor(128 cos(2 pi v))
  function automatic int cos_q(int i);
    return int'($floor(128.0 * $cos(2.0 * PI * uval(i))));
  endfunction

  // round to nearest, halves away from zero
  function automatic int rnd(real x);
    return (x < 0.0) ? -$rtoi(-x + 0.5) : $rtoi(x + 0.5);
  endfunction

  // round-to-nearest variants of the three tables
  function automatic int ln_n(int i);
    return rnd(64.0 * $sqrt(-2.0 * $ln(uval(i))));
  endfunction
  function automatic int sin_n(int i);
    return rnd(128.0 * $sin(2.0 * PI * uval(i)));
  endfunction
  function automatic int cos_n(int i);
    return rnd(128.0 * $cos(2.0 * PI * uval(i)));
  endfunction

  // expected LED word for one display update
  function automatic logic [7:0] led_model(bit snow_mode, logic [31:0] r);
    logic [7:0] l;
    int n1, pos;
    l = '0;
    if (snow_mode) begin
      for (int i = 0; i < 8; i++) l[i] = (((r >> (4*i)) & 32'hF) < 2);
    end else begin
      n1  = ln_n(int'(r[8:0])) * cos_n(int'(r[17:9]));   // default tables round to nearest
      pos = int'($floor(real'(n1) / 8192.0)) + 4;    // integer part of the variate
      l[pos] = 1'b1;
    end
    return l;
  endfunction

endpackage
