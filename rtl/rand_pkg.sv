// Shared types, constants and table functions of the LED snow random-number
// generator.
//
// The generator turns a pseudorandom bit stream from a linear feedback shift
// register into uniform 9-bit indices and then, by table look-up and one
// multiplication, into normally distributed numbers (Box-Muller method).
// Everything here is fixed point: a table index i stands for the real number
// (i + 0.5) / 512, the radius table holds sqrt(-2 ln u) scaled by 64 and the
// sine table holds sin(2 pi v) scaled by 128, so a product of the two carries
// a scale of 2^13.
//
// By default the table entries are rounded to nearest, as the original table
// generator does. Rounding down (floor) is also offered: it reproduces the
// published sample entries of the design, which are truncated, and moves
// some entries down by one.
package rand_pkg;

  localparam int unsigned UNI_W     = 9;              // width of one uniform index
  localparam int unsigned ROM_DEPTH = 1 << UNI_W;     // 512 table entries
  localparam int unsigned ROM_W     = 9;              // signed table word (fits a 9x9 DSP multiplier)
  localparam int unsigned NORM_W    = 2 * ROM_W;      // 18-bit product
  localparam int unsigned LN_SCALE  = 64;             // radius table scale, 2^6
  localparam int unsigned SIN_SCALE = 128;            // sine table scale, 2^7
  localparam int unsigned NORM_FRAC = 13;             // fraction bits of n1/n2 (6 + 7)

  typedef logic [UNI_W-1:0]          uniform_t;
  typedef logic signed [ROM_W-1:0]   rom_word_t;
  typedef logic signed [NORM_W-1:0]  normal_t;
  typedef rom_word_t                 rom_t [ROM_DEPTH];

  localparam real TWO_PI = 6.283185307179586;

  // real value represented by table address i
  function automatic real uniform_value(int i);
    return (real'(i) + 0.5) / real'(ROM_DEPTH);
  endfunction

  // real to integer: floor, or round to nearest (halves away from zero)
  function automatic int quantize(real r, bit nearest);
    return nearest ? int'(r) : int'($floor(r));
  endfunction

  // radius table: 64 * sqrt(-2 ln u_i), quantized
  function automatic rom_t make_ln_table(bit nearest);
    rom_t t;
    for (int i = 0; i < int'(ROM_DEPTH); i++)
      t[i] = rom_word_t'(quantize(real'(LN_SCALE) * $sqrt(-2.0 * $ln(uniform_value(i))), nearest));
    return t;
  endfunction

  // angle table: 128 * sin(2 pi v_i), quantized
  function automatic rom_t make_sine_table(bit nearest);
    rom_t t;
    for (int i = 0; i < int'(ROM_DEPTH); i++)
      t[i] = rom_word_t'(quantize(real'(SIN_SCALE) * $sin(TWO_PI * uniform_value(i)), nearest));
    return t;
  endfunction

endpackage
