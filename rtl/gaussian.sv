// Box-Muller normal random number generator, fixed point, combinational.
//
// Given two independent uniform variates u and v in (0,1), the pair
//   z1 = sqrt(-2 ln u) cos(2 pi v),  z2 = sqrt(-2 ln u) sin(2 pi v)
// is a pair of independent standard normal variates. Here u and v are 9-bit
// indices (value (i + 0.5) / 512), the radius comes from ln_rom (scale 64)
// and sine and cosine from the two ports of sine_rom (scale 128). Each output
// is a 9 x 9 signed product, an 18-bit two's complement number whose real
// value is n / 2^13. The 9-bit words fit the 9 x 9 mode of common FPGA DSP
// multipliers.
//
// Interface: u, v (9-bit) in; n1 (cosine branch) and n2 (sine branch),
// signed 18-bit, out.
// Timing: purely combinational: two table reads and a multiply.
// Precision: with the default round-to-nearest tables the radius entry is
// within 1/128 and the sine entry within 1/256, so |z * 2^13 - n| stays below
// 119 + 64 (+ the product of the two errors) = 184; round-down tables
// (ROUND_NEAREST = 0) double both errors, bound 366.
module gaussian
  import rand_pkg::*;
#(
  parameter bit ROUND_NEAREST = 1'b1   // table rounding: 1 nearest (default), 0 down
) (
  input  uniform_t u,
  input  uniform_t v,
  output normal_t  n1,
  output normal_t  n2
);

  rom_word_t radius;   // sqrt(-2 ln u) * 64
  rom_word_t s_val;    // sin(2 pi v)  * 128
  rom_word_t c_val;    // cos(2 pi v)  * 128

  ln_rom   #(.ROUND_NEAREST(ROUND_NEAREST)) u_ln   (.addr(u), .data(radius));
  sine_rom #(.ROUND_NEAREST(ROUND_NEAREST)) u_sine (.addr(v), .sin_q(s_val), .cos_q(c_val));

  assign n1 = NORM_W'(radius * c_val);
  assign n2 = NORM_W'(radius * s_val);

endmodule
