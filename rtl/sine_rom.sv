// Angle look-up table of the Box-Muller transform, with two read ports.
//
// Holds, for each of the 512 uniform indices i, sin(2 pi v_i) with
// v_i = (i + 0.5) / 512, as a signed 9-bit fixed-point number with a scale
// of 128. Scaling by a power of two (instead of the 255 that would fill the
// word) keeps the product's scale a power of two. The largest entry is 128
// (127 when rounded down), which still fits the signed 9-bit word.
//
// The cosine is not stored separately: cos(2 pi v) = sin(2 pi v + pi/2), and
// a quarter turn is 128 entries, so the second port reads entry
// (i + 128) mod 512. The 9-bit address addition wraps naturally.
//
// Contents are computed at elaboration time (rand_pkg::make_sine_table) and
// rounded to nearest by default, as the original table generator does;
// ROUND_NEAREST = 0 rounds down instead, which reproduces the published
// sample entries.
//
// Interface: addr (9-bit index) in; sin_q and cos_q (signed 9-bit) out.
// Timing: purely combinational.
module sine_rom
  import rand_pkg::*;
#(
  parameter int unsigned DEPTH = ROM_DEPTH,   // must equal 2^UNI_W
  parameter int unsigned SCALE = SIN_SCALE,   // documented scale; the table uses SIN_SCALE
  parameter bit          ROUND_NEAREST = 1'b1   // 1: round to nearest (default), 0: round down
) (
  input  uniform_t  addr,
  output rom_word_t sin_q,
  output rom_word_t cos_q
);

  localparam rom_t     TABLE   = make_sine_table(ROUND_NEAREST);
  localparam uniform_t QUARTER = uniform_t'(ROM_DEPTH / 4);

  uniform_t cos_addr;

  initial begin
    assert (DEPTH == ROM_DEPTH && SCALE == SIN_SCALE)
      else $error("sine_rom: DEPTH/SCALE must match rand_pkg");
  end

  assign cos_addr = addr + QUARTER;     // wraps modulo 512
  assign sin_q    = TABLE[addr];
  assign cos_q    = TABLE[cos_addr];

endmodule
