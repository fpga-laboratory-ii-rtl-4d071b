// Radius look-up table of the Box-Muller transform.
//
// Holds, for each of the 512 uniform indices i, the value sqrt(-2 ln u_i)
// with u_i = (i + 0.5) / 512, as a signed 9-bit fixed-point number with a
// scale of 64 (six fraction bits). The largest entry, at i = 0, represents
// 3.7233 and is stored as 238; the smallest, at i = 511, represents 0.0442
// (3 when rounded to nearest, 2 when rounded down).
//
// The table contents are computed at elaboration time from the formula
// (rand_pkg::make_ln_table), so no data file is needed. Entries are rounded
// to nearest by default, as the original table generator does; ROUND_NEAREST
// = 0 rounds down instead, which reproduces the published sample entries.
//
// Interface: addr (9-bit index) in, data (signed 9-bit) out.
// Timing: purely combinational, an asynchronous ROM read, as in the original
// design where the whole transform sits between two register stages.
module ln_rom
  import rand_pkg::*;
#(
  parameter int unsigned DEPTH = ROM_DEPTH,   // must equal 2^UNI_W
  parameter int unsigned SCALE = LN_SCALE,   // documented scale; the table uses LN_SCALE
  parameter bit          ROUND_NEAREST = 1'b1   // 1: round to nearest (default), 0: round down
) (
  input  uniform_t  addr,
  output rom_word_t data
);

  localparam rom_t TABLE = make_ln_table(ROUND_NEAREST);

  initial begin
    assert (DEPTH == ROM_DEPTH && SCALE == LN_SCALE)
      else $error("ln_rom: DEPTH/SCALE must match rand_pkg");
  end

  assign data = TABLE[addr];

endmodule
