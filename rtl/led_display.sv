// LED pattern generator of the LED snow demo.
//
// On every clock where ce is high the eight LED outputs are updated in one of
// two modes, chosen by mode_snow (the KEY0 push button, 1 when released):
//   snow     LED i lights when the 4-bit nibble rand_q[4i+3:4i] is below
//            round(SNOW_LEVEL * 16) = 2, so each LED is on with probability
//            1/8. A sparse pattern looks more like falling snow than the
//            50% duty cycle of raw bits.
//   gaussian all LEDs are off except one: n1[15:13], read as a signed 3-bit
//            number (the integer part of the normal variate, -4..3), plus 4
//            selects the lit LED, so the light jitters around the middle of
//            the row with a normal distribution.
// Between enables the LEDs hold their value. While clear is high the LEDs are
// forced off; this clear (used during the power-up preload) is this design's
// addition so that the outputs have a defined value before the first update.
//
// Interface: clk, ce, clear, mode_snow, rand_q (32-bit LFSR word), n1
// (18-bit normal variate) in; led (8-bit) out.
// Timing: led is registered and changes one clock after the ce pulse is
// sampled.
module led_display
  import rand_pkg::*;
#(
  parameter real SNOW_LEVEL = 0.15
) (
  input  logic        clk,
  input  logic        ce,
  input  logic        clear,
  input  logic        mode_snow,
  input  logic [31:0] rand_q,
  input  normal_t     n1,
  output logic [7:0]  led
);

  localparam int          THRESH_I = int'(SNOW_LEVEL * 16.0);   // 2.4 rounds to 2
  localparam logic [4:0]  THRESH   = 5'(THRESH_I);

  logic [7:0]        snow;
  logic [7:0]        spot;
  logic signed [2:0] whole;     // integer part of n1, -4..3
  logic [2:0]        spot_idx;

  always_comb begin
    for (int i = 0; i < 8; i++)
      snow[i] = {1'b0, rand_q[4*i +: 4]} < THRESH;
  end

  // adding 4 to a 3-bit two's complement number just inverts its sign bit
  assign whole    = n1[NORM_FRAC+2:NORM_FRAC];
  assign spot_idx = {~whole[2], whole[1:0]};

  always_comb begin
    spot           = '0;
    spot[spot_idx] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (clear)   led <= '0;
    else if (ce) led <= mode_snow ? snow : spot;
  end

  // a gaussian update lights exactly one LED
  a_one_spot: assert property (@(posedge clk) (ce && !mode_snow && !clear) |=> $onehot(led))
    else $error("led_display: gaussian update did not light exactly one LED");

  // unused top bits of n1 (value is always within -4..4)
  logic unused_ok;
  assign unused_ok = ^{n1[NORM_W-1:NORM_FRAC+3], n1[NORM_FRAC-1:0]};

endmodule
