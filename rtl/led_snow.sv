// LED snow: hardware uniform and normal random numbers shown on eight LEDs.
//
// A 32-bit Fibonacci LFSR (taps 1, 5, 18, 30) produces a new pseudorandom
// word every clock. Its bits 8:0 and 17:9 are two independent 9-bit uniform
// indices that the combinational Box-Muller generator turns into a pair of
// normal variates. A clock-enable divider slows the display down to
// clk / CLK_DIV updates per second; at each update the LEDs show either
// "snow" (each LED on with probability 1/8, from the LFSR nibbles) or a
// single lit LED whose position is the integer part of the normal variate n1
// plus 4. key[0] selects the mode (1 = snow, 0 = gaussian); on the intended
// board the keys are active low, so pressing KEY0 shows the gaussian display.
//
// At power-up a load generator holds the LFSR preload high for LOAD_CYCLES
// clocks, seeding it with all ones. Block structure, taps, seed, divider and
// thresholds follow the reference design; clearing the LEDs during the
// preload is this design's own addition. ROUND_NEAREST selects how the
// Box-Muller tables are rounded (1, the default: to nearest, as the original
// table generator; 0: down, as the published sample entries). An assertion
// checks that the LFSR never falls into its all-zero state.
//
// Interface: clk, key[1:0] in (key[1] unused), led[7:0] out.
// Timing: fully synchronous to clk; n1/n2 are combinational from the LFSR
// register; led is registered.
module led_snow
  import rand_pkg::*;
#(
  parameter int unsigned CLK_DIV     = 2000000,
  parameter int unsigned LOAD_CYCLES = 10,
  parameter bit          ROUND_NEAREST = 1'b1   // Box-Muller table rounding: 1 nearest, 0 down
) (
  input  logic       clk,
  input  logic [1:0] key,
  output logic [7:0] led
);

  localparam logic [31:0] SEED = '1;

  logic        load;
  logic        ce;
  logic [31:0] rand_q;
  uniform_t    b0, b1;
  normal_t     n1, n2;

  load_gen #(.CYCLES(LOAD_CYCLES)) u_load (.clk(clk), .load(load));

  lfsr #(.M(32), .TAP1(1), .TAP2(5), .TAP3(18), .TAP4(30)) u_lfsr (
    .clk(clk), .pre(load), .u0(SEED), .u(rand_q)
  );

  assign b0 = rand_q[8:0];
  assign b1 = rand_q[17:9];

  gaussian #(.ROUND_NEAREST(ROUND_NEAREST)) u_gauss (.u(b0), .v(b1), .n1(n1), .n2(n2));

  clk_div #(.CLK_DIV(CLK_DIV)) u_div (.clk(clk), .ce(ce));

  led_display u_disp (
    .clk(clk), .ce(ce), .clear(load), .mode_snow(key[0]),
    .rand_q(rand_q), .n1(n1), .led(led)
  );

  // the LFSR must never fall into its all-zero lock-up state
  a_no_lockup: assert property (@(posedge clk) !load |-> rand_q != '0)
    else $error("led_snow: LFSR reached the all-zero state");

  // n2 and key[1] have no consumer on this board display
  logic unused_ok;
  assign unused_ok = ^{n2, key[1]};

endmodule
