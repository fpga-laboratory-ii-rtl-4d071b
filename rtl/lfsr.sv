// Fibonacci linear feedback shift register with four XOR taps.
//
// Every clock the register shifts one place towards bit 0 and the new most
// significant bit is the XOR of four tap bits. Taps are numbered from 1, so
// TAPk names register bit TAPk-1. With suitable taps the sequence visits
// nearly all 2^M states before repeating, and any slice of the register is a
// pseudorandom uniform integer. The all-zero state is a fixed point and must
// never be loaded.
//
// Interface: when pre is high the register takes u0 on the clock edge instead
// of shifting (a synchronous preload, which doubles as the reset and the
// seed). u is the register itself.
// Timing: one new state per clock, u changes right after the edge.
//
// The default taps (1, 2, 17, 29) and width are those of the reference
// design's generic defaults; the LED snow top level uses taps 1, 5, 18, 30.
module lfsr #(
  parameter int unsigned M    = 32,
  parameter int unsigned TAP1 = 1,
  parameter int unsigned TAP2 = 2,
  parameter int unsigned TAP3 = 17,
  parameter int unsigned TAP4 = 29
) (
  input  logic         clk,
  input  logic         pre,
  input  logic [M-1:0] u0,
  output logic [M-1:0] u
);

  logic [M-1:0] state;
  logic         feedback;

  initial begin
    assert (TAP1 >= 1 && TAP1 <= M && TAP2 >= 1 && TAP2 <= M &&
            TAP3 >= 1 && TAP3 <= M && TAP4 >= 1 && TAP4 <= M)
      else $error("lfsr: taps must lie in 1..M");
  end

  assign feedback = state[TAP1-1] ^ state[TAP2-1] ^ state[TAP3-1] ^ state[TAP4-1];

  always_ff @(posedge clk) begin
    if (pre) state <= u0;
    else     state <= {feedback, state[M-1:1]};
  end

  assign u = state;

endmodule
