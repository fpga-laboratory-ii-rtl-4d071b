// Clock-enable divider for the LED display.
//
// A counter runs from 0 to CLK_DIV-1 and wraps; the cycle after it reaches
// CLK_DIV-1, ce is high for exactly one clock. With the default CLK_DIV of
// 2,000,000 and a 50 MHz board clock the display refreshes 25 times a second,
// slow enough for the eye.
//
// Interface: clk in, ce out (registered).
// Timing: starting from the power-up count of 0, the first ce pulse follows
// clock edge CLK_DIV and the pulses then repeat every CLK_DIV clocks. The
// counter starts from its power-up value; there is no reset input.
// Lint note: the registers carry declaration initialisers, the usual way to
// give FPGA flip-flops a power-up value; a procedural-assignment-to-initialised
// variable warning is expected and intended.
module clk_div #(
  parameter int unsigned CLK_DIV = 2000000
) (
  input  logic clk,
  output logic ce
);

  localparam int unsigned CW = (CLK_DIV > 1) ? $clog2(CLK_DIV) : 1;

  logic [CW-1:0] count = '0;
  logic          ce_q = 1'b0;

  always_ff @(posedge clk) begin
    if (count == CW'(CLK_DIV - 1)) begin
      count <= '0;
      ce_q  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      ce_q  <= 1'b0;
    end
  end

  assign ce = ce_q;

endmodule
