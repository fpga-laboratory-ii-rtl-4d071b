// Power-up preload generator for the random number generator.
//
// After configuration it holds load high for CYCLES clock cycles and then
// low for good. One cycle would be enough to seed the LFSR; the longer pulse
// is a simple reset generator. The counter and load rely on power-up values
// (as FPGA registers have), so the block needs no reset input of its own.
//
// Interface: clk in, load out.
// Timing: load is 1 from configuration through the CYCLES-th clock edge and
// 0 from the next edge on. The power-up value of load (1) is this design's
// choice so that the very first edge already preloads the LFSR.
// Lint note: the registers carry declaration initialisers, the usual way to
// give FPGA flip-flops a power-up value; a procedural-assignment-to-initialised
// variable warning is expected and intended.
module load_gen #(
  parameter int unsigned CYCLES = 10
) (
  input  logic clk,
  output logic load
);

  localparam int unsigned CW = $clog2(CYCLES + 1);

  logic [CW-1:0] init_cnt = '0;
  logic          load_q = 1'b1;

  always_ff @(posedge clk) begin
    if (init_cnt < CW'(CYCLES)) begin
      load_q   <= 1'b1;
      init_cnt <= init_cnt + 1'b1;
    end else begin
      load_q   <= 1'b0;
    end
  end

  assign load = load_q;

endmodule
