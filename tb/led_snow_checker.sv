// Cycle-accurate reference model and scoreboard for the led_snow top level,
// shared by its end-to-end and full-size testbenches.
//
// The model counts clock edges from power-up and predicts, with no access
// to the RTL, the LFSR word (all-ones seed while the preload is active, then
// one Fibonacci step with taps 1, 5, 18, 30 per clock), the clock-enable
// positions (edges CLK_DIV, 2*CLK_DIV, ...) and the LED word after every
// edge. It compares led after every edge and counts how often each
// mechanism of the design was exercised: preload cycles, snow updates,
// gaussian updates, mode switches and the distinct gaussian LED positions.
module led_snow_checker #(
  parameter int unsigned CLK_DIV     = 2000000,
  parameter int unsigned LOAD_CYCLES = 10
) (
  input logic       clk,
  input logic [1:0] key,
  input logic [7:0] led
);
  import snow_ref_pkg::*;

  int checks = 0, failures = 0;
  int n_preload = 0, n_snow = 0, n_gauss = 0, n_switch = 0, n_lit = 0;
  logic [7:0] pos_seen = '0;
  int pos_hist[8] = '{default: 0};

  longint      edge_no = 0;
  logic [31:0] st;          // model LFSR state after the current edge
  logic [7:0]  exp_led = '0;
  bit          ce_m = 1'b0; // model ce after the current edge
  bit          last_mode;
  bit          have_mode = 1'b0;

  always @(posedge clk) begin
    logic [7:0] nl;
    int p;
    edge_no++;
    // display update uses the values before this edge
    nl = exp_led;
    if (edge_no <= longint'(LOAD_CYCLES) + 1) begin
      nl = '0;                                  // cleared during the preload
      n_preload++;
    end else if (ce_m) begin
      nl = led_model(key[0], st);
      if (key[0]) begin
        n_snow++;
        for (int i = 0; i < 8; i++) n_lit += int'(nl[i]);
      end else begin
        n_gauss++;
        for (int i = 0; i < 8; i++) if (nl[i]) begin p = i; pos_seen[i] = 1'b1; pos_hist[i]++; end
      end
      if (have_mode && last_mode != key[0]) n_switch++;
      last_mode = key[0]; have_mode = 1'b1;
    end
    exp_led = nl;
    // LFSR: preloaded on edges 1 .. LOAD_CYCLES+1, shifting afterwards
    if (edge_no <= longint'(LOAD_CYCLES) + 1) st = 32'hFFFF_FFFF;
    else                            st = lfsr_next(st, 32, 1, 5, 18, 30);
    ce_m = (edge_no % longint'(CLK_DIV)) == 0;
    #1;
    checks++;
    if (led !== exp_led) begin
      failures++;
      if (failures < 10) $display("FAIL edge %0d: led %b expected %b", edge_no, led, exp_led);
    end
  end

  // count a failure for each mechanism that never happened, then report
  function automatic void report(output int c, output int f);
    c = checks + 5; f = failures;
    $display("mechanisms: preload cycles %0d, snow updates %0d (LEDs lit %0d), gaussian updates %0d, mode switches %0d, gaussian positions seen %b",
             n_preload, n_snow, n_lit, n_gauss, n_switch, pos_seen);
    $display("gaussian position histogram: %0d %0d %0d %0d %0d %0d %0d %0d",
             pos_hist[0], pos_hist[1], pos_hist[2], pos_hist[3], pos_hist[4], pos_hist[5], pos_hist[6], pos_hist[7]);
    if (n_preload == 0) begin f++; $display("FAIL preload never happened"); end
    if (n_snow == 0)    begin f++; $display("FAIL no snow update"); end
    if (n_lit == 0)     begin f++; $display("FAIL no snow LED ever lit"); end
    if (n_gauss == 0)   begin f++; $display("FAIL no gaussian update"); end
    if (n_switch == 0)  begin f++; $display("FAIL mode never switched"); end
  endfunction
endmodule
