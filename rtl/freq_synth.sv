// freq_synth: behavioural model of the DVS link's frequency synthesizer.
//
// The real part is an analog synthesizer that produces the link clock at
// the frequency the controller selects. Here the router clock (1 GHz) is
// the reference and the link clock is represented by a clock enable: tick
// is high in exactly `level` of every MAX_LEVEL router cycles, spread
// evenly by a phase accumulator, so level L gives L x 125 MHz worth of
// link cycles. A level change takes effect on the next cycle. The model is
// synthesizable; only the name and role of the part come from the
// document, the enable-based representation is this design's choice.
module freq_synth
  import noc_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LEVEL_W-1:0] level,   // requested frequency, L x 125 MHz
  output logic               tick     // one link clock cycle in this router cycle
);

  localparam int AW = $clog2(2 * MAX_LEVEL);
  logic [AW-1:0] acc, sum;

  assign sum  = acc + AW'(level);
  assign tick = sum >= AW'(MAX_LEVEL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= tick ? sum - AW'(MAX_LEVEL) : sum;
  end

endmodule
