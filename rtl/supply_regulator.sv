// supply_regulator: behavioural model of the DVS link's adaptive
// power-supply regulator.
//
// The regulator feeds one supply to all eight links of a channel and moves
// it to the minimum voltage the selected link frequency needs (noc_pkg::
// level_mv). The voltage moves continuously at a fixed slew rate of
// 0.1 V/us, which with a 1 GHz reference is one millivolt every
// SLEW_CYCLES_PER_MV = 10 cycles. settled is low while the voltage is
// moving; the link does not carry data then. vdd_mv reports the present
// supply in millivolts. The slew rate and the "link down during a
// transition" rule are the document's; representing the analog supply as a
// millivolt counter is this design's choice. After reset the supply sits
// at the voltage of the level presented at reset.
module supply_regulator
  import noc_pkg::*;
#(
  parameter int SLEW_CYCLES_PER_MV = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [LEVEL_W-1:0] level,    // frequency level the supply must serve
  output logic [MV_W-1:0]    vdd_mv,   // present supply voltage, mV
  output logic               settled   // supply has reached its target
);

  localparam int SW = (SLEW_CYCLES_PER_MV > 1) ? $clog2(SLEW_CYCLES_PER_MV) : 1;
  logic [MV_W-1:0] target;
  logic [SW-1:0]   slew_cnt;
  logic            init;

  assign target  = level_mv(level);
  assign settled = !init && (vdd_mv == target);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vdd_mv   <= '0;
      slew_cnt <= '0;
      init     <= 1'b1;
    end else if (init) begin
      vdd_mv   <= target;
      init     <= 1'b0;
    end else if (vdd_mv == target) begin
      slew_cnt <= '0;
    end else if (int'(slew_cnt) == SLEW_CYCLES_PER_MV - 1) begin
      slew_cnt <= '0;
      vdd_mv   <= (vdd_mv < target) ? vdd_mv + 1'b1 : vdd_mv - 1'b1;
    end else begin
      slew_cnt <= slew_cnt + 1'b1;
    end
  end

endmodule
