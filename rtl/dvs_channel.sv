// dvs_channel: one router output channel built from DVS serial links, with
// its history-based DVS controller.
//
// A channel is LINKS = 8 serial links. Each link multiplexes MUX = 4 bits
// per link clock cycle, so the channel moves LINKS x MUX = 32 bits, one
// flit, per link cycle: at 1 GHz that is one flit per router cycle
// (32 Gb/s), at 125 MHz one flit every 8 router cycles. The flit is cut
// into 8 lane symbols of 4 bits (lane j carries data[4j+3:4j]) on the
// transmit side and put back together on the receive side; the sideband
// fields travel with it.
//
// Flits from the router's crossbar enter a small transmit FIFO. ready is
// high while at least three slots are free, which covers the two flits
// that may already be in the router's last two pipeline stages. On every link clock
// cycle (freq_synth tick) in which the supply is settled, the head flit is
// sent and appears on out_flit in the next router cycle. While the
// supply_regulator is moving the voltage the link carries nothing and its
// clock is not counted. dvs_history_ctrl watches the link cycles and the
// busy ones and picks the frequency level; the level drives both the
// synthesizer and the regulator.
//
// The link count, the 4:1 multiplexing, the flit-per-cycle rate at 1 GHz
// and the link being down during a transition are the document's. The FIFO,
// its depth, the lane bit order, carrying credits outside the scaled link
// and the one-cycle wire delay are this design's choices.
module dvs_channel
  import noc_pkg::*;
#(
  parameter int LINKS        = 8,
  parameter int MUX          = 4,
  parameter int FIFO_DEPTH   = 4,
  parameter int H            = 50,
  parameter int W_K          = 2,
  parameter int VS_FAST      = 16,
  parameter int VS_SLOW      = 32,
  parameter int T_LOWEST_PM  = 100,
  parameter int T_LOW_PM     = 300,
  parameter int T_HIGH_PM    = 400,
  parameter int T_HIGHEST_PM = 900,
  parameter int SLEW_CYCLES_PER_MV = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  flit_t              in_flit,    // from the router's crossbar
  output logic               ready,      // room for a flit three cycles from now
  output flit_t              out_flit,   // to the downstream router input
  output logic [LEVEL_W-1:0] level,      // link frequency level, L x 125 MHz
  output logic [MV_W-1:0]    vdd_mv,     // link supply voltage, mV
  output logic               link_up,    // not in a voltage transition
  output logic               busy,       // a flit left on this router cycle
  output logic               link_tick   // a link clock cycle with the link up
);

  localparam int CW = $clog2(FIFO_DEPTH + 1);
  localparam int PW = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;

  initial assert (LINKS * MUX == FLIT_W)
    else $error("channel width %0d must equal flit width %0d", LINKS * MUX, FLIT_W);

  // ---------------- transmit FIFO ----------------
  flit_t          fifo [FIFO_DEPTH];
  logic [PW-1:0]  wr_ptr, rd_ptr;
  logic [CW-1:0]  count;
  logic           push, pop;
  logic           synth_tick;

  assign link_tick = synth_tick && link_up;
  assign pop       = link_tick && (count != '0);
  assign push      = in_flit.valid;
  assign busy      = pop;
  assign ready     = int'(count) <= FIFO_DEPTH - 3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) begin
        fifo[wr_ptr] <= in_flit;
        wr_ptr <= (int'(wr_ptr) == FIFO_DEPTH - 1) ? '0 : wr_ptr + 1'b1;
      end
      if (pop) rd_ptr <= (int'(rd_ptr) == FIFO_DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      count <= count + CW'(push) - CW'(pop);
    end
  end

  // The router must honour ready: never push into a full FIFO.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  !(push && int'(count) == FIFO_DEPTH && !pop))
    else $error("dvs_channel: flit pushed into a full transmit FIFO");

  // ---------------- lanes: 4:1 multiplexed serial links ----------------
  flit_t            tx_flit;
  logic [MUX-1:0]   lane_sym [LINKS];   // symbols on the eight links this link cycle
  logic [FLIT_W-1:0] rx_data;

  assign tx_flit = pop ? fifo[rd_ptr] : FLIT_NONE;

  always_comb begin
    for (int j = 0; j < LINKS; j++) lane_sym[j] = tx_flit.data[j*MUX +: MUX];
    for (int j = 0; j < LINKS; j++) rx_data[j*MUX +: MUX] = lane_sym[j];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_flit <= FLIT_NONE;
    else begin
      out_flit       <= tx_flit;
      out_flit.data  <= rx_data;
    end
  end

  // ---------------- DVS control ----------------
  dvs_history_ctrl #(
    .H(H), .W_K(W_K), .VS_FAST(VS_FAST), .VS_SLOW(VS_SLOW),
    .T_LOWEST_PM(T_LOWEST_PM), .T_LOW_PM(T_LOW_PM),
    .T_HIGH_PM(T_HIGH_PM), .T_HIGHEST_PM(T_HIGHEST_PM)
  ) u_ctrl (
    .clk, .rst_n,
    .link_tick (link_tick),
    .busy      (pop),
    .level     (level),
    .scale_evt (),
    .trend     (),
    .u_pred    (),
    .win_end   (),
    .fast_sched()
  );

  freq_synth u_synth (
    .clk, .rst_n,
    .level (level),
    .tick  (synth_tick)
  );

  supply_regulator #(.SLEW_CYCLES_PER_MV(SLEW_CYCLES_PER_MV)) u_reg (
    .clk, .rst_n,
    .level   (level),
    .vdd_mv  (vdd_mv),
    .settled (link_up)
  );

endmodule
