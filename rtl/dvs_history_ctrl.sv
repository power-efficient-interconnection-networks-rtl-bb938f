// dvs_history_ctrl: history-based dynamic voltage scaling controller for one
// router output port (one DVS channel).
//
// Utilization is measured in link-clock cycles. Every cycle in which
// link_tick is high is one link cycle; busy says a flit crossed the link in
// it. A log2(H)-bit counter counts link cycles up to the history window H,
// a second one counts the busy ones, so at the end of each window it holds
// U_short = busy cycles / H, kept as a count out of H (no division needed:
// the thresholds are scaled by H instead). At every window end the
// predictor forms
//     U_pred = (W * U_short + U_long) / (W + 1),  W = 2^k - 1,
// with W*U_short built as (U_short << k) - U_short and the division as a
// right shift by k, and stores U_pred back as U_long.
// The prediction is then compared with four thresholds:
//     U_pred < T_low   -> trend decrease (fast schedule if < T_lowest)
//     U_pred > T_high  -> trend increase (fast schedule if > T_highest)
//     otherwise        -> trend static
// Scaling is carried out on a schedule of history windows: the fast signal
// fires every VS_FAST windows, the slow one every VS_SLOW windows. When the
// signal the latest decision selected fires, the frequency level moves one
// step in the trend direction, within MIN_LEVEL..MAX_LEVEL.
//
// Interface: level is the requested link frequency level (L x 125 MHz);
// scale_evt pulses for one cycle when it changes; trend, u_pred and
// win_end expose the decision for observation. Nothing counts while
// link_tick is low, so the controller naturally pauses while the link is
// down for a voltage transition.
//
// The algorithm, the weighted average, the power-of-two W, the counter
// widths and the Table I numbers follow the document. Evaluating the
// predictor at every window end, stepping one level per scaling event,
// ignoring the schedule while the trend is static and starting at the
// highest level after reset are this design's choices.
module dvs_history_ctrl
  import noc_pkg::*;
#(
  parameter int H           = 50,   // history window, link cycles
  parameter int W_K         = 2,    // W = 2^W_K - 1 = 3
  parameter int VS_FAST     = 16,   // windows between fast scaling events
  parameter int VS_SLOW     = 32,   // windows between slow scaling events
  parameter int T_LOWEST_PM = 100,  // thresholds in per mille of utilization
  parameter int T_LOW_PM    = 300,
  parameter int T_HIGH_PM   = 400,
  parameter int T_HIGHEST_PM= 900,
  parameter int RESET_LEVEL = MAX_LEVEL
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               link_tick,   // one link clock cycle, link up
  input  logic               busy,        // A(t): a flit used the link this link cycle
  output logic [LEVEL_W-1:0] level,       // requested frequency level
  output logic               scale_evt,   // level changed this cycle
  output logic [1:0]         trend,       // 0 static, 1 increase, 2 decrease
  output logic [$clog2(H+1)-1:0] u_pred,  // latest prediction, count out of H
  output logic               win_end,     // a history window closed this cycle
  output logic               fast_sched   // latest decision chose the fast schedule
);

  localparam int UW = $clog2(H + 1);
  localparam int IW = $clog2(VS_SLOW + 1);
  // Thresholds as busy-cycle counts out of H.
  localparam int T_LOWEST  = (T_LOWEST_PM  * H) / 1000;
  localparam int T_LOW     = (T_LOW_PM     * H) / 1000;
  localparam int T_HIGH    = (T_HIGH_PM    * H) / 1000;
  localparam int T_HIGHEST = (T_HIGHEST_PM * H) / 1000;

  localparam logic [1:0] TR_STATIC = 2'd0, TR_INC = 2'd1, TR_DEC = 2'd2;

  logic [UW-1:0] cyc_cnt;   // link cycles in the current window
  logic [UW-1:0] act_cnt;   // busy link cycles in the current window
  logic [UW-1:0] u_long;
  logic [IW-1:0] win_cnt;   // windows since the last slow signal

  logic [UW-1:0]   u_short;
  logic [UW+W_K:0] wsum;
  logic [UW-1:0]   pred;
  logic [1:0]      trend_n;
  logic            fast_n;
  logic            last_cyc;
  logic            sig_fast, sig_slow;

  assign last_cyc = link_tick && (cyc_cnt == UW'(H - 1));
  assign u_short  = act_cnt + UW'(busy);

  // W * U_short + U_long, W = 2^k - 1, then / (W + 1) as a shift.
  always_comb begin
    wsum = ((UW+W_K+1)'(u_short) << W_K) - (UW+W_K+1)'(u_short) + (UW+W_K+1)'(u_long);
    pred = UW'(wsum >> W_K);
    if (int'(pred) < T_LOW) begin
      trend_n = TR_DEC;
      fast_n  = int'(pred) < T_LOWEST;
    end else if (int'(pred) > T_HIGH) begin
      trend_n = TR_INC;
      fast_n  = int'(pred) > T_HIGHEST;
    end else begin
      trend_n = TR_STATIC;
      fast_n  = 1'b0;
    end
  end

  // Window counter position after this window closes.
  assign sig_fast = ((int'(win_cnt) + 1) % VS_FAST) == 0;
  assign sig_slow = (int'(win_cnt) + 1) == VS_SLOW;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_cnt   <= '0;
      act_cnt   <= '0;
      u_long    <= '0;
      u_pred    <= '0;
      win_cnt   <= '0;
      fast_sched  <= 1'b0;
      trend     <= TR_STATIC;
      level     <= LEVEL_W'(RESET_LEVEL);
      scale_evt <= 1'b0;
      win_end   <= 1'b0;
    end else begin
      scale_evt <= 1'b0;
      win_end   <= 1'b0;
      if (link_tick) begin
        if (last_cyc) begin
          cyc_cnt  <= '0;
          act_cnt  <= '0;
          u_long   <= pred;
          u_pred   <= pred;
          trend    <= trend_n;
          fast_sched <= fast_n;
          win_end  <= 1'b1;
          win_cnt  <= sig_slow ? '0 : win_cnt + 1'b1;
          if ((fast_n ? sig_fast : sig_slow) && trend_n != TR_STATIC) begin
            if (trend_n == TR_INC && int'(level) < MAX_LEVEL) begin
              level     <= level + 1'b1;
              scale_evt <= 1'b1;
            end else if (trend_n == TR_DEC && int'(level) > MIN_LEVEL) begin
              level     <= level - 1'b1;
              scale_evt <= 1'b1;
            end
          end
        end else begin
          cyc_cnt <= cyc_cnt + 1'b1;
          act_cnt <= u_short;
        end
      end
    end
  end

endmodule
