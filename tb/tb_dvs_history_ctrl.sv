// tb_dvs_history_ctrl: self-checking test of the history-based DVS controller
// at its default (Table I) settings: H = 50, W = 3, fast = 16 and slow = 32
// windows, thresholds 0.1 / 0.3 / 0.4 / 0.9.
//
// Each history window is driven with a chosen number of busy link cycles,
// with router cycles that carry no link clock (link_tick low, busy random)
// scattered in between; those must not count. An integer model in the
// testbench recomputes the weighted-average prediction, the trend and the
// scaling schedule and the frequency level after every window and compares
// them with the controller one cycle after the window closes. Phases of
// very low, low, mid, high and very high utilization exercise every branch
// of the algorithm, and the level is driven to both ends of its range.
module tb_dvs_history_ctrl;
  import noc_pkg::*;

  localparam int H = 50;
  // Table I thresholds as busy counts out of H = 50.
  localparam int TH_LOWEST = 5, TH_LOW = 15, TH_HIGH = 20, TH_HIGHEST = 45;

  logic clk = 0, rst_n = 0;
  logic link_tick = 0, busy = 0;
  logic [LEVEL_W-1:0] level;
  logic scale_evt, win_end, fast_sched;
  logic [1:0] trend;
  logic [$clog2(H+1)-1:0] u_pred;

  dvs_history_ctrl dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int m_ul = 0, m_level = MAX_LEVEL, m_win = 0;
  int n_up = 0, n_down = 0, n_fast = 0, n_slow = 0, n_static = 0;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (window %0d)", what, got, exp, m_win);
    end
  endtask

  // Drive one history window with b busy link cycles.
  task automatic run_window(int b);
    int pred, tr, fast, fire, exp_evt;
    for (int c = 0; c < H; c++) begin
      while ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        link_tick = 0;
        busy = 1'($urandom);
      end
      @(negedge clk);
      link_tick = 1;
      busy = (c < b);
    end
    @(negedge clk);
    link_tick = 0;
    busy = 0;
    // model
    pred = (3 * b + m_ul) / 4;
    m_ul = pred;
    if (pred < TH_LOW)       begin tr = 2; fast = (pred < TH_LOWEST);  end
    else if (pred > TH_HIGH) begin tr = 1; fast = (pred > TH_HIGHEST); end
    else                     begin tr = 0; fast = 0; end
    fire = fast ? (((m_win + 1) % 16) == 0) : (((m_win + 1) % 32) == 0);
    exp_evt = 0;
    if (fire && tr == 1 && m_level < MAX_LEVEL) begin m_level++; exp_evt = 1; n_up++; end
    if (fire && tr == 2 && m_level > MIN_LEVEL) begin m_level--; exp_evt = 1; n_down++; end
    if (exp_evt && fast) n_fast++;
    if (exp_evt && !fast) n_slow++;
    if (tr == 0) n_static++;
    check("win_end", int'(win_end), 1);
    check("u_pred", int'(u_pred), pred);
    check("trend", int'(trend), tr);
    check("fast_sched", int'(fast_sched), fast);
    check("scale_evt", int'(scale_evt), exp_evt);
    check("level", int'(level), m_level);
    m_win = (m_win + 1) % 32;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check("reset level", int'(level), MAX_LEVEL);
    repeat (4 * 32) run_window(2);              // very low: fast decrease to the floor
    repeat (2 * 32) run_window(48);             // very high: fast increase
    repeat (3 * 32) run_window(30);             // high: slow increase to the ceiling
    repeat (32) run_window(18);                 // between low and high: static
    repeat (4 * 32) run_window(8);              // low: slow decrease
    repeat (64) run_window($urandom_range(0, H));
    repeat (2) run_window(0);
    repeat (2) run_window(H);
    check("saw increase", int'(n_up > 0), 1);
    check("saw decrease", int'(n_down > 0), 1);
    check("saw fast",     int'(n_fast > 0), 1);
    check("saw slow",     int'(n_slow > 0), 1);
    check("saw static",   int'(n_static > 0), 1);
    $display("scaling events: up=%0d down=%0d fast=%0d slow=%0d", n_up, n_down, n_fast, n_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
