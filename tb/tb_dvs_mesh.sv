// tb_dvs_mesh: end-to-end test of the 8 x 8 DVS-link mesh at its default
// parameters, driven by a task workload.
//
// Workload: NTASKS communication tasks are alive at any time, each at a
// random node, each lasting a random time around TASK_LEN cycles; when one
// ends another starts at a random node. Every cycle a live task creates a
// 5-flit packet with probability RATE_PPM / 1e6 (a Bernoulli
// approximation of Poisson arrivals) for a uniformly random destination.
// Packets wait in an unbounded source queue at their node; the node's
// interface injects them flit by flit, alternating VCs between packets,
// only when it holds a credit for the VC.
//
// The run has a light phase, long enough for channels to scale down, a
// heavy phase that makes them scale back up, then a drain. Checks: every
// packet reaches its destination whole, in order and only once; no packet
// is lost. Counted, and each required to happen: frequency step up, step
// down, a channel down for a voltage transition, a scaling event on the
// fast and on the slow schedule, a credit stall at injection, and a full
// channel FIFO holding a router back. Reports the mean packet latency (from
// creation to ejection of the tail, source queueing included) and the mean
// link power against the same channels left at 1 GHz. Link power per
// level is interpolated in f*V^2 between the 23.6 mW (125 MHz, 0.9 V) and
// 200 mW (1 GHz, 2.5 V) end points; each transition costs
// C (1 - u) |V2^2 - V1^2| with C = 5 uF and u = 0.9.
module tb_dvs_mesh;
  import noc_pkg::*;

  localparam int K = 8, N = K * K, FLITS = 5;
  localparam int NTASKS   = 100;
  localparam int TASK_LEN = 20000;          // cycles (the document's tasks last ~1 ms)
  localparam int LIGHT_CYCLES = 30000;
  localparam int HEAVY_CYCLES = 20000;
  localparam int LIGHT_PPM = 400;           // packets per task per million cycles
  localparam int HEAVY_PPM = 4000;

  logic clk = 0, rst_n = 0;
  flit_t   inj_flit   [N];
  credit_t inj_credit [N];
  flit_t   ej_flit    [N];
  logic [LEVEL_W-1:0] link_level [N][4];
  logic [MV_W-1:0]    link_mv    [N][4];
  logic               link_up    [N][4];
  logic               link_busy  [N][4];

  dvs_mesh dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic fail(string m);
    failures++;
    if (failures < 20) $display("FAIL %s (t=%0t)", m, $time);
  endtask

  // ---------------- mechanism probes inside the channels ----------------
  logic fast_evt [N][4];
  logic slow_evt [N][4];
  logic fifo_full [N][4];
  for (genvar n = 0; n < N; n++) begin : g_probe
    for (genvar d = 0; d < 4; d++) begin : g_d
      localparam int X = n % K, Y = n / K;
      localparam int NX = (d == 1) ? X + 1 : (d == 3) ? X - 1 : X;
      localparam int NY = (d == 0) ? Y - 1 : (d == 2) ? Y + 1 : Y;
      if (NX >= 0 && NX < K && NY >= 0 && NY < K) begin : g_has
        assign fast_evt[n][d]  = dut.g_node[n].g_dir[d].g_ch.u_ch.u_ctrl.scale_evt &&
                                 dut.g_node[n].g_dir[d].g_ch.u_ch.u_ctrl.fast_sched;
        assign slow_evt[n][d]  = dut.g_node[n].g_dir[d].g_ch.u_ch.u_ctrl.scale_evt &&
                                 !dut.g_node[n].g_dir[d].g_ch.u_ch.u_ctrl.fast_sched;
        assign fifo_full[n][d] = !dut.g_node[n].g_dir[d].g_ch.u_ch.ready;
      end else begin : g_no
        assign fast_evt[n][d] = 1'b0;
        assign slow_evt[n][d] = 1'b0;
        assign fifo_full[n][d] = 1'b0;
      end
    end
  end

  // ---------------- workload ----------------
  int task_node [NTASKS];
  int task_end  [NTASKS];
  int rate_ppm = LIGHT_PPM;
  bit generating = 0;
  longint cycle = 0;

  typedef struct { int dest; int id; longint born; } pkt_t;
  pkt_t srcq [N][$];
  int next_id [N];
  int created = 0, delivered = 0;
  longint lat_sum = 0;
  // outstanding packets: key = src * 32768 + id
  longint born_of [int];

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (generating)
      for (int t = 0; t < NTASKS; t++) begin
        if (cycle >= task_end[t]) begin
          task_node[t] = $urandom_range(0, N - 1);
          task_end[t]  = int'(cycle) + $urandom_range(TASK_LEN / 2, 3 * TASK_LEN / 2);
        end
        if ($urandom_range(0, 999999) < rate_ppm) begin
          pkt_t p;
          int s;
          s = task_node[t];
          p.dest = $urandom_range(0, N - 1);
          p.id   = next_id[s];
          p.born = cycle;
          next_id[s] = (next_id[s] + 1) % 32768;
          srcq[s].push_back(p);
          born_of[s * 32768 + p.id] = cycle;
          created++;
        end
      end
  end

  // ---------------- network interfaces: injection ----------------
  int credit [N][NUM_VC];
  int cur_left [N];
  int cur_vc [N];
  pkt_t cur [N];
  int n_credit_stall = 0;

  always @(posedge clk) if (rst_n)
    for (int n = 0; n < N; n++)
      if (inj_credit[n].valid) credit[n][inj_credit[n].vc]++;

  always @(negedge clk) begin
    for (int n = 0; n < N; n++) begin
      inj_flit[n] = FLIT_NONE;
      if (rst_n) begin
        if (cur_left[n] == 0 && srcq[n].size() > 0) begin
          cur[n] = srcq[n].pop_front();
          cur_left[n] = FLITS;
          cur_vc[n] = 1 - cur_vc[n];
        end
        if (cur_left[n] > 0) begin
          if (credit[n][cur_vc[n]] == 0) n_credit_stall++;
          else begin
            int idx;
            idx = FLITS - cur_left[n];
            inj_flit[n].valid = 1;
            inj_flit[n].vc    = VC_W'(cur_vc[n]);
            inj_flit[n].ftype = (idx == 0) ? FT_HEAD : (idx == FLITS - 1) ? FT_TAIL : FT_BODY;
            inj_flit[n].data  = {15'(cur[n].id), 3'(idx), 6'(n),
                                 4'(cur[n].dest / K), 4'(cur[n].dest % K)};
            credit[n][cur_vc[n]]--;
            cur_left[n]--;
          end
        end
      end
    end
  end

  // ---------------- ejection and checking ----------------
  int rx_key [N][NUM_VC];
  int rx_idx [N][NUM_VC];
  always @(posedge clk) if (rst_n)
    for (int n = 0; n < N; n++)
      if (ej_flit[n].valid) begin
        int v, id, idx, src, dx, dy, key;
        v   = int'(ej_flit[n].vc);
        id  = int'(ej_flit[n].data[31:17]);
        idx = int'(ej_flit[n].data[16:14]);
        src = int'(ej_flit[n].data[13:8]);
        key = src * 32768 + id;
        dx  = int'(ej_flit[n].data[3:0]);
        dy  = int'(ej_flit[n].data[7:4]);
        checks++;
        if (dy * K + dx != n) fail($sformatf("flit for node %0d ejected at node %0d", dy * K + dx, n));
        if (is_head(ej_flit[n].ftype)) begin
          if (rx_idx[n][v] != 0) fail($sformatf("node %0d vc %0d: head inside a packet", n, v));
          rx_key[n][v] = key;
          rx_idx[n][v] = 1;
        end else if (key != rx_key[n][v] || rx_idx[n][v] == 0) begin
          fail($sformatf("node %0d vc %0d: flit of packet %0d interleaved", n, v, key));
        end else if (idx != rx_idx[n][v]) begin
          fail($sformatf("node %0d vc %0d: flit %0d out of order", n, v, idx));
        end else rx_idx[n][v]++;
        if (is_tail(ej_flit[n].ftype)) begin
          if (rx_idx[n][v] != FLITS) fail($sformatf("node %0d: packet of %0d flits", n, rx_idx[n][v]));
          rx_idx[n][v] = 0;
          if (!born_of.exists(key)) fail("packet delivered twice or never sent");
          else begin
            lat_sum += cycle - born_of[key];
            born_of.delete(key);
            delivered++;
          end
        end
      end

  // ---------------- power and mechanism counters ----------------
  real p_level [MAX_LEVEL + 1];
  real energy_dvs = 0.0, energy_full = 0.0, energy_trans = 0.0;
  int n_up = 0, n_down = 0, n_trans_cycles = 0, n_fast = 0, n_slow = 0, n_fifo_full = 0;
  int lvl_hist [MAX_LEVEL + 1];
  logic [LEVEL_W-1:0] prev_level [N][4];
  int n_channels = 0;

  function automatic real vlev(int l);
    return 0.9 + (l - 1) * (1.6 / 7.0);
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++)
      for (int d = 0; d < 4; d++)
        if (link_level[n][d] != 0) begin
          int l, pl;
          l = int'(link_level[n][d]);
          pl = int'(prev_level[n][d]);
          energy_dvs  += 8.0 * p_level[l] * 1.0e-9;     // W x 1 ns
          energy_full += 8.0 * p_level[MAX_LEVEL] * 1.0e-9;
          if (l > pl && pl != 0) n_up++;
          if (l < pl && pl != 0) n_down++;
          if (l != pl && pl != 0)
            energy_trans += 5.0e-6 * (1.0 - 0.9) *
                            ((vlev(l) ** 2 > vlev(pl) ** 2) ? vlev(l) ** 2 - vlev(pl) ** 2
                                                            : vlev(pl) ** 2 - vlev(l) ** 2);
          if (!link_up[n][d]) n_trans_cycles++;
          if (fast_evt[n][d]) n_fast++;
          if (slow_evt[n][d]) n_slow++;
          if (fifo_full[n][d]) n_fifo_full++;
          prev_level[n][d] <= link_level[n][d];
        end
  end

  task automatic require(string what, int cnt);
    checks++;
    if (cnt == 0) fail($sformatf("mechanism never happened: %s", what));
    $display("  %-34s %0d", what, cnt);
  endtask

  initial begin
    begin
      real e1, e8;
      e1 = 0.125 * vlev(1) ** 2;
      e8 = 1.0 * vlev(8) ** 2;
      for (int l = 1; l <= MAX_LEVEL; l++)
        p_level[l] = 0.0236 + (0.200 - 0.0236) * ((l / 8.0) * vlev(l) ** 2 - e1) / (e8 - e1);
      p_level[0] = 0.0;
    end
    for (int n = 0; n < N; n++) begin
      inj_flit[n] = FLIT_NONE;
      next_id[n] = 0; cur_left[n] = 0; cur_vc[n] = 1;
      for (int v = 0; v < NUM_VC; v++) begin credit[n][v] = 64; rx_idx[n][v] = 0; rx_key[n][v] = -1; end
      for (int d = 0; d < 4; d++) prev_level[n][d] = '0;
    end
    for (int t = 0; t < NTASKS; t++) begin
      task_node[t] = $urandom_range(0, N - 1);
      task_end[t]  = $urandom_range(TASK_LEN / 2, 3 * TASK_LEN / 2);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    generating = 1;
    rate_ppm = LIGHT_PPM;
    repeat (LIGHT_CYCLES) @(negedge clk);
    $display("after light phase: created=%0d delivered=%0d", created, delivered);
    rate_ppm = HEAVY_PPM;
    repeat (HEAVY_CYCLES) @(negedge clk);
    generating = 0;
    $display("after heavy phase: created=%0d delivered=%0d", created, delivered);
    begin
      int waited;
      waited = 0;
      while (delivered < created && waited < 60000) begin
        @(negedge clk);
        waited++;
      end
      $display("drained in %0d cycles", waited);
    end
    repeat (50) @(negedge clk);
    checks++;
    if (delivered != created || born_of.size() != 0) fail("packets lost");
    $display("packets created=%0d delivered=%0d mean latency=%0.1f cycles",
             created, delivered, real'(lat_sum) / real'(delivered));
    $display("link energy: DVS %0.4f J + transitions %0.6f J, all links at 1 GHz %0.4f J; saving %0.2fX",
             energy_dvs, energy_trans, energy_full, energy_full / (energy_dvs + energy_trans));
    $display("mechanisms:");
    require("frequency step up", n_up);
    require("frequency step down", n_down);
    require("channel-cycles down in transition", n_trans_cycles);
    require("scaling on fast schedule", n_fast);
    require("scaling on slow schedule", n_slow);
    require("injection credit stalls", n_credit_stall);
    require("channel FIFO full (router held)", n_fifo_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
