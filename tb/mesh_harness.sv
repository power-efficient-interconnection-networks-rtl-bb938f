// mesh_harness: testbench wrapper around one dvs_mesh. It holds a network
// interface per node (unbounded source queue, credit-respecting injection,
// VC alternating per packet), checks every ejected packet (right node,
// whole, in order, delivered once) and accumulates latency and link
// energy, together with the energy the same channels would use at 1 GHz.
// Packets are handed in with enqueue().
// Link power per level is interpolated in f*V^2 between 23.6 mW (125 MHz,
// 0.9 V) and 200 mW (1 GHz, 2.5 V); each voltage transition costs
// C (1 - u) |V2^2 - V1^2| with C = 5 uF, u = 0.9.
module mesh_harness
  import noc_pkg::*;
#(
  parameter int K = 8
) (
  input logic clk,
  input logic rst_n
);
  localparam int N = K * K, FLITS = 5;

  flit_t   inj_flit   [N];
  credit_t inj_credit [N];
  flit_t   ej_flit    [N];
  logic [LEVEL_W-1:0] link_level [N][4];
  logic [MV_W-1:0]    link_mv    [N][4];
  logic               link_up    [N][4];
  logic               link_busy  [N][4];

  dvs_mesh #(.K(K)) u_mesh (.*);

  typedef struct { int dest; int id; longint born; } pkt_t;
  pkt_t srcq [N][$];
  int next_id [N];
  longint born_of [int];
  longint cycle = 0;
  int created = 0, delivered = 0, errors = 0, n_scale = 0;
  longint lat_sum = 0;
  real energy = 0.0, energy_trans = 0.0, energy_full = 0.0;

  function automatic real vlev(int l);
    return 0.9 + (l - 1) * (1.6 / 7.0);
  endfunction
  function automatic real plev(int l);
    real e1, e8;
    e1 = 0.125 * vlev(1) ** 2;
    e8 = vlev(8) ** 2;
    return 0.0236 + (0.200 - 0.0236) * ((l / 8.0) * vlev(l) ** 2 - e1) / (e8 - e1);
  endfunction

  function automatic void enqueue(int src, int dest);
    pkt_t p;
    p.dest = dest;
    p.id   = next_id[src];
    p.born = cycle;
    next_id[src] = (next_id[src] + 1) % 32768;
    srcq[src].push_back(p);
    born_of[src * 32768 + p.id] = cycle;
    created++;
  endfunction

  function automatic void clear_stats();
    cycle = 0; created = 0; delivered = 0; lat_sum = 0; energy = 0.0; energy_trans = 0.0; energy_full = 0.0; n_scale = 0;
  endfunction

  // injection
  int credit [N][NUM_VC];
  int cur_left [N], cur_vc [N];
  pkt_t cur [N];
  always @(posedge clk) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) begin
        credit[n][0] = 64; credit[n][1] = 64;
      end
    end else begin
      cycle++;
      for (int n = 0; n < N; n++) if (inj_credit[n].valid) credit[n][inj_credit[n].vc]++;
    end
  end
  always @(negedge clk)
    for (int n = 0; n < N; n++) begin
      inj_flit[n] = FLIT_NONE;
      if (!rst_n) begin
        cur_left[n] = 0; cur_vc[n] = 1; next_id[n] = 0;
      end else begin
        if (cur_left[n] == 0 && srcq[n].size() > 0) begin
          cur[n] = srcq[n].pop_front();
          cur_left[n] = FLITS;
          cur_vc[n] = 1 - cur_vc[n];
        end
        if (cur_left[n] > 0 && credit[n][cur_vc[n]] > 0) begin
          int idx;
          idx = FLITS - cur_left[n];
          inj_flit[n].valid = 1;
          inj_flit[n].vc    = VC_W'(cur_vc[n]);
          inj_flit[n].ftype = (idx == 0) ? FT_HEAD : (idx == FLITS - 1) ? FT_TAIL : FT_BODY;
          inj_flit[n].data  = {15'(cur[n].id), 3'(idx), 6'(n), 4'(cur[n].dest / K), 4'(cur[n].dest % K)};
          credit[n][cur_vc[n]]--;
          cur_left[n]--;
        end
      end
    end

  // ejection
  int rx_key [N][NUM_VC], rx_idx [N][NUM_VC];
  always @(posedge clk)
    if (!rst_n) begin
      for (int n = 0; n < N; n++) for (int v = 0; v < NUM_VC; v++) begin rx_idx[n][v] = 0; rx_key[n][v] = -1; end
    end else
      for (int n = 0; n < N; n++)
        if (ej_flit[n].valid) begin
          int v, key, idx;
          v   = int'(ej_flit[n].vc);
          key = int'(ej_flit[n].data[13:8]) * 32768 + int'(ej_flit[n].data[31:17]);
          idx = int'(ej_flit[n].data[16:14]);
          if (int'(ej_flit[n].data[7:4]) * K + int'(ej_flit[n].data[3:0]) != n) errors++;
          if (is_head(ej_flit[n].ftype)) begin
            if (rx_idx[n][v] != 0) errors++;
            rx_key[n][v] = key; rx_idx[n][v] = 1;
          end else if (key != rx_key[n][v] || idx != rx_idx[n][v]) errors++;
          else rx_idx[n][v]++;
          if (is_tail(ej_flit[n].ftype)) begin
            if (rx_idx[n][v] != FLITS) errors++;
            rx_idx[n][v] = 0;
            if (!born_of.exists(key)) errors++;
            else begin
              lat_sum += cycle - born_of[key];
              born_of.delete(key);
              delivered++;
            end
          end
        end

  // link energy
  logic [LEVEL_W-1:0] prev [N][4];
  always @(posedge clk)
    for (int n = 0; n < N; n++)
      for (int d = 0; d < 4; d++) begin
        if (rst_n && link_level[n][d] != 0) begin
          int l, pl;
          l = int'(link_level[n][d]); pl = int'(prev[n][d]);
          energy += 8.0 * plev(l) * 1.0e-9;
          energy_full += 8.0 * plev(MAX_LEVEL) * 1.0e-9;
          if (pl != 0 && pl != l) begin
            n_scale++;
            energy_trans += 5.0e-6 * 0.1 * ((vlev(l) ** 2 > vlev(pl) ** 2) ? vlev(l) ** 2 - vlev(pl) ** 2
                                                                             : vlev(pl) ** 2 - vlev(l) ** 2);
          end
        end
        prev[n][d] <= rst_n ? link_level[n][d] : '0;
      end
endmodule
