// tb_vc_router: one router at mesh position (2,2) with all five ports
// driven by testbench neighbours.
//
// Each upstream neighbour sends 5-flit packets (head + 4 body, the head
// holding the destination, every flit tagged with a packet number and its
// index) on both VCs, interleaving the VCs flit by flit, and only when it
// holds a credit for that VC (64 per VC); credits come back on
// in_credit_out. Each downstream neighbour takes flits when its random
// out_ready allows, checks that the flit left on the X-then-Y output port
// for its destination, that the packets on one output VC arrive whole and
// in order, and returns credits after a random delay.
// It also checks the four-stage pipeline latency of a lone head flit
// (written at edge t, out after edge t+4), that all packets arrive, and
// that credit stalls and output-VC contention occurred.
module tb_vc_router;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS, NVC = NUM_VC, DEPTH = 64, FLITS = 5;
  localparam int MX = 2, MY = 2;

  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] my_x = COORD_W'(MX), my_y = COORD_W'(MY);
  flit_t   in_flit [NP];
  credit_t in_credit_out [NP];
  flit_t   out_flit [NP];
  credit_t out_credit_in [NP];
  logic    out_ready [NP];

  vc_router dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic fail(string m);
    failures++;
    $display("FAIL %s (t=%0t)", m, $time);
  endtask

  // packet encoding: data[31:16] packet id, [15:12] flit index, [7:0] dest
  function automatic int exp_port(int dx, int dy);
    if (dx > MX) return 2; if (dx < MX) return 4;
    if (dy > MY) return 3; if (dy < MY) return 1;
    return 0;
  endfunction

  // ---------------- upstream senders ----------------
  int up_credit [NP][NVC];
  int pkt_left  [NP][NVC];     // flits still to send of the current packet
  int pkt_id    [NP][NVC];
  int pkt_dest  [NP][NVC];
  int pkts_to_send [NP];
  int next_id = 1;
  int sent_pkts = 0;
  int dest_of [int];
  int n_credit_stall = 0;
  bit enable_traffic = 0;

  always @(posedge clk) if (rst_n)
    for (int p = 0; p < NP; p++)
      if (in_credit_out[p].valid) up_credit[p][in_credit_out[p].vc]++;

  bit manual = 1;
  always @(negedge clk) if (!manual) begin
    for (int p = 0; p < NP; p++) begin
      in_flit[p] = FLIT_NONE;
      if (rst_n && enable_traffic) begin
        int v;
        v = $urandom_range(0, NVC - 1);
        if (pkt_left[p][v] == 0 && pkts_to_send[p] > 0 && $urandom_range(0, 3) == 0) begin
          int dx, dy;
          dx = $urandom_range(0, 4); dy = $urandom_range(0, 4);
          pkt_left[p][v] = FLITS;
          pkt_id[p][v]   = next_id++;
          pkt_dest[p][v] = dy * 16 + dx;
          dest_of[pkt_id[p][v]] = pkt_dest[p][v];
          pkts_to_send[p]--;
        end
        if (pkt_left[p][v] > 0) begin
          if (up_credit[p][v] == 0) n_credit_stall++;
          else begin
            int idx;
            idx = FLITS - pkt_left[p][v];
            in_flit[p].valid = 1;
            in_flit[p].vc    = VC_W'(v);
            in_flit[p].ftype = (idx == 0) ? FT_HEAD : (idx == FLITS - 1) ? FT_TAIL : FT_BODY;
            in_flit[p].data  = {16'(pkt_id[p][v]), 4'(idx), 4'd0, 8'(pkt_dest[p][v])};
            up_credit[p][v]--;
            pkt_left[p][v]--;
            if (idx == 0) sent_pkts++;
          end
        end
      end
    end
  end

  // ---------------- downstream receivers ----------------
  int rx_id  [NP][NVC];
  int rx_idx [NP][NVC];
  int got_pkts = 0, got_flits = 0;
  int credit_q [NP][$];
  int ready_pct = 100;

  always @(negedge clk) begin
    for (int p = 0; p < NP; p++) begin
      out_ready[p] = ($urandom_range(0, 99) < ready_pct);
      out_credit_in[p] = CREDIT_NONE;
      if (credit_q[p].size() > 0 && $urandom_range(0, 3) != 0) begin
        out_credit_in[p].valid = 1;
        out_credit_in[p].vc = VC_W'(credit_q[p].pop_front());
      end
    end
  end

  int outstanding [NP][NVC];    // flits held downstream, must stay <= DEPTH
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NP; p++) begin
      if (out_credit_in[p].valid) outstanding[p][out_credit_in[p].vc]--;
      if (out_flit[p].valid) begin
        int v, id, idx, d;
        v = int'(out_flit[p].vc);
        id = int'(out_flit[p].data[31:16]);
        idx = int'(out_flit[p].data[15:12]);
        d = int'(out_flit[p].data[7:0]);
        got_flits++;
        outstanding[p][v]++;
        credit_q[p].push_back(v);
        checks++;
        if (outstanding[p][v] > DEPTH) fail("credit overrun downstream");
        if (idx == 0) begin
          if (rx_idx[p][v] != 0) fail($sformatf("port %0d vc %0d: head inside a packet", p, v));
          if (!is_head(out_flit[p].ftype)) fail("index 0 is not a head");
          if (!dest_of.exists(id)) fail("unknown packet");
          else if (exp_port(d % 16, d / 16) != p) fail($sformatf("packet %0d to (%0d,%0d) left on port %0d", id, d % 16, d / 16, p));
          rx_id[p][v] = id;
          rx_idx[p][v] = 1;
          if (is_tail(out_flit[p].ftype)) begin   // single-flit packet
            rx_idx[p][v] = 0;
            got_pkts++;
          end
        end else begin
          if (id != rx_id[p][v] || idx != rx_idx[p][v])
            fail($sformatf("port %0d vc %0d: flit %0d of packet %0d, expected %0d of %0d", p, v, idx, id, rx_idx[p][v], rx_id[p][v]));
          rx_idx[p][v] = (idx == FLITS - 1) ? 0 : idx + 1;
          if (idx == FLITS - 1) begin
            got_pkts++;
            if (!is_tail(out_flit[p].ftype)) fail("last flit is not a tail");
          end
        end
      end
    end
  end

  // ---------------- sequence ----------------
  int n_va_wait = 0;
  always @(posedge clk) if (rst_n)
    for (int i = 0; i < NP * NVC; i++)
      if (dut.va_req[i] && !dut.va_gnt[i]) n_va_wait++;

  initial begin
    for (int p = 0; p < NP; p++) begin
      in_flit[p] = FLIT_NONE;
      for (int v = 0; v < NVC; v++) begin
        up_credit[p][v] = DEPTH; pkt_left[p][v] = 0; rx_idx[p][v] = 0; rx_id[p][v] = 0;
        outstanding[p][v] = 0;
      end
      pkts_to_send[p] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    // lone head latency: a head-tail flit from west to east
    begin
      int t_in, t_out;
      dest_of[999] = 2 * 16 + 3;
      in_flit[P_WEST].valid = 1;
      in_flit[P_WEST].vc    = '0;
      in_flit[P_WEST].ftype = FT_HEADTAIL;
      in_flit[P_WEST].data  = {16'd999, 4'd0, 4'd0, 8'(2 * 16 + 3)};
      up_credit[P_WEST][0]--;
      @(posedge clk);
      t_in = 0;
      #1 in_flit[P_WEST] = FLIT_NONE;
      t_out = 0;
      while (!out_flit[P_EAST].valid && t_out < 20) begin
        @(posedge clk); #1;
        t_out++;
      end
      checks++;
      if (t_out != 4) fail($sformatf("head latency %0d cycles, expected 4", t_out));
      @(negedge clk);
      sent_pkts++;
    end
    // random traffic, then back-pressure phase with slow credits
    manual = 0;
    ready_pct = 80;
    for (int p = 0; p < NP; p++) pkts_to_send[p] = 120;
    enable_traffic = 1;
    repeat (3000) @(negedge clk);
    ready_pct = 25;
    for (int p = 0; p < NP; p++) pkts_to_send[p] += 60;
    repeat (4000) @(negedge clk);
    ready_pct = 100;
    wait (got_pkts == sent_pkts && got_pkts > 1);
    repeat (20) @(negedge clk);
    checks++;
    if (got_pkts != 1 + NP * 180) fail($sformatf("%0d packets arrived, %0d sent", got_pkts, 1 + NP * 180));
    checks++;
    if (n_credit_stall == 0) fail("no credit stall happened");
    checks++;
    if (n_va_wait == 0) fail("no VC allocation wait happened");
    $display("packets=%0d flits=%0d credit_stalls=%0d va_waits=%0d", got_pkts, got_flits, n_credit_stall, n_va_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
