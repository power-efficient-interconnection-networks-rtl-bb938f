// vc_router: four-stage pipelined virtual-channel router with credit-based
// flow control, for a 2-D mesh.
//
// Five ports (local, north, east, south, west), NVC = 2 virtual channels
// per port, DEPTH = 64 flits per VC (128 per input port). A packet is a
// head flit followed by body flits and a tail; the head carries the
// destination (noc_pkg). Each input VC moves through the stages
//   1 routing (RC)        : a head at the front of an idle VC gets its
//                           output port by X-then-Y routing (one cycle);
//   2 VC allocation (VA)  : it requests an output VC on that port from
//                           vc_allocator until one is free;
//   3 switch allocation   : every flit of the packet then requests the
//     (SA)                  switch from switch_allocator, which needs a
//                           downstream credit for its output VC and
//                           out_ready from the output channel; a winner
//                           leaves its buffer into a per-input-port
//                           traversal register;
//   4 crossbar traversal  : from that register the flit crosses the
//     (ST)                  crossbar into the output register that drives
//                           out_flit.
// When a flit wins SA, a credit for its VC goes back upstream on
// in_credit_out in the next cycle and the downstream credit count drops by
// one; out_credit_in adds it back. The tail releases the output VC and
// returns the input VC to routing.
//
// Timing: a head flit written into the buffer at clock edge t is routed at
// edge t+1, wins VA at t+2 and SA at t+3, and is on out_flit after edge
// t+4. Flits of a packet then follow one per cycle when credits and the
// channel allow. out_ready must allow for two flits already past SA.
//
// The four stages, the VC and buffer counts, the flit size and credit flow
// control are the document's. The routing function (the document's
// simulator offers several; X-Y is used here), the allocator organisation
// and port numbering are this design's.
module vc_router
  import noc_pkg::*;
#(
  parameter int NVC   = NUM_VC,
  parameter int DEPTH = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  flit_t              in_flit       [NUM_PORTS],
  output credit_t            in_credit_out [NUM_PORTS],
  output flit_t              out_flit      [NUM_PORTS],
  input  credit_t            out_credit_in [NUM_PORTS],
  input  logic               out_ready     [NUM_PORTS]
);

  localparam int NP = NUM_PORTS;
  localparam int NI = NP * NVC;
  localparam int CW = $clog2(DEPTH + 1);

  typedef enum logic [1:0] {S_IDLE, S_VA, S_ACTIVE} vcstate_e;

  // ---------------- input buffers ----------------
  flit_t  front [NP][NVC];
  logic   empty [NP][NVC];
  logic   pop   [NP][NVC];

  for (genvar ip = 0; ip < NP; ip++) begin : g_in
    input_buffer #(.NVC(NVC), .DEPTH(DEPTH)) u_buf (
      .clk, .rst_n,
      .in_flit (in_flit[ip]),
      .pop     (pop[ip]),
      .front   (front[ip]),
      .empty   (empty[ip])
    );
  end

  // ---------------- per input VC state ----------------
  vcstate_e          state   [NI];
  logic [PORT_W-1:0] route   [NI];
  logic [VC_W-1:0]   ovc     [NI];
  logic              ovc_busy[NP][NVC];
  logic [CW-1:0]     credits [NP][NVC];

  logic              va_req [NI], va_gnt [NI];
  logic [VC_W-1:0]   va_vc  [NI];
  logic              sa_req [NI], sa_gnt [NI];

  always_comb begin
    for (int i = 0; i < NI; i++) begin
      va_req[i] = (state[i] == S_VA);
      sa_req[i] = (state[i] == S_ACTIVE) && !empty[i / NVC][i % NVC] &&
                  (credits[route[i]][ovc[i]] != '0) && out_ready[route[i]];
    end
    for (int ip = 0; ip < NP; ip++)
      for (int v = 0; v < NVC; v++) pop[ip][v] = sa_gnt[ip*NVC + v];
  end

  vc_allocator #(.NP(NP), .NVC(NVC)) u_va (
    .clk, .rst_n,
    .req      (va_req),
    .req_port (route),
    .ovc_busy (ovc_busy),
    .gnt      (va_gnt),
    .gnt_vc   (va_vc)
  );

  switch_allocator #(.NP(NP), .NVC(NVC)) u_sa (
    .clk, .rst_n,
    .req      (sa_req),
    .req_port (route),
    .gnt      (sa_gnt)
  );

  // ---------------- switch traversal register and crossbar ----------------
  // SA winners are latched per input port (flit, output port, output VC);
  // the crossbar is traversed from these registers in the next cycle.
  flit_t             st_flit [NP];
  logic [PORT_W-1:0] st_port [NP];
  logic [VC_W-1:0]   st_vc   [NP];

  logic [PORT_W-1:0] xb_sel  [NP];
  logic              xb_sv   [NP];
  logic [VC_W-1:0]   xb_vc   [NP];
  flit_t             xb_out  [NP];

  always_comb begin
    for (int o = 0; o < NP; o++) begin
      xb_sel[o] = '0;
      xb_sv[o]  = 1'b0;
      xb_vc[o]  = '0;
      for (int ip = 0; ip < NP; ip++)
        if (st_flit[ip].valid && int'(st_port[ip]) == o) begin
          xb_sel[o] = PORT_W'(ip);
          xb_sv[o]  = 1'b1;
          xb_vc[o]  = st_vc[ip];
        end
    end
  end

  crossbar #(.NP(NP)) u_xb (
    .in_flit   (st_flit),
    .sel       (xb_sel),
    .sel_valid (xb_sv),
    .out_vc    (xb_vc),
    .out_flit  (xb_out)
  );

  // ---------------- sequential state ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NI; i++) begin
        state[i] <= S_IDLE;
        route[i] <= '0;
        ovc[i]   <= '0;
      end
      for (int p = 0; p < NP; p++) begin
        for (int v = 0; v < NVC; v++) begin
          ovc_busy[p][v] <= 1'b0;
          credits[p][v]  <= CW'(DEPTH);
        end
        out_flit[p]      <= FLIT_NONE;
        in_credit_out[p] <= CREDIT_NONE;
        st_flit[p]       <= FLIT_NONE;
        st_port[p]       <= '0;
        st_vc[p]         <= '0;
      end
    end else begin
      // downstream credits
      for (int p = 0; p < NP; p++) begin
        for (int v = 0; v < NVC; v++) begin
          logic inc, dec;
          inc = out_credit_in[p].valid && int'(out_credit_in[p].vc) == v;
          dec = 1'b0;
          for (int i = 0; i < NI; i++)
            if (sa_gnt[i] && int'(route[i]) == p && int'(ovc[i]) == v) dec = 1'b1;
          credits[p][v] <= credits[p][v] + CW'(inc) - CW'(dec);
        end
      end
      // stage 4 (crossbar output register), upstream credits, ST latch
      for (int p = 0; p < NP; p++) begin
        out_flit[p]      <= xb_out[p];
        in_credit_out[p] <= CREDIT_NONE;
        st_flit[p]       <= FLIT_NONE;
      end
      for (int i = 0; i < NI; i++) begin
        flit_t f;
        f = front[i / NVC][i % NVC];
        case (state[i])
          S_IDLE:
            if (f.valid && is_head(f.ftype)) begin
              route[i] <= xy_route(my_x, my_y, dest_x(f.data), dest_y(f.data));
              state[i] <= S_VA;
            end
          S_VA:
            if (va_gnt[i]) begin
              ovc[i]   <= va_vc[i];
              ovc_busy[route[i]][va_vc[i]] <= 1'b1;
              state[i] <= S_ACTIVE;
            end
          S_ACTIVE:
            if (sa_gnt[i] && is_tail(f.ftype)) begin
              ovc_busy[route[i]][ovc[i]] <= 1'b0;
              state[i] <= S_IDLE;
            end
          default: state[i] <= S_IDLE;
        endcase
        if (sa_gnt[i]) begin
          in_credit_out[i / NVC].valid <= 1'b1;
          in_credit_out[i / NVC].vc    <= VC_W'(i % NVC);
          st_flit[i / NVC] <= f;
          st_port[i / NVC] <= route[i];
          st_vc[i / NVC]   <= ovc[i];
        end
      end
    end
  end

  // A VC must never hold more flits than credits allow.
  for (genvar p = 0; p < NP; p++) begin : g_chk
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      a_credit_range: assert property (@(posedge clk) disable iff (!rst_n)
                                       int'(credits[p][v]) <= DEPTH)
        else $error("vc_router: credit count of port %0d VC %0d above buffer depth", p, v);
    end
  end

endmodule
