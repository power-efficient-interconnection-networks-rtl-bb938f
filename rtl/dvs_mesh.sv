// dvs_mesh: K x K mesh interconnection network whose channels are DVS links.
//
// Every node is a vc_router. Each router output that leads to a neighbour
// drives a dvs_channel: eight serial links whose frequency and supply
// voltage are set by that channel's own history-based DVS controller,
// using only the utilization of that channel. There is no global
// coordination. Channel to neighbour: north is y-1, east x+1, south y+1,
// west x-1; node n sits at x = n % K, y = n / K. Credits return to the
// upstream router on a separate wire with no delay through the scaled
// link. Ports on the mesh boundary are left unconnected (X-Y routing never
// uses them).
//
// Each node's local port is brought out: inj_flit enters the router's
// local input (the injecting source must respect inj_credit, one credit per
// flit, DEPTH per VC), ej_flit leaves it. Ejection is immediate: every
// ejected flit returns its credit at once. For observation each mesh
// channel reports its frequency level, supply voltage, whether it is up and
// whether it carried a flit, indexed [node][direction] with direction
// 0..3 = north, east, south, west; boundary entries read zero.
//
// The 8 x 8 mesh, the routers and the per-channel DVS are the document's;
// the boundary treatment, the credit path and the observation ports are
// this design's choices.
module dvs_mesh
  import noc_pkg::*;
#(
  parameter int K     = 8,
  parameter int DEPTH = 64,
  parameter int H            = 50,
  parameter int VS_FAST      = 16,
  parameter int VS_SLOW      = 32,
  parameter int SLEW_CYCLES_PER_MV = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  flit_t              inj_flit   [K*K],
  output credit_t            inj_credit [K*K],
  output flit_t              ej_flit    [K*K],
  output logic [LEVEL_W-1:0] link_level [K*K][4],
  output logic [MV_W-1:0]    link_mv    [K*K][4],
  output logic               link_up    [K*K][4],
  output logic               link_busy  [K*K][4]
);

  localparam int N = K * K;

  flit_t   r_in     [N][NUM_PORTS];
  credit_t r_crd_o  [N][NUM_PORTS];
  flit_t   r_out    [N][NUM_PORTS];
  credit_t r_crd_i  [N][NUM_PORTS];
  logic    r_ready  [N][NUM_PORTS];
  flit_t   ch_out   [N][4];

  for (genvar n = 0; n < N; n++) begin : g_node
    localparam int X = n % K;
    localparam int Y = n / K;

    vc_router #(.NVC(NUM_VC), .DEPTH(DEPTH)) u_router (
      .clk, .rst_n,
      .my_x          (COORD_W'(X)),
      .my_y          (COORD_W'(Y)),
      .in_flit       (r_in[n]),
      .in_credit_out (r_crd_o[n]),
      .out_flit      (r_out[n]),
      .out_credit_in (r_crd_i[n]),
      .out_ready     (r_ready[n])
    );

    // local port
    assign r_in[n][P_LOCAL]    = inj_flit[n];
    assign inj_credit[n]       = r_crd_o[n][P_LOCAL];
    assign ej_flit[n]          = r_out[n][P_LOCAL];
    assign r_ready[n][P_LOCAL] = 1'b1;
    assign r_crd_i[n][P_LOCAL] = '{valid: r_out[n][P_LOCAL].valid, vc: r_out[n][P_LOCAL].vc};

    // mesh ports: d = 0..3 is router port d+1
    for (genvar d = 0; d < 4; d++) begin : g_dir
      localparam int NX   = (d == 1) ? X + 1 : (d == 3) ? X - 1 : X;
      localparam int NY   = (d == 0) ? Y - 1 : (d == 2) ? Y + 1 : Y;
      localparam int OPP  = (d + 2) % 4;
      localparam bit HAS  = (NX >= 0) && (NX < K) && (NY >= 0) && (NY < K);
      localparam int NB   = HAS ? NY * K + NX : 0;
      if (HAS) begin : g_ch
        dvs_channel #(
          .H(H), .VS_FAST(VS_FAST), .VS_SLOW(VS_SLOW),
          .SLEW_CYCLES_PER_MV(SLEW_CYCLES_PER_MV)
        ) u_ch (
          .clk, .rst_n,
          .in_flit   (r_out[n][d+1]),
          .ready     (r_ready[n][d+1]),
          .out_flit  (ch_out[n][d]),
          .level     (link_level[n][d]),
          .vdd_mv    (link_mv[n][d]),
          .link_up   (link_up[n][d]),
          .busy      (link_busy[n][d]),
          .link_tick ()
        );
        assign r_in[NB][OPP+1]  = ch_out[n][d];
        assign r_crd_i[n][d+1]  = r_crd_o[NB][OPP+1];
      end else begin : g_edge
        assign ch_out[n][d]     = FLIT_NONE;
        assign r_ready[n][d+1]  = 1'b0;
        assign r_crd_i[n][d+1]  = CREDIT_NONE;
        assign r_in[n][d+1]      = FLIT_NONE;
        assign link_level[n][d] = '0;
        assign link_mv[n][d]    = '0;
        assign link_up[n][d]    = 1'b0;
        assign link_busy[n][d]  = 1'b0;
      end
    end
  end

endmodule
