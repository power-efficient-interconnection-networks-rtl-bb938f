// vc_allocator: virtual-channel allocator of the router (pipeline stage 2).
//
// Each input VC holding a routed head flit requests its output port
// (req, req_port). For every output port the allocator picks one of the
// requesting input VCs in round-robin order, provided that port has a free
// output VC, and hands it the lowest-numbered free one (gnt, gnt_vc). An
// output VC stays busy until the router sees the packet's tail leave.
// At most one grant per output port per cycle. Purely combinational apart
// from the round-robin pointers, which advance past each winner.
// The document names the allocator; its organisation is this design's.
module vc_allocator
  import noc_pkg::*;
#(
  parameter int NP  = NUM_PORTS,
  parameter int NVC = NUM_VC
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            req      [NP*NVC],
  input  logic [PORT_W-1:0] req_port [NP*NVC],
  input  logic            ovc_busy [NP][NVC],
  output logic            gnt      [NP*NVC],
  output logic [VC_W-1:0] gnt_vc   [NP*NVC]
);

  localparam int NI = NP * NVC;
  localparam int IW = $clog2(NI);

  logic [IW-1:0] ptr [NP];
  logic          win_valid [NP];
  logic [IW-1:0] win_idx   [NP];

  always_comb begin
    for (int i = 0; i < NI; i++) begin
      gnt[i]    = 1'b0;
      gnt_vc[i] = '0;
    end
    for (int p = 0; p < NP; p++) begin
      logic          have_free;
      logic [VC_W-1:0] free_vc;
      have_free = 1'b0;
      free_vc   = '0;
      for (int v = NVC - 1; v >= 0; v--)
        if (!ovc_busy[p][v]) begin
          have_free = 1'b1;
          free_vc   = VC_W'(v);
        end
      win_valid[p] = 1'b0;
      win_idx[p]   = '0;
      for (int k = 0; k < NI; k++) begin
        int i;
        i = (int'(ptr[p]) + k) % NI;
        if (!win_valid[p] && req[i] && int'(req_port[i]) == p) begin
          win_valid[p] = 1'b1;
          win_idx[p]   = IW'(i);
        end
      end
      if (win_valid[p] && have_free) begin
        gnt[win_idx[p]]    = 1'b1;
        gnt_vc[win_idx[p]] = free_vc;
      end else begin
        win_valid[p] = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) ptr[p] <= '0;
    end else begin
      for (int p = 0; p < NP; p++)
        if (win_valid[p]) ptr[p] <= (int'(win_idx[p]) == NI - 1) ? '0 : win_idx[p] + 1'b1;
    end
  end

endmodule
