// switch_allocator: separable input-first switch allocator of the router
// (pipeline stage 3).
//
// req[i] says input VC i (port i / NVC, VC i % NVC) has a flit, an output
// VC, a downstream credit and a channel ready to take it; req_port[i] is
// its output port. First each input port picks one of its requesting VCs
// round-robin, then each output port picks one of the input ports whose
// pick targets it, again round-robin. gnt[i] marks the winning input VCs:
// at most one per input port and one per output port each cycle, so the
// crossbar is never asked to merge two flits. The document names the
// allocator; the separable input-first organisation is this design's.
module switch_allocator
  import noc_pkg::*;
#(
  parameter int NP  = NUM_PORTS,
  parameter int NVC = NUM_VC
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req      [NP*NVC],
  input  logic [PORT_W-1:0] req_port [NP*NVC],
  output logic              gnt      [NP*NVC]
);

  localparam int VW = (NVC > 1) ? $clog2(NVC) : 1;
  localparam int PW = (NP > 1) ? $clog2(NP) : 1;

  logic [VW-1:0] in_ptr  [NP];
  logic [PW-1:0] out_ptr [NP];
  logic          in_has  [NP];
  logic [VW-1:0] in_vc   [NP];
  logic          out_has [NP];
  logic [PW-1:0] out_in  [NP];

  always_comb begin
    // stage 1: one VC per input port
    for (int ip = 0; ip < NP; ip++) begin
      in_has[ip] = 1'b0;
      in_vc[ip]  = '0;
      for (int k = 0; k < NVC; k++)
        if (!in_has[ip] && req[ip*NVC + (int'(in_ptr[ip]) + k) % NVC]) begin
          in_has[ip] = 1'b1;
          in_vc[ip]  = VW'((int'(in_ptr[ip]) + k) % NVC);
        end
    end
    // stage 2: one input port per output port
    for (int op = 0; op < NP; op++) begin
      out_has[op] = 1'b0;
      out_in[op]  = '0;
      for (int k = 0; k < NP; k++)
        if (!out_has[op] && in_has[(int'(out_ptr[op]) + k) % NP] &&
            int'(req_port[((int'(out_ptr[op]) + k) % NP) * NVC +
                          int'(in_vc[(int'(out_ptr[op]) + k) % NP])]) == op) begin
          out_has[op] = 1'b1;
          out_in[op]  = PW'((int'(out_ptr[op]) + k) % NP);
        end
    end
    for (int i = 0; i < NP*NVC; i++) gnt[i] = 1'b0;
    for (int op = 0; op < NP; op++)
      if (out_has[op]) gnt[int'(out_in[op])*NVC + int'(in_vc[out_in[op]])] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NP; p++) begin
        in_ptr[p]  <= '0;
        out_ptr[p] <= '0;
      end
    end else begin
      for (int op = 0; op < NP; op++)
        if (out_has[op]) begin
          out_ptr[op] <= (int'(out_in[op]) == NP - 1) ? '0 : out_in[op] + 1'b1;
          in_ptr[out_in[op]] <= (int'(in_vc[out_in[op]]) == NVC - 1) ? '0 : in_vc[out_in[op]] + 1'b1;
        end
    end
  end

endmodule
