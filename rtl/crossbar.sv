// crossbar: the router's NP x NP crossbar (pipeline stage 4, traversal).
//
// Output port o carries the flit of input port sel[o] when sel_valid[o] is
// high and nothing otherwise; the VC field of the flit is replaced by the
// output VC (out_vc[o]) that the flit holds downstream. Purely
// combinational: the router registers the result. The document names the
// crossbar; the multiplexer form is this design's.
module crossbar
  import noc_pkg::*;
#(
  parameter int NP = NUM_PORTS
) (
  input  flit_t             in_flit   [NP],
  input  logic [PORT_W-1:0] sel       [NP],
  input  logic              sel_valid [NP],
  input  logic [VC_W-1:0]   out_vc    [NP],
  output flit_t             out_flit  [NP]
);

  always_comb begin
    for (int o = 0; o < NP; o++) begin
      out_flit[o] = FLIT_NONE;
      if (sel_valid[o] && int'(sel[o]) < NP) begin
        out_flit[o]       = in_flit[int'(sel[o])];
        out_flit[o].valid = 1'b1;
        out_flit[o].vc    = out_vc[o];
      end
    end
  end

endmodule
