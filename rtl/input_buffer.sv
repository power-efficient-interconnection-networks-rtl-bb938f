// input_buffer: the flit buffers of one router input port.
//
// The port holds NUM_VC virtual channels, each a FIFO of DEPTH flits
// (2 x 64 = 128 flits per port by default). An arriving flit is written
// into the FIFO its vc field names; each VC is read independently by a
// one-cycle pop. front[v] shows the oldest flit of VC v with no delay and
// empty[v] says the VC holds nothing. Credit-based flow control upstream
// guarantees no VC is written when full; an assertion checks it.
// The 128-flit capacity and two VCs are the document's; splitting them
// evenly between the VCs is this design's choice.
module input_buffer
  import noc_pkg::*;
#(
  parameter int NVC   = NUM_VC,
  parameter int DEPTH = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  flit_t  in_flit,
  input  logic   pop   [NVC],
  output flit_t  front [NVC],
  output logic   empty [NVC]
);

  localparam int PW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH + 1);

  logic [FLIT_W+1:0] mem [NVC][DEPTH];   // ftype, data (vc is implied)
  logic [PW-1:0] wr_ptr [NVC];
  logic [PW-1:0] rd_ptr [NVC];
  logic [CW-1:0] count  [NVC];

  for (genvar v = 0; v < NVC; v++) begin : g_vc
    logic push;
    logic [FLIT_W+1:0] word;
    assign push     = in_flit.valid && (int'(in_flit.vc) == v);
    assign empty[v] = (count[v] == '0);
    assign word     = mem[v][rd_ptr[v]];
    always_comb begin
      front[v]       = FLIT_NONE;
      front[v].valid = !empty[v];
      front[v].ftype = ftype_e'(word[FLIT_W+1:FLIT_W]);
      front[v].vc    = VC_W'(v);
      front[v].data  = word[FLIT_W-1:0];
    end

    always_ff @(posedge clk) begin
      if (push) mem[v][wr_ptr[v]] <= {in_flit.ftype, in_flit.data};
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wr_ptr[v] <= '0;
        rd_ptr[v] <= '0;
        count[v]  <= '0;
      end else begin
        if (push) wr_ptr[v] <= (int'(wr_ptr[v]) == DEPTH - 1) ? '0 : wr_ptr[v] + 1'b1;
        if (pop[v] && !empty[v]) rd_ptr[v] <= (int'(rd_ptr[v]) == DEPTH - 1) ? '0 : rd_ptr[v] + 1'b1;
        count[v] <= count[v] + CW'(push) - CW'(pop[v] && !empty[v]);
      end
    end

    a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(push && int'(count[v]) == DEPTH))
      else $error("input_buffer: VC %0d written while full", v);
  end

endmodule
