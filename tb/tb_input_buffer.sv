// tb_input_buffer: random writes into the two VCs of an input port and
// random pops, checked against a queue per VC. Writes stop at the 64-flit
// depth of a VC, as credits would enforce; both VCs are driven full and
// drained at least once. front, its type field and empty are compared
// every cycle.
module tb_input_buffer;
  import noc_pkg::*;
  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  flit_t in_flit;
  logic pop [NUM_VC];
  flit_t front [NUM_VC];
  logic empty [NUM_VC];
  input_buffer dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [FLIT_W+1:0] q [NUM_VC][$];
  int full_seen [NUM_VC];

  task automatic compare();
    for (int v = 0; v < NUM_VC; v++) begin
      checks++;
      if (empty[v] != (q[v].size() == 0)) begin
        failures++; $display("FAIL empty[%0d]", v);
      end else if (q[v].size() != 0 &&
                   ({front[v].ftype, front[v].data} != q[v][0] || !front[v].valid ||
                    int'(front[v].vc) != v)) begin
        failures++; $display("FAIL front[%0d] %h expected %h", v, {front[v].ftype, front[v].data}, q[v][0]);
      end
    end
  endtask

  initial begin
    in_flit = FLIT_NONE;
    for (int v = 0; v < NUM_VC; v++) begin pop[v] = 0; full_seen[v] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      int phase;
      @(negedge clk);
      compare();
      phase = (cyc / 500) % 3;   // 0 fill-biased, 1 drain-biased, 2 balanced
      in_flit = FLIT_NONE;
      begin
        int v;
        v = $urandom_range(0, NUM_VC - 1);
        if ($urandom_range(0, 9) < (phase == 0 ? 9 : phase == 1 ? 2 : 5) && q[v].size() < DEPTH) begin
          in_flit.valid = 1;
          in_flit.vc    = VC_W'(v);
          in_flit.ftype = ftype_e'($urandom_range(0, 3));
          in_flit.data  = $urandom;
        end
      end
      for (int v = 0; v < NUM_VC; v++)
        pop[v] = ($urandom_range(0, 9) < (phase == 0 ? 2 : phase == 1 ? 9 : 5)) && q[v].size() > 0;
      @(posedge clk);
      for (int v = 0; v < NUM_VC; v++) begin
        if (pop[v]) void'(q[v].pop_front());
        if (q[v].size() == DEPTH) full_seen[v]++;
      end
      if (in_flit.valid) q[in_flit.vc].push_back({in_flit.ftype, in_flit.data});
      for (int v = 0; v < NUM_VC; v++) if (q[v].size() == DEPTH) full_seen[v]++;
    end
    for (int v = 0; v < NUM_VC; v++) begin
      checks++;
      if (full_seen[v] == 0) begin failures++; $display("FAIL VC %0d never full", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
