// tb_vc_allocator: random requests from the 10 input VCs with random busy
// output VCs, checked every cycle against a round-robin reference: per
// output port the first requester at or after the port's pointer wins,
// provided the port has a free VC, and receives the lowest free VC; the
// pointer then moves past the winner. Also checks that a fully contended
// port serves all ten requesters in ten cycles.
module tb_vc_allocator;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS, NVC = NUM_VC, NI = NP * NVC;
  logic clk = 0, rst_n = 0;
  logic req [NI];
  logic [PORT_W-1:0] req_port [NI];
  logic ovc_busy [NP][NVC];
  logic gnt [NI];
  logic [VC_W-1:0] gnt_vc [NI];
  vc_allocator dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int ptr [NP];

  task automatic step_and_check();
    int eg [NI], ev [NI];
    for (int i = 0; i < NI; i++) begin eg[i] = 0; ev[i] = 0; end
    for (int p = 0; p < NP; p++) begin
      int fv, w;
      fv = -1; w = -1;
      for (int v = 0; v < NVC; v++) if (!ovc_busy[p][v] && fv < 0) fv = v;
      for (int k = 0; k < NI; k++) begin
        int i;
        i = (ptr[p] + k) % NI;
        if (w < 0 && req[i] && int'(req_port[i]) == p) w = i;
      end
      if (w >= 0 && fv >= 0) begin
        eg[w] = 1; ev[w] = fv;
        ptr[p] = (w + 1) % NI;
      end
    end
    #1;
    for (int i = 0; i < NI; i++) begin
      checks++;
      if (int'(gnt[i]) != eg[i] || (eg[i] == 1 && int'(gnt_vc[i]) != ev[i])) begin
        failures++;
        $display("FAIL input VC %0d: gnt %0d vc %0d, expected %0d vc %0d", i, gnt[i], gnt_vc[i], eg[i], ev[i]);
      end
    end
  endtask

  initial begin
    for (int p = 0; p < NP; p++) ptr[p] = 0;
    for (int i = 0; i < NI; i++) begin req[i] = 0; req_port[i] = '0; end
    for (int p = 0; p < NP; p++) for (int v = 0; v < NVC; v++) ovc_busy[p][v] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        req[i] = ($urandom_range(0, 2) != 0);
        req_port[i] = PORT_W'($urandom_range(0, NP - 1));
      end
      for (int p = 0; p < NP; p++) for (int v = 0; v < NVC; v++) ovc_busy[p][v] = ($urandom_range(0, 3) == 0);
      step_and_check();
    end
    // full contention on port 2: ten requesters, ten cycles, ten different winners
    begin
      int won [NI];
      for (int i = 0; i < NI; i++) won[i] = 0;
      for (int it = 0; it < NI; it++) begin
        @(negedge clk);
        for (int i = 0; i < NI; i++) begin req[i] = 1; req_port[i] = PORT_W'(2); end
        for (int p = 0; p < NP; p++) for (int v = 0; v < NVC; v++) ovc_busy[p][v] = 0;
        step_and_check();
        for (int i = 0; i < NI; i++) won[i] += int'(gnt[i]);
      end
      for (int i = 0; i < NI; i++) begin
        checks++;
        if (won[i] != 1) begin failures++; $display("FAIL fairness: VC %0d won %0d times", i, won[i]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
