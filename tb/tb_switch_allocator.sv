// tb_switch_allocator: random switch requests checked every cycle against a
// reference separable input-first round-robin allocator (one VC per input
// port, then one input port per output port, pointers moving past the
// winners), plus the invariants: grants only to requesters, at most one
// grant per input port and per output port.
module tb_switch_allocator;
  import noc_pkg::*;
  localparam int NP = NUM_PORTS, NVC = NUM_VC, NI = NP * NVC;
  logic clk = 0, rst_n = 0;
  logic req [NI];
  logic [PORT_W-1:0] req_port [NI];
  logic gnt [NI];
  switch_allocator dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int iptr [NP], optr [NP];
  int n_grants = 0;

  task automatic step_and_check();
    int pick [NP];
    int eg [NI];
    int per_in [NP], per_out [NP];
    for (int i = 0; i < NI; i++) eg[i] = 0;
    for (int ip = 0; ip < NP; ip++) begin
      pick[ip] = -1;
      for (int k = 0; k < NVC; k++) begin
        int v;
        v = (iptr[ip] + k) % NVC;
        if (pick[ip] < 0 && req[ip*NVC + v]) pick[ip] = v;
      end
    end
    for (int op = 0; op < NP; op++) begin
      int w;
      w = -1;
      for (int k = 0; k < NP; k++) begin
        int ip;
        ip = (optr[op] + k) % NP;
        if (w < 0 && pick[ip] >= 0 && int'(req_port[ip*NVC + pick[ip]]) == op) w = ip;
      end
      if (w >= 0) begin
        eg[w*NVC + pick[w]] = 1;
        optr[op] = (w + 1) % NP;
        iptr[w]  = (pick[w] + 1) % NVC;
      end
    end
    #1;
    for (int p = 0; p < NP; p++) begin per_in[p] = 0; per_out[p] = 0; end
    for (int i = 0; i < NI; i++) begin
      checks++;
      if (int'(gnt[i]) != eg[i]) begin
        failures++; $display("FAIL input VC %0d: gnt %0d expected %0d", i, gnt[i], eg[i]);
      end
      if (gnt[i]) begin
        n_grants++;
        per_in[i / NVC]++;
        per_out[req_port[i]]++;
        checks++;
        if (!req[i]) begin failures++; $display("FAIL grant without request"); end
      end
    end
    for (int p = 0; p < NP; p++) begin
      checks++;
      if (per_in[p] > 1 || per_out[p] > 1) begin failures++; $display("FAIL port %0d granted twice", p); end
    end
  endtask

  initial begin
    for (int p = 0; p < NP; p++) begin iptr[p] = 0; optr[p] = 0; end
    for (int i = 0; i < NI; i++) begin req[i] = 0; req_port[i] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        req[i] = ($urandom_range(0, 1) != 0);
        req_port[i] = PORT_W'($urandom_range(0, NP - 1));
      end
      step_and_check();
    end
    checks++;
    if (n_grants < 4000) begin failures++; $display("FAIL only %0d grants", n_grants); end
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
