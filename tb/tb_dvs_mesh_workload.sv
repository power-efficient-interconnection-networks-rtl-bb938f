// tb_dvs_mesh_workload: the task workload at 50 and at 100 concurrent tasks,
// at three injection rates each, on the 8 x 8 DVS mesh. For each point it
// prints mean packet latency (creation to tail ejection, source queueing
// included) and link power, against the power of the same channels held at
// 1 GHz, and checks that every packet arrives intact, that the channels
// rescaled and that DVS saves link energy.
// Tasks last TASK_LEN cycles on average (the evaluated tasks last about
// 1 ms, i.e. a million cycles; they are shortened here so a point takes
// seconds). Per-task rates for 50 tasks are twice those for 100 tasks,
// so both sweeps cover the same network loads.
module tb_dvs_mesh_workload;
  import noc_pkg::*;
  localparam int K = 8, N = K * K;
  localparam int TASK_LEN = 10000;
  localparam int RUN = 20000;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  mesh_harness #(.K(K)) h_dvs (.clk, .rst_n);

  int checks = 0, failures = 0;
  task automatic expect_true(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_point(int ntasks, int ppm);
    int tnode [100], tend [100];
    int waited;
    real p_dvs, p_full;
    rst_n = 0;
    repeat (3) @(negedge clk);
    h_dvs.clear_stats();
    rst_n = 1;
    for (int t = 0; t < ntasks; t++) begin
      tnode[t] = $urandom_range(0, N - 1);
      tend[t]  = $urandom_range(TASK_LEN / 2, 3 * TASK_LEN / 2);
    end
    for (int c = 0; c < RUN; c++) begin
      @(posedge clk);
      for (int t = 0; t < ntasks; t++) begin
        if (c >= tend[t]) begin
          tnode[t] = $urandom_range(0, N - 1);
          tend[t]  = c + $urandom_range(TASK_LEN / 2, 3 * TASK_LEN / 2);
        end
        if ($urandom_range(0, 999999) < ppm) begin
          int dst;
          dst = $urandom_range(0, N - 1);
          h_dvs.enqueue(tnode[t], dst);
        end
      end
    end
    waited = 0;
    while (h_dvs.delivered < h_dvs.created && waited < 150000) begin
      @(posedge clk);
      waited++;
    end
    expect_true($sformatf("%0d tasks @%0d ppm: all packets delivered", ntasks, ppm),
                h_dvs.delivered == h_dvs.created);
    expect_true("no packet errors", h_dvs.errors == 0);
    expect_true("links rescaled", h_dvs.n_scale > 0);
    expect_true("DVS uses less link energy", h_dvs.energy + h_dvs.energy_trans < h_dvs.energy_full);
    p_dvs  = (h_dvs.energy + h_dvs.energy_trans) / (real'(h_dvs.cycle) * 1.0e-9);
    p_full = h_dvs.energy_full / (real'(h_dvs.cycle) * 1.0e-9);
    $display("tasks=%0d rate=%0d ppm/task (%0.2f pkt/cycle): mean latency %0.1f cycles, link power %0.1f W vs %0.1f W at 1 GHz (%0.2fX saving), %0d rescalings",
             ntasks, ppm, ntasks * ppm / 1.0e6, real'(h_dvs.lat_sum) / h_dvs.delivered,
             p_dvs, p_full, p_full / p_dvs, h_dvs.n_scale);
  endtask

  initial begin
    run_point(100, 500);
    run_point(100, 2000);
    run_point(100, 4000);
    run_point(50, 1000);
    run_point(50, 4000);
    run_point(50, 8000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
