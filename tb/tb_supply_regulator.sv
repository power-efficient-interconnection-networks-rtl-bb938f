// tb_supply_regulator: checks the supply regulator model. After reset the
// supply sits at the level's voltage. For a series of level changes it
// checks the target voltage (0.9 V at 125 MHz to 2.5 V at 1 GHz, linear in
// between, computed here in floating point), that the supply never moves
// faster than 0.1 V/us (1 mV per 10 ns cycle) and always toward the target,
// that settled is low throughout the move, and that the move takes
// |dV| x 10 cycles, the transition time implied by the slew rate.
module tb_supply_regulator;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [LEVEL_W-1:0] level = LEVEL_W'(MAX_LEVEL);
  logic [MV_W-1:0] vdd_mv;
  logic settled;
  supply_regulator dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic int exp_mv(int l);
    real v;
    v = 900.0 + (l - 1) * (1600.0 / 7.0);
    return $rtoi(v + 0.5);
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic move_to(int l);
    int start, tgt, cyc, prev, last_change, bad;
    @(negedge clk);
    start = int'(vdd_mv);
    level = LEVEL_W'(l);
    tgt   = exp_mv(l);
    cyc = 0; prev = start; last_change = 0; bad = 0;
    @(negedge clk);
    while (!settled && cyc < 40000) begin
      cyc++;
      if (int'(vdd_mv) != prev) begin
        if ((int'(vdd_mv) - prev) * (tgt - start) <= 0) bad++;       // wrong direction
        if ((int'(vdd_mv) - prev > 1) || (prev - int'(vdd_mv) > 1)) bad++;
        if (last_change != 0 && cyc - last_change < 10) bad++;        // too fast
        last_change = cyc;
        prev = int'(vdd_mv);
      end
      @(negedge clk);
    end
    check("slew violations", bad, 0);
    check("final voltage", int'(vdd_mv), tgt);
    checks++;
    if (cyc < 10 * (start > tgt ? start - tgt : tgt - start) - 1 ||
        cyc > 10 * (start > tgt ? start - tgt : tgt - start) + 1) begin
      failures++;
      $display("FAIL transition %0d->%0d mV took %0d cycles", start, tgt, cyc);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check("reset voltage", int'(vdd_mv), 2500);
    check("reset settled", int'(settled), 1);
    move_to(7);
    move_to(6);
    move_to(1);
    check("min voltage", int'(vdd_mv), 900);
    move_to(2);
    move_to(8);
    check("max voltage", int'(vdd_mv), 2500);
    move_to(4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
