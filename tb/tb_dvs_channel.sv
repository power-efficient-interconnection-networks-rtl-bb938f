// tb_dvs_channel: end-to-end test of one DVS channel at default settings.
//
// A source offers flits with random data whenever ready is high; every
// flit that comes out is compared, in order, with what went in.
// Phase 1 saturates the channel at 1 GHz and checks one flit per router
// cycle (32 Gb/s). Phase 2 lets it idle: the controller must step the
// frequency down to 125 MHz, the link must be down (no flit, link_up low)
// during each voltage transition, and each transition must last
// 10 cycles per mV of supply change. Phase 3 saturates it again at the
// lowest level and checks one flit per 8 cycles while the level holds,
// then checks that the controller scales the link back up.
module tb_dvs_channel;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  flit_t in_flit, out_flit;
  logic ready, link_up, busy, link_tick;
  logic [LEVEL_W-1:0] level;
  logic [MV_W-1:0] vdd_mv;

  dvs_channel dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [FLIT_W-1:0] sb [$];
  bit offer = 0;
  int n_out = 0, n_down_cycles = 0, n_up_steps = 0, n_down_steps = 0;
  logic was_up = 1;
  logic [LEVEL_W-1:0] prev_level;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s (t=%0t)", msg, $time);
  endtask

  // source
  always @(negedge clk) begin
    in_flit = FLIT_NONE;
    if (rst_n && offer && ready) begin
      in_flit.valid = 1'b1;
      in_flit.ftype = FT_BODY;
      in_flit.vc    = VC_W'($urandom);
      in_flit.data  = $urandom;
      sb.push_back(in_flit.data);
    end
  end

  // sink and monitors
  always @(posedge clk) if (rst_n) begin
    if (out_flit.valid) begin
      logic [FLIT_W-1:0] e;
      checks++;
      n_out++;
      if (!was_up) fail("flit delivered while the link was down");
      if (sb.size() == 0) fail("flit out of nowhere");
      else begin
        e = sb.pop_front();
        if (e != out_flit.data) fail($sformatf("data %h expected %h", out_flit.data, e));
      end
    end
    if (!link_up) n_down_cycles++;
    was_up <= link_up;
    if (level > prev_level) n_up_steps++;
    if (level < prev_level) n_down_steps++;
    prev_level <= level;
  end

  task automatic check(string what, int got, int lo, int hi);
    checks++;
    if (got < lo || got > hi) fail($sformatf("%s = %0d, expected %0d..%0d", what, got, lo, hi));
  endtask

  int n0, t0, mv0;

  initial begin
    prev_level = LEVEL_W'(MAX_LEVEL);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check("reset level", int'(level), MAX_LEVEL, MAX_LEVEL);
    // phase 1: full rate
    offer = 1;
    repeat (20) @(negedge clk);
    n0 = n_out;
    repeat (400) @(negedge clk);
    check("flits in 400 cycles at 1 GHz", n_out - n0, 399, 400);
    // phase 2: idle, expect scaling down with link-down transitions
    offer = 0;
    wait (level == LEVEL_W'(MAX_LEVEL - 1));
    mv0 = int'(vdd_mv);
    t0 = n_down_cycles;
    @(negedge clk);
    check("link down after scaling", int'(link_up), 0, 0);
    wait (link_up);
    check("transition cycles 1 GHz -> 875 MHz", n_down_cycles - t0,
          10 * (mv0 - 2271) - 2, 10 * (mv0 - 2271) + 2);
    wait (level == LEVEL_W'(MIN_LEVEL) && link_up);
    check("supply at 125 MHz", int'(vdd_mv), 900, 900);
    // phase 3: saturate at the lowest level
    offer = 1;
    repeat (20) @(negedge clk);
    n0 = n_out;
    repeat (160) @(negedge clk);
    if (level == LEVEL_W'(MIN_LEVEL) && link_up)
      check("flits in 160 cycles at 125 MHz", n_out - n0, 19, 21);
    else fail("level changed during the rate measurement");
    wait (level == LEVEL_W'(MAX_LEVEL) && link_up);
    offer = 0;
    repeat (50) @(negedge clk);
    check("all flits delivered", sb.size(), 0, 0);
    check("down steps", n_down_steps, MAX_LEVEL - 1, MAX_LEVEL - 1);
    check("up steps", n_up_steps, MAX_LEVEL - 1, MAX_LEVEL - 1);
    $display("flits=%0d link-down cycles=%0d", n_out, n_down_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
