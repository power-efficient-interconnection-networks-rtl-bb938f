// tb_freq_synth: checks the link clock enable of the frequency synthesizer.
// For every level L = 1..8 it runs 64 router cycles and checks that every
// window of 8 consecutive cycles holds exactly L link cycles (L x 125 MHz
// from a 1 GHz reference, spread evenly), then switches level on the fly.
module tb_freq_synth;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [LEVEL_W-1:0] level = LEVEL_W'(MAX_LEVEL);
  logic tick;
  freq_synth dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic hist [$];

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int l = 1; l <= MAX_LEVEL; l++) begin
      @(negedge clk);
      level = LEVEL_W'(l);
      hist.delete();
      repeat (8) @(negedge clk);          // let the phase settle
      for (int c = 0; c < 64; c++) begin
        hist.push_back(tick);
        @(negedge clk);
      end
      for (int s = 0; s + 8 <= 64; s++) begin
        int n;
        n = 0;
        for (int k = 0; k < 8; k++) n += int'(hist[s + k]);
        checks++;
        if (n != l) begin
          failures++;
          $display("FAIL level %0d: %0d ticks in 8 cycles starting at %0d", l, n, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
