// tb_crossbar: random flits and selections; each output must carry the
// selected input's type and data with valid set and the VC replaced by the
// output VC, or nothing when not selected.
module tb_crossbar;
  import noc_pkg::*;
  flit_t in_flit [NUM_PORTS];
  logic [PORT_W-1:0] sel [NUM_PORTS];
  logic sel_valid [NUM_PORTS];
  logic [VC_W-1:0] out_vc [NUM_PORTS];
  flit_t out_flit [NUM_PORTS];
  crossbar dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int it = 0; it < 2000; it++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        in_flit[p] = flit_t'({$urandom, $urandom});
        sel[p] = PORT_W'($urandom_range(0, NUM_PORTS - 1));
        sel_valid[p] = 1'($urandom);
        out_vc[p] = VC_W'($urandom);
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        checks++;
        if (sel_valid[o]) begin
          if (!out_flit[o].valid || out_flit[o].data != in_flit[sel[o]].data ||
              out_flit[o].ftype != in_flit[sel[o]].ftype || out_flit[o].vc != out_vc[o]) begin
            failures++; $display("FAIL output %0d", o);
          end
        end else if (out_flit[o].valid) begin
          failures++; $display("FAIL output %0d valid without selection", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
