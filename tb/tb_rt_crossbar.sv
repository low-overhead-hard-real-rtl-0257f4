// tb_rt_crossbar: random selector settings, valid bits and flits. Every
// output must carry exactly the flit of the input its entry selects, valid
// only when the entry is enabled and that input holds a real-time flit;
// one-to-many settings (several outputs on one input) are counted and must
// occur; unrouted must flag valid inputs no enabled output selects.
module tb_rt_crossbar;
  import hres_pkg::*;
  logic  [NUM_PORTS-1:0] in_valid, sel_en, out_valid, unrouted;
  flit_t [NUM_PORTS-1:0] in_flit, out_flit;
  logic  [NUM_PORTS-1:0][PORT_W-1:0] sel_in;
  rt_crossbar dut (.*);
  int checks = 0, failures = 0, multicast = 0;
  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [NUM_PORTS-1:0] used;
      int fan[NUM_PORTS];
      used = '0;
      for (int i = 0; i < NUM_PORTS; i++) begin
        in_valid[i] = $urandom % 2;
        in_flit[i]  = flit_t'({$urandom, $urandom});
        sel_en[i]   = $urandom % 3 != 0;
        sel_in[i]   = PORT_W'($urandom % 5);
        fan[i]      = 0;
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        int s;
        s = int'(sel_in[o]);
        if (sel_en[o]) begin used[s] = 1'b1; fan[s]++; end
        checks++;
        if (out_valid[o] != (sel_en[o] && in_valid[s]) || (out_valid[o] && out_flit[o] != in_flit[s])) begin
          failures++;
          $display("FAIL: output %0d", o);
        end
      end
      for (int i = 0; i < NUM_PORTS; i++) if (in_valid[i] && fan[i] > 1) multicast++;
      checks++;
      if (unrouted != (in_valid & ~used)) begin failures++; $display("FAIL: unrouted"); end
    end
    checks++;
    if (multicast == 0) begin failures++; $display("FAIL: no one-to-many case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
