// tb_be_crossbar: random grants and flits; each granted output must carry
// the selected input's flit and output VC, and only granted outputs are
// valid.
module tb_be_crossbar;
  import hres_pkg::*;
  flit_t [NUM_PORTS-1:0] in_flit, out_flit;
  logic  [NUM_PORTS-1:0][VC_ID_W-1:0] in_vc, out_vc;
  logic  [NUM_PORTS-1:0] sel_valid, out_valid;
  logic  [NUM_PORTS-1:0][PORT_W-1:0] sel_in;
  be_crossbar dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < NUM_PORTS; i++) begin
        in_flit[i]   = flit_t'({$urandom, $urandom});
        in_vc[i]     = VC_ID_W'($urandom);
        sel_valid[i] = $urandom % 2;
        sel_in[i]    = PORT_W'($urandom % 5);
      end
      #1;
      for (int o = 0; o < NUM_PORTS; o++) begin
        checks++;
        if (out_valid[o] != sel_valid[o] ||
            (sel_valid[o] && (out_flit[o] != in_flit[sel_in[o]] || out_vc[o] != in_vc[sel_in[o]]))) begin
          failures++;
          $display("FAIL: output %0d", o);
        end
      end
    end
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
