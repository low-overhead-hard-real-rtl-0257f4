// tb_switch_allocator: random switch requests and real-time occupancy.
// Checks every cycle: grants go only to requesting VCs, at most one VC per
// input and one input per output, input and output grants agree, no grant
// to an output that carries a real-time flit, rt_block is raised exactly
// when a stage-1 winner is refused for that reason, and an input that is the
// only requester of a free output is always granted. A final phase holds two
// inputs on one output and checks they alternate (round robin).
module tb_switch_allocator;
  import hres_pkg::*;
  localparam int NVC = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [NUM_PORTS-1:0][NVC-1:0] req;
  logic [NUM_PORTS-1:0][NVC-1:0][PORT_W-1:0] req_port;
  logic [NUM_PORTS-1:0] rt_busy, in_gnt, out_gnt, rt_block;
  logic [NUM_PORTS-1:0][VC_ID_W-1:0] in_gnt_vc;
  logic [NUM_PORTS-1:0][PORT_W-1:0] out_gnt_in;
  switch_allocator #(.NUM_VC(NVC)) dut (.*);
  int checks = 0, failures = 0, blocks = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    req = '0; req_port = '0; rt_busy = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 4000; t++) begin
      int nreq_out[NUM_PORTS];
      for (int i = 0; i < NUM_PORTS; i++)
        for (int v = 0; v < NVC; v++) begin
          req[i][v]      = ($urandom % 3 == 0);
          req_port[i][v] = PORT_W'($urandom % 5);
        end
      rt_busy = NUM_PORTS'($urandom) & NUM_PORTS'($urandom);
      #1;
      foreach (nreq_out[o]) nreq_out[o] = 0;
      for (int i = 0; i < NUM_PORTS; i++) if (|req[i]) for (int v = 0; v < NVC; v++) if (req[i][v]) nreq_out[req_port[i][v]]++;
      for (int i = 0; i < NUM_PORTS; i++) begin
        if (in_gnt[i]) begin
          int o;
          check(req[i][in_gnt_vc[i]], "input grant without request");
          o = int'(req_port[i][in_gnt_vc[i]]);
          check(out_gnt[o] && int'(out_gnt_in[o]) == i, "input and output grants disagree");
          check(!rt_busy[o], "grant on a real-time output");
        end
      end
      for (int o = 0; o < NUM_PORTS; o++) begin
        bit s1_wants;
        s1_wants = 0;
        if (out_gnt[o]) check(in_gnt[out_gnt_in[o]] && int'(req_port[out_gnt_in[o]][in_gnt_vc[out_gnt_in[o]]]) == o,
                              "output grant not matched by input grant");
        check(!(rt_busy[o] && out_gnt[o]), "collision with real-time flit");
        for (int i = 0; i < NUM_PORTS; i++) if (|req[i] && int'(req_port[i][in_gnt_vc[i]]) == o) s1_wants = 1;
        check(rt_block[o] == (rt_busy[o] && s1_wants), "rt_block flag");
        if (rt_block[o]) blocks++;
        if (!rt_busy[o] && s1_wants) check(out_gnt[o], "free output with a request not granted");
      end
      @(posedge clk);
      @(negedge clk);
    end
    // round robin between inputs 1 and 3 on output 2
    req = '0; rt_busy = '0;
    req[1][0] = 1; req_port[1][0] = 3'd2;
    req[3][1] = 1; req_port[3][1] = 3'd2;
    begin
      int last;
      last = -1;
      for (int t = 0; t < 20; t++) begin
        #1;
        check(out_gnt[2] && int'(out_gnt_in[2]) != last, "inputs do not alternate");
        last = int'(out_gnt_in[2]);
        @(posedge clk);
        @(negedge clk);
      end
    end
    check(blocks > 0, "real-time block never happened");
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
