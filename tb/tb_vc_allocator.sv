// tb_vc_allocator: random VA requests and releases against a model of the
// busy bits of every downstream VC. Checks: only requesters are granted, at
// most one grant per output port per cycle, the granted VC is the lowest
// free one, nothing is granted while all VCs of a port are busy, a grant is
// given whenever a port has a request and a free VC, and a persistent
// requester is served within N_IN grants (round robin).
module tb_vc_allocator;
  import hres_pkg::*;
  localparam int NVC = 2, N_IN = NUM_PORTS * NVC;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [N_IN-1:0] req, gnt;
  logic [N_IN-1:0][PORT_W-1:0] req_port;
  logic [N_IN-1:0][VC_ID_W-1:0] gnt_vc;
  logic [NUM_PORTS-1:0] release_en;
  logic [NUM_PORTS-1:0][VC_ID_W-1:0] release_vc;
  logic [NUM_PORTS-1:0][NVC-1:0] vc_busy;
  vc_allocator #(.NUM_VC(NVC)) dut (.*);
  int checks = 0, failures = 0, full_blocks = 0;
  bit busy[NUM_PORTS][NVC];
  int wait_cnt[N_IN];
  logic rel_next;
  logic [VC_ID_W-1:0] rel_vc_next;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    req = '0; req_port = '0; release_en = '0; release_vc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    foreach (busy[p, v]) busy[p][v] = 0;
    foreach (wait_cnt[i]) wait_cnt[i] = 0;
    for (int t = 0; t < 4000; t++) begin
      for (int i = 0; i < N_IN; i++) begin
        req[i]      = ($urandom % 2);
        req_port[i] = PORT_W'((t / 500) % 2 == 0 ? $urandom % 5 : $urandom % 2);
      end
      for (int p = 0; p < NUM_PORTS; p++) begin
        int v;
        v = int'($urandom % NVC);
        release_en[p] = busy[p][v] && ($urandom % 3 == 0);
        release_vc[p] = VC_ID_W'(v);
      end
      #1;
      for (int p = 0; p < NUM_PORTS; p++) begin
        int ng, lowest;
        bit any_req;
        ng = 0; any_req = 0; lowest = -1;
        for (int v = NVC - 1; v >= 0; v--) if (!busy[p][v]) lowest = v;
        for (int i = 0; i < N_IN; i++) begin
          if (req[i] && req_port[i] == p) any_req = 1;
          if (gnt[i] && req_port[i] == p) begin
            ng++;
            check(req[i], "grant without request");
            check(int'(gnt_vc[i]) == lowest, $sformatf("port %0d granted vc %0d, lowest free %0d", p, gnt_vc[i], lowest));
          end
        end
        check(ng <= 1, "two grants on one port");
        if (lowest < 0) begin
          check(ng == 0, "grant while all VCs busy");
          if (any_req) full_blocks++;
        end else begin
          check(ng == (any_req ? 1 : 0), "request not served though a VC is free");
        end
      end
      @(posedge clk);
      for (int i = 0; i < N_IN; i++) begin
        if (gnt[i]) begin busy[req_port[i]][gnt_vc[i]] = 1; wait_cnt[i] = 0; end
      end
      for (int p = 0; p < NUM_PORTS; p++) if (release_en[p]) busy[p][release_vc[p]] = 0;
      @(negedge clk);
      for (int p = 0; p < NUM_PORTS; p++)
        for (int v = 0; v < NVC; v++) check(vc_busy[p][v] == busy[p][v], "busy bits");
    end
    // fairness: all inputs request port 3 forever, releases right away
    for (int i = 0; i < N_IN; i++) begin req[i] = 1; req_port[i] = 3'd3; wait_cnt[i] = 0; end
    release_en = '0;
    rst_n = 0; @(negedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      #1;
      for (int i = 0; i < N_IN; i++) begin
        if (gnt[i]) wait_cnt[i] = 0; else wait_cnt[i]++;
        check(wait_cnt[i] <= N_IN, $sformatf("input %0d starved", i));
      end
      // free the VC granted in this cycle during the next one
      rel_next = |gnt;
      for (int i = 0; i < N_IN; i++) if (gnt[i]) rel_vc_next = gnt_vc[i];
      @(posedge clk);
      @(negedge clk);
      release_en[3] = rel_next;
      release_vc[3] = rel_vc_next;
    end
    check(full_blocks > 0, "all-busy case never reached");
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
