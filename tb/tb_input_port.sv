// tb_input_port: an input port at (1, 1) with 2 VCs fed with a random mix of
// real-time flits and multi-flit best-effort packets on both VCs, while the
// testbench plays VC and switch allocator with random delays.
// Checks: real-time flits appear on rt_valid/rt_flit in the cycle they
// arrive and are never buffered; buffered flits leave in order per VC with
// the route of their head flit (XY) and the output VC granted to them; a
// credit with the right VC follows each dequeue one cycle later; a VC asks
// for VA only between its head's arrival and its VA grant; with no
// contention the VA request rises two cycles after the head arrives (RC
// stage) and SA is requested the cycle after the VA grant.
module tb_input_port;
  import hres_pkg::*;
  localparam int NVC = 2, D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  link_t in_link;
  credit_t credit_up;
  logic rt_valid;
  flit_t rt_flit;
  logic [NVC-1:0] va_req, va_gnt, sa_req;
  logic [NVC-1:0][PORT_W-1:0] vc_route;
  logic [NVC-1:0][VC_ID_W-1:0] va_out_vc, vc_out_vc;
  logic sa_gnt;
  logic [VC_ID_W-1:0] sa_gnt_vc;
  flit_t be_flit;
  logic [VC_ID_W-1:0] be_out_vc;
  input_port #(.NUM_VC(NVC), .BUF_DEPTH(D), .X_COORD(1), .Y_COORD(1)) dut (.*);

  int checks = 0, failures = 0, cyc = 0, rt_seen = 0, pkts_done = 0;
  flit_t q[NVC][$];             // flits written per VC
  int    occ[NVC];              // buffer occupancy as the sender sees it
  int    exp_route[NVC];
  int    granted_vc[NVC];
  bit    pending_credit;
  int    pending_vc;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic int xy(flit_t f);
    if (f.dst_x > 1) return 2;
    if (f.dst_x < 1) return 4;
    if (f.dst_y > 1) return 1;
    if (f.dst_y < 1) return 3;
    return 0;
  endfunction

  // sender state
  int s_vc = 0, s_len = 0, s_idx = 0, s_id = 0;
  flit_t s_head;

  initial begin
    in_link = '0; va_gnt = '0; va_out_vc = '0; sa_gnt = 0; sa_gnt_vc = '0;
    foreach (occ[v]) begin occ[v] = 0; exp_route[v] = -1; granted_vc[v] = -1; end
    pending_credit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- directed: uncontended head flit timing on VC 1, destination (3, 1)
    in_link = '0;
    in_link.valid = 1; in_link.vc = 3'd1;
    in_link.flit.kind = FK_SINGLE; in_link.flit.dst_x = 4'd3; in_link.flit.dst_y = 4'd1;
    in_link.flit.payload = 36'h123;
    #1 check(!rt_valid, "normal flit on real-time path");
    @(negedge clk); in_link = '0;
    check(va_req == '0, "VA requested before route computation");
    @(negedge clk);
    check(va_req == 2'b10 && vc_route[1] == P_EAST, "VA request two cycles after arrival, route east");
    va_gnt = 2'b10; va_out_vc[1] = 3'd1;
    @(negedge clk); va_gnt = '0;
    check(sa_req == 2'b10 && vc_out_vc[1] == 3'd1, "SA request the cycle after VA grant");
    sa_gnt = 1; sa_gnt_vc = 3'd1;
    #1 check(be_flit.payload == 36'h123 && be_out_vc == 3'd1, "flit leaves through the crossbar input");
    @(negedge clk); sa_gnt = 0;
    check(credit_up.valid && credit_up.vc == 3'd1, "credit one cycle after dequeue");
    check(sa_req == '0 && va_req == '0, "VC idle after single-flit packet");
    @(negedge clk);

    // ---- random traffic
    for (cyc = 0; cyc < 5000; cyc++) begin
      link_t l;
      l = '0;
      // sender: real-time flit or the next best-effort flit
      if ($urandom % 5 == 0) begin
        l.valid = 1; l.flit = flit_t'({$urandom, $urandom}); l.flit.rt = 1;
      end else if (s_len == 0 && $urandom % 2 == 0) begin
        s_vc = int'($urandom % NVC); s_len = 1 + int'($urandom % 4); s_idx = 0; s_id++;
      end
      if (!l.valid && s_len > 0 && occ[s_vc] < D && $urandom % 4 != 0) begin
        l.valid = 1; l.vc = VC_ID_W'(s_vc);
        l.flit.rt = 0;
        l.flit.kind = (s_len == 1) ? FK_SINGLE : (s_idx == 0) ? FK_HEAD : (s_idx == s_len - 1) ? FK_TAIL : FK_BODY;
        if (s_idx == 0) begin l.flit.dst_x = COORD_W'($urandom % 4); l.flit.dst_y = COORD_W'($urandom % 4); s_head = l.flit; end
        else begin l.flit.dst_x = s_head.dst_x; l.flit.dst_y = s_head.dst_y; end
        l.flit.payload = {16'(s_id), 8'(s_idx), 12'h0};
        s_idx++;
        if (s_idx == s_len) s_len = 0;
      end
      in_link = l;
      // allocator responses
      va_gnt = '0;
      for (int v = 0; v < NVC; v++) if (va_req[v] && $urandom % 3 == 0) begin va_gnt[v] = 1; va_out_vc[v] = VC_ID_W'($urandom % 8); end
      sa_gnt = 0;
      if (|sa_req && $urandom % 2 == 0) begin
        int v;
        v = int'($urandom % NVC);
        if (!sa_req[v]) v = 1 - v;
        sa_gnt = 1; sa_gnt_vc = VC_ID_W'(v);
      end
      #1;
      check(rt_valid == (l.valid && l.flit.rt), "real-time valid");
      if (rt_valid) begin check(rt_flit == l.flit, "real-time flit"); rt_seen++; end
      for (int v = 0; v < NVC; v++) begin
        if (va_req[v]) begin
          check(q[v].size() > 0 && is_head(q[v][0].kind), "VA request without head at front");
          if (q[v].size() > 0) check(int'(vc_route[v]) == xy(q[v][0]), "route of head");
          exp_route[v] = int'(vc_route[v]);
        end
        check(sa_req[v] == (granted_vc[v] >= 0 && q[v].size() > 0), $sformatf("SA request of VC %0d", v));
      end
      if (sa_gnt) begin
        int v;
        v = int'(sa_gnt_vc);
        check(q[v].size() > 0 && be_flit == q[v][0], "buffered flit order");
        check(int'(be_out_vc) == granted_vc[v], "output VC");
      end
      check(credit_up.valid == pending_credit && (!pending_credit || int'(credit_up.vc) == pending_vc), "credit return");
      @(posedge clk);
      // update the model with what happened at the edge
      pending_credit = sa_gnt;
      pending_vc = int'(sa_gnt_vc);
      if (sa_gnt) begin
        flit_t f;
        f = q[sa_gnt_vc].pop_front();
        occ[sa_gnt_vc]--;
        if (is_tail(f.kind)) begin granted_vc[sa_gnt_vc] = -1; pkts_done++; end
      end
      for (int v = 0; v < NVC; v++) if (va_gnt[v]) granted_vc[v] = int'(va_out_vc[v]);
      if (l.valid && !l.flit.rt) begin q[l.vc].push_back(l.flit); occ[l.vc]++; end
      @(negedge clk);
    end
    check(rt_seen > 0 && pkts_done > 100, "traffic too small");
    $display("rt=%0d packets=%0d", rt_seen, pkts_done);
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
