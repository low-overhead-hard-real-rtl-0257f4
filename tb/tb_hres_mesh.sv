// tb_hres_mesh: end-to-end test of the 4x4 HRES mesh at its default sizes.
//
// Every node runs a network-interface model that injects multi-flit
// best-effort packets (1 to 4 flits, random destinations, alternating VCs,
// credit flow control) and an ejection sink that checks every arriving flit
// and returns credits. Two real-time flows are configured in the routers'
// selector tables, as an offline route computation would:
//   flow A, unicast   node 0 -> 1 -> 2 -> 3 -> 7 -> 11 -> 15 (7 routers)
//   flow B, multicast node 12 -> 13 and node 12 -> 8     (2 routers each)
// Real-time flits must leave the last router exactly one cycle per router
// after they appear on the injection link,
// whatever the best-effort load. Node 5's sink holds its credits back for a
// while so that credit back-pressure stalls traffic. Counted mechanisms:
// real-time deliveries (unicast and multicast), switch requests lost to a
// real-time flit, credit exhaustion at a sink, and all packets delivered.
module tb_hres_mesh;
  import hres_pkg::*;

  localparam int MX = 4, MY = 4, NODES = MX * MY, NVC = 2, DEPTH = 8;
  localparam int PKTS_PER_NODE = 40;
  localparam int RT_START = 100, RT_END = 1500;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  link_t   [NODES-1:0] local_in, local_out;
  credit_t [NODES-1:0] local_in_credit, local_out_credit;
  logic                cfg_we, cfg_en;
  logic [3:0]          cfg_node;
  logic [PORT_W-1:0]   cfg_out_port, cfg_in_port;
  logic [NODES-1:0]    rt_block, rt_unrouted;

  hres_mesh dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---------------- source model state ----------------
  int  src_sent[NODES];           // packets started
  bit  src_busy[NODES];
  int  src_dst[NODES], src_len[NODES], src_idx[NODES], src_vc[NODES], src_id[NODES];
  int  src_credit[NODES][NVC];
  int  be_pkts_sent = 0, be_pkts_rcvd = 0, be_flits_sent = 0, be_flits_rcvd = 0;
  int  pkt_len[int];              // packet id -> length
  int  pkt_dst[int];              // packet id -> destination node

  // ---------------- sink model state ----------------
  int  snk_cur[NODES][NVC];       // packet id in progress per VC, -1 idle
  int  snk_next[NODES][NVC];
  int  snk_outstanding[NODES][NVC];
  int  cr_ready[NODES][$];        // cycle at which a credit may return
  int  cr_vc[NODES][$];

  // ---------------- real-time flows ----------------
  int  rtA_seq = 0, rtB_seq = 0;
  int  rt_expect_cyc[NODES][$];   // expected arrival cycle per destination
  int  rt_expect_tag[NODES][$];
  int  rt_unicast_ok = 0, rt_multicast_ok = 0, rt_block_cycles = 0, credit_stalls = 0;

  function automatic logic [PAYLOAD_W-1:0] mk_payload(int id, int idx, int len);
    return {id[15:0], idx[7:0], len[3:0], 8'h5A};
  endfunction

  task automatic cfg_write(int node, logic [2:0] outp, logic [2:0] inp);
    @(negedge clk);
    cfg_we = 1'b1; cfg_node = 4'(node); cfg_out_port = outp; cfg_in_port = inp; cfg_en = 1'b1;
    @(negedge clk);
    cfg_we = 1'b0;
  endtask

  always_ff @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      for (int n = 0; n < NODES; n++) begin
        bit  rt_now;
        link_t l;
        rt_now = 1'b0;
        l = '0;
        // ---- credits returned by the router to the source
        if (local_in_credit[n].valid) src_credit[n][local_in_credit[n].vc] += 1;

        // ---- real-time injection
        if (cyc >= RT_START && cyc < RT_END) begin
          if (n == 0 && cyc % 3 == 0) begin
            rt_now = 1'b1;
            l.valid = 1'b1; l.flit.rt = 1'b1; l.flit.kind = FK_SINGLE;
            l.flit.payload = mk_payload(16'hA000 + rtA_seq, 0, 1);
            rt_expect_cyc[15].push_back(cyc + 1 + 7);
            rt_expect_tag[15].push_back(16'hA000 + rtA_seq);
            rtA_seq++;
          end
          if (n == 12 && cyc % 4 == 1) begin
            rt_now = 1'b1;
            l.valid = 1'b1; l.flit.rt = 1'b1; l.flit.kind = FK_SINGLE;
            l.flit.payload = mk_payload(16'hB000 + rtB_seq, 0, 1);
            rt_expect_cyc[13].push_back(cyc + 1 + 2);
            rt_expect_tag[13].push_back(16'hB000 + rtB_seq);
            rt_expect_cyc[8].push_back(cyc + 1 + 2);
            rt_expect_tag[8].push_back(16'hB000 + rtB_seq);
            rtB_seq++;
          end
        end

        // ---- best-effort injection
        if (!rt_now) begin
          if (!src_busy[n] && src_sent[n] < PKTS_PER_NODE && ($urandom % 4 != 0)) begin
            int d;
            d = int'($urandom % (NODES - 1));
            if (d >= n) d++;
            src_busy[n] = 1'b1;
            src_dst[n]  = d;
            src_len[n]  = 1 + int'($urandom % 4);
            src_idx[n]  = 0;
            src_vc[n]   = src_sent[n] % NVC;
            src_id[n]   = n * 256 + src_sent[n];
            pkt_len[src_id[n]] = src_len[n];
            pkt_dst[src_id[n]] = d;
            src_sent[n]++;
            be_pkts_sent++;
          end
          if (src_busy[n] && src_credit[n][src_vc[n]] > 0) begin
            l.valid = 1'b1;
            l.vc    = VC_ID_W'(src_vc[n]);
            l.flit.rt    = 1'b0;
            l.flit.kind  = (src_len[n] == 1) ? FK_SINGLE :
                           (src_idx[n] == 0) ? FK_HEAD :
                           (src_idx[n] == src_len[n] - 1) ? FK_TAIL : FK_BODY;
            l.flit.dst_x = COORD_W'(src_dst[n] % MX);
            l.flit.dst_y = COORD_W'(src_dst[n] / MX);
            l.flit.payload = mk_payload(src_id[n], src_idx[n], src_len[n]);
            src_credit[n][src_vc[n]] -= 1;
            be_flits_sent++;
            src_idx[n]++;
            if (src_idx[n] == src_len[n]) src_busy[n] = 1'b0;
          end
        end
        local_in[n] <= l;

        // ---- ejection sink
        if (local_out[n].valid) begin
          flit_t f;
          int id, idx, v;
          f   = local_out[n].flit;
          id  = int'(f.payload[35:20]);
          idx = int'(f.payload[19:12]);
          if (f.rt) begin
            check(rt_expect_cyc[n].size() > 0, $sformatf("unexpected real-time flit at node %0d", n));
            if (rt_expect_cyc[n].size() > 0) begin
              int ec, et;
              ec = rt_expect_cyc[n].pop_front();
              et = rt_expect_tag[n].pop_front();
              check(ec == cyc && et == id,
                    $sformatf("rt flit %h at node %0d cycle %0d, expected %h at %0d", id, n, cyc, et, ec));
              if (ec == cyc && et == id) begin
                if (n == 15) rt_unicast_ok++;
                else         rt_multicast_ok++;
              end
            end
          end else begin
            v = int'(local_out[n].vc);
            be_flits_rcvd++;
            check(v < NVC, "ejected VC out of range");
            check(pkt_dst.exists(id) && pkt_dst[id] == n,
                  $sformatf("flit of packet %0d at wrong node %0d", id, n));
            check(int'(f.dst_x) == n % MX && int'(f.dst_y) == n / MX, "destination field");
            if (snk_cur[n][v] < 0) begin
              check(is_head(f.kind) && idx == 0, $sformatf("packet %0d does not start with a head", id));
              snk_cur[n][v]  = id;
              snk_next[n][v] = 0;
            end
            check(id == snk_cur[n][v] && idx == snk_next[n][v],
                  $sformatf("node %0d vc %0d: got %0d.%0d expected %0d.%0d", n, v, id, idx,
                            snk_cur[n][v], snk_next[n][v]));
            snk_next[n][v]++;
            if (is_tail(f.kind)) begin
              check(pkt_len.exists(id) && snk_next[n][v] == pkt_len[id], "packet length");
              snk_cur[n][v] = -1;
              be_pkts_rcvd++;
            end
            snk_outstanding[n][v]++;
            check(snk_outstanding[n][v] <= DEPTH, "ejection buffer overflow");
            if (snk_outstanding[n][v] == DEPTH) credit_stalls++;
            cr_ready[n].push_back((n == 5 && cyc > 100 && cyc < 1200) ? cyc + 150 : cyc + 1 + int'($urandom % 3));
            cr_vc[n].push_back(v);
          end
        end
        if (cr_ready[n].size() > 0 && cr_ready[n][0] <= cyc) begin
          int v;
          void'(cr_ready[n].pop_front());
          v = cr_vc[n].pop_front();
          snk_outstanding[n][v]--;
          local_out_credit[n] <= '{valid: 1'b1, vc: VC_ID_W'(v)};
        end else begin
          local_out_credit[n] <= '0;
        end
      end
      if (|rt_block) rt_block_cycles++;
      check(rt_unrouted == '0, "real-time flit with no route");
    end
  end

  initial begin
    local_in = '0; local_out_credit = '0;
    cfg_we = 1'b0; cfg_en = 1'b0; cfg_node = '0; cfg_out_port = '0; cfg_in_port = '0;
    for (int n = 0; n < NODES; n++) begin
      src_sent[n] = 0; src_busy[n] = 1'b0;
      for (int v = 0; v < NVC; v++) begin
        src_credit[n][v] = DEPTH; snk_cur[n][v] = -1; snk_next[n][v] = 0; snk_outstanding[n][v] = 0;
      end
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // flow A: 0 -> 1 -> 2 -> 3 (east), 3 -> 7 -> 11 -> 15 (north)
    cfg_write(0,  P_EAST,  P_LOCAL);
    cfg_write(1,  P_EAST,  P_WEST);
    cfg_write(2,  P_EAST,  P_WEST);
    cfg_write(3,  P_NORTH, P_WEST);
    cfg_write(7,  P_NORTH, P_SOUTH);
    cfg_write(11, P_NORTH, P_SOUTH);
    cfg_write(15, P_LOCAL, P_SOUTH);
    // flow B: 12 -> 13 (east) and 12 -> 8 (south), one-to-many at node 12
    cfg_write(12, P_EAST,  P_LOCAL);
    cfg_write(12, P_SOUTH, P_LOCAL);
    cfg_write(13, P_LOCAL, P_WEST);
    cfg_write(8,  P_LOCAL, P_NORTH);

    wait (cyc > RT_END && be_pkts_sent == NODES * PKTS_PER_NODE && be_pkts_rcvd == be_pkts_sent);
    repeat (20) @(posedge clk);
    check(be_flits_rcvd == be_flits_sent, $sformatf("flits sent %0d received %0d", be_flits_sent, be_flits_rcvd));
    for (int n = 0; n < NODES; n++) check(rt_expect_cyc[n].size() == 0, $sformatf("real-time flits missing at node %0d", n));
    $display("packets=%0d flits=%0d rt_unicast=%0d rt_multicast=%0d rt_block_cycles=%0d credit_stalls=%0d",
             be_pkts_rcvd, be_flits_rcvd, rt_unicast_ok, rt_multicast_ok, rt_block_cycles, credit_stalls);
    check(rt_unicast_ok == rtA_seq && rt_unicast_ok > 0, "unicast real-time deliveries");
    check(rt_multicast_ok == 2 * rtB_seq && rt_multicast_ok > 0, "multicast real-time deliveries");
    check(rt_block_cycles > 0, "switch allocation never lost to a real-time flit");
    check(credit_stalls > 0, "credit back-pressure never reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired: sent %0d received %0d packets", be_pkts_sent, be_pkts_rcvd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
