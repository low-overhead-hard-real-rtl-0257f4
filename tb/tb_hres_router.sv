// tb_hres_router: one HRES router at (1, 1) with default sizes (2 VCs,
// 8-flit buffers), surrounded by five neighbour models that send random
// best-effort packets (1 to 4 flits, credit flow control) and sink and check
// what leaves each output. The selector table is set to
//   east <- west, local <- south, north <- local, south <- local
// (the last two make a one-to-many real-time transfer from the local port),
// and real-time flits are injected on the west, south and local inputs.
// Checks: a real-time flit leaves on every selected output exactly one cycle
// after it is on the input link; an uncontended single-flit packet leaves
// 4 cycles after arriving (RC, VA, SA/ST); every best-effort packet leaves
// through its XY output, whole and in order within its VC; no output buffer
// overflows; switch requests lost to real-time flits do happen.
module tb_hres_router;
  import hres_pkg::*;
  localparam int NVC = 2, DEPTH = 8, PKTS = 60;
  localparam int RT_START = 60, RT_END = 900;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  link_t   [NUM_PORTS-1:0] in_link, out_link;
  credit_t [NUM_PORTS-1:0] credit_out, credit_in;
  logic cfg_we, cfg_en;
  logic [PORT_W-1:0] cfg_out_port, cfg_in_port;
  logic rt_block, rt_unrouted;
  hres_router #(.X_COORD(1), .Y_COORD(1)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL @%0d: %s", cyc, what); end
  endtask

  function automatic int xy(int dx, int dy);
    if (dx > 1) return 2;
    if (dx < 1) return 4;
    if (dy > 1) return 1;
    if (dy < 1) return 3;
    return 0;
  endfunction

  int src_sent[NUM_PORTS], src_credit[NUM_PORTS][NVC];
  bit src_busy[NUM_PORTS];
  int src_len[NUM_PORTS], src_idx[NUM_PORTS], src_vc[NUM_PORTS], src_id[NUM_PORTS];
  int src_dx[NUM_PORTS], src_dy[NUM_PORTS];
  int pkt_out[int], pkt_len[int];
  int snk_cur[NUM_PORTS][NVC], snk_next[NUM_PORTS][NVC], snk_out[NUM_PORTS][NVC];
  int rt_exp_cyc[NUM_PORTS][$], rt_exp_tag[NUM_PORTS][$];
  int sent = 0, rcvd = 0, rt_ok = 0, rt_blocks = 0, rt_seq = 0, first_lat = -1;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      for (int p = 0; p < NUM_PORTS; p++) begin
        link_t l;
        bit rt_now;
        l = '0; rt_now = 0;
        if (credit_out[p].valid) src_credit[p][credit_out[p].vc] += 1;
        // real-time injection on west, south and local inputs
        if (cyc >= RT_START && cyc < RT_END &&
            ((p == 4 && cyc % 3 == 0) || (p == 3 && cyc % 4 == 1) || (p == 0 && cyc % 5 == 2))) begin
          int tag;
          tag = 16'hF000 + rt_seq;
          rt_seq++;
          rt_now = 1;
          l.valid = 1; l.flit.rt = 1; l.flit.kind = FK_SINGLE;
          l.flit.payload = {16'(tag), 20'h0};
          if (p == 4) begin rt_exp_cyc[2].push_back(cyc + 2); rt_exp_tag[2].push_back(tag); end
          if (p == 3) begin rt_exp_cyc[0].push_back(cyc + 2); rt_exp_tag[0].push_back(tag); end
          if (p == 0) begin
            rt_exp_cyc[1].push_back(cyc + 2); rt_exp_tag[1].push_back(tag);
            rt_exp_cyc[3].push_back(cyc + 2); rt_exp_tag[3].push_back(tag);
          end
        end
        if (!rt_now) begin
          if (cyc == 5 && p == 0) begin
            // lone single-flit packet to measure the uncontended latency
            l.valid = 1; l.vc = 3'd0; l.flit.kind = FK_SINGLE; l.flit.dst_x = 4'd3; l.flit.dst_y = 4'd1;
            l.flit.payload = {16'hEEEE, 8'd0, 12'd0};
            pkt_out[16'hEEEE] = 2; pkt_len[16'hEEEE] = 1;
            src_credit[0][0] -= 1;
            sent++;
          end else if (cyc > 40) begin
            if (!src_busy[p] && src_sent[p] < PKTS && $urandom % 3 != 0) begin
              src_busy[p] = 1; src_len[p] = 1 + int'($urandom % 4); src_idx[p] = 0;
              src_vc[p] = int'($urandom % NVC); src_id[p] = p * 256 + src_sent[p];
              src_dx[p] = int'($urandom % 4); src_dy[p] = int'($urandom % 4);
              pkt_out[src_id[p]] = xy(src_dx[p], src_dy[p]); pkt_len[src_id[p]] = src_len[p];
              src_sent[p]++; sent++;
            end
            if (src_busy[p] && src_credit[p][src_vc[p]] > 0) begin
              l.valid = 1; l.vc = VC_ID_W'(src_vc[p]);
              l.flit.kind = (src_len[p] == 1) ? FK_SINGLE : (src_idx[p] == 0) ? FK_HEAD :
                            (src_idx[p] == src_len[p] - 1) ? FK_TAIL : FK_BODY;
              l.flit.dst_x = COORD_W'(src_dx[p]); l.flit.dst_y = COORD_W'(src_dy[p]);
              l.flit.payload = {16'(src_id[p]), 8'(src_idx[p]), 12'd0};
              src_credit[p][src_vc[p]] -= 1;
              src_idx[p]++;
              if (src_idx[p] == src_len[p]) src_busy[p] = 0;
            end
          end
        end
        in_link[p] <= l;

        // sink of output p
        credit_in[p] <= '0;
        if (out_link[p].valid) begin
          flit_t f;
          int id, idx, v;
          f = out_link[p].flit;
          id = int'(f.payload[35:20]); idx = int'(f.payload[19:12]);
          if (f.rt) begin
            check(rt_exp_cyc[p].size() > 0, "unexpected real-time flit");
            if (rt_exp_cyc[p].size() > 0) begin
              int ec, et;
              ec = rt_exp_cyc[p].pop_front(); et = rt_exp_tag[p].pop_front();
              check(ec == cyc && et == id, $sformatf("rt flit %h on port %0d at %0d, expected %h at %0d", id, p, cyc, et, ec));
              if (ec == cyc && et == id) rt_ok++;
            end
          end else begin
            v = int'(out_link[p].vc);
            check(v < NVC, "output VC out of range");
            check(pkt_out.exists(id) && pkt_out[id] == p, $sformatf("packet %0d on wrong output %0d", id, p));
            if (id == 16'hEEEE) first_lat = cyc - 6;
            if (snk_cur[p][v] < 0) begin
              check(is_head(f.kind) && idx == 0, "packet must start with head");
              snk_cur[p][v] = id; snk_next[p][v] = 0;
            end
            check(id == snk_cur[p][v] && idx == snk_next[p][v], $sformatf("port %0d vc %0d order", p, v));
            snk_next[p][v]++;
            if (is_tail(f.kind)) begin
              check(pkt_len.exists(id) && snk_next[p][v] == pkt_len[id], "packet length");
              snk_cur[p][v] = -1; rcvd++;
            end
            snk_out[p][v]++;
            check(snk_out[p][v] <= DEPTH, "downstream buffer overflow");
            // return the credit at once, except that the north sink is slow
            if (p != 1 || $urandom % 4 == 0) begin
              credit_in[p] <= '{valid: 1'b1, vc: VC_ID_W'(v)};
              snk_out[p][v]--;
            end
          end
        end else if (p == 1) begin
          for (int v = 0; v < NVC; v++) if (snk_out[1][v] > 0) begin
            credit_in[1] <= '{valid: 1'b1, vc: VC_ID_W'(v)};
            snk_out[1][v]--;
            break;
          end
        end
      end
      if (rt_block) rt_blocks++;
      check(!rt_unrouted, "real-time flit with no route");
    end
  end

  task automatic cfg_write(logic [2:0] o, logic [2:0] i);
    @(negedge clk);
    cfg_we = 1; cfg_out_port = o; cfg_in_port = i; cfg_en = 1;
    @(negedge clk);
    cfg_we = 0;
  endtask

  initial begin
    in_link = '0; credit_in = '0; cfg_we = 0; cfg_en = 0; cfg_out_port = '0; cfg_in_port = '0;
    for (int p = 0; p < NUM_PORTS; p++) begin
      src_sent[p] = 0; src_busy[p] = 0;
      for (int v = 0; v < NVC; v++) begin src_credit[p][v] = DEPTH; snk_cur[p][v] = -1; snk_next[p][v] = 0; snk_out[p][v] = 0; end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    cfg_write(P_EAST, P_WEST);
    cfg_write(P_LOCAL, P_SOUTH);
    cfg_write(P_NORTH, P_LOCAL);
    cfg_write(P_SOUTH, P_LOCAL);
    wait (cyc > RT_END && rcvd == NUM_PORTS * PKTS + 1);
    repeat (10) @(posedge clk);
    for (int p = 0; p < NUM_PORTS; p++) check(rt_exp_cyc[p].size() == 0, "real-time flits missing");
    check(first_lat == 4, $sformatf("uncontended head latency %0d, expected 4", first_lat));
    check(rt_blocks > 0, "switch allocation never lost to a real-time flit");
    $display("packets=%0d rt=%0d rt_block_cycles=%0d first_latency=%0d", rcvd, rt_ok, rt_blocks, first_lat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: sent %0d received %0d", sent, rcvd);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
