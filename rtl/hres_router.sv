// hres_router: five-port Hard Real-time Support (HRES) network-on-chip router.
//
// Two datapaths share the router's links. Normal (best-effort) flits take
// the datapath of a conventional input-buffered virtual-channel router:
// per-VC buffers, route computation (XY), VC allocation, switch allocation
// and the buffered crossbar. Hard real-time flits, marked by the service bit
// of the flit, are never buffered: they cross a second, bufferless crossbar
// whose select lines come from a guaranteed-service selector table written
// offline. At each output a multiplexer sends the real-time flit when one is
// there. The switch allocator sees the real-time valid of each output and
// treats a buffered request for such an output as lost, so the two paths
// never collide and the buffered path itself is left unchanged.
//
// Interface: per port one incoming link (in_link) with its returned credit
// (credit_out), and one outgoing link (out_link) with the credit from the
// downstream router (credit_in); ports are 0 local, 1 north (y+1), 2 east
// (x+1), 3 south (y-1), 4 west (x-1). cfg_* writes one selector-table entry.
//
// Timing: a real-time flit leaves on the output link the cycle after it
// arrives (one cycle per hop, independent of buffered load). A buffered head
// flit with no contention spends RC, VA and SA one cycle each and appears on
// the output link 4 cycles after arriving; following flits stream one per
// cycle. The cycle counts per stage are this design's choice.
module hres_router
  import hres_pkg::*;
#(
  parameter int unsigned NUM_VC    = 2,
  parameter int unsigned BUF_DEPTH = 8,
  parameter int unsigned X_COORD   = 0,
  parameter int unsigned Y_COORD   = 0
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  link_t   [NUM_PORTS-1:0] in_link,
  output credit_t [NUM_PORTS-1:0] credit_out,
  output link_t   [NUM_PORTS-1:0] out_link,
  input  credit_t [NUM_PORTS-1:0] credit_in,
  input  logic                    cfg_we,
  input  logic [PORT_W-1:0]       cfg_out_port,
  input  logic [PORT_W-1:0]       cfg_in_port,
  input  logic                    cfg_en,
  output logic                    rt_block,
  output logic                    rt_unrouted
);
  localparam int unsigned N_IN = NUM_PORTS * NUM_VC;
  localparam int unsigned VW   = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  // input side
  logic  [NUM_PORTS-1:0]                         in_rt_valid;
  flit_t [NUM_PORTS-1:0]                         in_rt_flit;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0]             va_req;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0][PORT_W-1:0] vc_route;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0]             va_gnt;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0][VC_ID_W-1:0] va_out_vc;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0]             sa_req_raw, sa_req;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0][VC_ID_W-1:0] vc_out_vc;
  logic  [NUM_PORTS-1:0]                         sa_in_gnt;
  logic  [NUM_PORTS-1:0][VC_ID_W-1:0]            sa_in_gnt_vc;
  flit_t [NUM_PORTS-1:0]                         be_flit;
  logic  [NUM_PORTS-1:0][VC_ID_W-1:0]            be_out_vc;
  // output side
  logic  [NUM_PORTS-1:0]                         sel_en;
  logic  [NUM_PORTS-1:0][PORT_W-1:0]             sel_in;
  logic  [NUM_PORTS-1:0]                         rt_out_valid;
  flit_t [NUM_PORTS-1:0]                         rt_out_flit;
  logic  [NUM_PORTS-1:0]                         rt_unrouted_in;
  logic  [NUM_PORTS-1:0]                         sa_out_gnt;
  logic  [NUM_PORTS-1:0][PORT_W-1:0]             sa_out_gnt_in;
  logic  [NUM_PORTS-1:0]                         sa_rt_block;
  logic  [NUM_PORTS-1:0]                         xb_valid;
  flit_t [NUM_PORTS-1:0]                         xb_flit;
  logic  [NUM_PORTS-1:0][VC_ID_W-1:0]            xb_vc;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0]             credit_ok;
  logic  [NUM_PORTS-1:0]                         release_en;
  // flattened VA request vectors
  logic  [N_IN-1:0]                              va_req_flat, va_gnt_flat;
  logic  [N_IN-1:0][PORT_W-1:0]                  va_port_flat;
  logic  [N_IN-1:0][VC_ID_W-1:0]                 va_vc_flat;
  logic  [NUM_PORTS-1:0][NUM_VC-1:0]             vc_busy_unused;

  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    input_port #(
      .NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH), .X_COORD(X_COORD), .Y_COORD(Y_COORD)
    ) u_in (
      .clk, .rst_n,
      .in_link  (in_link[i]),
      .credit_up(credit_out[i]),
      .rt_valid (in_rt_valid[i]),
      .rt_flit  (in_rt_flit[i]),
      .va_req   (va_req[i]),
      .vc_route (vc_route[i]),
      .va_gnt   (va_gnt[i]),
      .va_out_vc(va_out_vc[i]),
      .sa_req   (sa_req_raw[i]),
      .vc_out_vc(vc_out_vc[i]),
      .sa_gnt   (sa_in_gnt[i]),
      .sa_gnt_vc(sa_in_gnt_vc[i]),
      .be_flit  (be_flit[i]),
      .be_out_vc(be_out_vc[i])
    );

    for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
      // a VC may compete for the switch only if its downstream VC has space
      assign sa_req[i][v] = sa_req_raw[i][v] && credit_ok[vc_route[i][v]][vc_out_vc[i][v][VW-1:0]];
      assign va_req_flat[i*NUM_VC+v]  = va_req[i][v];
      assign va_port_flat[i*NUM_VC+v] = vc_route[i][v];
      assign va_gnt[i][v]             = va_gnt_flat[i*NUM_VC+v];
      assign va_out_vc[i][v]          = va_vc_flat[i*NUM_VC+v];
    end
  end

  vc_allocator #(.NUM_VC(NUM_VC)) u_va (
    .clk, .rst_n,
    .req       (va_req_flat),
    .req_port  (va_port_flat),
    .gnt       (va_gnt_flat),
    .gnt_vc    (va_vc_flat),
    .release_en(release_en),
    .release_vc(xb_vc),
    .vc_busy   (vc_busy_unused)
  );

  gs_selector_table u_gs (
    .clk, .rst_n,
    .cfg_we, .cfg_out_port, .cfg_in_port, .cfg_en,
    .sel_en, .sel_in
  );

  rt_crossbar u_rt_xb (
    .in_valid (in_rt_valid),
    .in_flit  (in_rt_flit),
    .sel_en, .sel_in,
    .out_valid(rt_out_valid),
    .out_flit (rt_out_flit),
    .unrouted (rt_unrouted_in)
  );

  switch_allocator #(.NUM_VC(NUM_VC)) u_sa (
    .clk, .rst_n,
    .req       (sa_req),
    .req_port  (vc_route),
    .rt_busy   (rt_out_valid),
    .in_gnt    (sa_in_gnt),
    .in_gnt_vc (sa_in_gnt_vc),
    .out_gnt   (sa_out_gnt),
    .out_gnt_in(sa_out_gnt_in),
    .rt_block  (sa_rt_block)
  );

  be_crossbar u_be_xb (
    .in_flit  (be_flit),
    .in_vc    (be_out_vc),
    .sel_valid(sa_out_gnt),
    .sel_in   (sa_out_gnt_in),
    .out_valid(xb_valid),
    .out_flit (xb_flit),
    .out_vc   (xb_vc)
  );

  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    assign release_en[o] = xb_valid[o] && is_tail(xb_flit[o].kind);

    output_port #(.NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH)) u_out (
      .clk, .rst_n,
      .rt_valid (rt_out_valid[o]),
      .rt_flit  (rt_out_flit[o]),
      .be_valid (xb_valid[o]),
      .be_flit  (xb_flit[o]),
      .be_vc    (xb_vc[o]),
      .credit_in(credit_in[o]),
      .credit_ok(credit_ok[o]),
      .out_link (out_link[o])
    );
  end

  assign rt_block    = |sa_rt_block;
  assign rt_unrouted = |rt_unrouted_in;
endmodule
