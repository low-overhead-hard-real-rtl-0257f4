// input_port: one input port of the HRES router.
//
// The service bit of each arriving flit picks its datapath. A hard real-time
// flit (rt = 1) is not buffered: it is handed straight to the real-time
// crossbar in the cycle it arrives (rt_valid/rt_flit). Any other flit is
// written into the buffer of the virtual channel named on the link.
//
// Each VC keeps a small state machine, the "VC state" of a virtual-channel
// router:
//   VC_IDLE   - no packet in progress; when a head flit reaches the front of
//               the buffer its output port is computed (RC stage, one cycle)
//   VC_VA     - route known, asking the VC allocator for an output VC
//   VC_ACTIVE - output VC held; each buffered flit asks the switch allocator
//               for the crossbar (sa_req). A granted flit leaves the buffer
//               in that cycle; when it is the tail the VC returns to VC_IDLE.
// A dequeued flit returns one credit upstream, registered (one cycle later).
// Only one VC of a port is dequeued per cycle (one crossbar input per port).
// The service-bit demultiplexer follows the HRES router; the one-cycle RC and
// VA stages and the registered credit are this design's choices.
module input_port
  import hres_pkg::*;
#(
  parameter int unsigned NUM_VC    = 2,
  parameter int unsigned BUF_DEPTH = 8,
  parameter int unsigned X_COORD   = 0,
  parameter int unsigned Y_COORD   = 0
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // link from the upstream router / network interface
  input  link_t                     in_link,
  output credit_t                   credit_up,
  // real-time datapath
  output logic                      rt_valid,
  output flit_t                     rt_flit,
  // VC allocation
  output logic [NUM_VC-1:0]         va_req,
  output logic [NUM_VC-1:0][PORT_W-1:0] vc_route,
  input  logic [NUM_VC-1:0]         va_gnt,
  input  logic [NUM_VC-1:0][VC_ID_W-1:0] va_out_vc,
  // switch allocation
  output logic [NUM_VC-1:0]         sa_req,
  output logic [NUM_VC-1:0][VC_ID_W-1:0] vc_out_vc,
  input  logic                      sa_gnt,
  input  logic [VC_ID_W-1:0]        sa_gnt_vc,
  // flit leaving the buffer through the crossbar
  output flit_t                     be_flit,
  output logic [VC_ID_W-1:0]        be_out_vc
);
  localparam int unsigned VW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;  // VC index bits

  typedef enum logic [1:0] {VC_IDLE, VC_VA, VC_ACTIVE} vc_state_e;

  vc_state_e                state     [NUM_VC];
  flit_t                    front     [NUM_VC];
  logic [NUM_VC-1:0]        empty;
  logic [NUM_VC-1:0]        wr_en, rd_en;
  logic [NUM_VC-1:0][PORT_W-1:0] rc_port;
  logic [NUM_VC-1:0][PORT_W-1:0] route_q;
  logic [NUM_VC-1:0][VC_ID_W-1:0] out_vc_q;

  // service demultiplexer
  assign rt_valid = in_link.valid && in_link.flit.rt;
  assign rt_flit  = in_link.flit;

  for (genvar v = 0; v < NUM_VC; v++) begin : g_vc
    logic [FLIT_W-1:0] rd_bits;
    logic              full_unused;
    logic [$clog2(BUF_DEPTH):0] count_unused;

    assign wr_en[v] = in_link.valid && !in_link.flit.rt && (int'(in_link.vc) == v);
    assign rd_en[v] = sa_gnt && (int'(sa_gnt_vc) == v);
    assign front[v] = flit_t'(rd_bits);

    vc_buffer #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .wr_en  (wr_en[v]),
      .wr_data(in_link.flit),
      .rd_en  (rd_en[v]),
      .rd_data(rd_bits),
      .empty  (empty[v]),
      .full   (full_unused),
      .count  (count_unused)
    );

    route_compute #(.X_COORD(X_COORD), .Y_COORD(Y_COORD)) u_rc (
      .dst_x   (front[v].dst_x),
      .dst_y   (front[v].dst_y),
      .out_port(rc_port[v])
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        state[v]    <= VC_IDLE;
        route_q[v]  <= '0;
        out_vc_q[v] <= '0;
      end else begin
        unique case (state[v])
          VC_IDLE: if (!empty[v] && is_head(front[v].kind)) begin
            route_q[v] <= rc_port[v];
            state[v]   <= VC_VA;
          end
          VC_VA: if (va_gnt[v]) begin
            out_vc_q[v] <= va_out_vc[v];
            state[v]    <= VC_ACTIVE;
          end
          VC_ACTIVE: if (rd_en[v] && is_tail(front[v].kind)) begin
            state[v] <= VC_IDLE;
          end
          default: state[v] <= VC_IDLE;
        endcase
      end
    end

    assign va_req[v]    = (state[v] == VC_VA);
    assign sa_req[v]    = (state[v] == VC_ACTIVE) && !empty[v];
    assign vc_route[v]  = route_q[v];
    assign vc_out_vc[v] = out_vc_q[v];

    a_head_first: assert property (@(posedge clk) disable iff (!rst_n)
      (state[v] == VC_IDLE && !empty[v]) |-> is_head(front[v].kind));
  end

  // crossbar input: front flit of the granted VC
  always_comb begin
    be_flit   = front[0];
    be_out_vc = out_vc_q[0];
    for (int v = 0; v < NUM_VC; v++) begin
      if (int'(sa_gnt_vc) == v) begin
        be_flit   = front[v];
        be_out_vc = out_vc_q[v];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      credit_up <= '0;
    end else begin
      credit_up.valid <= sa_gnt;
      credit_up.vc    <= sa_gnt_vc;
    end
  end

  a_grant_active: assert property (@(posedge clk) disable iff (!rst_n)
    sa_gnt |-> sa_req[sa_gnt_vc[VW-1:0]]);
endmodule
