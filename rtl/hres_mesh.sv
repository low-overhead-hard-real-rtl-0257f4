// hres_mesh: 2D mesh network of HRES routers (4x4, 16 nodes, by default).
//
// Router (x, y) is node n = y * MESH_X + x. Neighbouring routers are joined
// by a link and a credit wire in each direction: the north output of (x, y)
// feeds the south input of (x, y+1), the east output of (x, y) the west
// input of (x+1, y), and so on. Each node's local port is brought out as
// local_in / local_out with their credits, for a processing element's
// network interface. Ports that face out of the mesh receive no flits and
// no credits. All routers' guaranteed-service selector tables are written
// through one configuration port that names the router (cfg_node).
// rt_block and rt_unrouted report, per router, a buffered flit held back by
// a real-time flit and a real-time flit that no output selects. The 16-node
// 2D mesh is the evaluated system; its 4x4 shape, the shared configuration
// port and the tied-off edge ports are this design's choices.
module hres_mesh
  import hres_pkg::*;
#(
  parameter  int unsigned MESH_X    = 4,
  parameter  int unsigned MESH_Y    = 4,
  parameter  int unsigned NUM_VC    = 2,
  parameter  int unsigned BUF_DEPTH = 8,
  localparam int unsigned NODES     = MESH_X * MESH_Y,
  localparam int unsigned NODE_W    = (NODES > 1) ? $clog2(NODES) : 1
) (
  input  logic                clk,
  input  logic                rst_n,
  input  link_t   [NODES-1:0] local_in,
  output credit_t [NODES-1:0] local_in_credit,
  output link_t   [NODES-1:0] local_out,
  input  credit_t [NODES-1:0] local_out_credit,
  input  logic                cfg_we,
  input  logic [NODE_W-1:0]   cfg_node,
  input  logic [PORT_W-1:0]   cfg_out_port,
  input  logic [PORT_W-1:0]   cfg_in_port,
  input  logic                cfg_en,
  output logic [NODES-1:0]    rt_block,
  output logic [NODES-1:0]    rt_unrouted
);
  link_t   [NODES-1:0][NUM_PORTS-1:0] r_in, r_out;
  credit_t [NODES-1:0][NUM_PORTS-1:0] r_cr_out, r_cr_in;

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned N = y * MESH_X + x;

      // local port
      assign r_in[N][P_LOCAL]    = local_in[N];
      assign local_in_credit[N]  = r_cr_out[N][P_LOCAL];
      assign local_out[N]        = r_out[N][P_LOCAL];
      assign r_cr_in[N][P_LOCAL] = local_out_credit[N];

      // north neighbour (y+1)
      if (y + 1 < MESH_Y) begin : g_n
        assign r_in[N][P_NORTH]    = r_out[N+MESH_X][P_SOUTH];
        assign r_cr_in[N][P_NORTH] = r_cr_out[N+MESH_X][P_SOUTH];
      end else begin : g_n_edge
        assign r_in[N][P_NORTH]    = '0;
        assign r_cr_in[N][P_NORTH] = '0;
      end
      // south neighbour (y-1)
      if (y > 0) begin : g_s
        assign r_in[N][P_SOUTH]    = r_out[N-MESH_X][P_NORTH];
        assign r_cr_in[N][P_SOUTH] = r_cr_out[N-MESH_X][P_NORTH];
      end else begin : g_s_edge
        assign r_in[N][P_SOUTH]    = '0;
        assign r_cr_in[N][P_SOUTH] = '0;
      end
      // east neighbour (x+1)
      if (x + 1 < MESH_X) begin : g_e
        assign r_in[N][P_EAST]    = r_out[N+1][P_WEST];
        assign r_cr_in[N][P_EAST] = r_cr_out[N+1][P_WEST];
      end else begin : g_e_edge
        assign r_in[N][P_EAST]    = '0;
        assign r_cr_in[N][P_EAST] = '0;
      end
      // west neighbour (x-1)
      if (x > 0) begin : g_w
        assign r_in[N][P_WEST]    = r_out[N-1][P_EAST];
        assign r_cr_in[N][P_WEST] = r_cr_out[N-1][P_EAST];
      end else begin : g_w_edge
        assign r_in[N][P_WEST]    = '0;
        assign r_cr_in[N][P_WEST] = '0;
      end

      hres_router #(
        .NUM_VC(NUM_VC), .BUF_DEPTH(BUF_DEPTH), .X_COORD(x), .Y_COORD(y)
      ) u_router (
        .clk, .rst_n,
        .in_link     (r_in[N]),
        .credit_out  (r_cr_out[N]),
        .out_link    (r_out[N]),
        .credit_in   (r_cr_in[N]),
        .cfg_we      (cfg_we && (int'(cfg_node) == N)),
        .cfg_out_port,
        .cfg_in_port,
        .cfg_en,
        .rt_block    (rt_block[N]),
        .rt_unrouted (rt_unrouted[N])
      );
    end
  end
endmodule
