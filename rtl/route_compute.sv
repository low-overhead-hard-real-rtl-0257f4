// route_compute: route computation (RC) of the buffered datapath.
//
// Dimension-order XY routing: a packet first travels along X until its
// column matches, then along Y, then leaves through the local port. XY
// routing is deadlock-free on a 2D mesh, which is what the buffered path of
// the router needs; the hard real-time flits do not use this unit (their
// routes are set offline in the guaranteed-service selector table).
// X_COORD and Y_COORD give the router's own position. Purely combinational.
// The HRES router allows any routing for normal traffic; XY is this design's
// choice, as is the direction convention (north is y+1, east is x+1).
module route_compute
  import hres_pkg::*;
#(
  parameter int unsigned X_COORD = 0,
  parameter int unsigned Y_COORD = 0
) (
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output logic [PORT_W-1:0]  out_port
);
  localparam logic signed [COORD_W:0] MY_X = (COORD_W+1)'(X_COORD);
  localparam logic signed [COORD_W:0] MY_Y = (COORD_W+1)'(Y_COORD);

  logic signed [COORD_W:0] dx, dy;   // destination minus own position

  always_comb begin
    dx = signed'({1'b0, dst_x}) - MY_X;
    dy = signed'({1'b0, dst_y}) - MY_Y;
    if (dx > 0)      out_port = P_EAST;
    else if (dx < 0) out_port = P_WEST;
    else if (dy > 0) out_port = P_NORTH;
    else if (dy < 0) out_port = P_SOUTH;
    else             out_port = P_LOCAL;
  end
endmodule
