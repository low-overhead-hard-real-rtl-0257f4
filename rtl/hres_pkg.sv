// hres_pkg: types and constants shared by the HRES router and mesh.
//
// A flit is the 46-bit flit of the base virtual-channel network plus one
// service bit that marks it as hard real-time (guaranteed latency) or normal
// (best effort), following the router's definition of an extended flit type.
// The field layout inside the 46 bits (2-bit kind, 4-bit X and Y destination,
// 36-bit payload) is this design's choice. A link carries a valid bit, the
// virtual-channel number (3 bits, enough for 8 VCs) and the flit; a credit
// carries a valid bit and a VC number.
package hres_pkg;

  localparam int unsigned NUM_PORTS   = 5;   // local + four mesh directions
  localparam int unsigned PORT_W      = 3;
  localparam int unsigned BASE_FLIT_W = 46;  // flit width of the base network
  localparam int unsigned VC_ID_W     = 3;   // VC number field on the link
  localparam int unsigned COORD_W     = 4;
  localparam int unsigned PAYLOAD_W   = BASE_FLIT_W - 2 - 2 * COORD_W;  // 36

  // Port numbering of every router.
  localparam logic [PORT_W-1:0] P_LOCAL = 3'd0;
  localparam logic [PORT_W-1:0] P_NORTH = 3'd1;  // towards y+1
  localparam logic [PORT_W-1:0] P_EAST  = 3'd2;  // towards x+1
  localparam logic [PORT_W-1:0] P_SOUTH = 3'd3;  // towards y-1
  localparam logic [PORT_W-1:0] P_WEST  = 3'd4;  // towards x-1

  typedef enum logic [1:0] {
    FK_HEAD   = 2'b00,
    FK_BODY   = 2'b01,
    FK_TAIL   = 2'b10,
    FK_SINGLE = 2'b11   // head and tail in one flit
  } flit_kind_e;

  typedef struct packed {
    logic                 rt;       // 1: hard real-time, bypasses the buffers
    flit_kind_e           kind;
    logic [COORD_W-1:0]   dst_x;
    logic [COORD_W-1:0]   dst_y;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  localparam int unsigned FLIT_W = $bits(flit_t);  // 47

  typedef struct packed {
    logic               valid;
    logic [VC_ID_W-1:0] vc;
    flit_t              flit;
  } link_t;

  typedef struct packed {
    logic               valid;
    logic [VC_ID_W-1:0] vc;
  } credit_t;

  function automatic logic is_head(flit_kind_e k);
    return (k == FK_HEAD) || (k == FK_SINGLE);
  endfunction

  function automatic logic is_tail(flit_kind_e k);
    return (k == FK_TAIL) || (k == FK_SINGLE);
  endfunction

endpackage
