// vc_allocator: virtual-channel allocation (VA stage) of the buffered path.
//
// Every input VC whose head flit has been routed asks for a VC of its output
// port at the next hop. The allocator keeps, per output port, a busy bit for
// each downstream VC. Each cycle and for each output port, a round-robin
// arbiter picks one requesting input VC and, if a downstream VC is free,
// grants it the lowest-numbered free one. The VC is marked busy from the next
// cycle and freed when the packet's tail flit leaves through that output
// (release). Requests are indexed in = port * NUM_VC + vc. The HRES router
// leaves its VC allocator unchanged and allows any scheme; this separable
// round-robin one is this design's choice.
module vc_allocator
  import hres_pkg::*;
#(
  parameter  int unsigned NUM_VC = 2,
  localparam int unsigned N_IN   = NUM_PORTS * NUM_VC
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [N_IN-1:0]                req,
  input  logic [N_IN-1:0][PORT_W-1:0]    req_port,
  output logic [N_IN-1:0]                gnt,
  output logic [N_IN-1:0][VC_ID_W-1:0]   gnt_vc,
  input  logic [NUM_PORTS-1:0]           release_en,
  input  logic [NUM_PORTS-1:0][VC_ID_W-1:0] release_vc,
  output logic [NUM_PORTS-1:0][NUM_VC-1:0]  vc_busy
);
  localparam int unsigned VW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  logic [NUM_PORTS-1:0][N_IN-1:0]    port_req;
  logic [NUM_PORTS-1:0][N_IN-1:0]    port_win;
  logic [NUM_PORTS-1:0]              any_free;
  logic [NUM_PORTS-1:0][VC_ID_W-1:0] free_vc;

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_out
    logic [$clog2(N_IN)-1:0] idx_unused;
    logic                    valid_unused;

    always_comb begin
      for (int i = 0; i < N_IN; i++) port_req[p][i] = req[i] && (int'(req_port[i]) == p);
      any_free[p] = 1'b0;
      free_vc[p]  = '0;
      for (int v = NUM_VC - 1; v >= 0; v--) begin
        if (!vc_busy[p][v]) begin
          any_free[p] = 1'b1;
          free_vc[p]  = VC_ID_W'(v);
        end
      end
    end

    rr_arbiter #(.N(N_IN)) u_arb (
      .clk, .rst_n,
      .req      (port_req[p] & {N_IN{any_free[p]}}),
      .advance  (1'b1),
      .gnt      (port_win[p]),
      .gnt_idx  (idx_unused),
      .gnt_valid(valid_unused)
    );

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        vc_busy[p] <= '0;
      end else begin
        for (int v = 0; v < NUM_VC; v++) begin
          if (any_free[p] && |port_win[p] && int'(free_vc[p]) == v) vc_busy[p][v] <= 1'b1;
          else if (release_en[p] && int'(release_vc[p]) == v)       vc_busy[p][v] <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    gnt    = '0;
    gnt_vc = '0;
    for (int i = 0; i < N_IN; i++) begin
      for (int p = 0; p < NUM_PORTS; p++) begin
        if (port_win[p][i]) begin
          gnt[i]    = 1'b1;
          gnt_vc[i] = free_vc[p];
        end
      end
    end
  end

  for (genvar p = 0; p < NUM_PORTS; p++) begin : g_chk
    a_release_busy: assert property (@(posedge clk) disable iff (!rst_n)
      release_en[p] |-> vc_busy[p][release_vc[p][VW-1:0]]);
  end
endmodule
