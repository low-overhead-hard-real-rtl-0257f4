// switch_allocator: switch allocation (SA stage) of the buffered path, with
// the real-time check of the HRES router.
//
// Separable input-first allocation. Stage 1: at each input port a round-robin
// arbiter picks one VC among those requesting. Stage 2: at each output port a
// round-robin arbiter picks one input among the stage-1 winners that target
// it. The HRES addition is rt_busy: when a real-time flit is assigned to an
// output port in this cycle, every request for that port is treated as having
// lost allocation, so the VC stalls (request 1, grant 0) and retries next
// cycle; rt_block reports such outputs. Arbiter priorities move only on an
// actual grant. Purely combinational grants; the grants are used in the same
// cycle to read the buffers and drive the crossbar. The real-time stall rule
// is the HRES router's; the separable round-robin structure is this design's.
module switch_allocator
  import hres_pkg::*;
#(
  parameter int unsigned NUM_VC = 2
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0]       req,
  input  logic [NUM_PORTS-1:0][NUM_VC-1:0][PORT_W-1:0] req_port,
  input  logic [NUM_PORTS-1:0]                   rt_busy,
  output logic [NUM_PORTS-1:0]                   in_gnt,
  output logic [NUM_PORTS-1:0][VC_ID_W-1:0]      in_gnt_vc,
  output logic [NUM_PORTS-1:0]                   out_gnt,
  output logic [NUM_PORTS-1:0][PORT_W-1:0]       out_gnt_in,
  output logic [NUM_PORTS-1:0]                   rt_block
);
  localparam int unsigned VW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  logic [NUM_PORTS-1:0]                 s1_valid;
  logic [NUM_PORTS-1:0][VW-1:0]         s1_vc;
  logic [NUM_PORTS-1:0][PORT_W-1:0]     s1_port;
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0]  s2_req;     // [out][in]
  logic [NUM_PORTS-1:0][NUM_PORTS-1:0]  s2_gnt;     // [out][in]
  logic [NUM_PORTS-1:0][PORT_W-1:0]     s2_idx;

  // stage 1: one VC per input port
  for (genvar i = 0; i < NUM_PORTS; i++) begin : g_in
    logic [NUM_VC-1:0] gnt_unused;
    rr_arbiter #(.N(NUM_VC)) u_arb (
      .clk, .rst_n,
      .req      (req[i]),
      .advance  (in_gnt[i]),
      .gnt      (gnt_unused),
      .gnt_idx  (s1_vc[i]),
      .gnt_valid(s1_valid[i])
    );
    assign s1_port[i] = req_port[i][s1_vc[i]];
  end

  // stage 2: one input per output port, none where a real-time flit passes
  for (genvar o = 0; o < NUM_PORTS; o++) begin : g_out
    always_comb begin
      for (int i = 0; i < NUM_PORTS; i++) s2_req[o][i] = s1_valid[i] && (int'(s1_port[i]) == o);
    end
    assign rt_block[o] = rt_busy[o] && |s2_req[o];

    rr_arbiter #(.N(NUM_PORTS)) u_arb (
      .clk, .rst_n,
      .req      (s2_req[o] & {NUM_PORTS{!rt_busy[o]}}),
      .advance  (1'b1),
      .gnt      (s2_gnt[o]),
      .gnt_idx  (s2_idx[o]),
      .gnt_valid(out_gnt[o])
    );
    assign out_gnt_in[o] = s2_idx[o];
  end

  always_comb begin
    for (int i = 0; i < NUM_PORTS; i++) begin
      in_gnt[i]    = 1'b0;
      for (int o = 0; o < NUM_PORTS; o++) in_gnt[i] |= s2_gnt[o][i];
      in_gnt_vc[i] = VC_ID_W'(s1_vc[i]);
    end
  end

endmodule
