// be_crossbar: 5x5 crossbar of the buffered (best-effort) datapath.
//
// Each output port is a multiplexer over the five input ports, driven by the
// switch allocator's output-side grant (sel_valid, sel_in). It carries the
// flit and the output VC it will use at the next hop. Combinational: the
// result is registered in the output port (switch traversal ends there).
// The crossbar is the unchanged one of a virtual-channel router; building it
// from multiplexers is this design's choice.
module be_crossbar
  import hres_pkg::*;
(
  input  flit_t [NUM_PORTS-1:0]              in_flit,
  input  logic  [NUM_PORTS-1:0][VC_ID_W-1:0] in_vc,
  input  logic  [NUM_PORTS-1:0]              sel_valid,
  input  logic  [NUM_PORTS-1:0][PORT_W-1:0]  sel_in,
  output logic  [NUM_PORTS-1:0]              out_valid,
  output flit_t [NUM_PORTS-1:0]              out_flit,
  output logic  [NUM_PORTS-1:0][VC_ID_W-1:0] out_vc
);
  always_comb begin
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_valid[o] = sel_valid[o];
      out_flit[o]  = in_flit[0];
      out_vc[o]    = in_vc[0];
      for (int i = 1; i < NUM_PORTS; i++) begin
        if (int'(sel_in[o]) == i) begin
          out_flit[o] = in_flit[i];
          out_vc[o]   = in_vc[i];
        end
      end
    end
  end
endmodule
