// rt_crossbar: bufferless crossbar of the hard real-time datapath.
//
// Five 5-to-1 multiplexers, one per output port, whose select lines come
// from the guaranteed-service selector table and are fixed for the run of an
// application. Output o forwards input sel_in[o] when its entry is enabled
// and that input carries a real-time flit this cycle. Several outputs may
// select the same input, which gives one-to-many (multicast) real-time
// transfers with no extra logic. There is no arbitration: the offline route
// computation guarantees that no two real-time flows share a link.
// `unrouted` flags an input whose real-time flit no enabled output selects
// (a configuration error; such a flit is lost). Combinational. The five
// multiplexers and multicast follow the HRES router; `unrouted` is an added
// status output.
module rt_crossbar
  import hres_pkg::*;
(
  input  logic  [NUM_PORTS-1:0]             in_valid,
  input  flit_t [NUM_PORTS-1:0]             in_flit,
  input  logic  [NUM_PORTS-1:0]             sel_en,
  input  logic  [NUM_PORTS-1:0][PORT_W-1:0] sel_in,
  output logic  [NUM_PORTS-1:0]             out_valid,
  output flit_t [NUM_PORTS-1:0]             out_flit,
  output logic  [NUM_PORTS-1:0]             unrouted
);
  logic [NUM_PORTS-1:0] taken;

  always_comb begin
    taken = '0;
    for (int o = 0; o < NUM_PORTS; o++) begin
      out_valid[o] = 1'b0;
      out_flit[o]  = in_flit[0];
      for (int i = 0; i < NUM_PORTS; i++) begin
        if (int'(sel_in[o]) == i) begin
          out_flit[o]  = in_flit[i];
          out_valid[o] = sel_en[o] && in_valid[i];
          if (sel_en[o]) taken[i] = 1'b1;
        end
      end
    end
    unrouted = in_valid & ~taken;
  end
endmodule
