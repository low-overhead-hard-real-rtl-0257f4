// output_port: output multiplexer, link register and credit counters of one
// output port.
//
// The real-time crossbar and the buffered crossbar meet here. A real-time
// flit assigned to the port always wins; the switch allocator has already
// withheld the buffered grant for this port in that cycle, and an assertion
// checks that both never arrive together. The chosen flit is registered onto
// the output link (switch traversal), so a flit appears on the link one
// cycle after it crossed the crossbar. Real-time flits are sent with VC
// field 0; buffered flits carry their allocated output VC.
// A credit counter per downstream VC starts at BUF_DEPTH, drops when a
// buffered flit is sent and rises on each credit from downstream; credit_ok
// tells the switch allocator which VCs may send. The output multiplexer and
// the precedence of real-time flits follow the HRES router; credit-based flow
// control and the VC field of real-time flits are this design's choices.
module output_port
  import hres_pkg::*;
#(
  parameter int unsigned NUM_VC    = 2,
  parameter int unsigned BUF_DEPTH = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               rt_valid,
  input  flit_t              rt_flit,
  input  logic               be_valid,
  input  flit_t              be_flit,
  input  logic [VC_ID_W-1:0] be_vc,
  input  credit_t            credit_in,
  output logic [NUM_VC-1:0]  credit_ok,
  output link_t              out_link
);
  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);
  localparam int unsigned VW = (NUM_VC > 1) ? $clog2(NUM_VC) : 1;

  logic [NUM_VC-1:0][CW-1:0] credits;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_link <= '0;
    end else if (rt_valid) begin
      out_link.valid <= 1'b1;
      out_link.vc    <= '0;
      out_link.flit  <= rt_flit;
    end else begin
      out_link.valid <= be_valid;
      out_link.vc    <= be_vc;
      out_link.flit  <= be_flit;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int v = 0; v < NUM_VC; v++) credits[v] <= CW'(BUF_DEPTH);
    end else begin
      for (int v = 0; v < NUM_VC; v++) begin
        credits[v] <= credits[v]
                    + CW'(credit_in.valid && int'(credit_in.vc) == v)
                    - CW'(be_valid && !rt_valid && int'(be_vc) == v);
      end
    end
  end

  always_comb begin
    for (int v = 0; v < NUM_VC; v++) credit_ok[v] = (credits[v] != '0);
  end

  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n) !(rt_valid && be_valid));
  a_credit_avail: assert property (@(posedge clk) disable iff (!rst_n)
    be_valid |-> credit_ok[be_vc[VW-1:0]]);
endmodule
