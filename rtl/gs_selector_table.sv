// gs_selector_table: programmable guaranteed-service selector table.
//
// One entry per output port: an enable bit and the number of the input port
// whose real-time flits that output forwards. The entries are the select
// lines of the real-time crossbar. They are written before an application
// runs, one entry per cfg_we cycle, from routes computed offline; a write
// takes effect from the next cycle. Writes to an output number above 4 are
// ignored. Reset disables every entry. The table and its role follow the
// HRES router; the one-entry-per-cycle write port and the reset value are this
// design's choices.
module gs_selector_table
  import hres_pkg::*;
(
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             cfg_we,
  input  logic [PORT_W-1:0]                cfg_out_port,
  input  logic [PORT_W-1:0]                cfg_in_port,
  input  logic                             cfg_en,
  output logic [NUM_PORTS-1:0]             sel_en,
  output logic [NUM_PORTS-1:0][PORT_W-1:0] sel_in
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sel_en <= '0;
      sel_in <= '0;
    end else if (cfg_we && int'(cfg_out_port) < NUM_PORTS) begin
      sel_en[cfg_out_port] <= cfg_en;
      sel_in[cfg_out_port] <= cfg_in_port;
    end
  end
endmodule
