// vc_buffer: first-in first-out flit buffer of one virtual channel.
//
// A circular buffer of DEPTH entries (8 by default, the buffer depth of the
// evaluated network) with read and write pointers and an occupancy count.
// rd_data shows the front entry combinationally whenever the buffer is not
// empty; rd_en pops it at the clock edge. A write and a read may happen in
// the same cycle. Writing into a full buffer is an error: credit-based flow
// control upstream prevents it, and an assertion checks it.
module vc_buffer #(
  parameter  int unsigned WIDTH = 47,
  parameter  int unsigned DEPTH = 8,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (int'(p) == DEPTH - 1) ? '0 : p + 1'b1;
  endfunction

  assign empty   = (count == '0);
  assign full    = (int'(count) == DEPTH);
  assign rd_data = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en) wr_ptr <= next_ptr(wr_ptr);
      if (rd_en) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (AW+1)'(wr_en) - (AW+1)'(rd_en);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (!full || rd_en));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) rd_en |-> !empty);
endmodule
