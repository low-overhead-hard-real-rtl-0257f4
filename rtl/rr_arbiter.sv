// rr_arbiter: round-robin arbiter used by the VC and switch allocators.
//
// Grants one of N requests, searching from the position after the last
// granted one, so every persistent requester is served within N grants.
// The grant is combinational from req; the priority pointer moves only when
// `advance` is high in a cycle with a grant. Reset puts the pointer at 0.
module rr_arbiter #(
  parameter  int unsigned N  = 5,
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N-1:0]         req,
  input  logic                 advance,
  output logic [N-1:0]         gnt,
  output logic [IW-1:0]        gnt_idx,
  output logic                 gnt_valid
);
  logic [IW-1:0] ptr;   // highest priority index

  always_comb begin
    gnt       = '0;
    gnt_idx   = '0;
    gnt_valid = 1'b0;
    for (int k = 0; k < N; k++) begin
      logic [IW-1:0] idx;
      idx = IW'((int'(ptr) + k) % N);
      if (!gnt_valid && req[idx]) begin
        gnt_valid = 1'b1;
        gnt[idx]  = 1'b1;
        gnt_idx   = idx;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ptr <= '0;
    end else if (advance && gnt_valid) begin
      ptr <= (int'(gnt_idx) == N - 1) ? '0 : gnt_idx + 1'b1;
    end
  end
endmodule
