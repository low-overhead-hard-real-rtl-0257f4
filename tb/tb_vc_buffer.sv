// tb_vc_buffer: random pushes and pops against a queue model; checks the
// front entry, the occupancy count and the empty/full flags every cycle, and
// that a pushed entry is readable in the next cycle.
module tb_vc_buffer;
  localparam int W = 47, D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic wr_en, rd_en, empty, full;
  logic [W-1:0] wr_data, rd_data;
  logic [3:0] count;
  vc_buffer #(.WIDTH(W), .DEPTH(D)) dut (.*);
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0, "empty after reset");
    for (int i = 0; i < 2000; i++) begin
      // compare before the edge
      check(int'(count) == model.size(), $sformatf("count %0d vs %0d", count, model.size()));
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == D), "full flag");
      if (model.size() > 0) check(rd_data == model[0], "front entry");
      wr_en   = (model.size() < D) && ($urandom % 3 != 0);
      rd_en   = (model.size() > 0) && ($urandom % ((i / 500) % 2 == 0 ? 2 : 4) == 0);
      wr_data = {$urandom, $urandom};
      @(posedge clk);
      if (rd_en) void'(model.pop_front());
      if (wr_en) model.push_back(wr_data);
      @(negedge clk);
    end
    // fill completely, then drain
    wr_en = 0; rd_en = 0;
    while (model.size() < D) begin
      wr_en = 1; wr_data = W'(model.size() + 100);
      @(posedge clk); model.push_back(wr_data); @(negedge clk);
    end
    wr_en = 0;
    check(full && count == D, "full after filling");
    while (model.size() > 0) begin
      check(rd_data == model[0], "drain order");
      rd_en = 1; @(posedge clk); void'(model.pop_front()); @(negedge clk);
    end
    rd_en = 0;
    check(empty, "empty after draining");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
