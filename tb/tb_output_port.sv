// tb_output_port: the link register must carry the real-time flit (VC 0)
// whenever one is present and the buffered flit otherwise, one cycle later;
// credit counters of each VC must start at the buffer depth, fall with every
// buffered flit sent, rise with every credit, and credit_ok must drop at zero.
module tb_output_port;
  import hres_pkg::*;
  localparam int NVC = 2, D = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic rt_valid, be_valid;
  flit_t rt_flit, be_flit;
  logic [VC_ID_W-1:0] be_vc;
  credit_t credit_in;
  logic [NVC-1:0] credit_ok;
  link_t out_link;
  output_port #(.NUM_VC(NVC), .BUF_DEPTH(D)) dut (.*);
  int checks = 0, failures = 0, zero_seen = 0;
  int cred[NVC];
  link_t exp_link;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    rt_valid = 0; be_valid = 0; rt_flit = '0; be_flit = '0; be_vc = '0; credit_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(credit_ok == '1 && !out_link.valid, "after reset");
    for (int v = 0; v < NVC; v++) cred[v] = D;
    for (int t = 0; t < 3000; t++) begin
      int bv;
      for (int v = 0; v < NVC; v++) check(credit_ok[v] == (cred[v] > 0), $sformatf("credit_ok vc %0d (count %0d)", v, cred[v]));
      bv = int'($urandom % NVC);
      rt_valid = ($urandom % 4 == 0);
      rt_flit  = flit_t'({$urandom, $urandom});
      be_flit  = flit_t'({$urandom, $urandom});
      be_vc    = VC_ID_W'(bv);
      // as the switch allocator would: no buffered flit beside a real-time one
      be_valid = !rt_valid && cred[bv] > 0 && ($urandom % 3 != 0);
      credit_in.valid = ($urandom % ((t / 300) % 2 == 0 ? 2 : 5) == 0) && cred[$urandom % NVC] < D;
      credit_in.vc    = VC_ID_W'($urandom % NVC);
      if (credit_in.valid && cred[credit_in.vc] >= D) credit_in.valid = 1'b0;
      exp_link = '0;
      if (rt_valid) begin exp_link.valid = 1; exp_link.flit = rt_flit; end
      else if (be_valid) begin exp_link.valid = 1; exp_link.vc = be_vc; exp_link.flit = be_flit; end
      @(posedge clk);
      if (be_valid) cred[bv]--;
      if (credit_in.valid) cred[credit_in.vc]++;
      for (int v = 0; v < NVC; v++) if (cred[v] == 0) zero_seen++;
      @(negedge clk);
      check(out_link.valid == exp_link.valid, "link valid");
      if (exp_link.valid) check(out_link == exp_link, "link contents");
    end
    check(zero_seen > 0, "credit count never reached zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
