// tb_gs_selector_table: random writes of selector entries (including
// invalid output numbers, which must be ignored) against a model of the
// table; checks reset clears every enable and a write lands one cycle later.
module tb_gs_selector_table;
  import hres_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic cfg_we, cfg_en;
  logic [PORT_W-1:0] cfg_out_port, cfg_in_port;
  logic [NUM_PORTS-1:0] sel_en;
  logic [NUM_PORTS-1:0][PORT_W-1:0] sel_in;
  gs_selector_table dut (.*);
  int checks = 0, failures = 0;
  logic [NUM_PORTS-1:0] m_en;
  logic [NUM_PORTS-1:0][PORT_W-1:0] m_in;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    cfg_we = 0; cfg_en = 0; cfg_out_port = 0; cfg_in_port = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(sel_en == '0, "reset disables all entries");
    m_en = '0; m_in = '0;
    for (int i = 0; i < 500; i++) begin
      cfg_we = ($urandom % 2) == 1;
      cfg_out_port = PORT_W'($urandom % 8);
      cfg_in_port  = PORT_W'($urandom % 5);
      cfg_en       = ($urandom % 4) != 0;
      @(posedge clk);
      if (cfg_we && cfg_out_port < 5) begin
        m_en[cfg_out_port] = cfg_en;
        m_in[cfg_out_port] = cfg_in_port;
      end
      @(negedge clk);
      for (int o = 0; o < NUM_PORTS; o++) begin
        check(sel_en[o] == m_en[o], $sformatf("enable of output %0d", o));
        if (m_en[o]) check(sel_in[o] == m_in[o], $sformatf("select of output %0d", o));
      end
    end
    rst_n = 0; @(negedge clk); rst_n = 1;
    check(sel_en == '0, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
