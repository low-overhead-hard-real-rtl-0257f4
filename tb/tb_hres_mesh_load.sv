// tb_hres_mesh_load: best-effort load sweep on the default 2-VC 4x4 mesh,
// with the unicast and multicast real-time flows of the mesh test running
// throughout. Three meshes run side by side with sources that start a new
// packet with probability 5 %, 30 % and 100 % per idle cycle (all of them
// send 40 packets per node). Each environment checks every flit, and that
// every real-time flit arrives exactly one cycle per router after injection
// at every load. This test adds: the mean best-effort packet latency must
// rise with the load, while the real-time latency stays fixed.
module tb_hres_mesh_load;
  localparam int NL = 3;
  localparam int LOAD [NL] = '{5, 30, 100};
  logic [NL-1:0] done;
  int checks_l [NL], failures_l [NL], lat_sum [NL], lat_n [NL];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < NL; k++) begin : g_load
    mesh_traffic_env #(.NVC(2), .INJ_PCT(LOAD[k])) u_env (
      .done(done[k]), .checks(checks_l[k]), .failures(failures_l[k]),
      .be_lat_sum(lat_sum[k]), .be_lat_n(lat_n[k]));
  end

  initial begin
    real mean [NL];
    fork
      wait (done === '1);
      #3000000;
    join_any
    for (int k = 0; k < NL; k++) begin
      checks   += checks_l[k];
      failures += failures_l[k];
      mean[k] = (lat_n[k] > 0) ? real'(lat_sum[k]) / real'(lat_n[k]) : 0.0;
      $display("load %0d %%: mean best-effort packet latency %0.2f cycles over %0d packets", LOAD[k], mean[k], lat_n[k]);
    end
    checks++;
    if (done !== '1) begin
      failures++;
      $display("watchdog expired: done %b", done);
    end
    for (int k = 1; k < NL; k++) begin
      checks++;
      if (!(mean[k] > mean[k-1])) begin
        failures++;
        $display("FAIL: latency does not rise from load %0d to %0d", LOAD[k-1], LOAD[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
