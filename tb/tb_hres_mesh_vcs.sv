// tb_hres_mesh_vcs: the 4x4 mesh traffic test in the 4-VC and 8-VC router
// configurations (the default is 2 VCs, tested by tb_hres_mesh). Both meshes
// run side by side, each in its own mesh_traffic_env; the test passes when
// both finish with no failure.
module tb_hres_mesh_vcs;
  logic done4, done8;
  int   checks4, failures4, checks8, failures8;
  int   checks, failures;

  mesh_traffic_env #(.NVC(4)) u_vc4 (.done(done4), .checks(checks4), .failures(failures4), .be_lat_sum(), .be_lat_n());
  mesh_traffic_env #(.NVC(8)) u_vc8 (.done(done8), .checks(checks8), .failures(failures8), .be_lat_sum(), .be_lat_n());

  initial begin
    fork
      wait (done4 === 1'b1 && done8 === 1'b1);
      #2000000;
    join_any
    checks   = checks4 + checks8;
    failures = failures4 + failures8;
    if (!(done4 && done8)) begin
      failures++;
      $display("watchdog expired: 4-VC done %0b, 8-VC done %0b", done4, done8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
