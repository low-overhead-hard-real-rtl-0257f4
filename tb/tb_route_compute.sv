// tb_route_compute: XY routing of a router placed at (2, 1) for every
// destination of an 8x8 coordinate range, against a reference written with
// signed coordinate differences.
module tb_route_compute;
  import hres_pkg::*;
  logic [COORD_W-1:0] dst_x, dst_y;
  logic [PORT_W-1:0]  out_port;
  route_compute #(.X_COORD(2), .Y_COORD(1)) dut (.*);
  int checks = 0, failures = 0;
  initial begin
    for (int x = 0; x < 8; x++) begin
      for (int y = 0; y < 8; y++) begin
        int dx, dy;
        logic [PORT_W-1:0] exp_p;
        dst_x = COORD_W'(x); dst_y = COORD_W'(y);
        #1;
        dx = x - 2; dy = y - 1;
        exp_p = (dx > 0) ? 3'd2 : (dx < 0) ? 3'd4 : (dy > 0) ? 3'd1 : (dy < 0) ? 3'd3 : 3'd0;
        checks++;
        if (out_port !== exp_p) begin
          failures++;
          $display("FAIL: dst (%0d,%0d) port %0d expected %0d", x, y, out_port, exp_p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
