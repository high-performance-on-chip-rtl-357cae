// tb_xy_route: checks the routing unit of a router at (1,2) for every
// destination of a 4 x 4 mesh against a reference written from the rule
// "X first, then Y, East = +x, South = +y".
module tb_xy_route;
  import noc_pkg::*;
  logic [XW-1:0] dst_x;
  logic [YW-1:0] dst_y;
  port_e         out_port;
  int checks = 0, failures = 0;

  xy_route #(.MY_X(1), .MY_Y(2)) dut (.*);

  initial begin
    for (int x = 0; x < 4; x++)
      for (int y = 0; y < 4; y++) begin
        port_e exp;
        int dx, dy;
        dx = x - 1; dy = y - 2;
        exp = (dx != 0) ? ((dx > 0) ? P_EAST : P_WEST)
                        : (dy > 0) ? P_SOUTH : (dy < 0) ? P_NORTH : P_LOCAL;
        dst_x = XW'(x); dst_y = YW'(y);
        #1;
        checks++;
        if (out_port != exp) begin
          failures++;
          $display("dst (%0d,%0d): port %0d, expected %0d", x, y, out_port, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
