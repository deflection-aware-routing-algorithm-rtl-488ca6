// tb_xy_route: exhaustive check of the XY routing function over every pair
// of current and destination addresses of an 8x8 mesh. The expected port is
// worked out here from the rule "correct x first, then y".
module tb_xy_route;
  import noc_pkg::*;
  addr_t cur, dest;
  port_e port_o;
  int checks = 0, failures = 0;

  xy_route dut (.cur(cur), .dest(dest), .port_o(port_o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    port_e exp;
    for (int cx = 0; cx < 8; cx++) for (int cy = 0; cy < 8; cy++)
      for (int dx = 0; dx < 8; dx++) for (int dy = 0; dy < 8; dy++) begin
        cur  = '{y: 3'(cy), x: 3'(cx)};
        dest = '{y: 3'(dy), x: 3'(dx)};
        #1;
        if (dx > cx) exp = P_EAST;
        else if (dx < cx) exp = P_WEST;
        else if (dy > cy) exp = P_SOUTH;
        else if (dy < cy) exp = P_NORTH;
        else exp = P_LOCAL;
        checks++;
        if (port_o != exp) begin
          failures++;
          if (failures < 5) $display("FAIL cur=%0d,%0d dest=%0d,%0d got %0d exp %0d",
                                     cx, cy, dx, dy, port_o, exp);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
