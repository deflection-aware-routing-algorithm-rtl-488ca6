// tb_addr_gen: checks the neighbour address produced for every node of an
// 8x8 mesh and every port against coordinates computed here.
module tb_addr_gen;
  import noc_pkg::*;
  addr_t node, nbr;
  port_e port_i;
  int checks = 0, failures = 0;

  addr_gen dut (.node(node), .port_i(port_i), .nbr(nbr));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex, ey;
    for (int x = 0; x < 8; x++) for (int y = 0; y < 8; y++)
      for (int p = 0; p < 5; p++) begin
        node   = '{y: 3'(y), x: 3'(x)};
        port_i = port_e'(p);
        #1;
        ex = x; ey = y;
        case (p)
          1: ey = y - 1;
          2: ex = x + 1;
          3: ey = y + 1;
          4: ex = x - 1;
          default: ;
        endcase
        // only neighbours inside the mesh are meaningful
        if (ex >= 0 && ex < 8 && ey >= 0 && ey < 8) begin
          checks++;
          if (nbr.x != 3'(ex) || nbr.y != 3'(ey)) begin
            failures++;
            $display("FAIL node %0d,%0d port %0d -> %0d,%0d", x, y, p, nbr.x, nbr.y);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
