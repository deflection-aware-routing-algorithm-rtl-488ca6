// tb_dar_unit: for every receiver, input port and destination of an 8x8
// mesh, the deflection flag must be low exactly when XY routing at the
// transmitter sends the packet to this receiver. The expectation walks the
// XY path here, independently of the unit. It also counts how many
// single-bit flips of a correct destination field the check catches.
module tb_dar_unit;
  import noc_pkg::*;
  addr_t own, dest, tx_addr;
  port_e in_port;
  logic  deflect;
  int checks = 0, failures = 0, caught = 0, flips = 0;

  dar_unit dut (.own(own), .in_port(in_port), .dest(dest),
                .tx_addr(tx_addr), .deflect(deflect));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic on_path(int tx, int ty, int ox, int oy, int dx, int dy);
    int nx = tx, ny = ty;
    if (dx != tx) nx = (dx > tx) ? tx + 1 : tx - 1;
    else if (dy != ty) ny = (dy > ty) ? ty + 1 : ty - 1;
    else return 1'b0;  // packet would have been ejected at the transmitter
    return (nx == ox) && (ny == oy);
  endfunction

  initial begin
    int tx, ty;
    logic exp;
    for (int ox = 0; ox < 8; ox++) for (int oy = 0; oy < 8; oy++)
      for (int p = 1; p < 5; p++) begin
        tx = ox; ty = oy;
        case (p) 1: ty = oy - 1; 2: tx = ox + 1; 3: ty = oy + 1; default: tx = ox - 1; endcase
        if (tx < 0 || tx > 7 || ty < 0 || ty > 7) continue;
        for (int dx = 0; dx < 8; dx++) for (int dy = 0; dy < 8; dy++) begin
          own     = '{y: 3'(oy), x: 3'(ox)};
          in_port = port_e'(p);
          dest    = '{y: 3'(dy), x: 3'(dx)};
          #1;
          exp = !on_path(tx, ty, ox, oy, dx, dy);
          checks++;
          if (deflect !== exp || tx_addr.x != 3'(tx) || tx_addr.y != 3'(ty)) begin
            failures++;
            if (failures < 5) $display("FAIL own %0d,%0d p%0d dest %0d,%0d", ox, oy, p, dx, dy);
          end
          if (!exp) begin  // a correct header: try every single-bit flip
            for (int b = 0; b < 6; b++) begin
              addr_t bad;
              bad = addr_t'(6'({dest.y, dest.x}) ^ (6'd1 << b));
              dest = bad;
              #1;
              flips++;
              if (deflect) caught++;
              checks++;
              if (deflect !== !on_path(tx, ty, ox, oy, int'(bad.x), int'(bad.y))) failures++;
              dest = '{y: 3'(dy), x: 3'(dx)};
            end
          end
        end
      end
    $display("single-bit destination flips caught by DAR: %0d of %0d", caught, flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
