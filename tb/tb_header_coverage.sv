// tb_header_coverage: fault-coverage experiment for header flits on the
// 8x8 mesh, in the spirit of the coverage table of the design's
// evaluation. For random packets and a random hop on their XY path, a
// correct 128-bit header (with its two parity bits) is hit by k = 1..8
// contiguous flipped bits, either anywhere in the flit or inside the 12
// routing bits, and passed through the deflection-aware routing check
// (dar_unit) and the parity comparator (parity_check). It prints the share
// detected by DAR, by the parity pair and by both together, and checks
// that (a) every 1-, 2- and 3-bit contiguous fault is caught by the two
// parity bits, (b) a clean header is never flagged and (c) DAR alone
// catches some faults that change the destination.
module tb_header_coverage;
  import noc_pkg::*;
  localparam int W = 128, TRIALS = 4000;
  addr_t      own, dest, tx_addr;
  port_e      in_port;
  logic       deflect, perr;
  logic [W-1:0] data;
  logic [1:0] par;
  int checks = 0, failures = 0;

  dar_unit             u_dar (.own(own), .in_port(in_port), .dest(dest),
                              .tx_addr(tx_addr), .deflect(deflect));
  parity_check #(.W(W)) u_par (.data(data), .par(par), .error(perr));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] par2(logic [W-1:0] d);
    logic [1:0] p = '0;
    for (int i = 0; i < W; i++) p[i % 2] ^= d[i];
    return p;
  endfunction

  initial begin
    int sx, sy, dx, dy, cx, cy, nx, ny, hops, h, pos, region;
    int n_dar, n_par, n_any;
    logic [W-1:0] good;
    for (region = 0; region < 2; region++) begin
      $display("faults %s", region == 0 ? "anywhere in the 128-bit header" : "inside the 12 routing bits");
      for (int k = 1; k <= 8; k++) begin
        n_dar = 0; n_par = 0; n_any = 0;
        for (int t = 0; t < TRIALS; t++) begin
          // random packet with at least one hop
          do begin
            sx = $urandom_range(0, 7); sy = $urandom_range(0, 7);
            dx = $urandom_range(0, 7); dy = $urandom_range(0, 7);
          end while (sx == dx && sy == dy);
          hops = (sx > dx ? sx - dx : dx - sx) + (sy > dy ? sy - dy : dy - sy);
          h = $urandom_range(0, hops - 1);
          // walk h hops of the XY path to the transmitter (cx, cy)
          cx = sx; cy = sy;
          for (int i = 0; i < h; i++)
            if (cx != dx) cx += (dx > cx) ? 1 : -1; else cy += (dy > cy) ? 1 : -1;
          nx = cx; ny = cy;
          if (nx != dx) nx += (dx > nx) ? 1 : -1; else ny += (dy > ny) ? 1 : -1;
          own = '{y: 3'(ny), x: 3'(nx)};
          in_port = (nx > cx) ? P_WEST : (nx < cx) ? P_EAST : (ny > cy) ? P_NORTH : P_SOUTH;
          good = {$urandom, $urandom, $urandom, $urandom};
          good[11:0] = {3'(sy), 3'(sx), 3'(dy), 3'(dx)};
          par = par2(good);
          // clean header first
          data = good; dest = hdr_dest(good[5:0]);
          #1;
          if (k == 1) begin
            checks++;
            if (deflect || perr) failures++;
          end
          pos  = (region == 0) ? $urandom_range(0, W - k) : $urandom_range(0, 12 - k);
          data = good;
          for (int i = 0; i < k; i++) data[pos + i] = ~data[pos + i];
          dest = hdr_dest(data[5:0]);
          #1;
          n_dar += int'(deflect);
          n_par += int'(perr);
          n_any += int'(deflect || perr);
          if (k <= 3) begin
            checks++;
            if (!perr) failures++;
          end
        end
        $display("  k=%0d  DAR %5.1f%%  2-bit parity %5.1f%%  DAR+parity %5.1f%%", k,
                 100.0 * n_dar / TRIALS, 100.0 * n_par / TRIALS, 100.0 * n_any / TRIALS);
        if (region == 1 && k == 1) begin
          checks++;
          if (n_dar == 0) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
