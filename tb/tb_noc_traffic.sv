// tb_noc_traffic: synthetic traffic on the full 8x8 mesh with 5-flit
// packets, the traffic patterns of the design's latency evaluation:
// uniform random, tornado, bit-complement and transpose. For each pattern
// and two injection rates (packets per node per cycle) every core offers
// packets for a fixed window; the test then drains the network, checks that
// every packet arrived at its destination intact and in order, and prints
// the average packet latency (creation of the packet to arrival of its
// tail, source queueing included). No faults are injected, so this is the
// fault-free case, which the header checks must not slow down: no header
// may be flagged. It also checks that latency does not fall as the rate
// rises.
module tb_noc_traffic;
  import noc_pkg::*;
  localparam int MX = 8, NN = 64, W = 128, LEN = 5, WINDOW = 400, MAXC = 40000;
  localparam int MAXP = 8000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   [NN-1:0]        inj_valid, inj_ready, ej_valid, ej_ready;
  ftype_e                 inj_ftype [NN], ej_ftype [NN];
  logic   [NN-1:0][W-1:0] inj_data, ej_data;
  logic   [NN-1:0]        ev_dar, ev_par, ev_drop, ev_retx, ev_unc;
  logic   [NN-1:0][5:0]   ev_corr;

  noc_mesh dut (
    .clk(clk), .rst(rst),
    .inj_valid(inj_valid), .inj_ftype(inj_ftype), .inj_data(inj_data), .inj_ready(inj_ready),
    .ej_valid(ej_valid), .ej_ftype(ej_ftype), .ej_data(ej_data), .ej_ready(ej_ready),
    .link_inj_en(1'b0), .link_inj_node(6'd0), .link_inj_port(P_EAST), .link_inj_mask('0),
    .buf_inj_en(1'b0), .buf_inj_node(6'd0), .buf_inj_port(P_LOCAL), .buf_inj_mask('0),
    .ev_dar(ev_dar), .ev_par(ev_par), .ev_drop(ev_drop), .ev_retx(ev_retx),
    .ev_corr(ev_corr), .ev_unc(ev_unc));

  initial begin : watchdog
    repeat (MAXC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pdst [MAXP], pborn [MAXP], pnext [MAXP];
  typedef struct { int id; int k; } fl_t;
  fl_t q [NN][$];

  function automatic int pattern_dest(int pat, int s);
    int x = s % MX, y = s / MX;
    case (pat)
      0: return $urandom_range(0, NN - 1);                        // uniform
      1: return ((y + MX/2 - 1) % MX) * MX + (x + MX/2 - 1) % MX; // tornado
      2: return (~s) & (NN - 1);                                  // bit complement
      default: return x * MX + y;                                 // transpose
    endcase
  endfunction

  function automatic logic [W-1:0] flit_data(int id, int k, int src);
    logic [W-1:0] d;
    d = {16'(id), 8'(k), 8'h3C, {3{32'(id * 69069 + k)}}};
    if (k == 0) d[11:0] = {3'(src / MX), 3'(src % MX), 3'(pdst[id] / MX), 3'(pdst[id] % MX)};
    return d;
  endfunction

  initial begin
    string names [4] = '{"uniform", "tornado", "bitcomp", "transpose"};
    real   rates [2] = '{0.01, 0.03};
    real   lat [2];
    int    np, done, cyc, sum, id, k, flagged;
    inj_valid = '0; ej_ready = '1;
    for (int n = 0; n < NN; n++) begin inj_ftype[n] = F_BODY; inj_data[n] = '0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int pat = 0; pat < 4; pat++) begin
      for (int r = 0; r < 2; r++) begin
        np = 0; done = 0; cyc = 0; sum = 0; flagged = 0;
        while ((cyc < WINDOW || done < np) && cyc < 8000) begin
          @(posedge clk); #1;
          // offer new packets during the window
          if (cyc < WINDOW)
            for (int n = 0; n < NN; n++)
              if ($urandom_range(0, 9999) < int'(rates[r] * 10000.0) && np < MAXP) begin
                int d;
                d = pattern_dest(pat, n);
                if (d != n) begin
                  pdst[np] = d; pborn[np] = cyc; pnext[np] = 0;
                  for (int j = 0; j < LEN; j++) q[n].push_back('{np, j});
                  np++;
                end
              end
          for (int n = 0; n < NN; n++) begin
            if (q[n].size() > 0) begin
              fl_t f;
              f = q[n][0];
              inj_valid[n] = 1;
              inj_data[n]  = flit_data(f.id, f.k, n);
              inj_ftype[n] = (f.k == 0) ? F_HEAD : (f.k == LEN - 1) ? F_TAIL : F_BODY;
            end else inj_valid[n] = 0;
          end
          #4;
          for (int n = 0; n < NN; n++) begin
            if (inj_valid[n] && inj_ready[n]) void'(q[n].pop_front());
            if (ej_valid[n]) begin
              id = int'(ej_data[n][127:112]);
              k  = int'(ej_data[n][111:104]);
              checks++;
              if (id >= np || pdst[id] != n || k != pnext[id]) begin
                failures++;
                if (failures < 10) $display("FAIL node %0d id %0d k %0d", n, id, k);
              end else begin
                pnext[id]++;
                if (pnext[id] == LEN) begin
                  done++;
                  sum += cyc - pborn[id];
                end
              end
            end
            flagged += int'(ev_dar[n] || ev_par[n] || ev_drop[n]);
          end
          cyc++;
        end
        lat[r] = (done > 0) ? real'(sum) / done : 0.0;
        $display("%-9s rate %0.2f: %0d packets, %0d delivered, average latency %0.1f cycles",
                 names[pat], rates[r], np, done, lat[r]);
        checks++; if (done != np || np == 0) failures++;
        checks++; if (flagged != 0) failures++;
      end
      checks++; if (lat[1] < lat[0]) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
