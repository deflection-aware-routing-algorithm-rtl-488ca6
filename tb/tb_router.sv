// tb_router: one router at (1,1) of an 8x8 mesh with all four neighbours
// and the local core played by the testbench.
//  * Each input sends 30 packets of 1..5 flits to random destinations that
//    XY routing may bring through this router; the flits carry the packet
//    number and flit index, so a scoreboard checks the output port, order
//    and data of every flit.
//  * Neighbour drivers corrupt some first-sent headers (a destination bit or
//    a payload bit) while keeping the parity of the clean header; the router
//    must drop them, ask for a retransmission exactly SPARE_DEPTH cycles
//    later and accept the clean copy the driver then sends.
//  * Bursts of up to 8 flipped bits are injected into the input buffers;
//    every flit must still leave intact.
//  * Neighbour receivers reject some headers on the router's outputs; the
//    router must resend each exactly SPARE_DEPTH cycles later.
// Every mechanism is counted and must occur at least once.
module tb_router;
  import noc_pkg::*;
  localparam int W = 128, B = 8, D = 4, ENC_W = 168, NP = 5, MAXC = 20000;
  localparam int NPKT = 30;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  addr_t own = '{y: 3'd1, x: 3'd1};
  logic   [NP-1:0]        in_valid, in_ready, retx_out, out_valid, out_ready, retx_in;
  ftype_e                 in_ftype [NP], out_ftype [NP];
  logic   [NP-1:0][W-1:0] in_data, out_data;
  logic   [NP-1:0][1:0]   in_par, out_par;
  logic   [NP-1:0]        link_inj_en, buf_inj_en;
  logic   [W-1:0]         link_inj_mask;
  logic   [ENC_W-1:0]     buf_inj_mask;
  logic   [NP-1:0]        ev_dar, ev_par, ev_drop, ev_retx, ev_unc;
  logic   [5:0]           ev_corr;

  router #(.FLIT_W(W), .B(B), .SPARE_DEPTH(D)) dut (
    .clk(clk), .rst(rst), .own(own),
    .in_valid(in_valid), .in_ftype(in_ftype), .in_data(in_data), .in_par(in_par),
    .in_ready(in_ready), .retx_out(retx_out),
    .out_valid(out_valid), .out_ftype(out_ftype), .out_data(out_data), .out_par(out_par),
    .out_ready(out_ready), .retx_in(retx_in),
    .link_inj_en(link_inj_en), .link_inj_mask(link_inj_mask),
    .buf_inj_en(buf_inj_en), .buf_inj_mask(buf_inj_mask),
    .ev_dar(ev_dar), .ev_par(ev_par), .ev_drop(ev_drop), .ev_retx(ev_retx),
    .ev_corr(ev_corr), .ev_unc(ev_unc));

  initial begin : watchdog
    repeat (MAXC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  function automatic logic [1:0] par2(logic [W-1:0] d);
    logic [1:0] p = '0;
    for (int i = 0; i < W; i++) p[i % 2] ^= d[i];
    return p;
  endfunction

  function automatic int xy_port(int cx, int cy, int dx, int dy);
    if (dx > cx) return 2;
    if (dx < cx) return 4;
    if (dy > cy) return 3;
    if (dy < cy) return 1;
    return 0;
  endfunction

  // packet id -> destination and length
  int pdx [NP*NPKT], pdy [NP*NPKT], plen [NP*NPKT], pnext [NP*NPKT];

  function automatic logic [W-1:0] flit_data(int id, int k);
    logic [W-1:0] d;
    d = {16'(id), 8'(k), 8'hA5, {3{32'(id * 7919 + k * 104729)}}};
    if (k == 0) d[11:0] = {3'd1, 3'd1, 3'(pdy[id]), 3'(pdx[id])};
    return d;
  endfunction

  // ------------------------------------------------------------ drivers
  typedef struct { int id; int k; } fl_t;
  fl_t          q [NP][$];
  logic [W-1:0] hist [NP][0:MAXC];
  int owait [NP], oretx_at [NP];
  logic [W-1:0] orej [NP];
  int n_dar = 0, n_par = 0, n_drop = 0, n_retx_in = 0, n_retx_out = 0, n_corr = 0;
  int n_pkts = 0, n_bufinj = 0;

  initial begin
    int tx, ty, dx, dy, id, cyc;
    logic corrupt;
    // build the packets
    for (int p = 0; p < NP; p++) begin
      tx = 1; ty = 1;
      case (p) 1: ty = 0; 2: tx = 2; 3: ty = 2; 4: tx = 0; default: ; endcase
      for (int n = 0; n < NPKT; n++) begin
        id = p * NPKT + n;
        do begin
          dx = $urandom_range(0, 7); dy = $urandom_range(0, 7);
        end while (p != 0 && !(xy_port(tx, ty, dx, dy) == ((p + 1) % 4) + 1 &&
                               !(dx == tx && dy == ty)));
        pdx[id] = dx; pdy[id] = dy; plen[id] = $urandom_range(1, 5); pnext[id] = 0;
        for (int k = 0; k < plen[id]; k++) q[p].push_back('{id, k});
      end
    end
    in_valid = '0; out_ready = '0; retx_in = '0; link_inj_en = '0; buf_inj_en = '0;
    link_inj_mask = '0; buf_inj_mask = '0;
    for (int p = 0; p < NP; p++) begin
      in_ftype[p] = F_BODY; in_data[p] = '0; in_par[p] = '0; owait[p] = 0; oretx_at[p] = -1;
    end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    cyc = 0;
    while (n_pkts < NP * NPKT && cyc < MAXC - 100) begin
      @(posedge clk); #1;
      cyc++;
      // ---- inputs
      for (int p = 0; p < NP; p++) begin
        corrupt = 0;
        if (retx_out[p]) begin
          in_valid[p] = 1; in_ftype[p] = F_HEAD; in_data[p] = hist[p][cyc - D];
          in_par[p] = par2(hist[p][cyc - D]);
        end else if (q[p].size() > 0) begin
          fl_t f;
          logic [W-1:0] d;
          f = q[p][0];
          d = flit_data(f.id, f.k);
          in_valid[p] = 1;
          in_ftype[p] = (plen[f.id] == 1) ? F_HEADTAIL : (f.k == 0) ? F_HEAD :
                        (f.k == plen[f.id] - 1) ? F_TAIL : F_BODY;
          in_par[p]   = par2(d);
          hist[p][cyc] = d;
          if (p != 0 && f.k == 0 && $urandom_range(0, 3) == 0) begin
            corrupt = 1;
            d ^= ($urandom_range(0, 1) == 1) ? 128'h4 : (128'h1 << 50);
          end
          in_data[p] = d;
        end else begin
          in_valid[p] = 0;
        end
      end
      // buffer upsets
      buf_inj_en = '0;
      if ($urandom_range(0, 5) == 0) begin
        int len, pos;
        len = $urandom_range(1, B);
        pos = $urandom_range(0, ENC_W - B);
        buf_inj_en[$urandom_range(0, NP - 1)] = 1'b1;
        buf_inj_mask = '0;
        for (int i = 0; i < len; i++) buf_inj_mask[pos + i] = 1'b1;
      end
      // ---- outputs
      for (int o = 0; o < NP; o++) begin
        retx_in[o] = (cyc == oretx_at[o]);
        if (retx_in[o]) out_ready[o] = 1;
        else if (owait[o] > 0) begin out_ready[o] = 0; owait[o]--; end
        else out_ready[o] = ($urandom_range(0, 4) != 0);
      end
      #4;
      // ---- sample handshakes
      for (int p = 0; p < NP; p++) begin
        if (in_valid[p] && in_ready[p]) begin
          if (retx_out[p]) hist[p][cyc] = hist[p][cyc - D];
          else void'(q[p].pop_front());
          if (buf_inj_en[p]) n_bufinj++;
        end
      end
      n_dar += $countones(ev_dar); n_par += $countones(ev_par);
      n_drop += $countones(ev_drop); n_retx_out += $countones(retx_out);
      n_corr += int'(ev_corr);
      for (int o = 0; o < NP; o++) begin
        if (retx_in[o]) begin
          n_retx_in++;
          checks++;
          if (!out_valid[o] || out_data[o] !== orej[o] || !ev_retx[o]) begin
            failures++;
            $display("FAIL output %0d did not resend its header", o);
          end
        end
        if (out_valid[o] && out_ready[o]) begin
          int id, k;
          id = int'(out_data[o][127:112]);
          k  = int'(out_data[o][111:104]);
          if (o != 0 && !retx_in[o] && is_head(out_ftype[o]) && $urandom_range(0, 3) == 0) begin
            orej[o] = out_data[o]; owait[o] = D - 1; oretx_at[o] = cyc + D;
            continue;   // this receiver rejects the header
          end
          checks++;
          if (id >= NP * NPKT || k != pnext[id] || out_data[o] !== flit_data(id, k) ||
              o != xy_port(1, 1, pdx[id], pdy[id]) ||
              (o != 0 && is_head(out_ftype[o]) && out_par[o] !== par2(out_data[o]))) begin
            failures++;
            if (failures < 10) $display("FAIL flit id=%0d k=%0d at port %0d cycle %0d", id, k, o, cyc);
          end else begin
            pnext[id]++;
            if (pnext[id] == plen[id]) n_pkts++;
          end
        end
      end
    end
    $display("packets %0d, DAR %0d, parity %0d, dropped %0d, retx requested %0d, resent %0d, corrected groups %0d, buffer upsets %0d, cycles %0d",
             n_pkts, n_dar, n_par, n_drop, n_retx_out, n_retx_in, n_corr, n_bufinj, cyc);
    checks++; if (n_pkts != NP * NPKT) failures++;
    checks++; if (n_dar == 0) failures++;
    checks++; if (n_par == 0) failures++;
    checks++; if (n_retx_out != n_drop || n_drop == 0) failures++;
    checks++; if (n_retx_in == 0) failures++;
    checks++; if (n_corr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
