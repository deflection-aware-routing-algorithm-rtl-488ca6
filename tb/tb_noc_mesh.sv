// tb_noc_mesh: end-to-end test of the full 8x8 mesh at its default
// parameters.
//  * Every core sends NPK packets of 1..5 flits to random destinations;
//    a scoreboard checks that each flit reaches the right core, in order and
//    with its data intact, and that every packet arrives.
//  * Link faults: on some cycles a header crossing a random link is hit by a
//    flipped destination bit (which DAR is meant to catch), a single flipped
//    payload bit or a flipped adjacent pair (which the two parity bits
//    catch). The header must be dropped and resent from the spare buffer.
//  * Buffer faults: bursts of 1..8 contiguous flipped bits are written into
//    random input buffers and must be corrected by the Hamming decoders.
//  * Cores stall their ejection port at random, so back-pressure spreads
//    through the network.
// Counts each mechanism (DAR detection, parity detection, dropped header,
// retransmission, Hamming correction, injection stall, ejection stall) and
// fails if one never happened. Traffic stops early after 100 failures.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int MX = 8, MY = 8, NN = MX * MY, W = 128, B = 8, ENC_W = 168;
  localparam int NPK = 10, MAXC = 20000;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   [NN-1:0]        inj_valid, inj_ready, ej_valid, ej_ready;
  ftype_e                 inj_ftype [NN], ej_ftype [NN];
  logic   [NN-1:0][W-1:0] inj_data, ej_data;
  logic                   link_inj_en, buf_inj_en, fi_arm;
  logic   [5:0]           link_inj_node, buf_inj_node;
  port_e                  link_inj_port, buf_inj_port;
  logic   [W-1:0]         link_inj_mask;
  logic   [ENC_W-1:0]     buf_inj_mask;
  logic   [NN-1:0]        ev_dar, ev_par, ev_drop, ev_retx, ev_unc;
  logic   [NN-1:0][5:0]   ev_corr;

  noc_mesh dut (
    .clk(clk), .rst(rst),
    .inj_valid(inj_valid), .inj_ftype(inj_ftype), .inj_data(inj_data), .inj_ready(inj_ready),
    .ej_valid(ej_valid), .ej_ftype(ej_ftype), .ej_data(ej_data), .ej_ready(ej_ready),
    .link_inj_en(link_inj_en), .link_inj_node(link_inj_node), .link_inj_port(link_inj_port),
    .link_inj_mask(link_inj_mask),
    .buf_inj_en(buf_inj_en), .buf_inj_node(buf_inj_node), .buf_inj_port(buf_inj_port),
    .buf_inj_mask(buf_inj_mask),
    .ev_dar(ev_dar), .ev_par(ev_par), .ev_drop(ev_drop), .ev_retx(ev_retx),
    .ev_corr(ev_corr), .ev_unc(ev_unc));

  // Hit a link only while it carries a header.
  always_comb
    link_inj_en = fi_arm && dut.r_out_valid[link_inj_node][link_inj_port] &&
                  is_head(dut.r_out_ftype[link_inj_node][link_inj_port]);

  initial begin : watchdog
    repeat (MAXC) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pdst [NN*NPK], plen [NN*NPK], pnext [NN*NPK];

  function automatic logic [W-1:0] flit_data(int id, int k);
    logic [W-1:0] d;
    d = {16'(id), 8'(k), 8'h5A, {3{32'(id * 40503 + k * 2654435)}}};
    if (k == 0)
      d[11:0] = {3'((id / NPK) / MX), 3'((id / NPK) % MX),
                 3'(pdst[id] / MX), 3'(pdst[id] % MX)};
    return d;
  endfunction

  typedef struct { int id; int k; } fl_t;
  fl_t q [NN][$];

  initial begin
    int cyc = 0, n_pkts = 0, id, k;
    int n_dar = 0, n_par = 0, n_drop = 0, n_retx = 0, n_corr = 0, n_unc = 0;
    int n_inj_stall = 0, n_ej_stall = 0, n_link_hits = 0, n_flits = 0;
    for (int n = 0; n < NN; n++)
      for (int i = 0; i < NPK; i++) begin
        id = n * NPK + i;
        pdst[id] = $urandom_range(0, NN - 1);
        plen[id] = (i == 0) ? 5 : $urandom_range(1, 5);
        pnext[id] = 0;
        for (int j = 0; j < plen[id]; j++) q[n].push_back('{id, j});
      end
    inj_valid = '0; ej_ready = '0; fi_arm = 0; buf_inj_en = 0;
    link_inj_node = '0; link_inj_port = P_EAST; link_inj_mask = '0;
    buf_inj_node = '0; buf_inj_port = P_LOCAL; buf_inj_mask = '0;
    for (int n = 0; n < NN; n++) begin inj_ftype[n] = F_BODY; inj_data[n] = '0; end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    while (n_pkts < NN * NPK && cyc < MAXC - 100 && failures < 100) begin
      @(posedge clk); #1;
      cyc++;
      for (int n = 0; n < NN; n++) begin
        if (q[n].size() > 0) begin
          fl_t f;
          f = q[n][0];
          inj_valid[n] = 1;
          inj_data[n]  = flit_data(f.id, f.k);
          inj_ftype[n] = (plen[f.id] == 1) ? F_HEADTAIL : (f.k == 0) ? F_HEAD :
                         (f.k == plen[f.id] - 1) ? F_TAIL : F_BODY;
        end else inj_valid[n] = 0;
        ej_ready[n] = ($urandom_range(0, 7) != 0);
      end
      // a link fault on a random link that carries a header in this cycle
      #1;
      begin
        int cand [$];
        for (int n = 0; n < NN; n++)
          for (int p = 1; p < 5; p++)
            if (dut.r_out_valid[n][p] && dut.r_out_ready[n][p] && is_head(dut.r_out_ftype[n][p]))
              cand.push_back(n * 8 + p);
        fi_arm = (cand.size() > 0) && ($urandom_range(0, 1) == 0);
        if (cand.size() > 0) begin
          int c;
          c = cand[$urandom_range(0, cand.size() - 1)];
          link_inj_node = 6'(c / 8);
          link_inj_port = port_e'(c % 8);
        end
      end
      case ($urandom_range(0, 3))
        0, 1: link_inj_mask = W'(1) << $urandom_range(0, 2 * COORD_W - 1);   // destination bit
        2: link_inj_mask = W'(1) << $urandom_range(12, W - 1);            // payload bit
        default: link_inj_mask = W'(3) << $urandom_range(0, W - 2);       // adjacent pair
      endcase
      // a buffer upset
      buf_inj_en   = ($urandom_range(0, 1) == 0);
      buf_inj_node = 6'($urandom_range(0, NN - 1));
      buf_inj_port = port_e'($urandom_range(0, 4));
      begin
        int len, pos;
        len = $urandom_range(1, B);
        pos = $urandom_range(0, ENC_W - B);
        buf_inj_mask = '0;
        for (int i = 0; i < len; i++) buf_inj_mask[pos + i] = 1'b1;
      end
      #3;
      if (link_inj_en) n_link_hits++;
      for (int n = 0; n < NN; n++) begin
        if (inj_valid[n] && inj_ready[n]) void'(q[n].pop_front());
        if (inj_valid[n] && !inj_ready[n]) n_inj_stall++;
        if (ej_valid[n] && !ej_ready[n]) n_ej_stall++;
        if (ej_valid[n] && ej_ready[n]) begin
          id = int'(ej_data[n][127:112]);
          k  = int'(ej_data[n][111:104]);
          checks++;
          n_flits++;
          if (id >= NN * NPK || pdst[id] != n || k != pnext[id] ||
              ej_data[n] !== flit_data(id, k)) begin
            failures++;
            if (failures < 10) $display("FAIL node %0d got id=%0d k=%0d cycle %0d", n, id, k, cyc);
          end else begin
            pnext[id]++;
            if (pnext[id] == plen[id]) n_pkts++;
          end
        end
        n_dar  += int'(ev_dar[n]);
        n_par  += int'(ev_par[n]);
        n_drop += int'(ev_drop[n]);
        n_retx += int'(ev_retx[n]);
        n_corr += int'(ev_corr[n]);
        n_unc  += int'(ev_unc[n]);
      end
    end
    $display("packets %0d/%0d flits %0d cycles %0d", n_pkts, NN * NPK, n_flits, cyc);
    $display("link hits %0d: DAR %0d parity %0d dropped %0d resent %0d",
             n_link_hits, n_dar, n_par, n_drop, n_retx);
    $display("corrected groups %0d uncorrectable %0d, injection stalls %0d, ejection stalls %0d",
             n_corr, n_unc, n_inj_stall, n_ej_stall);
    checks++; if (n_pkts != NN * NPK) failures++;
    checks++; if (n_dar == 0) failures++;
    checks++; if (n_par == 0) failures++;
    checks++; if (n_drop == 0) failures++;
    checks++; if (n_retx == 0) failures++;
    checks++; if (n_corr == 0) failures++;
    checks++; if (n_unc != 0) failures++;
    checks++; if (n_inj_stall == 0) failures++;
    checks++; if (n_ej_stall == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
