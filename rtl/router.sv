// router: five-port wormhole router of the fault-tolerant mesh.
//
// Ports 0..4 are LOCAL, NORTH, EAST, SOUTH, WEST (noc_pkg::port_e). Each
// input port has
//   * an error control unit (err_ctrl_unit, not on LOCAL) that checks every
//     header arriving from a neighbour with the deflection-aware routing
//     check and the two-bit parity, drops a faulty one and asks the
//     neighbour to resend it,
//   * a flit encoder (Hamming per group + split interleaver), the input
//     buffer (flit_fifo) and a flit decoder at the buffer head, so upsets of
//     up to B contiguous stored bits are corrected,
//   * XY routing of the header at the buffer head; body and tail flits
//     follow the route stored when their header left (wormhole).
// Each output is allocated to one input from header to tail; a free output
// is given to competing headers in round-robin order. Outputs towards
// neighbours go through an output_unit (parity, spare buffer,
// retransmission multiplexer); the LOCAL output goes straight to the core.
//
// Timing: a flit at the head of a buffer crosses the crossbar and the link
// and is written into the neighbour's buffer in one cycle; routing, the
// header checks and the Hamming codec are combinational in that cycle
// (the "merged" arrangement). A faulty header costs SPARE_DEPTH cycles on
// that link until its copy is resent.
//
// Fault injection, for test: `link_inj_en[o]` XORs `link_inj_mask` onto
// the data of output o's link (a crosstalk or output-buffer fault seen by
// the next router), `buf_inj_en[i]` XORs `buf_inj_mask` onto the encoded
// word written into input buffer i (a soft error in the buffer).
//
// Follows the source design: XY routing, wormhole switching, the header
// checks and retransmission, the data protection around the buffer. This
// design's own: the one-cycle router pipeline, the ready/valid link, the
// round-robin switch allocator and the fault-injection inputs.
module router
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_W      = 128,  // flit data width
  parameter int unsigned B           = 8,    // longest upset burst covered
  parameter int unsigned BUF_DEPTH   = 1,    // input buffer depth, flits
  parameter int unsigned SPARE_DEPTH = 4,    // retransmission interval
  localparam int unsigned NG     = n_groups(FLIT_W, B),
  localparam int unsigned ENC_W  = enc_width(FLIT_W, B),
  localparam int unsigned CORR_W = $clog2(NPORTS * NG + 1)
) (
  input  logic clk,
  input  logic rst,
  input  addr_t own,
  // input links
  input  logic  [NPORTS-1:0]             in_valid,
  input  ftype_e                         in_ftype [NPORTS],
  input  logic  [NPORTS-1:0][FLIT_W-1:0] in_data,
  input  logic  [NPORTS-1:0][1:0]        in_par,
  output logic  [NPORTS-1:0]             in_ready,
  output logic  [NPORTS-1:0]             retx_out,
  // output links
  output logic  [NPORTS-1:0]             out_valid,
  output ftype_e                         out_ftype [NPORTS],
  output logic  [NPORTS-1:0][FLIT_W-1:0] out_data,
  output logic  [NPORTS-1:0][1:0]        out_par,
  input  logic  [NPORTS-1:0]             out_ready,
  input  logic  [NPORTS-1:0]             retx_in,
  // fault injection
  input  logic  [NPORTS-1:0]             link_inj_en,
  input  logic  [FLIT_W-1:0]             link_inj_mask,
  input  logic  [NPORTS-1:0]             buf_inj_en,
  input  logic  [ENC_W-1:0]              buf_inj_mask,
  // events, one bit per port and cycle
  output logic  [NPORTS-1:0]             ev_dar,    // DAR flagged a header
  output logic  [NPORTS-1:0]             ev_par,    // parity flagged a header
  output logic  [NPORTS-1:0]             ev_drop,   // header dropped
  output logic  [NPORTS-1:0]             ev_retx,   // header resent
  output logic  [CORR_W-1:0]             ev_corr,   // groups corrected
  output logic  [NPORTS-1:0]             ev_unc     // uncorrectable word
);
  localparam int unsigned FW = 2 + ENC_W;  // buffer word {ftype, encoded}
  localparam int unsigned DC_W = $clog2(NG + 1);

  // ---------------------------------------------------------------- inputs
  logic   [NPORTS-1:0]             accept, empty, full, pop;
  logic   [NPORTS-1:0][FW-1:0]     fifo_out;
  ftype_e                          h_ftype [NPORTS];
  logic   [NPORTS-1:0][FLIT_W-1:0] h_data;
  logic   [NPORTS-1:0][DC_W-1:0]   h_ncorr;
  port_e                           h_route [NPORTS];
  port_e                           req_port [NPORTS];
  port_e                           route_q [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_in
    logic [ENC_W-1:0] enc;
    logic             unc;

    if (p == P_LOCAL) begin : g_local
      assign in_ready[p] = !full[p];
      assign accept[p]   = in_valid[p] && !full[p];
      assign retx_out[p] = 1'b0;
      assign ev_dar[p]   = 1'b0;
      assign ev_par[p]   = 1'b0;
      assign ev_drop[p]  = 1'b0;
    end else begin : g_ecu
      err_ctrl_unit #(.W(FLIT_W), .SPARE_DEPTH(SPARE_DEPTH)) u_ecu (
        .clk(clk), .rst(rst), .own(own), .in_port(port_e'(p)),
        .in_valid(in_valid[p]), .in_ftype(in_ftype[p]), .in_data(in_data[p]),
        .in_par(in_par[p]), .fifo_full(full[p]),
        .in_ready(in_ready[p]), .accept(accept[p]), .retx(retx_out[p]),
        .ev_dar(ev_dar[p]), .ev_par(ev_par[p]), .ev_drop(ev_drop[p])
      );
    end

    flit_encoder #(.FLIT_W(FLIT_W), .B(B)) u_enc (.data(in_data[p]), .enc(enc));

    flit_fifo #(.W(FW), .DEPTH(BUF_DEPTH)) u_buf (
      .clk(clk), .rst(rst),
      .push(accept[p]),
      .din({in_ftype[p], enc ^ (buf_inj_en[p] ? buf_inj_mask : '0)}),
      .pop(pop[p]), .dout(fifo_out[p]), .empty(empty[p]), .full(full[p])
    );

    flit_decoder #(.FLIT_W(FLIT_W), .B(B)) u_dec (
      .enc(fifo_out[p][ENC_W-1:0]), .data(h_data[p]),
      .n_corrected(h_ncorr[p]), .uncorrectable(unc)
    );
    assign h_ftype[p] = ftype_e'(fifo_out[p][FW-1 -: 2]);
    assign ev_unc[p]  = pop[p] && unc;

    xy_route u_rt (.cur(own), .dest(hdr_dest(h_data[p][2*COORD_W-1:0])),
                   .port_o(h_route[p]));
    assign req_port[p] = is_head(h_ftype[p]) ? h_route[p] : route_q[p];

    always_ff @(posedge clk) begin
      if (rst) route_q[p] <= P_LOCAL;
      else if (pop[p] && is_head(h_ftype[p])) route_q[p] <= h_route[p];
    end
  end

  // ------------------------------------------------------ switch allocation
  logic [NPORTS-1:0]        locked;
  port_e                    owner  [NPORTS];
  logic [NPORTS-1:0][2:0]   rr_ptr;
  logic [NPORTS-1:0][NPORTS-1:0] req, gnt;
  logic [NPORTS-1:0]        xb_valid, xb_ready;
  port_e                    xb_sel [NPORTS];

  // Round-robin pick: first requester at or after `ptr`.
  function automatic logic [NPORTS-1:0] rr_pick(logic [NPORTS-1:0] r,
                                                logic [2:0] ptr);
    logic [NPORTS-1:0] g;
    int unsigned idx;
    g = '0;
    for (int unsigned k = 0; k < NPORTS; k++) begin
      idx = (32'(ptr) + k) % NPORTS;
      if (r[idx] && (g == '0)) g[idx] = 1'b1;
    end
    return g;
  endfunction

  always_comb begin
    for (int unsigned o = 0; o < NPORTS; o++) begin
      for (int unsigned i = 0; i < NPORTS; i++) begin
        req[o][i] = !empty[i] && (req_port[i] == port_e'(o)) &&
                    (locked[o] ? (owner[o] == port_e'(i)) : is_head(h_ftype[i]));
      end
      gnt[o] = rr_pick(req[o], rr_ptr[o]);
      xb_valid[o] = |gnt[o];
      xb_sel[o]   = P_LOCAL;
      for (int unsigned i = 0; i < NPORTS; i++)
        if (gnt[o][i]) xb_sel[o] = port_e'(i);
    end
    for (int unsigned i = 0; i < NPORTS; i++) begin
      pop[i] = 1'b0;
      for (int unsigned o = 0; o < NPORTS; o++)
        if (gnt[o][i] && xb_ready[o]) pop[i] = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      locked <= '0;
      rr_ptr <= '0;
      for (int unsigned o = 0; o < NPORTS; o++) owner[o] <= P_LOCAL;
    end else begin
      for (int unsigned o = 0; o < NPORTS; o++) begin
        if (xb_valid[o] && xb_ready[o]) begin
          if (is_tail(h_ftype[xb_sel[o]])) begin
            locked[o] <= 1'b0;
          end else if (is_head(h_ftype[xb_sel[o]])) begin
            locked[o] <= 1'b1;
            owner[o]  <= xb_sel[o];
          end
          if (is_head(h_ftype[xb_sel[o]]))
            rr_ptr[o] <= 3'((32'(xb_sel[o]) + 1) % NPORTS);
        end
      end
    end
  end

  // --------------------------------------------------------------- outputs
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    if (o == P_LOCAL) begin : g_local
      assign out_valid[o] = xb_valid[o];
      assign out_ftype[o] = h_ftype[xb_sel[o]];
      assign out_data[o]  = h_data[xb_sel[o]];
      assign out_par[o]   = 2'b00;
      assign xb_ready[o]  = out_ready[o];
      assign ev_retx[o]   = 1'b0;
    end else begin : g_nbr
      logic [FLIT_W-1:0] ldata;
      output_unit #(.W(FLIT_W), .SPARE_DEPTH(SPARE_DEPTH)) u_out (
        .clk(clk), .rst(rst),
        .xb_valid(xb_valid[o]), .xb_ftype(h_ftype[xb_sel[o]]),
        .xb_data(h_data[xb_sel[o]]), .xb_ready(xb_ready[o]),
        .link_valid(out_valid[o]), .link_ftype(out_ftype[o]),
        .link_data(ldata), .link_par(out_par[o]),
        .link_ready(out_ready[o]), .retx_in(retx_in[o]), .ev_retx(ev_retx[o])
      );
      assign out_data[o] = ldata ^ (link_inj_en[o] ? link_inj_mask : '0);
    end
  end

  always_comb begin
    ev_corr = '0;
    for (int unsigned i = 0; i < NPORTS; i++)
      if (pop[i]) ev_corr += CORR_W'(h_ncorr[i]);
  end
endmodule
