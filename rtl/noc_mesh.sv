// noc_mesh: MESH_X x MESH_Y 2D-mesh network on chip protected against soft
// errors and crosstalk faults (top level).
//
// Node n = y*MESH_X + x holds one router at address (x, y); x grows towards
// EAST and y towards SOUTH. Neighbouring routers are joined by a pair of
// links, each carrying valid, flit type, FLIT_W data bits and two header
// parity bits forwards and ready plus the retransmission request backwards.
// Ports on the mesh edge are tied off. Every node's LOCAL port is brought
// out: the core injects packets through inj_* and receives them on ej_*
// (ready/valid; a flit moves when valid && ready).
//
// A packet is a header flit (type HEAD, or HEADTAIL for a one-flit
// packet) whose data bits [2:0]/[5:3] give the destination x/y and
// [8:6]/[11:9] the source x/y, followed by BODY flits and a TAIL flit.
//
// Fault injection, for test: while link_inj_en is high the data of the
// link leaving node link_inj_node through port link_inj_port is XORed with
// link_inj_mask; while buf_inj_en is high the encoded word written into
// input buffer buf_inj_port of node buf_inj_node is XORed with buf_inj_mask
// (ENC_W bits, the interleaved Hamming codewords).
// Event outputs report, per node and cycle, headers flagged by the
// deflection-aware routing check (ev_dar) and by parity (ev_par), headers
// dropped (ev_drop) and resent (ev_retx), and the number of Hamming groups
// corrected as flits left the input buffers (ev_corr).
//
// The 8x8 mesh, XY routing, wormhole switching, 128-bit flits, bursts of
// up to 8 upset bits and the 4-cycle retransmission interval follow the
// source design; the link signalling and fault-injection controls are this
// design's own.
module noc_mesh
  import noc_pkg::*;
#(
  parameter int unsigned MESH_X      = 8,
  parameter int unsigned MESH_Y      = 8,
  parameter int unsigned FLIT_W      = 128,
  parameter int unsigned B           = 8,
  parameter int unsigned BUF_DEPTH   = 1,
  parameter int unsigned SPARE_DEPTH = 4,
  localparam int unsigned NN     = MESH_X * MESH_Y,
  localparam int unsigned NODE_W = (NN > 1) ? $clog2(NN) : 1,
  localparam int unsigned ENC_W  = enc_width(FLIT_W, B),
  localparam int unsigned CORR_W = $clog2(NPORTS * n_groups(FLIT_W, B) + 1)
) (
  input  logic clk,
  input  logic rst,
  // local injection (core -> network)
  input  logic   [NN-1:0]             inj_valid,
  input  ftype_e                      inj_ftype [NN],
  input  logic   [NN-1:0][FLIT_W-1:0] inj_data,
  output logic   [NN-1:0]             inj_ready,
  // local ejection (network -> core)
  output logic   [NN-1:0]             ej_valid,
  output ftype_e                      ej_ftype [NN],
  output logic   [NN-1:0][FLIT_W-1:0] ej_data,
  input  logic   [NN-1:0]             ej_ready,
  // fault injection
  input  logic                        link_inj_en,
  input  logic   [NODE_W-1:0]         link_inj_node,
  input  port_e                       link_inj_port,
  input  logic   [FLIT_W-1:0]         link_inj_mask,
  input  logic                        buf_inj_en,
  input  logic   [NODE_W-1:0]         buf_inj_node,
  input  port_e                       buf_inj_port,
  input  logic   [ENC_W-1:0]          buf_inj_mask,
  // events
  output logic   [NN-1:0]             ev_dar,
  output logic   [NN-1:0]             ev_par,
  output logic   [NN-1:0]             ev_drop,
  output logic   [NN-1:0]             ev_retx,
  output logic   [NN-1:0][CORR_W-1:0] ev_corr,
  output logic   [NN-1:0]             ev_unc
);
  if (MESH_X > (1 << COORD_W) || MESH_Y > (1 << COORD_W)) begin : g_bad_size
    $error("noc_mesh: mesh larger than the header address fields");
  end

  // Router-side link bundles, indexed [node][port].
  logic   [NPORTS-1:0]             r_in_valid  [NN];
  ftype_e                          r_in_ftype  [NN][NPORTS];
  logic   [NPORTS-1:0][FLIT_W-1:0] r_in_data   [NN];
  logic   [NPORTS-1:0][1:0]        r_in_par    [NN];
  logic   [NPORTS-1:0]             r_in_ready  [NN];
  logic   [NPORTS-1:0]             r_retx_out  [NN];
  logic   [NPORTS-1:0]             r_out_valid [NN];
  ftype_e                          r_out_ftype [NN][NPORTS];
  logic   [NPORTS-1:0][FLIT_W-1:0] r_out_data  [NN];
  logic   [NPORTS-1:0][1:0]        r_out_par   [NN];
  logic   [NPORTS-1:0]             r_out_ready [NN];
  logic   [NPORTS-1:0]             r_retx_in   [NN];

  function automatic port_e opposite(port_e p);
    case (p)
      P_NORTH: return P_SOUTH;
      P_SOUTH: return P_NORTH;
      P_EAST:  return P_WEST;
      P_WEST:  return P_EAST;
      default: return P_LOCAL;
    endcase
  endfunction

  for (genvar y = 0; y < MESH_Y; y++) begin : g_y
    for (genvar x = 0; x < MESH_X; x++) begin : g_x
      localparam int unsigned n = y * MESH_X + x;
      logic [NPORTS-1:0] link_en, buf_en, dar, par, drop, retx, unc;

      always_comb begin
        link_en = '0;
        buf_en  = '0;
        if (link_inj_en && link_inj_node == NODE_W'(n)) link_en[link_inj_port] = 1'b1;
        if (buf_inj_en  && buf_inj_node  == NODE_W'(n)) buf_en[buf_inj_port]   = 1'b1;
      end

      router #(
        .FLIT_W(FLIT_W), .B(B), .BUF_DEPTH(BUF_DEPTH), .SPARE_DEPTH(SPARE_DEPTH)
      ) u_router (
        .clk(clk), .rst(rst),
        .own('{y: COORD_W'(y), x: COORD_W'(x)}),
        .in_valid(r_in_valid[n]), .in_ftype(r_in_ftype[n]), .in_data(r_in_data[n]),
        .in_par(r_in_par[n]), .in_ready(r_in_ready[n]), .retx_out(r_retx_out[n]),
        .out_valid(r_out_valid[n]), .out_ftype(r_out_ftype[n]),
        .out_data(r_out_data[n]), .out_par(r_out_par[n]),
        .out_ready(r_out_ready[n]), .retx_in(r_retx_in[n]),
        .link_inj_en(link_en), .link_inj_mask(link_inj_mask),
        .buf_inj_en(buf_en), .buf_inj_mask(buf_inj_mask),
        .ev_dar(dar), .ev_par(par), .ev_drop(drop), .ev_retx(retx),
        .ev_corr(ev_corr[n]), .ev_unc(unc)
      );
      assign ev_dar[n]  = |dar;
      assign ev_par[n]  = |par;
      assign ev_drop[n] = |drop;
      assign ev_retx[n] = |retx;
      assign ev_unc[n]  = |unc;

      // LOCAL port
      assign r_in_valid[n][P_LOCAL]  = inj_valid[n];
      assign r_in_ftype[n][P_LOCAL]  = inj_ftype[n];
      assign r_in_data[n][P_LOCAL]   = inj_data[n];
      assign r_in_par[n][P_LOCAL]    = 2'b00;
      assign inj_ready[n]            = r_in_ready[n][P_LOCAL];
      assign ej_valid[n]             = r_out_valid[n][P_LOCAL];
      assign ej_ftype[n]             = r_out_ftype[n][P_LOCAL];
      assign ej_data[n]              = r_out_data[n][P_LOCAL];
      assign r_out_ready[n][P_LOCAL] = ej_ready[n];
      assign r_retx_in[n][P_LOCAL]   = 1'b0;

      // Neighbour ports
      for (genvar p = 1; p < NPORTS; p++) begin : g_p
        localparam int nx = (p == P_EAST) ? x + 1 : (p == P_WEST) ? x - 1 : x;
        localparam int ny = (p == P_SOUTH) ? y + 1 : (p == P_NORTH) ? y - 1 : y;
        localparam port_e q = opposite(port_e'(p));
        if (nx >= 0 && nx < int'(MESH_X) && ny >= 0 && ny < int'(MESH_Y)) begin : g_link
          localparam int unsigned m = ny * MESH_X + nx;
          assign r_in_valid[n][p]  = r_out_valid[m][q];
          assign r_in_ftype[n][p]  = r_out_ftype[m][q];
          assign r_in_data[n][p]   = r_out_data[m][q];
          assign r_in_par[n][p]    = r_out_par[m][q];
          assign r_out_ready[n][p] = r_in_ready[m][q];
          assign r_retx_in[n][p]   = r_retx_out[m][q];
        end else begin : g_edge
          assign r_in_valid[n][p]  = 1'b0;
          assign r_in_ftype[n][p]  = F_BODY;
          assign r_in_data[n][p]   = '0;
          assign r_in_par[n][p]    = 2'b00;
          assign r_out_ready[n][p] = 1'b0;
          assign r_retx_in[n][p]   = 1'b0;
        end
      end
    end
  end
endmodule
