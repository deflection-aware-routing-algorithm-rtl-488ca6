// output_unit: transmitter side of one router output towards a neighbour.
//
// The flit granted by the switch allocator (xb_*) gets its two parity bits
// (parity_gen) and goes onto the link. A header that leaves is also copied
// into the spare buffer. When the receiver's retransmission request
// (`retx_in`) arrives, the output multiplexer puts the stored copy on the
// link instead and `xb_ready` is held low for that cycle, so the crossbar
// sends nothing. Link handshake: a flit moves when link_valid && link_ready;
// the receiver guarantees link_ready in the retransmission cycle.
// Combinational from crossbar to link; only the spare buffer holds state.
// The parity generator, spare buffer and multiplexer follow the source
// design; computing parity for every flit type, of which only
// headers are checked, is this design's simplification.
module output_unit
  import noc_pkg::*;
#(
  parameter int unsigned W           = 128,
  parameter int unsigned SPARE_DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst,
  // from the crossbar
  input  logic         xb_valid,
  input  ftype_e       xb_ftype,
  input  logic [W-1:0] xb_data,
  output logic         xb_ready,
  // link to the neighbour
  output logic         link_valid,
  output ftype_e       link_ftype,
  output logic [W-1:0] link_data,
  output logic [1:0]   link_par,
  input  logic         link_ready,
  input  logic         retx_in,
  output logic         ev_retx      // pulse: a header was retransmitted
);
  localparam int unsigned SW = W + 2 + 2;  // {ftype, par, data}

  logic [1:0]    par;
  logic          load, sp_valid;
  logic [SW-1:0] sp_out;

  parity_gen #(.W(W)) u_pg (.data(xb_data), .par(par));

  assign xb_ready = link_ready && !retx_in;
  assign load     = xb_valid && xb_ready && is_head(xb_ftype);

  spare_buffer #(.W(SW), .DEPTH(SPARE_DEPTH)) u_spare (
    .clk(clk), .rst(rst), .load(load), .din({xb_ftype, par, xb_data}),
    .retx(retx_in), .dout(sp_out), .dvalid(sp_valid)
  );

  always_comb begin
    if (retx_in) begin
      link_valid = sp_valid;
      link_ftype = ftype_e'(sp_out[SW-1 -: 2]);
      link_par   = sp_out[W +: 2];
      link_data  = sp_out[W-1:0];
    end else begin
      link_valid = xb_valid;
      link_ftype = xb_ftype;
      link_par   = par;
      link_data  = xb_data;
    end
  end

  assign ev_retx = retx_in;

  assert property (@(posedge clk) disable iff (rst) retx_in |-> link_ready)
    else $error("output_unit: receiver not ready for retransmission");
endmodule
