// spare_buffer: retransmission buffer of a router output (transmitter side).
//
// A barrel shifter (circular shift register) of DEPTH stages, each holding a
// W-bit flit and a valid bit. Every cycle all stages shift by one. A header
// sent on the link is loaded into stage 0 (`load`), so it appears at the
// last stage (`dout`, `dvalid`) DEPTH cycles later, exactly when a
// retransmission request for it can arrive. On `retx` the last stage is
// both handed to the output multiplexer and rotated back into stage 0, so
// the copy stays available in case the resent header is hit again; without
// `retx` the last stage simply falls out. The input multiplexer in front of
// stage 0 picks the new header or the rotated copy.
// Structure, depth of four and re-buffering follow the source design;
// dropping unrequested headers at the end is this design's reading.
module spare_buffer #(
  parameter int unsigned W     = 132,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,   // a header was sent this cycle
  input  logic [W-1:0] din,
  input  logic         retx,   // retransmission request for the last stage
  output logic [W-1:0] dout,
  output logic         dvalid
);
  logic [W-1:0]     stage [DEPTH];
  logic [DEPTH-1:0] vld;

  assign dout   = stage[DEPTH-1];
  assign dvalid = vld[DEPTH-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      vld <= '0;
    end else begin
      vld[0] <= retx ? vld[DEPTH-1] : load;
      for (int unsigned k = 1; k < DEPTH; k++) vld[k] <= vld[k-1];
    end
  end

  always_ff @(posedge clk) begin
    stage[0] <= retx ? stage[DEPTH-1] : din;
    for (int unsigned k = 1; k < DEPTH; k++) stage[k] <= stage[k-1];
  end

  assert property (@(posedge clk) disable iff (rst) !(retx && load))
    else $error("spare_buffer: new header while retransmitting");
  assert property (@(posedge clk) disable iff (rst) retx |-> dvalid)
    else $error("spare_buffer: retransmission request but no stored header");
endmodule
