// err_ctrl_unit: receiver-side error control unit (routing check and parity
// check) of one router input port.
//
// Every header flit accepted from the link is checked in the cycle it
// arrives: dar_unit re-runs the routing as if at the transmitter and
// parity_check compares the two parity bits. A header that fails either
// check is dropped (not written into the input buffer) and a retransmission
// request is sent back to the transmitter. The request travels through a
// SPARE_DEPTH-stage register pipeline, so it reaches the transmitter exactly
// when the dropped header reaches the end of the transmitter's
// SPARE_DEPTH-stage spare buffer (see spare_buffer). Meanwhile the port
// holds `in_ready` low, so no flit of the packet overtakes its header, and
// raises it again in the one cycle in which the retransmitted copy arrives.
// The copy is checked like any header and may be rejected again.
//
// Link handshake: a flit moves when in_valid && in_ready. `accept` is the
// write strobe of the input buffer. in_ready depends only on registered
// state and fifo_full. Body and tail flits are not checked here; their
// protection is the Hamming code of the buffer.
//
// What follows the source design: both checks, dropping the header,
// the retransmission signal, the four-cycle interval. This design's own:
// the exact pipeline placement and the stall of the link during the wait.
module err_ctrl_unit
  import noc_pkg::*;
#(
  parameter int unsigned W           = 128,  // flit data width
  parameter int unsigned SPARE_DEPTH = 4     // retransmission interval, cycles
) (
  input  logic         clk,
  input  logic         rst,
  input  addr_t        own,        // this node's address
  input  port_e        in_port,    // which port this unit guards
  input  logic         in_valid,
  input  ftype_e       in_ftype,
  input  logic [W-1:0] in_data,
  input  logic [1:0]   in_par,
  input  logic         fifo_full,
  output logic         in_ready,
  output logic         accept,     // write the flit into the input buffer
  output logic         retx,       // retransmission request to transmitter
  output logic         ev_dar,     // pulse: DAR detected a faulty header
  output logic         ev_par,     // pulse: parity detected a faulty header
  output logic         ev_drop     // pulse: a header was dropped
);
  localparam int unsigned CNT_W = $clog2(SPARE_DEPTH + 1);

  addr_t            tx_addr;
  logic             deflect, perr, xfer, hdr, fault;
  logic [CNT_W-1:0] wait_cnt;
  logic [SPARE_DEPTH-1:0] req_pipe;

  dar_unit u_dar (
    .own(own), .in_port(in_port), .dest(hdr_dest(in_data[2*COORD_W-1:0])),
    .tx_addr(tx_addr), .deflect(deflect)
  );
  parity_check #(.W(W)) u_par (.data(in_data), .par(in_par), .error(perr));

  assign in_ready = (wait_cnt == '0) ? !fifo_full : (wait_cnt == CNT_W'(1));
  assign xfer     = in_valid && in_ready;
  assign hdr      = is_head(in_ftype);
  assign fault    = xfer && hdr && (deflect || perr);
  assign accept   = xfer && !fault;
  assign ev_dar   = xfer && hdr && deflect;
  assign ev_par   = xfer && hdr && perr;
  assign ev_drop  = fault;
  assign retx     = req_pipe[SPARE_DEPTH-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      wait_cnt <= '0;
      req_pipe <= '0;
    end else begin
      req_pipe <= {req_pipe[SPARE_DEPTH-2:0], fault};
      if (fault)                wait_cnt <= CNT_W'(SPARE_DEPTH);
      else if (wait_cnt != '0)  wait_cnt <= wait_cnt - CNT_W'(1);
    end
  end

  // The copy must arrive in the cycle the port reopens for it.
  assert property (@(posedge clk) disable iff (rst)
    (wait_cnt == CNT_W'(1)) |-> (in_valid && hdr && !fifo_full))
    else $error("err_ctrl_unit: retransmitted header missing");
endmodule
