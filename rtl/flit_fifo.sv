// flit_fifo: input buffer (queue) of a router port.
//
// A first-in first-out queue of DEPTH words of W bits, written with `push`
// and read from the head (`dout`, valid while `!empty`) with `pop`. Pushing
// and popping in the same cycle is allowed when the queue is neither full
// (for the push) nor empty (for the pop). Synchronous, active-high reset
// empties it. The default depth of one flit follows the source design's
// statement that a wormhole node buffers one flit; the word holds the
// encoded flit, as the source design stores data behind its encoder and
// interleaver.
module flit_fifo #(
  parameter int unsigned W     = 170,
  parameter int unsigned DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         push,
  input  logic [W-1:0] din,
  input  logic         pop,
  output logic [W-1:0] dout,
  output logic         empty,
  output logic         full
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [W-1:0]  mem [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic [CW-1:0] count;

  assign empty = (count == '0);
  assign full  = (count == CW'(DEPTH));
  assign dout  = mem[rd_ptr];

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + PW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (push && !full) begin
        mem[wr_ptr] <= din;
        wr_ptr      <= inc(wr_ptr);
      end
      if (pop && !empty) rd_ptr <= inc(rd_ptr);
      count <= count + CW'(push && !full) - CW'(pop && !empty);
    end
  end

  assert property (@(posedge clk) disable iff (rst) !(push && full))
    else $error("flit_fifo: push while full");
  assert property (@(posedge clk) disable iff (rst) !(pop && empty))
    else $error("flit_fifo: pop while empty");
endmodule
