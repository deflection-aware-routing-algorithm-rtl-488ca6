// parity_check: parity comparator of the header check.
//
// Regenerates the two interleaved parity bits of the received header data
// (see parity_gen) and compares them with the two parity bits that travelled
// with it. `error` is high on any mismatch. Combinational. Follows the
// source design.
module parity_check #(
  parameter int unsigned W = 128  // flit data width
) (
  input  logic [W-1:0] data,
  input  logic [1:0]   par,
  output logic         error
);
  logic [1:0] calc;
  parity_gen #(.W(W)) u_gen (.data(data), .par(calc));
  assign error = |(calc ^ par);
endmodule
