// parity_gen: two-bit interleaved parity of a header flit.
//
// par[0] is the XOR of the even-numbered data bits and par[1] the XOR of the
// odd-numbered ones, so any single error and any two adjacent errors flip at
// least one of them. Combinational. The scheme follows the source design;
// which bit holds which parity is this design's own choice.
module parity_gen #(
  parameter int unsigned W = 128  // flit data width
) (
  input  logic [W-1:0] data,
  output logic [1:0]   par
);
  always_comb begin
    par = '0;
    for (int unsigned i = 0; i < W; i++) par[i % 2] ^= data[i];
  end
endmodule
