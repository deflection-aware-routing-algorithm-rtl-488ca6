// split_deinterleaver: inverse of split_interleaver.
//
// Walks the buffered word in the same row order as split_interleaver (bit j
// of codewords 0..B-1, then bit j of the residue codeword while it has
// one) and puts every bit back into its codeword, giving the B codewords
// side by side (codeword g in bits [g*CW +: CW]) followed by the residue
// codeword. Without a residue, bit j of codeword g is read from position
// j*B + g. Combinational wiring. Follows the source design; the
// permutation matches split_interleaver.
module split_deinterleaver #(
  parameter int unsigned B   = 8,
  parameter int unsigned CW  = 21,
  parameter int unsigned CWR = 0,
  localparam int unsigned W  = B * CW + CWR
) (
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);
  // Row j is preceded by j full rows of B bits and min(j, CWR) residue bits.
  for (genvar j = 0; j < CW; j++) begin : g_row
    localparam int unsigned BASE = j * B + ((j > CWR) ? CWR : j);
    for (genvar g = 0; g < B; g++) begin : g_bit
      assign out[g*CW + j] = in[BASE + g];
    end
  end
  for (genvar j = 0; j < CWR; j++) begin : g_res
    assign out[B*CW + j] = in[j*B + j + B];
  end
endmodule
