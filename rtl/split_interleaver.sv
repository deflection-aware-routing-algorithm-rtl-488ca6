// split_interleaver: split (distance) interleaving of the Hamming codewords
// of one flit.
//
// The input holds B codewords of CW bits side by side (codeword g in bits
// [g*CW +: CW]) and, when CWR > 0, a shorter residue codeword of CWR bits
// after them (bits [B*CW +: CWR]). The output is filled in order, one
// "row" at a time: for j = 0, 1, ... it takes bit j of codeword 0, 1, ...,
// B-1 and then bit j of the residue codeword if it has one. Without a
// residue codeword, bit j of codeword g lands at position j*B + g. Two bits
// of the same codeword are therefore at least B positions apart. A burst of
// at most B contiguous upsets in the buffer then touches each codeword at
// most once, and its Hamming decoder corrects it. Requires CWR <= CW.
// Combinational wiring (generate loops). The spacing of B bits follows the source design
// (bursts of up to eight bits); the exact permutation is this design's own.
module split_interleaver #(
  parameter int unsigned B   = 8,   // number of full groups (= longest burst)
  parameter int unsigned CW  = 21,  // bits per full codeword
  parameter int unsigned CWR = 0,   // bits of the residue codeword, 0 if none
  localparam int unsigned W  = B * CW + CWR
) (
  input  logic [W-1:0] in,
  output logic [W-1:0] out
);
  if (CWR > CW) begin : g_bad_residue
    $error("split_interleaver: residue codeword longer than a full one");
  end

  // Row j is preceded by j full rows of B bits and min(j, CWR) residue bits.
  for (genvar j = 0; j < CW; j++) begin : g_row
    localparam int unsigned BASE = j * B + ((j > CWR) ? CWR : j);
    for (genvar g = 0; g < B; g++) begin : g_bit
      assign out[BASE + g] = in[g*CW + j];
    end
  end
  for (genvar j = 0; j < CWR; j++) begin : g_res
    assign out[j*B + j + B] = in[B*CW + j];
  end
endmodule
