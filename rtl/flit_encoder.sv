// flit_encoder: protection of a flit before it is written into a buffer.
//
// The FLIT_W data bits are split into B groups of N = FLIT_W/B contiguous
// bits (group g = data[g*N +: N]). When B does not divide FLIT_W, the top
// NR = FLIT_W mod B bits form one extra, shorter residue group. Each group
// is Hamming-encoded (N + R bits, R the smallest value with
// 2^R - R - 1 >= N) and the codewords are split-interleaved. The stored
// word is ENC_W bits: 168 for a 128-bit flit and B = 8 (eight (21,16)
// codewords). Combinational.
// The group length, the residue group and the code size follow the source
// design. Reading the residue as an extra group (B + 1 codecs in all) is
// this design's choice where the source's wording is ambiguous. Requires
// NR <= N.
module flit_encoder
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_W = 128,
  parameter int unsigned B      = 8,
  localparam int unsigned N     = FLIT_W / B,
  localparam int unsigned NR    = FLIT_W % B,
  localparam int unsigned CW    = N + ham_r(N),
  localparam int unsigned CWR   = (NR > 0) ? NR + ham_r(NR) : 0,
  localparam int unsigned ENC_W = B * CW + CWR
) (
  input  logic [FLIT_W-1:0] data,
  output logic [ENC_W-1:0]  enc
);
  if (NR > N) begin : g_bad_width
    $error("flit_encoder: FLIT_W too small for B groups");
  end

  logic [ENC_W-1:0] codes;

  for (genvar g = 0; g < B; g++) begin : g_grp
    hamming_enc #(.N(N)) u_enc (.data(data[g*N +: N]), .code(codes[g*CW +: CW]));
  end

  if (NR > 0) begin : g_res
    hamming_enc #(.N(NR)) u_enc (.data(data[B*N +: NR]), .code(codes[B*CW +: CWR]));
  end

  split_interleaver #(.B(B), .CW(CW), .CWR(CWR)) u_il (.in(codes), .out(enc));
endmodule
