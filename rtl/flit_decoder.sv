// flit_decoder: recovery of a flit read from a buffer.
//
// De-interleaves the ENC_W-bit buffered word into its Hamming codewords
// (B full groups and, when B does not divide FLIT_W, one residue group; see
// flit_encoder) and decodes each, correcting one error per group. The
// interleaver spaces the bits of a group at least B positions apart, so any
// burst of up to B contiguous upsets is corrected. `n_corrected` counts the
// groups that were corrected, and `uncorrectable` flags a group whose
// syndrome points outside its codeword. Combinational. Follows the source
// design (in that order: de-interleaver, then Hamming decoder).
module flit_decoder
  import noc_pkg::*;
#(
  parameter int unsigned FLIT_W = 128,
  parameter int unsigned B      = 8,
  localparam int unsigned N     = FLIT_W / B,
  localparam int unsigned NR    = FLIT_W % B,
  localparam int unsigned CW    = N + ham_r(N),
  localparam int unsigned CWR   = (NR > 0) ? NR + ham_r(NR) : 0,
  localparam int unsigned ENC_W = B * CW + CWR,
  localparam int unsigned NG    = (NR > 0) ? B + 1 : B
) (
  input  logic [ENC_W-1:0]          enc,
  output logic [FLIT_W-1:0]         data,
  output logic [$clog2(NG+1)-1:0]   n_corrected,
  output logic                      uncorrectable
);
  logic [ENC_W-1:0] codes;
  logic [NG-1:0]    corr, unc;

  split_deinterleaver #(.B(B), .CW(CW), .CWR(CWR)) u_dil (.in(enc), .out(codes));

  for (genvar g = 0; g < B; g++) begin : g_grp
    hamming_dec #(.N(N)) u_dec (
      .code(codes[g*CW +: CW]), .data(data[g*N +: N]),
      .corrected(corr[g]), .uncorrectable(unc[g])
    );
  end

  if (NR > 0) begin : g_res
    hamming_dec #(.N(NR)) u_dec (
      .code(codes[B*CW +: CWR]), .data(data[B*N +: NR]),
      .corrected(corr[B]), .uncorrectable(unc[B])
    );
  end

  always_comb begin
    n_corrected = '0;
    for (int unsigned g = 0; g < NG; g++)
      n_corrected += ($clog2(NG+1))'(corr[g]);
  end
  assign uncorrectable = |unc;
endmodule
