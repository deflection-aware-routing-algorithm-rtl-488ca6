// hamming_dec: Hamming (N+R, N) decoder with single-error correction.
//
// The syndrome is the XOR of the indices (1..N+R) of all set codeword bits;
// it is zero for a clean word and equals the position of a single flipped
// bit otherwise, which is inverted before the data bits are extracted.
// `corrected` flags a non-zero syndrome that pointed inside the codeword;
// `uncorrectable` flags a syndrome outside it (a multi-bit error). Layout as
// in hamming_enc. Combinational. Follows the source design's use of a
// simple Hamming decoder per group.
module hamming_dec
  import noc_pkg::*;
#(
  parameter int unsigned N  = 16,
  localparam int unsigned R  = ham_r(N),
  localparam int unsigned CW = N + R
) (
  input  logic [CW-1:0] code,
  output logic [N-1:0]  data,
  output logic          corrected,
  output logic          uncorrectable
);
  always_comb begin
    logic [R-1:0]  syn;
    logic [CW-1:0] fixed;
    int unsigned   d;
    syn = '0;
    for (int unsigned pos = 1; pos <= CW; pos++)
      if (code[pos-1]) syn ^= R'(pos);
    fixed         = code;
    corrected     = 1'b0;
    uncorrectable = 1'b0;
    if (syn != '0) begin
      if (32'(syn) <= CW) begin
        fixed[syn-1] = ~code[syn-1];
        corrected    = 1'b1;
      end else begin
        uncorrectable = 1'b1;
      end
    end
    data = '0;
    d    = 0;
    for (int unsigned pos = 1; pos <= CW; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        data[d] = fixed[pos-1];
        d++;
      end
    end
  end
endmodule
