// hamming_enc: Hamming (N+R, N) single-error-correcting encoder.
//
// Codeword positions are numbered 1..N+R; check bits sit at the powers of
// two and data bits fill the other positions in ascending order. Check bit
// 2^k is the XOR of every position whose index has bit k set. code[p-1]
// holds position p. R is the smallest value with 2^R - R - 1 >= N, which for
// the 16-bit groups of a 128-bit flit gives the (21,16) code. Combinational.
// The code parameters follow the source design; the bit placement is the
// textbook Hamming layout chosen here.
module hamming_enc
  import noc_pkg::*;
#(
  parameter int unsigned N  = 16,         // data bits per group
  localparam int unsigned R  = ham_r(N),  // check bits
  localparam int unsigned CW = N + R      // codeword bits
) (
  input  logic [N-1:0]  data,
  output logic [CW-1:0] code
);
  always_comb begin
    int unsigned d;
    logic p;
    code = '0;
    d    = 0;
    for (int unsigned pos = 1; pos <= CW; pos++) begin
      if ((pos & (pos - 1)) != 0) begin
        code[pos-1] = data[d];
        d++;
      end
    end
    for (int unsigned k = 0; k < R; k++) begin
      p = 1'b0;
      for (int unsigned pos = 1; pos <= CW; pos++)
        if (((pos >> k) & 1) == 1) p ^= code[pos-1];
      code[(1 << k) - 1] = p;
    end
  end
endmodule
