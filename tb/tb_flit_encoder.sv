// tb_flit_encoder: for random 128-bit flits, the 168-bit stored word is
// undone here (bit j of group g read from position j*8+g); every group
// must be a valid (21,16) Hamming codeword (zero syndrome) whose data bits
// are the flit's bits [g*16 +: 16].
module tb_flit_encoder;
  localparam int FLIT_W = 128, B = 8, N = 16, CW = 21, ENC_W = B * CW;
  logic [FLIT_W-1:0] data;
  logic [ENC_W-1:0]  enc;
  int checks = 0, failures = 0;

  flit_encoder #(.FLIT_W(FLIT_W), .B(B)) dut (.data(data), .enc(enc));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [CW-1:0] cw;
    logic [N-1:0]  d;
    int s, k;
    for (int t = 0; t < 500; t++) begin
      data = {$urandom, $urandom, $urandom, $urandom};
      #1;
      for (int g = 0; g < B; g++) begin
        for (int j = 0; j < CW; j++) cw[j] = enc[j*B + g];
        s = 0;
        for (int p = 1; p <= CW; p++) if (cw[p-1]) s ^= p;
        k = 0;
        for (int p = 1; p <= CW; p++)
          if ((p & (p - 1)) != 0) begin d[k] = cw[p-1]; k++; end
        checks++;
        if (s != 0 || d !== data[g*N +: N]) begin
          failures++;
          if (failures < 5) $display("FAIL group %0d syndrome %0d", g, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
