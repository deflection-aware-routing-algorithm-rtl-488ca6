// tb_split_interleaver: single-bit walking inputs must appear at position
// j*B+g for bit j of codeword g; random words are checked the same way,
// and the two bits of a codeword that are neighbours are shown to sit
// exactly B apart in the output.
module tb_split_interleaver;
  localparam int B = 8, CW = 21, W = B * CW;
  logic [W-1:0] in, out;
  int checks = 0, failures = 0;

  split_interleaver #(.B(B), .CW(CW)) dut (.in(in), .out(out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < B; g++)
      for (int j = 0; j < CW; j++) begin
        in = '0;
        in[g*CW + j] = 1'b1;
        #1;
        checks++;
        if (out !== (W'(1) << (j*B + g))) begin
          failures++;
          if (failures < 5) $display("FAIL g=%0d j=%0d", g, j);
        end
      end
    for (int t = 0; t < 100; t++) begin
      for (int k = 0; k < W; k++) in[k] = 1'($urandom);
      #1;
      for (int g = 0; g < B; g++)
        for (int j = 0; j < CW; j++) begin
          checks++;
          if (out[j*B + g] !== in[g*CW + j]) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
