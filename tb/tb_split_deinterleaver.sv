// tb_split_deinterleaver: a walking one at buffer position j*B+g must come
// back as bit j of codeword g, and random words must be restored bit for
// bit.
module tb_split_deinterleaver;
  localparam int B = 8, CW = 21, W = B * CW;
  logic [W-1:0] in, out;
  int checks = 0, failures = 0;

  split_deinterleaver #(.B(B), .CW(CW)) dut (.in(in), .out(out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < B; g++)
      for (int j = 0; j < CW; j++) begin
        in = W'(1) << (j*B + g);
        #1;
        checks++;
        if (out !== (W'(1) << (g*CW + j))) failures++;
      end
    for (int t = 0; t < 100; t++) begin
      for (int k = 0; k < W; k++) in[k] = 1'($urandom);
      #1;
      for (int g = 0; g < B; g++)
        for (int j = 0; j < CW; j++) begin
          checks++;
          if (out[g*CW + j] !== in[j*B + g]) failures++;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
