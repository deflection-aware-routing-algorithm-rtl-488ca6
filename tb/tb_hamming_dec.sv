// tb_hamming_dec: (21,16) codewords built here are fed to the decoder
// clean (data out unchanged, no flag), with every single-bit error (data
// restored, `corrected`) and with random double errors (some flag raised).
module tb_hamming_dec;
  logic [20:0] code;
  logic [15:0] data;
  logic        corrected, uncorrectable;
  int checks = 0, failures = 0;

  hamming_dec #(.N(16)) dut (.code(code), .data(data),
                             .corrected(corrected), .uncorrectable(uncorrectable));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [20:0] encode(logic [15:0] d);
    logic [20:0] c = '0;
    int k = 0;
    for (int p = 1; p <= 21; p++)
      if ((p & (p - 1)) != 0) begin c[p-1] = d[k]; k++; end
    for (int b = 0; b < 5; b++) begin
      logic x = 0;
      for (int p = 1; p <= 21; p++) if (p[b]) x ^= c[p-1];
      c[(1 << b) - 1] = x;
    end
    return c;
  endfunction

  initial begin
    logic [15:0] d;
    logic [20:0] good;
    int a, b;
    for (int t = 0; t < 300; t++) begin
      d = 16'($urandom);
      good = encode(d);
      code = good;
      #1;
      checks++;
      if (data !== d || corrected || uncorrectable) failures++;
      for (int i = 0; i < 21; i++) begin
        code = good ^ (21'(1) << i);
        #1;
        checks++;
        if (data !== d || !corrected) begin
          failures++;
          if (failures < 5) $display("FAIL single error bit %0d: %h vs %h", i, data, d);
        end
      end
      a = $urandom_range(0, 20);
      b = (a + 1 + $urandom_range(0, 19)) % 21;
      code = good ^ (21'(1) << a) ^ (21'(1) << b);
      #1;
      checks++;
      if (!(corrected || uncorrectable)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
