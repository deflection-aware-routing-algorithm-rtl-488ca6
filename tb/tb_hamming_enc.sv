// tb_hamming_enc: for the (21,16) code used with 128-bit flits and for the
// (7,4) code, checks that every data bit lands at its non-power-of-two
// position and that the XOR of the indices of all set bits (the syndrome)
// of the produced codeword is zero.
module tb_hamming_enc;
  logic [15:0] d16;
  logic [20:0] c21;
  logic [3:0]  d4;
  logic [6:0]  c7;
  int checks = 0, failures = 0;

  hamming_enc #(.N(16)) dut16 (.data(d16), .code(c21));
  hamming_enc #(.N(4))  dut4  (.data(d4),  .code(c7));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int syndrome(logic [31:0] c, int cw);
    int s = 0;
    for (int p = 1; p <= cw; p++) if (c[p-1]) s ^= p;
    return s;
  endfunction

  function automatic logic [31:0] extract(logic [31:0] c, int cw);
    logic [31:0] d = '0;
    int k = 0;
    for (int p = 1; p <= cw; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16) begin
        d[k] = c[p-1];
        k++;
      end
    return d;
  endfunction

  initial begin
    for (int t = 0; t < 2000; t++) begin
      d16 = 16'($urandom);
      d4  = 4'(t);
      #1;
      checks += 4;
      if (syndrome(32'(c21), 21) != 0) failures++;
      if (extract(32'(c21), 21) != 32'(d16)) failures++;
      if (syndrome(32'(c7), 7) != 0) failures++;
      if (extract(32'(c7), 7) != 32'(d4)) failures++;
    end
    // known (7,4) word: data 1011 -> p1=d1^d2^d4, p2=d1^d3^d4, p4=d2^d3^d4
    d4 = 4'b1011;
    #1;
    checks++;
    if (c7 !== 7'b1010101) begin
      failures++;
      $display("FAIL (7,4) of 1011 = %b", c7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
