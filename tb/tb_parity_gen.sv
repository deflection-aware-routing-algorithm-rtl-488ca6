// tb_parity_gen: random and corner data; the expected parity pair is the
// XOR-reduction of the data masked with 0101... (even bits) and 1010...
// (odd bits).
module tb_parity_gen;
  localparam int W = 128;
  logic [W-1:0] data;
  logic [1:0]   par;
  int checks = 0, failures = 0;

  parity_gen #(.W(W)) dut (.data(data), .par(par));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] even_mask;
    logic [1:0]   exp;
    even_mask = {(W/2){2'b01}};
    for (int t = 0; t < 500; t++) begin
      if (t == 0) data = '0;
      else if (t == 1) data = '1;
      else if (t < 2 + W) data = W'(1) << (t - 2);
      else data = {$urandom, $urandom, $urandom, $urandom};
      #1;
      exp = {^(data & ~even_mask), ^(data & even_mask)};
      checks++;
      if (par !== exp) begin
        failures++;
        $display("FAIL data=%h par=%b exp=%b", data, par, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
