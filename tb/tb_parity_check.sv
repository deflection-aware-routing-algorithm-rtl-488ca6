// tb_parity_check: sends correct words (no error expected), words with one
// flipped bit and with two adjacent flipped bits (error expected), and
// words with two flipped bits of equal index parity (not detectable,
// no error expected). Expected parity computed here.
module tb_parity_check;
  localparam int W = 128;
  logic [W-1:0] data;
  logic [1:0]   par;
  logic         error;
  int checks = 0, failures = 0;

  parity_check #(.W(W)) dut (.data(data), .par(par), .error(error));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic exp, string what);
    #1;
    checks++;
    if (error !== exp) begin
      failures++;
      $display("FAIL %s: error=%b", what, error);
    end
  endtask

  initial begin
    logic [W-1:0] good;
    int b;
    for (int t = 0; t < 300; t++) begin
      good = {$urandom, $urandom, $urandom, $urandom};
      par  = '0;
      for (int i = 0; i < W; i++) par[i % 2] ^= good[i];
      b = $urandom_range(0, W - 3);
      data = good;                              check(1'b0, "clean");
      data = good ^ (W'(1) << b);               check(1'b1, "single");
      data = good ^ (W'(3) << b);               check(1'b1, "adjacent pair");
      data = good ^ (W'(5) << b);               check(1'b0, "same-parity pair");
      data = good; par = par ^ 2'b10;           check(1'b1, "parity bit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
