// tb_spare_buffer: headers loaded into the barrel shifter must show up at
// its end exactly DEPTH cycles later and then disappear; a header resent
// with `retx` must be rotated back and appear again DEPTH cycles after
// that. Expectations come from a cycle-indexed record of what was loaded.
module tb_spare_buffer;
  localparam int W = 132, D = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         load, retx, dvalid;
  logic [W-1:0] din, dout;

  spare_buffer #(.W(W), .DEPTH(D)) dut (.clk(clk), .rst(rst), .load(load), .din(din),
                                         .retx(retx), .dout(dout), .dvalid(dvalid));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exp_v/exp_d[c]: what must be at the end of the shifter in cycle c
  logic         exp_v [0:3000];
  logic [W-1:0] exp_d [0:3000];

  initial begin
    int n_retx = 0;
    for (int c = 0; c <= 3000; c++) begin exp_v[c] = 0; exp_d[c] = '0; end
    load = 0; retx = 0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 2000; c++) begin
      // compare what the end holds in this cycle
      checks++;
      if (dvalid !== exp_v[c] || (exp_v[c] && dout !== exp_d[c])) begin
        failures++;
        if (failures < 5) $display("FAIL cycle %0d: valid %b exp %b", c, dvalid, exp_v[c]);
      end
      retx = exp_v[c] && ($urandom_range(0, 2) == 0);
      load = !retx && ($urandom_range(0, 2) == 0);
      for (int k = 0; k < W; k++) din[k] = 1'($urandom);
      if (retx) begin
        exp_v[c + D] = 1; exp_d[c + D] = exp_d[c]; n_retx++;
      end else if (load) begin
        exp_v[c + D] = 1; exp_d[c + D] = din;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (n_retx == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
