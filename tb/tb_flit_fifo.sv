// tb_flit_fifo: random pushes and pops (never a push when full nor a pop
// when empty) against a queue model, for the default depth of one and for
// a depth of four; also checks the full/empty flags each cycle.
module tb_flit_fifo;
  localparam int W = 170;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         push1, pop1, empty1, full1, push4, pop4, empty4, full4;
  logic [W-1:0] din1, dout1, din4, dout4;

  flit_fifo #(.W(W))             dut1 (.clk(clk), .rst(rst), .push(push1), .din(din1),
                                      .pop(pop1), .dout(dout1), .empty(empty1), .full(full1));
  flit_fifo #(.W(W), .DEPTH(4))  dut4 (.clk(clk), .rst(rst), .push(push4), .din(din4),
                                      .pop(pop4), .dout(dout4), .empty(empty4), .full(full4));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W-1:0] q1[$], q4[$];

  function automatic logic [W-1:0] rnd();
    logic [W-1:0] v;
    for (int k = 0; k < W; k++) v[k] = 1'($urandom);
    return v;
  endfunction

  initial begin
    push1 = 0; pop1 = 0; push4 = 0; pop4 = 0; din1 = '0; din4 = '0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int t = 0; t < 3000; t++) begin
      // flags against the model
      checks += 4;
      if (empty1 !== (q1.size() == 0) || full1 !== (q1.size() == 1)) failures++;
      if (empty4 !== (q4.size() == 0) || full4 !== (q4.size() == 4)) failures++;
      if (q1.size() > 0 && dout1 !== q1[0]) failures++;
      if (q4.size() > 0 && dout4 !== q4[0]) failures++;
      push1 = !full1 && ($urandom_range(0, 1) == 1);
      pop1  = !empty1 && ($urandom_range(0, 2) != 0);
      push4 = !full4 && ($urandom_range(0, 1) == 1);
      pop4  = !empty4 && ($urandom_range(0, 2) == 0);
      din1  = rnd();
      din4  = rnd();
      @(posedge clk);
      if (pop1) void'(q1.pop_front());
      if (push1) q1.push_back(din1);
      if (pop4) void'(q4.pop_front());
      if (push4) q4.push_back(din4);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
