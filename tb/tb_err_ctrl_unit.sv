// tb_err_ctrl_unit: receiver (3,3), guarding its WEST port (transmitter
// (2,3)). Sends a correct header and a body flit (accepted), a header with
// a deflecting destination (dropped, DAR event, link held SPARE_DEPTH-1
// cycles, retransmission request exactly SPARE_DEPTH cycles later, copy
// accepted), a header with a payload bit flipped (parity event only,
// dropped, and its copy dropped again) and checks back-pressure from a
// full buffer.
module tb_err_ctrl_unit;
  import noc_pkg::*;
  localparam int W = 128, D = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         in_valid, fifo_full, in_ready, accept, retx, ev_dar, ev_par, ev_drop;
  ftype_e       in_ftype;
  logic [W-1:0] in_data;
  logic [1:0]   in_par;
  addr_t        own = '{y: 3'd3, x: 3'd3};

  err_ctrl_unit #(.W(W), .SPARE_DEPTH(D)) dut (
    .clk(clk), .rst(rst), .own(own), .in_port(P_WEST), .in_valid(in_valid),
    .in_ftype(in_ftype), .in_data(in_data), .in_par(in_par), .fifo_full(fifo_full),
    .in_ready(in_ready), .accept(accept), .retx(retx),
    .ev_dar(ev_dar), .ev_par(ev_par), .ev_drop(ev_drop));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] par2(logic [W-1:0] d);
    logic [1:0] p = '0;
    for (int i = 0; i < W; i++) p[i % 2] ^= d[i];
    return p;
  endfunction

  function automatic logic [W-1:0] header(int dx, int dy);
    return {96'hABCD_0123_4567_89AB_CDEF_0011, 20'h0, 3'd3, 3'd2, 3'(dy), 3'(dx)};
  endfunction

  task automatic expect_out(logic rdy, logic acc, logic rtx, logic dar, logic par,
                            string what);
    checks++;
    if (in_ready !== rdy || accept !== acc || retx !== rtx || ev_dar !== dar ||
        ev_par !== par || ev_drop !== (dar | par)) begin
      failures++;
      $display("FAIL %s: ready=%b accept=%b retx=%b dar=%b par=%b", what,
               in_ready, accept, retx, ev_dar, ev_par);
    end
  endtask

  task automatic drive(logic v, ftype_e t, logic [W-1:0] d, logic [1:0] p);
    in_valid = v; in_ftype = t; in_data = d; in_par = p;
  endtask

  initial begin
    logic [W-1:0] good, bad_dest, bad_bit;
    good     = header(5, 3);                    // path (2,3)->(3,3): correct
    bad_dest = good ^ 128'h4;                   // x 5 -> 1: deflects WEST
    bad_bit  = good ^ (128'h1 << 40);           // payload bit, DAR blind
    fifo_full = 0;
    drive(0, F_BODY, '0, 2'b00);
    repeat (2) @(posedge clk);
    #1 rst = 0;

    drive(1, F_HEAD, good, par2(good));         #1 expect_out(1, 1, 0, 0, 0, "good header");
    @(posedge clk); #1;
    drive(1, F_BODY, 128'h5, 2'b00);            #1 expect_out(1, 1, 0, 0, 0, "body");
    @(posedge clk); #1;

    // deflecting header
    drive(1, F_HEAD, bad_dest, par2(bad_dest)); #1 expect_out(1, 0, 0, 1, 0, "DAR fault");
    for (int c = 1; c < D; c++) begin
      @(posedge clk); #1;
      drive(1, F_BODY, 128'h6, 2'b00);          #1 expect_out(0, 0, 0, 0, 0, "waiting");
    end
    @(posedge clk); #1;
    drive(1, F_HEAD, good, par2(good));         #1 expect_out(1, 1, 1, 0, 0, "resend cycle");
    @(posedge clk); #1;
    drive(0, F_BODY, '0, 2'b00);                #1 expect_out(1, 0, 0, 0, 0, "idle");
    @(posedge clk); #1;

    // parity-only fault, resent copy hit again
    drive(1, F_HEAD, bad_bit, par2(good));      #1 expect_out(1, 0, 0, 0, 1, "parity fault");
    for (int c = 1; c < D; c++) begin
      @(posedge clk); #1;
      drive(0, F_BODY, '0, 2'b00);              #1 expect_out(0, 0, 0, 0, 0, "waiting 2");
    end
    @(posedge clk); #1;
    drive(1, F_HEAD, bad_bit, par2(good));      #1 expect_out(1, 0, 1, 0, 1, "copy faulty");
    for (int c = 1; c < D; c++) begin
      @(posedge clk); #1;
      drive(0, F_BODY, '0, 2'b00);              #1 expect_out(0, 0, 0, 0, 0, "waiting 3");
    end
    @(posedge clk); #1;
    drive(1, F_HEAD, good, par2(good));         #1 expect_out(1, 1, 1, 0, 0, "second copy");
    @(posedge clk); #1;

    // back-pressure
    fifo_full = 1;
    drive(1, F_BODY, 128'h7, 2'b00);            #1 expect_out(0, 0, 0, 0, 0, "full");
    @(posedge clk); #1;
    fifo_full = 0;                              #1 expect_out(1, 1, 0, 0, 0, "drained");
    @(posedge clk); #1;
    drive(0, F_BODY, '0, 2'b00);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
