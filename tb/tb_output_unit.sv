// tb_output_unit: random flits from the crossbar must reach the link with
// their two parity bits computed here. The test plays the receiver: it
// requests a retransmission SPARE_DEPTH cycles after some headers were
// sent, and then the link must carry that header again (with its parity),
// the crossbar must be held off and the retransmission event must fire.
module tb_output_unit;
  import noc_pkg::*;
  localparam int W = 128, D = 4;
  logic clk = 0, rst = 1;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         xb_valid, xb_ready, link_valid, link_ready, retx_in, ev_retx;
  ftype_e       xb_ftype, link_ftype;
  logic [W-1:0] xb_data, link_data;
  logic [1:0]   link_par;

  output_unit #(.W(W), .SPARE_DEPTH(D)) dut (
    .clk(clk), .rst(rst), .xb_valid(xb_valid), .xb_ftype(xb_ftype), .xb_data(xb_data),
    .xb_ready(xb_ready), .link_valid(link_valid), .link_ftype(link_ftype),
    .link_data(link_data), .link_par(link_par), .link_ready(link_ready),
    .retx_in(retx_in), .ev_retx(ev_retx));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] par2(logic [W-1:0] d);
    logic [1:0] p = '0;
    for (int i = 0; i < W; i++) p[i % 2] ^= d[i];
    return p;
  endfunction

  logic         sent_hdr [0:3000];
  logic [W-1:0] sent_d   [0:3000];
  ftype_e       sent_t   [0:3000];

  initial begin
    int n_retx = 0, hold = 0;
    for (int c = 0; c <= 3000; c++) sent_hdr[c] = 0;
    xb_valid = 0; xb_ftype = F_BODY; xb_data = '0; link_ready = 1; retx_in = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 2000; c++) begin
      // receiver: ask for some headers again D cycles after they left
      retx_in = (c >= D) && sent_hdr[c - D] && ($urandom_range(0, 1) == 1);
      link_ready = retx_in ? 1'b1 : (hold > 0 ? 1'b0 : ($urandom_range(0, 3) != 0));
      xb_valid = ($urandom_range(0, 3) != 0);
      xb_ftype = ftype_e'($urandom_range(0, 3));
      xb_data  = {$urandom, $urandom, $urandom, $urandom};
      #1;
      checks++;
      if (retx_in) begin
        n_retx++;
        if (!link_valid || link_data !== sent_d[c - D] || link_ftype !== sent_t[c - D] ||
            link_par !== par2(sent_d[c - D]) || xb_ready || !ev_retx) begin
          failures++;
          $display("FAIL retransmission in cycle %0d", c);
        end
        sent_hdr[c] = 1; sent_d[c] = sent_d[c - D]; sent_t[c] = sent_t[c - D];
        hold = D - 1;
      end else begin
        if (link_valid !== xb_valid || link_data !== xb_data || link_ftype !== xb_ftype ||
            link_par !== par2(xb_data) || xb_ready !== link_ready || ev_retx) begin
          failures++;
          $display("FAIL transmission in cycle %0d", c);
        end
        if (xb_valid && link_ready && is_head(xb_ftype)) begin
          sent_hdr[c] = 1; sent_d[c] = xb_data; sent_t[c] = xb_ftype;
        end
        if (hold > 0) hold--;
      end
      @(posedge clk); #1;
    end
    checks++;
    if (n_retx == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
