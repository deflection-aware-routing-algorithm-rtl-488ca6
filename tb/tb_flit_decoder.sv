// tb_flit_decoder: 128-bit flits are encoded and interleaved here, then hit
// by a burst of 0..8 contiguous flipped bits at a random position of the
// 168-bit stored word. The decoder must return the original flit and
// report one corrected group per flipped bit. A burst of 9 bits must be
// reported as not cleanly corrected (wrong data or a flag).
// A second encoder/decoder pair with a 100-bit flit (eight 12-bit groups
// plus a 4-bit residue group, 143 stored bits) must round-trip random flits
// through bursts of 0..8 flipped bits in the same way.
module tb_flit_decoder;
  localparam int FLIT_W = 128, B = 8, N = 16, CW = 21, ENC_W = B * CW;
  logic [ENC_W-1:0]  enc;
  logic [FLIT_W-1:0] data;
  logic [3:0]        n_corrected;
  logic              uncorrectable;
  int checks = 0, failures = 0;

  flit_decoder #(.FLIT_W(FLIT_W), .B(B)) dut (
    .enc(enc), .data(data), .n_corrected(n_corrected), .uncorrectable(uncorrectable));

  localparam int RF_W = 100, RENC_W = 8 * 17 + 7;
  logic [RF_W-1:0]   r_in, r_out;
  logic [RENC_W-1:0] r_enc;
  logic [RENC_W-1:0] r_mask;
  logic [3:0]        r_ncorr;
  logic              r_unc;

  flit_encoder #(.FLIT_W(RF_W), .B(B)) u_renc (.data(r_in), .enc(r_enc));
  flit_decoder #(.FLIT_W(RF_W), .B(B)) u_rdec (
    .enc(r_enc ^ r_mask), .data(r_out), .n_corrected(r_ncorr), .uncorrectable(r_unc));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ENC_W-1:0] protect(logic [FLIT_W-1:0] f);
    logic [ENC_W-1:0] w = '0;
    for (int g = 0; g < B; g++) begin
      logic [CW-1:0] c = '0;
      int k = 0;
      for (int p = 1; p <= CW; p++)
        if ((p & (p - 1)) != 0) begin c[p-1] = f[g*N + k]; k++; end
      for (int b = 0; b < 5; b++) begin
        logic x = 0;
        for (int p = 1; p <= CW; p++) if (p[b]) x ^= c[p-1];
        c[(1 << b) - 1] = x;
      end
      for (int j = 0; j < CW; j++) w[j*B + g] = c[j];
    end
    return w;
  endfunction

  initial begin
    logic [FLIT_W-1:0] f;
    logic [ENC_W-1:0]  mask;
    int len, pos, not_clean = 0, nine = 0;
    for (int t = 0; t < 2000; t++) begin
      f   = {$urandom, $urandom, $urandom, $urandom};
      len = (t < 1800) ? t % 9 : 9;
      pos = $urandom_range(0, ENC_W - len);
      mask = '0;
      for (int i = 0; i < len; i++) mask[pos + i] = 1'b1;
      enc = protect(f) ^ mask;
      #1;
      if (len <= B) begin
        checks += 2;
        if (data !== f) begin
          failures++;
          if (failures < 5) $display("FAIL burst %0d at %0d", len, pos);
        end
        if (32'(n_corrected) != len || uncorrectable) failures++;
      end else begin
        nine++;
        if (data !== f || uncorrectable || 32'(n_corrected) != 9) not_clean++;
      end
    end
    // a 9-bit burst puts two errors into one group: it can never decode to
    // nine clean single corrections
    checks++;
    if (not_clean != nine) failures++;
    // residue-group configuration
    for (int t = 0; t < 1800; t++) begin
      r_in = {$urandom, $urandom, $urandom, $urandom};
      len  = t % 9;
      pos  = $urandom_range(0, RENC_W - len);
      r_mask = '0;
      for (int i = 0; i < len; i++) r_mask[pos + i] = 1'b1;
      #1;
      checks += 2;
      if (r_out !== r_in) begin
        failures++;
        if (failures < 5) $display("FAIL residue burst %0d at %0d", len, pos);
      end
      if (32'(r_ncorr) != len || r_unc) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
