// tb_frame_workload: one constituent-decoder pass over a frame of the size
// used in the decoder's error-rate evaluation: 800 information bits = 400
// bit pairs, cut into 20 independent windows of W = 20 steps. The bit pairs
// are encoded continuously by the reference encoder (rate 1/2 per
// constituent code: A, B, Y, W), sent as BPSK through an AWGN channel at
// Eb/N0 = EBN0_DB and turned into 6-bit LLRs with two fractional bits. The
// whole frame is decoded at once by the 20 parallel windows of dbctc_top at
// its default parameters, with all-zero boundary metrics and no a priori
// input, as in a first half-iteration; the last result must appear 2*W = 40
// cycles after start. Every LLR is compared with the reference model, and
// the bit errors of the decoded hard decisions must be fewer than those of
// the raw systematic channel values. The interleaver and the second constituent decoder are
// not part of this test, so the turbo iterations are not run.
module tb_frame_workload;
  import ctc_pkg::*;
  import tb_model_pkg::*;

  localparam int  W       = W_DEF;
  localparam int  NWIN    = 20;
  localparam int  NSYM    = W * NWIN;
  localparam real EBN0_DB = 3.0;
  localparam real RATE    = 0.5;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic start = 1'b0;
  sm_t  alpha_init [NWIN][NST];
  sm_t  beta_init  [NWIN][NST];
  logic [$clog2(W)-1:0] fwd_idx, bwd_idx, out_idx;
  sym_in_t mem [NWIN][W];
  sym_in_t fwd_sym [NWIN];
  sym_in_t bwd_sym [NWIN];
  logic busy, done, smc_full, out_valid;
  logic [NWIN-1:0] inc_sat;
  logic enc_y, enc_w;
  idx_t enc_state;
  ext_t out_ex  [NWIN][3];
  apo_t out_apo [NWIN][3];

  always_comb
    for (int p = 0; p < NWIN; p++) begin
      fwd_sym[p] = mem[p][fwd_idx];
      bwd_sym[p] = mem[p][bwd_idx];
    end

  dbctc_top dut (
    .clk, .rst, .enc_load(1'b0), .enc_load_state(3'd0), .enc_en(1'b0), .enc_a(1'b0),
    .enc_b(1'b0), .enc_y, .enc_w, .enc_state, .start, .alpha_init, .beta_init,
    .fwd_idx, .fwd_sym, .bwd_idx, .bwd_sym,
    .busy, .done, .smc_full, .inc_sat, .out_valid, .out_idx, .out_ex, .out_apo
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  // standard normal sample (Box-Muller)
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(32'hFFFF_FFFE)) + 1.0) / 4294967296.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  // channel LLR 2y/sigma^2 in quarter steps, clipped to 6 bits
  function automatic int quant(real llr);
    int q;
    q = int'($floor(llr * 4.0 + 0.5));
    if (q > 31) q = 31;
    if (q < -32) q = -32;
    return q;
  endfunction

  initial begin
    repeat (4 * W + 500) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a[NSYM], b[NSYM];
    msym_t ms[NSYM];
    real sigma;
    int st, raw_err, dec_err, dummy, nout, t_last;
    int exp_ex[NSYM][3], exp_apo[NSYM][3];
    dummy = 0;
    sigma = $sqrt(1.0 / (2.0 * RATE * $pow(10.0, EBN0_DB / 10.0)));
    st = 0;
    raw_err = 0;
    for (int k = 0; k < NSYM; k++) begin
      int nst, y, w;
      real v[4];
      a[k] = int'($urandom_range(1));
      b[k] = int'($urandom_range(1));
      enc(st, a[k], b[k], nst, y, w);
      st = nst;
      v[0] = real'(2 * a[k] - 1) + sigma * gauss();
      v[1] = real'(2 * b[k] - 1) + sigma * gauss();
      v[2] = real'(2 * y - 1) + sigma * gauss();
      v[3] = real'(2 * w - 1) + sigma * gauss();
      ms[k].s1 = quant(2.0 * v[0] / (sigma * sigma));
      ms[k].s2 = quant(2.0 * v[1] / (sigma * sigma));
      ms[k].p1 = quant(2.0 * v[2] / (sigma * sigma));
      ms[k].p2 = quant(2.0 * v[3] / (sigma * sigma));
      ms[k].apr = '{0, 0, 0, 0};
      raw_err += int'((ms[k].s1 > 0) != (a[k] == 1)) + int'((ms[k].s2 > 0) != (b[k] == 1));
    end
    for (int p = 0; p < NWIN; p++)
      for (int s = 0; s < NST; s++) begin
        alpha_init[p][s] = '0;
        beta_init[p][s]  = '0;
      end
    for (int k = 0; k < NSYM; k++) begin
      mem[k / W][k % W].s1 = llr_t'(ms[k].s1);
      mem[k / W][k % W].s2 = llr_t'(ms[k].s2);
      mem[k / W][k % W].p1 = llr_t'(ms[k].p1);
      mem[k / W][k % W].p2 = llr_t'(ms[k].p2);
      mem[k / W][k % W].apr1 = '0;
      mem[k / W][k % W].apr2 = '0;
      mem[k / W][k % W].apr3 = '0;
    end
    repeat (3) @(posedge clk);
    rst = 1'b0;

    // reference model, window by window
    for (int win = 0; win < NWIN; win++) begin
      int al[NS], be[NS], is_seq[W][NS], incs[W];
      int base;
      base = win * W;
      for (int s = 0; s < NS; s++) begin al[s] = 0; be[s] = 0; end
      for (int k = 0; k < W; k++) begin
        bit sat;
        compress(al, is_seq[k], incs[k], sat);
        fwd_step(al, ms[base + k], dummy);
      end
      for (int k = W - 1; k >= 0; k--) begin
        int ah[NS], lapo[3], lex[3], nsat;
        regen(is_seq[k], incs[k], ah);
        apo(ah, be, ms[base + k], lapo, dummy);
        ext(lapo, ms[base + k], lex, nsat);
        exp_apo[base + k] = lapo;
        exp_ex[base + k]  = lex;
        bwd_step(be, ms[base + k], dummy);
      end
    end

    // decode the whole frame at once
    dec_err = 0;
    @(negedge clk);
    start = 1'b1;
    @(posedge clk);
    #1 start = 1'b0;
    nout = 0;
    t_last = 0;
    for (int c = 1; c <= 2 * W + 4; c++) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        int k;
        k = int'(out_idx);
        nout++;
        t_last = c;
        for (int win = 0; win < NWIN; win++) begin
          int dec, best, g;
          g = win * W + k;
          for (int z = 0; z < 3; z++) begin
            check(int'(out_ex[win][z]) == exp_ex[g][z], $sformatf("win %0d k %0d ex[%0d]", win, k, z));
            check(int'(out_apo[win][z]) == exp_apo[g][z], $sformatf("win %0d k %0d apo[%0d]", win, k, z));
          end
          dec = 0; best = 0;
          for (int z = 0; z < 3; z++)
            if (int'(out_apo[win][z]) > best) begin best = int'(out_apo[win][z]); dec = z + 1; end
          dec_err += int'((dec & 1) != a[g]) + int'((dec >> 1) != b[g]);
        end
      end
    end
    check(nout == W, "number of output steps");
    check(t_last == 2 * W, $sformatf("frame latency %0d cycles, expected %0d", t_last, 2 * W));
    $display("frame of %0d bits at Eb/N0 = %.1f dB: %0d raw bit errors, %0d after one SISO pass",
             2 * NSYM, EBN0_DB, raw_err, dec_err);
    check(dec_err < raw_err, "decoding did not reduce the bit errors");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
