// tb_siso_array: checks the parallel window array with P = 4 windows of
// W = 8 steps over NROUND frames. Bit pairs are encoded by the reference
// encoder; soft inputs, a priori input and start metrics vary per window.
// Every LLR of every window is compared with the integer reference model,
// and the shared output order and the 2*W latency are checked. Noiseless
// windows without a priori input must decode without error, and
// increase-metric saturation, full caches and the max* correction must
// occur (extrinsic saturation is counted only).
module tb_siso_array;
  import ctc_pkg::*;
  import tb_model_pkg::*;

  localparam int P      = 4;
  localparam int W      = 8;
  localparam int NROUND = 8;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic start = 1'b0;
  sm_t  alpha_init [P][NST];
  sm_t  beta_init  [P][NST];
  logic [$clog2(W)-1:0] fwd_idx, bwd_idx, out_idx;
  sym_in_t mem [P][W];
  sym_in_t fwd_sym [P];
  sym_in_t bwd_sym [P];
  logic busy, done, smc_full, out_valid;
  logic [P-1:0] inc_sat;
  ext_t out_ex  [P][3];
  apo_t out_apo [P][3];

  always_comb
    for (int p = 0; p < P; p++) begin
      fwd_sym[p] = mem[p][fwd_idx];
      bwd_sym[p] = mem[p][bwd_idx];
    end

  siso_array #(.P(P), .W(W)) dut (
    .clk, .rst, .start, .alpha_init, .beta_init,
    .fwd_idx, .fwd_sym, .bwd_idx, .bwd_sym,
    .busy, .done, .smc_full, .inc_sat, .out_valid, .out_idx, .out_ex, .out_apo
  );

  int checks = 0, failures = 0;
  int cnt_inc_sat = 0, cnt_full = 0, cnt_corr = 0, cnt_exsat = 0;
  int cnt_apr = 0, cnt_known = 0, cnt_windows = 0, cnt_errfree = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int sat6(int v);
    if (v > 31) return 31;
    if (v < -32) return -32;
    return v;
  endfunction

  function automatic int clip8(int v);
    if (v > 127) return 127;
    if (v < -128) return -128;
    return v;
  endfunction

  function automatic int rnd(int lo, int hi);
    return lo + int'($urandom_range(hi - lo));
  endfunction

  // watchdog
  initial begin
    repeat (NROUND * (P * (W + 3) + 2 * W + 20) + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a[P][W], b[P][W];
    int exp_ex[P][W][3], exp_apo[P][W][3];
    int amp[P], noise[P];
    bit known[P], use_apr[P];
    for (int p = 0; p < P; p++)
      for (int s = 0; s < NST; s++) begin
        alpha_init[p][s] = '0;
        beta_init[p][s]  = '0;
      end
    repeat (3) @(posedge clk);
    rst = 1'b0;

    for (int round = 0; round < NROUND; round++) begin
      int t_last, nout, errs[P];
      bit order_ok;
      for (int p = 0; p < P; p++) begin
        int win, st0, st;
        msym_t ms[W];
        int al[NS], be[NS], is_seq[W][NS], incs[W];
        win = round * P + p;
        amp[p]     = (win % 4 == 3) ? 31 : rnd(4, 16);
        noise[p]   = (win % 5 == 0) ? 0 : rnd(0, 12);
        known[p]   = (win % 3 == 0);
        use_apr[p] = (win % 2 == 1);
        st0        = rnd(0, 7);

        // encode with the reference encoder
        st = st0;
        for (int k = 0; k < W; k++) begin
          int nst, y, w;
          a[p][k] = rnd(0, 1);
          b[p][k] = rnd(0, 1);
          enc(st, a[p][k], b[p][k], nst, y, w);
          st = nst;
          // channel LLRs, positive = bit 1
          ms[k].s1 = sat6((2 * a[p][k] - 1) * amp[p] + rnd(-noise[p], noise[p]));
          ms[k].s2 = sat6((2 * b[p][k] - 1) * amp[p] + rnd(-noise[p], noise[p]));
          ms[k].p1 = sat6((2 * y - 1) * amp[p] + rnd(-noise[p], noise[p]));
          ms[k].p2 = sat6((2 * w - 1) * amp[p] + rnd(-noise[p], noise[p]));
          ms[k].apr[0] = 0;
          if (use_apr[p] && win % 4 == 1) begin
            // a priori values that favour the transmitted symbol, as from a
            // later iteration
            int sc[4];
            for (int z = 0; z < 4; z++) sc[z] = (z == a[p][k] + 2 * b[p][k]) ? 100 : rnd(-30, 0);
            for (int z = 1; z < 4; z++) ms[k].apr[z] = clip8(sc[z] - sc[0]);
          end else begin
            for (int z = 1; z < 4; z++) ms[k].apr[z] = use_apr[p] ? rnd(-128, 127) : 0;
          end
          mem[p][k].s1 = llr_t'(ms[k].s1);
          mem[p][k].s2 = llr_t'(ms[k].s2);
          mem[p][k].p1 = llr_t'(ms[k].p1);
          mem[p][k].p2 = llr_t'(ms[k].p2);
          mem[p][k].apr1 = ext_t'(ms[k].apr[1]);
          mem[p][k].apr2 = ext_t'(ms[k].apr[2]);
          mem[p][k].apr3 = ext_t'(ms[k].apr[3]);
        end
        cnt_apr   += int'(use_apr[p]);
        cnt_known += int'(known[p]);

        // reference model of the window
        for (int s = 0; s < NS; s++) begin
          al[s] = known[p] ? ((s == st0) ? 0 : SM_FLOOR) : 0;
          be[s] = 0;
          alpha_init[p][s] = sm_t'(al[s]);
          beta_init[p][s]  = sm_t'(be[s]);
        end
        for (int k = 0; k < W; k++) begin
          bit sat;
          compress(al, is_seq[k], incs[k], sat);
          fwd_step(al, ms[k], cnt_corr);
        end
        for (int k = W - 1; k >= 0; k--) begin
          int ah[NS], lapo[3], lex[3], nsat;
          regen(is_seq[k], incs[k], ah);
          apo(ah, be, ms[k], lapo, cnt_corr);
          ext(lapo, ms[k], lex, nsat);
          cnt_exsat += nsat;
          exp_apo[p][k] = lapo;
          exp_ex[p][k]  = lex;
          bwd_step(be, ms[k], cnt_corr);
        end
      end

      // run all windows of the frame
      @(negedge clk);
      start = 1'b1;
      @(posedge clk);
      #1 start = 1'b0;
      nout = 0; order_ok = 1; t_last = 0;
      foreach (errs[p]) errs[p] = 0;
      for (int c = 1; c <= 2 * W + 4; c++) begin
        @(posedge clk);
        #1;
        if (inc_sat != '0) cnt_inc_sat++;
        if (smc_full) cnt_full++;
        if (out_valid) begin
          int k;
          k = int'(out_idx);
          if (k != W - 1 - nout) order_ok = 0;
          nout++;
          t_last = c;
          for (int p = 0; p < P; p++) begin
            int dec, best;
            for (int z = 0; z < 3; z++) begin
              check(int'(out_ex[p][z]) == exp_ex[p][k][z],
                    $sformatf("round %0d win %0d k %0d ex[%0d] %0d exp %0d", round, p, k, z,
                              out_ex[p][z], exp_ex[p][k][z]));
              check(int'(out_apo[p][z]) == exp_apo[p][k][z],
                    $sformatf("round %0d win %0d k %0d apo[%0d] %0d exp %0d", round, p, k, z,
                              out_apo[p][z], exp_apo[p][k][z]));
            end
            dec = 0; best = 0;
            for (int z = 0; z < 3; z++)
              if (int'(out_apo[p][z]) > best) begin best = int'(out_apo[p][z]); dec = z + 1; end
            if (dec != a[p][k] + 2 * b[p][k]) errs[p]++;
          end
        end
      end
      check(nout == W, $sformatf("round %0d: %0d outputs", round, nout));
      check(order_ok, $sformatf("round %0d: output order", round));
      check(t_last == 2 * W, $sformatf("round %0d: latency %0d, expected %0d", round, t_last, 2 * W));
      check(!busy, "idle after the frame");
      for (int p = 0; p < P; p++) begin
        cnt_windows++;
        if (noise[p] == 0 && !use_apr[p]) begin
          check(errs[p] == 0, $sformatf("round %0d win %0d: %0d symbol errors without noise",
                                        round, p, errs[p]));
          cnt_errfree += int'(errs[p] == 0);
        end
      end
    end

    $display("mechanisms: windows=%0d inc_sat_cycles=%0d smc_full_cycles=%0d maxstar_corrections=%0d ex_saturations=%0d apr_windows=%0d known_start_windows=%0d noiseless_errorfree=%0d",
             cnt_windows, cnt_inc_sat, cnt_full, cnt_corr, cnt_exsat, cnt_apr, cnt_known, cnt_errfree);
    check(cnt_inc_sat > 0, "increase-metric saturation never happened");
    check(cnt_full > 0, "SMC never full");
    check(cnt_corr > 0, "max* correction term never selected");
    check(cnt_apr > 0 && cnt_known > 0, "a priori / known start not exercised");
    check(cnt_errfree > 0, "no noiseless window decoded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
