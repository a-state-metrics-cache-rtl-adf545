// tb_siso_window: checks one SISO decoding window with a short window
// (W = 8) over NWIN windows of random bit pairs encoded by the reference
// encoder: every extrinsic and a posteriori LLR against the integer
// reference model, output order W..1, the 2*W cycle latency, error-free hard
// decisions for noiseless windows, and that increase-metric saturation, a
// full SMC and the max* correction all occur (extrinsic saturation is
// counted; the end-to-end test requires it).
module tb_siso_window;
  import ctc_pkg::*;
  import tb_model_pkg::*;

  localparam int W    = 8;
  localparam int NWIN = 24;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic start = 1'b0;
  sm_t  alpha_init [NST];
  sm_t  beta_init  [NST];
  logic [$clog2(W)-1:0] fwd_idx, bwd_idx, out_idx;
  sym_in_t mem [W];
  logic busy, done, smc_full, inc_sat, out_valid;
  ext_t out_ex  [3];
  apo_t out_apo [3];

  siso_window #(.W(W)) dut (
    .clk, .rst, .start, .alpha_init, .beta_init,
    .fwd_idx, .fwd_sym(mem[fwd_idx]), .bwd_idx, .bwd_sym(mem[bwd_idx]),
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
    repeat (NWIN * (4 * W + 20) + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a[W], b[W];
    msym_t ms[W];
    int al[NS], be[NS];
    int is_seq[W][NS], incs[W];
    int exp_ex[W][3], exp_apo[W][3];
    foreach (alpha_init[i]) alpha_init[i] = '0;
    foreach (beta_init[i])  beta_init[i]  = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;

    for (int win = 0; win < NWIN; win++) begin
      int amp, noise, st0, st;
      bit known, use_apr;
      int t_start, t_last, nout, errs;
      bit order_ok;
      amp     = (win % 4 == 3) ? 31 : rnd(4, 16);
      noise   = (win < 4) ? 0 : rnd(0, 12);
      known   = (win % 3 == 0);
      use_apr = (win % 2 == 1);
      st0     = rnd(0, 7);

      // encode with the reference encoder
      st = st0;
      for (int k = 0; k < W; k++) begin
        int nst, y, w;
        a[k] = rnd(0, 1);
        b[k] = rnd(0, 1);
        enc(st, a[k], b[k], nst, y, w);
        st = nst;
        // channel LLRs, positive = bit 1
        ms[k].s1 = sat6((2 * a[k] - 1) * amp + rnd(-noise, noise));
        ms[k].s2 = sat6((2 * b[k] - 1) * amp + rnd(-noise, noise));
        ms[k].p1 = sat6((2 * y - 1) * amp + rnd(-noise, noise));
        ms[k].p2 = sat6((2 * w - 1) * amp + rnd(-noise, noise));
        ms[k].apr[0] = 0;
        if (use_apr && win % 4 == 1) begin
          // a priori values that favour the transmitted symbol, as from a
          // later iteration
          int sc[4];
          for (int z = 0; z < 4; z++) sc[z] = (z == a[k] + 2 * b[k]) ? 100 : rnd(-30, 0);
          for (int z = 1; z < 4; z++) ms[k].apr[z] = clip8(sc[z] - sc[0]);
        end else begin
          for (int z = 1; z < 4; z++) ms[k].apr[z] = use_apr ? rnd(-128, 127) : 0;
        end
        mem[k].s1 = llr_t'(ms[k].s1);
        mem[k].s2 = llr_t'(ms[k].s2);
        mem[k].p1 = llr_t'(ms[k].p1);
        mem[k].p2 = llr_t'(ms[k].p2);
        mem[k].apr1 = ext_t'(ms[k].apr[1]);
        mem[k].apr2 = ext_t'(ms[k].apr[2]);
        mem[k].apr3 = ext_t'(ms[k].apr[3]);
      end
      cnt_apr   += int'(use_apr);
      cnt_known += int'(known);

      // reference model of the window
      for (int s = 0; s < NS; s++) begin
        al[s] = known ? ((s == st0) ? 0 : SM_FLOOR) : 0;
        be[s] = 0;
        alpha_init[s] = sm_t'(al[s]);
        beta_init[s]  = sm_t'(be[s]);
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
        exp_apo[k] = lapo;
        exp_ex[k]  = lex;
        bwd_step(be, ms[k], cnt_corr);
      end

      // run the window
      @(negedge clk);
      start = 1'b1;
      @(posedge clk);
      t_start = 0;
      #1 start = 1'b0;
      nout = 0; errs = 0; order_ok = 1; t_last = 0;
      for (int c = 1; c <= 2 * W + 4; c++) begin
        @(posedge clk);
        #1;
        if (inc_sat) cnt_inc_sat++;
        if (smc_full) cnt_full++;
        if (out_valid) begin
          int k, dec, best;
          k = int'(out_idx);
          if (k != W - 1 - nout) order_ok = 0;
          nout++;
          t_last = c;
          for (int z = 0; z < 3; z++) begin
            check(int'(out_ex[z]) == exp_ex[k][z],
                  $sformatf("win %0d k %0d ex[%0d] %0d exp %0d", win, k, z, out_ex[z], exp_ex[k][z]));
            check(int'(out_apo[z]) == exp_apo[k][z],
                  $sformatf("win %0d k %0d apo[%0d] %0d exp %0d", win, k, z, out_apo[z], exp_apo[k][z]));
          end
          dec = 0; best = 0;
          for (int z = 0; z < 3; z++)
            if (int'(out_apo[z]) > best) begin best = int'(out_apo[z]); dec = z + 1; end
          if (dec != a[k] + 2 * b[k]) errs++;
        end
      end
      check(nout == W, $sformatf("win %0d: %0d outputs", win, nout));
      check(order_ok, $sformatf("win %0d: output order", win));
      check(t_last == 2 * W, $sformatf("win %0d: latency %0d, expected %0d", win, t_last, 2 * W));
      check(!busy, "idle after window");
      cnt_windows++;
      if (noise == 0 && !use_apr) begin
        check(errs == 0, $sformatf("win %0d: %0d symbol errors without noise", win, errs));
        cnt_errfree += int'(errs == 0);
      end
      $display("window %0d amp %0d noise %0d known %0d apr %0d: %0d symbol errors",
               win, amp, noise, known, use_apr, errs);
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
