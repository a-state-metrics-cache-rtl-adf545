// tb_smc_compress: checks the compressing module. First the worked example
// of the method, eight metrics 13.26 12.59 10.56 10.29 14.21 10.79 11.24
// 11.1 in quarter steps (53 50 42 41 57 43 45 44): the index sequence must be
// 3 2 5 7 6 1 0 4, min 41, max 57, increase round(16/7) = 2. Then random
// metrics (with ties, and spreads large enough to saturate the 6-bit
// increase metric) against the reference model.
module tb_smc_compress;
  import ctc_pkg::*;
  import tb_model_pkg::*;

  sm_t       alpha [NST];
  smc_word_t word;
  sm_t       amin, amax;
  logic      inc_sat;

  smc_compress dut (.alpha, .word, .alpha_min(amin), .alpha_max(amax), .inc_sat);

  int checks = 0, failures = 0, nsat = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex_vals[NST] = '{53, 50, 42, 41, 57, 43, 45, 44};
    int ex_is[NST]   = '{3, 2, 5, 7, 6, 1, 0, 4};
    int al[NS], is[NS], inc;
    bit sat;
    for (int s = 0; s < NST; s++) alpha[s] = sm_t'(ex_vals[s]);
    #1;
    for (int r = 0; r < NST; r++) check(int'(word.is[r]) == ex_is[r], $sformatf("example is_%0d", r));
    check(amin == 41 && amax == 57, "example min/max");
    check(word.inc == 2 && !inc_sat, "example increase metric");

    for (int t = 0; t < 3000; t++) begin
      int lim;
      lim = (t % 4 == 0) ? 6 : ((t % 4 == 1) ? 512 : 200);
      for (int s = 0; s < NS; s++) begin
        al[s] = -int'($urandom_range(lim - 1));
        alpha[s] = sm_t'(al[s]);
      end
      #1;
      compress(al, is, inc, sat);
      for (int r = 0; r < NST; r++) check(int'(word.is[r]) == is[r], $sformatf("t %0d is_%0d", t, r));
      check(int'(word.inc) == inc, $sformatf("t %0d inc %0d exp %0d", t, word.inc, inc));
      check(inc_sat == sat, "saturation flag");
      check(int'(amin) == al[is[0]] && int'(amax) == al[is[NS-1]], "min/max");
      nsat += int'(sat);
    end
    check(nsat > 0, "saturation never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
