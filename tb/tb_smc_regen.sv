// tb_smc_regen: checks the regeneration module. For the index sequence of
// the worked example (3 2 5 7 6 1 0 4) and an increase metric of 2 the
// estimate must be 12 10 2 0 14 4 8 6 (state 3 gets 0, state 4 gets 7*2).
// Then random permutations and increase metrics 0..63 against the model.
module tb_smc_regen;
  import ctc_pkg::*;
  import tb_model_pkg::*;

  smc_word_t word;
  ahat_t     alpha_hat [NST];

  smc_regen dut (.word, .alpha_hat);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ex_is[NST]  = '{3, 2, 5, 7, 6, 1, 0, 4};
    int ex_ah[NST]  = '{12, 10, 2, 0, 14, 4, 8, 6};
    int is[NS], ah[NS];
    for (int r = 0; r < NST; r++) word.is[r] = idx_t'(ex_is[r]);
    word.inc = 6'd2;
    #1;
    for (int s = 0; s < NST; s++) begin
      checks++;
      if (int'(alpha_hat[s]) != ex_ah[s]) begin
        failures++;
        $display("FAIL: example state %0d: %0d, expected %0d", s, alpha_hat[s], ex_ah[s]);
      end
    end
    for (int t = 0; t < 3000; t++) begin
      int inc;
      for (int i = 0; i < NS; i++) is[i] = i;
      for (int i = NS - 1; i > 0; i--) begin
        int j, tmp;
        j = int'($urandom_range(i));
        tmp = is[i]; is[i] = is[j]; is[j] = tmp;
      end
      inc = (t == 0) ? 63 : int'($urandom_range(63));
      for (int r = 0; r < NST; r++) word.is[r] = idx_t'(is[r]);
      word.inc = inc_t'(inc);
      #1;
      regen(is, inc, ah);
      for (int s = 0; s < NST; s++) begin
        checks++;
        if (int'(alpha_hat[s]) != ah[s]) begin
          failures++;
          if (failures <= 10) $display("FAIL: t %0d state %0d: %0d, expected %0d", t, s, alpha_hat[s], ah[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
