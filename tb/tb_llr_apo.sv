// tb_llr_apo: drives the a posteriori LLR calculator with random regenerated
// forward metrics (0..441), branch metrics built from random soft inputs and
// random backward metrics (-512..0), and compares the three LLRs with the
// reference model. A case with a single dominant path checks the sign of
// the decision by hand: the LLR of the symbol on that path must be the
// largest and positive.
module tb_llr_apo;
  import ctc_pkg::*;
  import tb_model_pkg::*;

  ahat_t alpha_hat [NST];
  gam_t  gamma [16];
  sm_t   beta [NST];
  apo_t  apo [3];

  llr_apo dut (.alpha_hat, .gamma, .beta, .apo);

  int checks = 0, failures = 0;

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
    int ah[NS], be[NS], lapo[3], dummy;
    msym_t ms;
    dummy = 0;
    // dominant path: state 5, symbol 11 (A=1, B=1), strong systematic values
    ms.s1 = 30; ms.s2 = 30; ms.p1 = 0; ms.p2 = 0; ms.apr = '{0, 0, 0, 0};
    for (int s = 0; s < NS; s++) begin ah[s] = (s == 5) ? 400 : 0; be[s] = 0; end
    for (int s = 0; s < NST; s++) begin alpha_hat[s] = ahat_t'(ah[s]); beta[s] = '0; end
    for (int i = 0; i < 16; i++)
      gamma[i] = gam_t'(tb_model_pkg::gamma(ms, (i >> 2) & 1, (i >> 3) & 1, i & 1, (i >> 1) & 1));
    #1;
    check(apo[2] > 0 && apo[2] > apo[0] && apo[2] > apo[1], "dominant symbol 11");

    for (int t = 0; t < 3000; t++) begin
      int amp;
      amp = (t % 2 == 0) ? 31 : 8;
      ms.s1 = int'($urandom_range(2 * amp)) - amp;
      ms.s2 = int'($urandom_range(2 * amp)) - amp;
      ms.p1 = int'($urandom_range(2 * amp)) - amp;
      ms.p2 = int'($urandom_range(2 * amp)) - amp;
      ms.apr[0] = 0;
      for (int z = 1; z < 4; z++) ms.apr[z] = int'($urandom_range(255)) - 128;
      for (int s = 0; s < NS; s++) begin
        ah[s] = int'($urandom_range(7)) * int'($urandom_range(63));
        be[s] = -int'($urandom_range(512));
        alpha_hat[s] = ahat_t'(ah[s]);
        beta[s] = sm_t'(be[s]);
      end
      for (int i = 0; i < 16; i++)
        gamma[i] = gam_t'(tb_model_pkg::gamma(ms, (i >> 2) & 1, (i >> 3) & 1, i & 1, (i >> 1) & 1));
      #1;
      tb_model_pkg::apo(ah, be, ms, lapo, dummy);
      for (int z = 0; z < 3; z++)
        check(int'(apo[z]) == lapo[z], $sformatf("t %0d apo[%0d] %0d exp %0d", t, z, apo[z], lapo[z]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
