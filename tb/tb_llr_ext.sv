// tb_llr_ext: checks the extrinsic calculator against the reference model
// for random a posteriori LLRs and soft inputs, covering both saturation
// limits, and by hand: apo = 100, a priori 20, L_s1 = 10 gives
// floor(70*109/128) = 59 for symbol 01.
module tb_llr_ext;
  import ctc_pkg::*;
  import tb_model_pkg::*;

  apo_t    apo [3];
  sym_in_t sym;
  ext_t    ex [3];

  llr_ext dut (.apo, .sym, .ex);

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
    msym_t ms;
    int la[3], lex[3], ns;
    sym = '0;
    sym.s1 = 6'sd10; sym.apr1 = 8'sd20;
    apo = '{16'sd100, 16'sd0, 16'sd0};
    #1 check(ex[0] == 59, $sformatf("hand case: %0d", ex[0]));
    for (int t = 0; t < 5000; t++) begin
      int lim;
      lim = (t % 2 == 0) ? 400 : 100;
      ms.s1 = int'($urandom_range(63)) - 32;
      ms.s2 = int'($urandom_range(63)) - 32;
      ms.p1 = int'($urandom_range(63)) - 32;
      ms.p2 = int'($urandom_range(63)) - 32;
      ms.apr = '{0, int'($urandom_range(255)) - 128, int'($urandom_range(255)) - 128,
                 int'($urandom_range(255)) - 128};
      for (int z = 0; z < 3; z++) begin
        la[z] = int'($urandom_range(2 * lim)) - lim;
        apo[z] = apo_t'(la[z]);
      end
      sym = '{s1: llr_t'(ms.s1), s2: llr_t'(ms.s2), p1: llr_t'(ms.p1), p2: llr_t'(ms.p2),
              apr1: ext_t'(ms.apr[1]), apr2: ext_t'(ms.apr[2]), apr3: ext_t'(ms.apr[3])};
      #1;
      ext(la, ms, lex, ns);
      nsat += ns;
      for (int z = 0; z < 3; z++)
        check(int'(ex[z]) == lex[z], $sformatf("t %0d ex[%0d] %0d exp %0d", t, z, ex[z], lex[z]));
    end
    check(nsat > 0, "saturation never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
