// tb_bmu: checks the 16 branch metrics of random soft inputs against the
// reference model gamma(z, W, Y) = A*Ls1 + B*Ls2 + Y*Lp1 + W*Lp2 + La(z),
// including the extreme input values.
module tb_bmu;
  import ctc_pkg::*;
  import tb_model_pkg::*;

  sym_in_t sym;
  gam_t    gamma [16];

  bmu dut (.sym, .gamma);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    msym_t ms;
    for (int t = 0; t < 2000; t++) begin
      if (t < 2) begin
        int e;
        e = (t == 0) ? 1 : 0;
        ms.s1 = e ? 31 : -32; ms.s2 = e ? 31 : -32; ms.p1 = e ? 31 : -32; ms.p2 = e ? 31 : -32;
        ms.apr = '{0, e ? 127 : -128, e ? 127 : -128, e ? 127 : -128};
      end else begin
        ms.s1 = int'($urandom_range(63)) - 32;
        ms.s2 = int'($urandom_range(63)) - 32;
        ms.p1 = int'($urandom_range(63)) - 32;
        ms.p2 = int'($urandom_range(63)) - 32;
        ms.apr = '{0, int'($urandom_range(255)) - 128, int'($urandom_range(255)) - 128,
                   int'($urandom_range(255)) - 128};
      end
      sym = '{s1: llr_t'(ms.s1), s2: llr_t'(ms.s2), p1: llr_t'(ms.p1), p2: llr_t'(ms.p2),
              apr1: ext_t'(ms.apr[1]), apr2: ext_t'(ms.apr[2]), apr3: ext_t'(ms.apr[3])};
      #1;
      for (int i = 0; i < 16; i++) begin
        int exp_g;
        exp_g = gamma_m(ms, i);
        checks++;
        if (int'(gamma[i]) != exp_g) begin
          failures++;
          if (failures <= 10) $display("FAIL: gamma[%0d] = %0d, expected %0d", i, gamma[i], exp_g);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // index i = {B, A, W, Y}
  function automatic int gamma_m(msym_t ms, int i);
    return tb_model_pkg::gamma(ms, (i >> 2) & 1, (i >> 3) & 1, i & 1, (i >> 1) & 1);
  endfunction
endmodule
