// tb_fwd_recursion: runs the forward recursion alpha_k = max*[alpha_{k-1} + gamma_k] over random trellis steps
// (strong and weak channel values, with and without a priori input) and
// compares the register after every step with the reference model. It also
// checks load (all-zero and known-state boundary metrics), hold when step
// is low, synchronous reset, and that clipping at -512 occurs.
module tb_fwd_recursion;
  import ctc_pkg::*;
  import tb_model_pkg::*;

  logic clk = 1'b0, rst = 1'b1, load = 1'b0, step = 1'b0;
  sm_t  init [NST];
  gam_t gamma [16];
  sm_t  alpha [NST];
  always #5 clk = ~clk;

  fwd_recursion dut (.clk, .rst, .load, .alpha_init(init), .step, .gamma, .alpha);

  int checks = 0, failures = 0, clipped = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m[NS];
    int dummy;
    msym_t ms;
    dummy = 0;
    foreach (init[i]) init[i] = '0;
    foreach (gamma[i]) gamma[i] = '0;
    @(negedge clk);
    @(negedge clk);
    for (int s = 0; s < NS; s++) check(alpha[s] == 0, "reset value");
    rst = 1'b0;
    for (int run = 0; run < 40; run++) begin
      int amp;
      amp = (run % 4 == 0) ? 31 : 12;
      for (int s = 0; s < NS; s++) begin
        m[s] = (run % 2 == 0) ? 0 : ((s == run % 8) ? 0 : -512);
        init[s] = sm_t'(m[s]);
      end
      load = 1'b1;
      @(negedge clk);
      load = 1'b0;
      for (int s = 0; s < NS; s++) check(int'(alpha[s]) == m[s], "load");
      for (int k = 0; k < 30; k++) begin
        ms.s1 = int'($urandom_range(2 * amp)) - amp;
        ms.s2 = int'($urandom_range(2 * amp)) - amp;
        ms.p1 = int'($urandom_range(2 * amp)) - amp;
        ms.p2 = int'($urandom_range(2 * amp)) - amp;
        ms.apr[0] = 0;
        for (int z = 1; z < 4; z++) ms.apr[z] = (run % 3 == 0) ? int'($urandom_range(255)) - 128 : 0;
        for (int i = 0; i < 16; i++)
          gamma[i] = gam_t'(tb_model_pkg::gamma(ms, (i >> 2) & 1, (i >> 3) & 1, i & 1, (i >> 1) & 1));
        step = (k % 9 != 8);
        @(negedge clk);
        if (step) fwd_step(m, ms, dummy);
        for (int s = 0; s < NS; s++) begin
          check(int'(alpha[s]) == m[s], $sformatf("run %0d step %0d state %0d: %0d, expected %0d",
                                              run, k, s, alpha[s], m[s]));
          if (m[s] == -512) clipped++;
        end
      end
      step = 1'b0;
    end
    check(clipped > 0, "clipping never happened");
    rst = 1'b1;
    @(negedge clk);
    for (int s = 0; s < NS; s++) check(alpha[s] == 0, "synchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
