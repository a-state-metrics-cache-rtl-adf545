// tb_ctc_encoder: checks the constituent encoder against the reference
// encoder over random bit-pair sequences from random preset states, the
// all-zero input from state 0 (must stay in state 0 with zero parity), that
// every state has four distinct successors, and hold when en is low.
module tb_ctc_encoder;
  import ctc_pkg::*;
  import tb_model_pkg::*;

  logic clk = 1'b0, rst = 1'b1, load = 1'b0, en = 1'b0, a = 1'b0, b = 1'b0;
  idx_t load_state = '0, state;
  logic y, w;
  always #5 clk = ~clk;

  ctc_encoder dut (.clk, .rst, .load, .load_state, .en, .a, .b, .y, .w, .state);

  int checks = 0, failures = 0;

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
    int st, nst, ey, ew;
    @(negedge clk);
    @(negedge clk);
    check(state == 0, "reset state");
    rst = 1'b0;
    // zero input stays in state 0
    en = 1'b1;
    repeat (5) begin
      #1 check(!y && !w, "zero parity from state 0");
      @(negedge clk);
      check(state == 0, "zero input stays in state 0");
    end
    // four distinct successors of every state
    for (int s = 0; s < 8; s++) begin
      bit [7:0] seen;
      seen = '0;
      for (int z = 0; z < 4; z++) begin
        enc(s, z & 1, z >> 1, nst, ey, ew);
        seen[nst] = 1'b1;
      end
      check($countones(seen) == 4, "four successors");
    end
    for (int run = 0; run < 50; run++) begin
      st = int'($urandom_range(7));
      load = 1'b1; load_state = idx_t'(st);
      @(negedge clk);
      load = 1'b0;
      check(int'(state) == st, "preset");
      for (int k = 0; k < 40; k++) begin
        a = 1'($urandom_range(1));
        b = 1'($urandom_range(1));
        en = (k % 7 != 6);
        enc(st, int'(a), int'(b), nst, ey, ew);
        #1 check(int'(y) == ey && int'(w) == ew, $sformatf("parity run %0d k %0d", run, k));
        @(negedge clk);
        if (en) st = nst;
        check(int'(state) == st, $sformatf("state run %0d k %0d", run, k));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
