// tb_lifo_smc: fills the SMC with DEPTH random words (default depth 20),
// checks count, full and that each pushed word is on top, then pops them
// back and checks last-in first-out order and empty; repeats with partial
// fills and interleaved push/pop sequences against a queue model.
module tb_lifo_smc;
  import ctc_pkg::*;

  localparam int DEPTH = W_DEF;

  logic clk = 1'b0, rst = 1'b1, push = 1'b0, pop = 1'b0;
  smc_word_t din, top;
  logic empty, full;
  logic [$clog2(DEPTH+1)-1:0] count;
  always #5 clk = ~clk;

  lifo_smc #(.DEPTH(DEPTH)) dut (.clk, .rst, .push, .din, .pop, .top, .empty, .full, .count);

  int checks = 0, failures = 0;
  smc_word_t model[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    check(empty && !full && count == 0, "empty after reset");
    for (int t = 0; t < 3000; t++) begin
      bit do_push;
      if (model.size() == 0)          do_push = 1;
      else if (model.size() == DEPTH) do_push = 0;
      else if (t < 200)               do_push = ((t / DEPTH) % 2 == 0);
      else                            do_push = ($urandom_range(1) == 1);
      push = do_push;
      pop  = !do_push;
      din  = smc_word_t'({$urandom, $urandom});
      @(negedge clk);
      if (do_push) model.push_back(din);
      else void'(model.pop_back());
      push = 1'b0;
      pop  = 1'b0;
      check(int'(count) == model.size(), $sformatf("count %0d exp %0d", count, model.size()));
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      if (model.size() > 0) check(top == model[$], $sformatf("t %0d top word", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
