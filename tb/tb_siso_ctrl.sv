// tb_siso_ctrl: checks the window sequencer at the default window length
// W = 20: load only with start in idle, exactly W forward cycles with
// fwd_idx = 0..W-1, then W backward cycles with bwd_idx = W-1..0, done in
// the last backward cycle only, busy throughout, and that start is ignored
// while busy. Several windows are run back to back and with idle gaps.
module tb_siso_ctrl;
  import ctc_pkg::*;

  localparam int W = W_DEF;

  logic clk = 1'b0, rst = 1'b1, start = 1'b0;
  logic load, fwd_step, bwd_step, busy, done;
  logic [$clog2(W)-1:0] fwd_idx, bwd_idx;
  always #5 clk = ~clk;

  siso_ctrl #(.W(W)) dut (.clk, .rst, .start, .load, .fwd_step, .bwd_step,
                          .fwd_idx, .bwd_idx, .busy, .done);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    @(negedge clk);
    rst = 1'b0;
    check(!busy && !fwd_step && !bwd_step && !load && !done, "idle after reset");
    for (int win = 0; win < 6; win++) begin
      repeat (win % 3) begin
        @(negedge clk);
        check(!busy && !load, "idle gap");
      end
      start = 1'b1;
      #1 check(load, "load with start in idle");
      @(negedge clk);
      start = (win % 2 == 1);    // holding start high must not restart
      for (int k = 0; k < W; k++) begin
        check(fwd_step && !bwd_step && busy && !load && !done, $sformatf("forward cycle %0d", k));
        check(int'(fwd_idx) == k, $sformatf("fwd_idx %0d exp %0d", fwd_idx, k));
        @(negedge clk);
      end
      for (int k = 0; k < W; k++) begin
        check(bwd_step && !fwd_step && busy && !load, $sformatf("backward cycle %0d", k));
        check(int'(bwd_idx) == W - 1 - k, $sformatf("bwd_idx %0d exp %0d", bwd_idx, W - 1 - k));
        check(done == (k == W - 1), "done only in last backward cycle");
        if (k == W - 1) start = 1'b0;
        @(negedge clk);
      end
      check(!busy && !done, "idle after window");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
