// tb_maxstar_n: checks the simplified n-input max* against the reference
// model for N = 2 (the plain two-input operator), N = 4 (state recursions)
// and N = 8 (a posteriori LLR), with random inputs including repeated
// maxima, plus hand-worked cases of the linear approximation (quarter LSBs):
// max*(0,0) = 0.5 -> 2, max*(-3,-5) -> -2, and a far-apart pair that must
// return the larger input unchanged.
module tb_maxstar_n;
  import tb_model_pkg::*;

  logic signed [11:0] x2 [2];
  logic signed [12:0] y2;
  logic signed [11:0] x4 [4];
  logic signed [12:0] y4;
  logic signed [13:0] x8 [8];
  logic signed [14:0] y8;

  maxstar_n #(.N(2), .DW(12)) u2 (.x(x2), .y(y2));
  maxstar_n #(.N(4), .DW(12)) u4 (.x(x4), .y(y4));
  maxstar_n #(.N(8), .DW(14)) u8 (.x(x8), .y(y8));

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
    int v[];
    bit c;
    // hand-worked two-input cases
    x2 = '{12'sd0, 12'sd0};     #1 check(y2 == 2,  "max*(0,0)");
    x2 = '{-12'sd3, -12'sd5};   #1 check(y2 == -2, "max*(-3,-5)");
    x2 = '{12'sd40, -12'sd100}; #1 check(y2 == 40, "max*(40,-100)");
    x2 = '{-12'sd100, 12'sd40}; #1 check(y2 == 40, "max*(-100,40)");
    x4 = '{-12'sd5, -12'sd100, -12'sd3, -12'sd200}; #1 check(y4 == -2, "max*4 picks two largest");
    for (int t = 0; t < 3000; t++) begin
      int lim;
      lim = (t % 3 == 0) ? 8 : 1000;
      v = new[2];
      foreach (v[i]) begin v[i] = int'($urandom_range(2 * lim)) - lim; x2[i] = 12'(v[i]); end
      #1 check(int'(y2) == msn(v, c), $sformatf("N=2 %p -> %0d", v, y2));
      v = new[4];
      foreach (v[i]) begin v[i] = int'($urandom_range(2 * lim)) - lim; end
      if (t % 7 == 0) v[3] = v[1];
      foreach (v[i]) x4[i] = 12'(v[i]);
      #1 check(int'(y4) == msn(v, c), $sformatf("N=4 %p -> %0d", v, y4));
      v = new[8];
      foreach (v[i]) begin v[i] = int'($urandom_range(4 * lim)) - 2 * lim; end
      if (t % 5 == 0) v[0] = v[6];
      foreach (v[i]) x8[i] = 14'(v[i]);
      #1 check(int'(y8) == msn(v, c), $sformatf("N=8 %p -> %0d", v, y8));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
