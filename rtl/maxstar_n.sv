// maxstar_n: simplified n-input max* operator. Instead of applying the
// two-input max* recursively (n-1 operator delays), the two predominant
// inputs are picked first: y1 is the largest input and y2 the largest of the
// remaining ones (equal to y1 when the maximum occurs twice). The result is
// max*(y1, y2) in the linear approximation of maxstar2. The decoder uses
// N = 4 for the state metric recursions and N = 8 for the a posteriori LLRs.
//
// The two largest values are found by one linear pass of compare-and-swap
// stages; this is a plain combinational network, no pipeline registers.
// Inputs: N signed values of DW bits (FRAC fractional bits); output: DW+1 bits.
module maxstar_n #(
  parameter int unsigned N    = 4,
  parameter int unsigned DW   = 12,
  parameter int unsigned FRAC = ctc_pkg::FRAC
) (
  input  logic signed [DW-1:0] x [N],
  output logic signed [DW:0]   y
);
  logic signed [DW-1:0] y1, y2;

  always_comb begin
    if (x[0] > x[1]) begin
      y1 = x[0];
      y2 = x[1];
    end else begin
      y1 = x[1];
      y2 = x[0];
    end
    for (int i = 2; i < N; i++) begin
      if (x[i] > y1) begin
        y2 = y1;
        y1 = x[i];
      end else if (x[i] > y2) begin
        y2 = x[i];
      end
    end
  end

  maxstar2 #(.DW(DW), .FRAC(FRAC)) u_ms2 (.x1(y1), .x2(y2), .y(y));

  initial assert (N >= 2) else $error("maxstar_n needs at least two inputs");
endmodule
