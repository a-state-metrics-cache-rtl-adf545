// maxstar2: two-input max* operator, ln(e^x1 + e^x2), in its linear
// approximation
//     max*(x1,x2) ~= max{ x1, 0.25*x1 + 0.75*x2 + 0.5,
//                         0.75*x1 + 0.25*x2 + 0.5, x2 }.
// The approximation is the one the decoder is built on; the fixed-point
// realisation is this design's: inputs and output are signed with FRAC
// fractional bits, the quarter products are formed as (x1 + 3*x2) >>> 2
// (rounding toward minus infinity) and 0.5 is the constant 1 << (FRAC-1).
// The output is one bit wider than the inputs, since the result can exceed
// the larger input by up to 0.5. Purely combinational.
module maxstar2 #(
  parameter int unsigned DW   = 12,
  parameter int unsigned FRAC = ctc_pkg::FRAC
) (
  input  logic signed [DW-1:0] x1,
  input  logic signed [DW-1:0] x2,
  output logic signed [DW:0]   y
);
  localparam int unsigned EW = DW + 3;
  localparam logic signed [EW-1:0] HALF = EW'(1) <<< (FRAC - 1);

  logic signed [EW-1:0] e1, e2, t13, t31, m_a, m_b;

  always_comb begin
    e1  = EW'(x1);
    e2  = EW'(x2);
    t13 = ((e1 + 3 * e2) >>> 2) + HALF;   // 0.25*x1 + 0.75*x2 + 0.5
    t31 = ((3 * e1 + e2) >>> 2) + HALF;   // 0.75*x1 + 0.25*x2 + 0.5
    m_a = (e1 > e2) ? e1 : e2;
    m_b = (t13 > t31) ? t13 : t31;
    y   = (DW+1)'((m_a > m_b) ? m_a : m_b);
  end
endmodule
