// sm_normalize: state metric normalisation shared by the forward and the
// backward recursion. The eight new metrics (IW bits, signed) are shifted so
// that the largest becomes 0, and every metric below -2^(SM_W-1) is clipped
// to that value, so the result fits the SM_W-bit state metric register.
// Subtracting the maximum is this design's choice of normalisation; it keeps
// every stored metric in [-2^(SM_W-1), 0]. Combinational.
module sm_normalize
  import ctc_pkg::*;
#(
  parameter int unsigned IW = SM_W + 3
) (
  input  logic signed [IW-1:0] m_in  [NST],
  output sm_t                  m_out [NST]
);
  localparam logic signed [IW:0] FLOOR = -(IW+1)'(2 ** (SM_W - 1));

  logic signed [IW-1:0] mx;
  logic signed [IW:0]   d;

  always_comb begin
    mx = m_in[0];
    for (int s = 1; s < NST; s++)
      if (m_in[s] > mx) mx = m_in[s];
    for (int s = 0; s < NST; s++) begin
      d = (IW+1)'(m_in[s]) - (IW+1)'(mx);
      m_out[s] = (d < FLOOR) ? sm_t'(FLOOR) : sm_t'(d);
    end
  end
endmodule
