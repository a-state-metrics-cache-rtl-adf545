// smc_compress: compressing module placed in front of the state metrics
// cache (SMC). It replaces the eight forward state metrics of a trellis step
// (8 x SM_W bits) by
//   - the index sequence IS = [is_0 .. is_7], the state numbers ordered from
//     the smallest metric to the largest (8 x 3 bits), and
//   - the increase metric alpha_inc = (alpha_max - alpha_min) / 7 (INC_W bits),
// so an SMC word shrinks from 80 to 30 bits.
//
// The comparator network compares every pair of states once (28 comparators)
// and counts, for each state, how many states rank below it; ties are broken
// by the lower state number. A state's count is its position in IS. The
// minimum and maximum are the metrics at positions 0 and 7. The division by 7
// rounds to nearest and saturates at 2^INC_W - 1 (inc_sat flags that case);
// the rank-counting network, the rounding and the saturation are this
// design's choices. Combinational.
module smc_compress
  import ctc_pkg::*;
(
  input  sm_t       alpha [NST],
  output smc_word_t word,
  output sm_t       alpha_min,
  output sm_t       alpha_max,
  output logic      inc_sat
);
  localparam int unsigned DW = SM_W + 1;
  localparam logic [DW-1:0] INC_MAX = DW'(2 ** INC_W - 1);

  idx_t          rank [NST];
  logic [DW-1:0] diff;
  logic [DW-1:0] q;

  always_comb begin
    // pairwise comparator network -> rank of every state
    for (int i = 0; i < NST; i++) begin
      rank[i] = '0;
      for (int j = 0; j < NST; j++)
        if (j != i && ((alpha[j] < alpha[i]) || (alpha[j] == alpha[i] && j < i)))
          rank[i] = rank[i] + 1'b1;
    end
    // index sequence: position rank[i] holds state i
    word.is = '0;
    for (int i = 0; i < NST; i++)
      word.is[rank[i]] = idx_t'(i);
    alpha_min = alpha[word.is[0]];
    alpha_max = alpha[word.is[NST-1]];
    diff      = DW'(alpha_max) - DW'(alpha_min);
    q         = (diff + DW'(3)) / DW'(7);
    inc_sat   = (q > INC_MAX);
    word.inc  = inc_sat ? inc_t'(INC_MAX) : inc_t'(q);
  end
endmodule
