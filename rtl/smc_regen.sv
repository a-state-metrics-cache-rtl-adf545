// smc_regen: regeneration module behind the state metrics cache. From one
// SMC word (index sequence IS and increase metric alpha_inc) it rebuilds the
// linear estimate of the forward metrics, relative to their minimum:
//   1. recursive addition: m_0 = 0, m_r = m_{r-1} + alpha_inc (r = 1..7),
//      so m_r = r * alpha_inc;
//   2. rearrange: the state at position r of the sequence, is_r, receives m_r,
//      i.e. alpha_hat(is_r) = r * alpha_inc.
// The state with the smallest metric gets 0, the largest gets 7*alpha_inc.
// The recursive addition is unrolled into a chain of 7 adders so that one
// word is regenerated per clock; this is this design's realisation of the
// feedback adder drawn for it. Combinational; output unsigned, AH_W bits.
module smc_regen
  import ctc_pkg::*;
(
  input  smc_word_t word,
  output ahat_t     alpha_hat [NST]
);
  ahat_t m [NST];

  always_comb begin
    m[0] = '0;
    for (int r = 1; r < NST; r++)
      m[r] = m[r-1] + ahat_t'(word.inc);
    alpha_hat = '{default: '0};
    for (int r = 0; r < NST; r++)
      alpha_hat[word.is[r]] = m[r];
  end
endmodule
