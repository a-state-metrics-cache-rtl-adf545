// llr_apo: a posteriori LLR calculator of one trellis step k:
//     M(z)      = max*_{branches with input z} [ alpha_{k-1}(s) + gamma_k(z)
//                                               + beta_k(next(s,z)) ]
//     Lapo_k(z) = M(z) - M(00),   z = 01, 10, 11.
// Each symbol value has 8 branches (one from every state), so M(z) is an
// 8-input simplified max* (maxstar_n). alpha_{k-1} is the regenerated,
// non-negative estimate alpha_hat from the SMC, so the absolute level of the
// forward metrics, which cancels in the difference, is never needed.
// Outputs apo[0..2] are the LLRs of symbols 01, 10, 11. Combinational;
// sums are SUM_W bits, results APO_W bits.
module llr_apo
  import ctc_pkg::*;
(
  input  ahat_t alpha_hat [NST],
  input  gam_t  gamma     [16],
  input  sm_t   beta      [NST],
  output apo_t  apo       [3]
);
  logic signed [SUM_W-1:0] cand [4][NST];
  logic signed [SUM_W:0]   m    [4];

  always_comb begin
    for (int z = 0; z < 4; z++)
      for (int s = 0; s < NST; s++)
        cand[z][s] = SUM_W'(signed'({1'b0, alpha_hat[s]}))
                   + SUM_W'(gamma[gam_idx(idx_t'(s), 2'(z))])
                   + SUM_W'(beta[next_state(idx_t'(s), 2'(z))]);
  end

  for (genvar z = 0; z < 4; z++) begin : g_ms
    maxstar_n #(.N(NST), .DW(SUM_W)) u_ms (.x(cand[z]), .y(m[z]));
  end

  always_comb begin
    for (int z = 1; z < 4; z++)
      apo[z-1] = APO_W'(m[z]) - APO_W'(m[0]);
  end
endmodule
