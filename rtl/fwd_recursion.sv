// fwd_recursion: forward state metric recursion
//     alpha_k(s') = max*_{z} [ alpha_{k-1}(prev(s',z)) + gamma_k(z) ],
// one trellis step per enabled clock. Each of the 8 states has 4 incoming
// branches (one per input symbol z); their sums go to a 4-input simplified
// max* (maxstar_n). The new metrics are normalised (largest = 0, clipped at
// -2^(SM_W-1)) and stored in the alpha register.
//
// Interface: load copies alpha_init into the register (window start); step
// advances one trellis step using the 16 branch metrics gamma of that step.
// alpha shows the register, i.e. alpha_{k-1} while step k is being applied.
// Register update on the rising clock edge; synchronous active-high reset
// clears the register to all zeros (all states equally likely). The reset
// value and the normalisation are this design's choices.
module fwd_recursion
  import ctc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic load,
  input  sm_t  alpha_init [NST],
  input  logic step,
  input  gam_t gamma      [16],
  output sm_t  alpha      [NST]
);
  localparam int unsigned CW = SM_W + 2;    // alpha + gamma sum width

  logic signed [CW-1:0] cand [NST][4];
  logic signed [CW:0]   mst  [NST];
  sm_t                  nrm  [NST];

  always_comb begin
    for (int ns = 0; ns < NST; ns++)
      for (int z = 0; z < 4; z++) begin
        idx_t ps;
        ps = prev_state(idx_t'(ns), 2'(z));
        cand[ns][z] = CW'(alpha[ps]) + CW'(gamma[gam_idx(ps, 2'(z))]);
      end
  end

  for (genvar ns = 0; ns < NST; ns++) begin : g_acs
    maxstar_n #(.N(4), .DW(CW)) u_ms (.x(cand[ns]), .y(mst[ns]));
  end

  sm_normalize #(.IW(CW + 1)) u_norm (.m_in(mst), .m_out(nrm));

  always_ff @(posedge clk) begin
    if (rst)       alpha <= '{default: '0};
    else if (load) alpha <= alpha_init;
    else if (step) alpha <= nrm;
  end
endmodule
