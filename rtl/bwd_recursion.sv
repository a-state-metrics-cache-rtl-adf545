// bwd_recursion: backward state metric recursion
//     beta_{k-1}(s) = max*_{z} [ beta_k(next(s,z)) + gamma_k(z) ],
// one trellis step per enabled clock, running from the end of the window to
// its start. Each state has 4 outgoing branches; their sums go to a 4-input
// simplified max* (maxstar_n), and the results are normalised like the
// forward metrics (largest = 0, clipped at -2^(SM_W-1)).
//
// Interface: load copies beta_init (beta_W) into the register; step applies
// the branch metrics gamma of step k to the register contents beta_k. beta
// shows the register, i.e. beta_k while step k is applied, which is what the
// a posteriori LLR of step k needs. Synchronous active-high reset to zeros.
module bwd_recursion
  import ctc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic load,
  input  sm_t  beta_init [NST],
  input  logic step,
  input  gam_t gamma     [16],
  output sm_t  beta      [NST]
);
  localparam int unsigned CW = SM_W + 2;

  logic signed [CW-1:0] cand [NST][4];
  logic signed [CW:0]   mst  [NST];
  sm_t                  nrm  [NST];

  always_comb begin
    for (int s = 0; s < NST; s++)
      for (int z = 0; z < 4; z++)
        cand[s][z] = CW'(beta[next_state(idx_t'(s), 2'(z))])
                   + CW'(gamma[gam_idx(idx_t'(s), 2'(z))]);
  end

  for (genvar s = 0; s < NST; s++) begin : g_acs
    maxstar_n #(.N(4), .DW(CW)) u_ms (.x(cand[s]), .y(mst[s]));
  end

  sm_normalize #(.IW(CW + 1)) u_norm (.m_in(mst), .m_out(nrm));

  always_ff @(posedge clk) begin
    if (rst)       beta <= '{default: '0};
    else if (load) beta <= beta_init;
    else if (step) beta <= nrm;
  end
endmodule
