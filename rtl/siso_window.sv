// siso_window: one SISO (soft-in soft-out) decoding window of the DB-CTC
// decoder with a compressed state metrics cache.
//
// Forward pass (W cycles): BMU_alpha forms the branch metrics of step k from
// the soft inputs fwd_sym (step fwd_idx+1), the forward recursion computes
// alpha_k, and the compressing module reduces alpha_{k-1} to an index
// sequence and an increase metric which are pushed into the LIFO SMC.
// Backward pass (W cycles): bwd_sym holds the soft inputs of step
// k = bwd_idx+1, k = W..1. BMU_beta forms gamma_k, the LIFO pops the word of
// alpha_{k-1} and the regeneration module turns it back into the linear
// estimate alpha_hat_{k-1}; together with beta_k from the backward recursion
// the a posteriori LLR calculator and the extrinsic calculator produce the
// LLRs of step k, while the backward recursion moves on to beta_{k-1}.
//
// Interface: the soft inputs come from an external memory addressed by
// fwd_idx / bwd_idx, read combinationally in the same cycle. alpha_init and
// beta_init are the boundary metrics alpha_0 and beta_W, sampled with start.
// Outputs are registered: out_valid marks one step, out_idx = k-1, ex the
// extrinsic LLRs and apo the a posteriori LLRs of symbols 01, 10, 11. Steps
// come out in the order W..1. Counting clock edges from the one that samples
// start, the forward steps happen at edges 1..W and the backward steps at
// edges W+1..2W; each step's LLRs are on the outputs right after its edge,
// so the last output of a window appears 2*W edges after start.
module siso_window
  import ctc_pkg::*;
#(
  parameter int unsigned W         = W_DEF,
  parameter int unsigned DELTA_NUM = 109,
  parameter int unsigned DELTA_SH  = 7
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  sm_t  alpha_init [NST],
  input  sm_t  beta_init  [NST],
  output logic [$clog2(W)-1:0] fwd_idx,
  input  sym_in_t              fwd_sym,
  output logic [$clog2(W)-1:0] bwd_idx,
  input  sym_in_t              bwd_sym,
  output logic busy,
  output logic done,
  output logic smc_full,
  output logic inc_sat,
  output logic out_valid,
  output logic [$clog2(W)-1:0] out_idx,
  output ext_t out_ex  [3],
  output apo_t out_apo [3]
);
  logic load, fwd_step, bwd_step;
  gam_t gam_f [16];
  gam_t gam_b [16];
  sm_t  alpha [NST];
  sm_t  beta  [NST];
  smc_word_t cw, top;
  logic smc_empty;
  ahat_t ahat [NST];
  apo_t  apo  [3];
  ext_t  ex   [3];

  siso_ctrl #(.W(W)) u_ctrl (
    .clk, .rst, .start, .load, .fwd_step, .bwd_step,
    .fwd_idx, .bwd_idx, .busy, .done
  );

  bmu u_bmu_a (.sym(fwd_sym), .gamma(gam_f));
  bmu u_bmu_b (.sym(bwd_sym), .gamma(gam_b));

  fwd_recursion u_fwd (
    .clk, .rst, .load, .alpha_init, .step(fwd_step), .gamma(gam_f), .alpha
  );

  smc_compress u_cmp (
    .alpha, .word(cw), .alpha_min(), .alpha_max(), .inc_sat
  );

  lifo_smc #(.DEPTH(W)) u_smc (
    .clk, .rst, .push(fwd_step), .din(cw), .pop(bwd_step), .top,
    .empty(smc_empty), .full(smc_full), .count()
  );

  smc_regen u_regen (.word(top), .alpha_hat(ahat));

  bwd_recursion u_bwd (
    .clk, .rst, .load, .beta_init, .step(bwd_step), .gamma(gam_b), .beta
  );

  llr_apo u_apo (.alpha_hat(ahat), .gamma(gam_b), .beta, .apo);

  llr_ext #(.DELTA_NUM(DELTA_NUM), .DELTA_SH(DELTA_SH)) u_ext (
    .apo, .sym(bwd_sym), .ex
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_idx   <= '0;
      out_ex    <= '{default: '0};
      out_apo   <= '{default: '0};
    end else begin
      out_valid <= bwd_step;
      if (bwd_step) begin
        out_idx <= bwd_idx;
        out_ex  <= ex;
        out_apo <= apo;
      end
    end
  end

  // The SMC is empty when a window starts and full when the backward pass
  // begins.
  a_smc_empty_at_start: assert property (@(posedge clk) disable iff (rst)
    load |-> smc_empty);
endmodule
