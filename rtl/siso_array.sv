// siso_array: P independent SISO decoding windows running in parallel, the
// throughput arrangement of the decoder: a received frame of P*W trellis
// steps is cut into P windows of W steps and every window is decoded at the
// same time by its own siso_window, each with its own compressed LIFO SMC.
// The default P = 20 windows of W = 20 steps covers a frame of 400 bit
// pairs (800 information bits) in one half-iteration of 2*W cycles.
//
// All windows share start and run in lockstep, so one pair of step
// addresses (fwd_idx, bwd_idx, taken from window 0) serves every window's
// soft-input memory: window p reads fwd_sym[p] / bwd_sym[p], the inputs of
// its step fwd_idx+1 / bwd_idx+1, in the same cycle. Boundary metrics are
// per window (alpha_init[p], beta_init[p]). Results of all windows leave
// together: out_valid and out_idx are common, out_ex[p] and out_apo[p] are
// window p's LLRs. Windows do not exchange boundary metrics; they are
// independent, as in the evaluated configuration. Lockstep operation and
// the shared addressing are this design's choices. The addresses and status
// of windows 1..P-1 equal those of window 0; an assertion checks that they
// agree.
module siso_array
  import ctc_pkg::*;
#(
  parameter int unsigned P         = 20,
  parameter int unsigned W         = W_DEF,
  parameter int unsigned DELTA_NUM = 109,
  parameter int unsigned DELTA_SH  = 7
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  input  sm_t  alpha_init [P][NST],
  input  sm_t  beta_init  [P][NST],
  output logic [$clog2(W)-1:0] fwd_idx,
  input  sym_in_t              fwd_sym [P],
  output logic [$clog2(W)-1:0] bwd_idx,
  input  sym_in_t              bwd_sym [P],
  output logic busy,
  output logic done,
  output logic smc_full,
  output logic [P-1:0] inc_sat,
  output logic out_valid,
  output logic [$clog2(W)-1:0] out_idx,
  output ext_t out_ex  [P][3],
  output apo_t out_apo [P][3]
);
  logic [$clog2(W)-1:0] f_idx [P];
  logic [$clog2(W)-1:0] b_idx [P];
  logic [$clog2(W)-1:0] o_idx [P];
  logic [P-1:0] w_busy, w_done, w_full, w_valid;

  for (genvar p = 0; p < P; p++) begin : g_win
    siso_window #(.W(W), .DELTA_NUM(DELTA_NUM), .DELTA_SH(DELTA_SH)) u_win (
      .clk, .rst, .start,
      .alpha_init(alpha_init[p]), .beta_init(beta_init[p]),
      .fwd_idx(f_idx[p]), .fwd_sym(fwd_sym[p]),
      .bwd_idx(b_idx[p]), .bwd_sym(bwd_sym[p]),
      .busy(w_busy[p]), .done(w_done[p]), .smc_full(w_full[p]), .inc_sat(inc_sat[p]),
      .out_valid(w_valid[p]), .out_idx(o_idx[p]),
      .out_ex(out_ex[p]), .out_apo(out_apo[p])
    );

    a_lockstep: assert property (@(posedge clk) disable iff (rst)
      f_idx[p] == f_idx[0] && b_idx[p] == b_idx[0] && w_valid[p] == w_valid[0]
      && w_busy[p] == w_busy[0] && w_done[p] == w_done[0] && o_idx[p] == o_idx[0])
      else $error("siso_array: window %0d out of step", p);
  end

  assign fwd_idx   = f_idx[0];
  assign bwd_idx   = b_idx[0];
  assign out_idx   = o_idx[0];
  assign busy      = w_busy[0];
  assign done      = w_done[0];
  assign smc_full  = &w_full;
  assign out_valid = w_valid[0];
endmodule
