// dbctc_top: the DB-CTC constituent encoder and the parallel SISO decoder
// with compressed state metrics caches, side by side. The encoder (enc_*)
// maps bit pairs to parity pairs; the decoder (all other ports, see
// siso_array and siso_window) decodes a frame of P windows of W trellis
// steps each, all windows at once, from soft inputs held in external
// per-window memories. By default P = 20 and W = 20: one frame of 400 bit
// pairs per half-iteration of 2*W cycles. The two parts share only clock and
// reset. The interleaver, the second constituent decoding and the iteration
// control of a complete turbo decoder are outside this top.
module dbctc_top
  import ctc_pkg::*;
#(
  parameter int unsigned P = 20,
  parameter int unsigned W = W_DEF
) (
  input  logic clk,
  input  logic rst,
  // constituent encoder
  input  logic enc_load,
  input  idx_t enc_load_state,
  input  logic enc_en,
  input  logic enc_a,
  input  logic enc_b,
  output logic enc_y,
  output logic enc_w,
  output idx_t enc_state,
  // parallel SISO decoding windows
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
  ctc_encoder u_enc (
    .clk, .rst, .load(enc_load), .load_state(enc_load_state), .en(enc_en),
    .a(enc_a), .b(enc_b), .y(enc_y), .w(enc_w), .state(enc_state)
  );

  siso_array #(.P(P), .W(W)) u_dec (
    .clk, .rst, .start, .alpha_init, .beta_init,
    .fwd_idx, .fwd_sym, .bwd_idx, .bwd_sym,
    .busy, .done, .smc_full, .inc_sat, .out_valid, .out_idx, .out_ex, .out_apo
  );
endmodule
