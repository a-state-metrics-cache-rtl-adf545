// siso_ctrl: sequencer of one SISO decoding window of W trellis steps.
// A window is decoded in two passes over the same W steps:
//   FWD  (W cycles): step k = 1..W. The forward recursion turns alpha_{k-1}
//        into alpha_k while alpha_{k-1}, compressed, is pushed into the LIFO
//        SMC. fwd_idx = k-1 addresses the soft inputs of step k.
//   BWD  (W cycles): step k = W..1. The LIFO pops the word of alpha_{k-1},
//        the backward recursion turns beta_k into beta_{k-1}, and the LLR of
//        step k is formed. bwd_idx = k-1 addresses the soft inputs of step k.
// start (accepted in IDLE) loads the initial metrics (load, one cycle in
// IDLE->FWD transition) and starts FWD; done pulses in the last BWD cycle.
// A window therefore takes 2*W cycles from the cycle after start. The two
// passes run one after the other; overlapping the passes of consecutive
// windows is not done. The state encoding and handshake are this design's.
module siso_ctrl
  import ctc_pkg::*;
#(
  parameter int unsigned W = W_DEF
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic load,
  output logic fwd_step,
  output logic bwd_step,
  output logic [$clog2(W)-1:0] fwd_idx,
  output logic [$clog2(W)-1:0] bwd_idx,
  output logic busy,
  output logic done
);
  localparam int unsigned CW = $clog2(W);

  typedef enum logic [1:0] {S_IDLE, S_FWD, S_BWD} state_t;
  state_t        st;
  logic [CW-1:0] cnt;
  logic          last;

  assign last     = (cnt == CW'(W - 1));
  assign load     = (st == S_IDLE) && start;
  assign fwd_step = (st == S_FWD);
  assign bwd_step = (st == S_BWD);
  assign fwd_idx  = cnt;
  assign bwd_idx  = CW'(W - 1) - cnt;
  assign busy     = (st != S_IDLE);
  assign done     = (st == S_BWD) && last;

  always_ff @(posedge clk) begin
    if (rst) begin
      st  <= S_IDLE;
      cnt <= '0;
    end else begin
      unique case (st)
        S_IDLE: if (start) begin
          st  <= S_FWD;
          cnt <= '0;
        end
        S_FWD: begin
          cnt <= last ? '0 : cnt + 1'b1;
          if (last) st <= S_BWD;
        end
        S_BWD: begin
          cnt <= last ? '0 : cnt + 1'b1;
          if (last) st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

  initial assert (W >= 2) else $error("siso_ctrl: window must have at least two steps");
endmodule
