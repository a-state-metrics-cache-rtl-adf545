// ctc_encoder: 8-state double binary constituent encoder. Each enabled clock
// it takes one bit pair (A,B) and emits the parity pair (Y,W) of the branch
// leaving the current state; the pair of delay cells D1,D2,D3 then moves to
// the next state. With fb = A ^ B ^ D1 ^ D3 (the input adder, fed back from
// D1 and D3):
//     D1' = fb,  D2' = D1 ^ B,  D3' = D2 ^ B,  Y = fb ^ D2 ^ D3,  W = fb ^ D3.
// The state {D1,D2,D3} is the decoder's state number (D1 the MSB); the same
// equations define the trellis in ctc_pkg.
//
// Interface: y, w are combinational from a, b and the state; en advances the
// state at the rising clock edge; load presets the state (used for the
// circular start state of a frame). Synchronous active-high reset to state 0.
// The systematic bits pass straight to the channel and are not repeated here.
module ctc_encoder
  import ctc_pkg::*;
(
  input  logic clk,
  input  logic rst,
  input  logic load,
  input  idx_t load_state,
  input  logic en,
  input  logic a,
  input  logic b,
  output logic y,
  output logic w,
  output idx_t state
);
  logic fb;

  always_comb begin
    fb = a ^ b ^ state[2] ^ state[0];
    y  = fb ^ state[1] ^ state[0];
    w  = fb ^ state[0];
  end

  always_ff @(posedge clk) begin
    if (rst)       state <= '0;
    else if (load) state <= load_state;
    else if (en)   state <= {fb, state[2] ^ b, state[1] ^ b};
  end
endmodule
