// lifo_smc: last-in first-out state metrics cache of one decoding window.
// The forward pass pushes one compressed word per trellis step; the backward
// pass pops them in reverse order. DEPTH is the window length W and the word
// is SMC_W = 8*3 + 6 = 30 bits, so the cache holds 30*W bits (37.5 % of the
// 80*W bits needed for uncompressed 10-bit metrics).
//
// Storage is a register array addressed by a stack pointer. top shows the
// most recently pushed word combinationally (asynchronous read), so a pop
// and the use of the popped word happen in the same cycle. push writes at the
// clock edge; pop removes the top word at the clock edge. Pushing while full,
// popping while empty, or doing both at once are protocol errors, caught by
// assertions. The asynchronous read and the error rules are this design's.
// Synchronous active-high reset empties the stack (contents are not cleared).
module lifo_smc
  import ctc_pkg::*;
#(
  parameter int unsigned DEPTH = W_DEF
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      push,
  input  smc_word_t din,
  input  logic      pop,
  output smc_word_t top,
  output logic      empty,
  output logic      full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = $clog2(DEPTH + 1);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  smc_word_t mem [DEPTH];
  logic [PW-1:0] sp;          // number of stored words
  logic [AW-1:0] top_addr;

  assign count    = sp;
  assign empty    = (sp == '0);
  assign full     = (sp == PW'(DEPTH));
  assign top_addr = empty ? '0 : AW'(sp - 1'b1);
  assign top      = mem[top_addr];

  always_ff @(posedge clk) begin
    if (rst) begin
      sp <= '0;
    end else if (push && !full) begin
      mem[AW'(sp)] <= din;
      sp <= sp + 1'b1;
    end else if (pop && !empty) begin
      sp <= sp - 1'b1;
    end
  end

  initial assert ($bits(smc_word_t) == SMC_W) else $error("lifo_smc: word width");

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) push |-> !full)
    else $error("lifo_smc: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) pop |-> !empty)
    else $error("lifo_smc: pop while empty");
  a_not_both:     assert property (@(posedge clk) disable iff (rst) !(push && pop))
    else $error("lifo_smc: push and pop in the same cycle");
endmodule
