// ctc_pkg: shared constants, types and trellis functions of the double binary
// convolutional turbo code (DB-CTC) SISO decoding window.
//
// Number format. Every metric (channel LLR, a priori / extrinsic LLR, branch
// metric, state metric) is a two's complement fixed-point number with FRAC
// fractional bits, so the constants 0.25, 0.75 and 0.5 of the linear max*
// approximation are exact. The widths below are this design's choice except
// the 10-bit state metric, the 3-bit state index and the 6-bit increase
// metric, which are the figures the SMC size comparison is built on.
//
// Trellis. The 8-state constituent code has state s = {s1,s2,s3} (the contents
// of delay cells D1,D2,D3, s1 the MSB, so state index 0..7 reads 000..111) and
// a 2-bit input symbol z = {b,a}: z[0] is bit A, carried by systematic channel
// s1, z[1] is bit B, carried by systematic channel s2. With the feedback
// fb = A^B^s1^s3 the next state is {fb, s1^B, s2^B}, and the parity outputs
// are Y = fb^s2^s3 (channel p1) and W = fb^s3 (channel p2).
package ctc_pkg;

  // Fixed-point format
  localparam int unsigned FRAC   = 2;    // fractional bits of every metric
  localparam int unsigned LLR_W  = 6;    // channel LLR  Lc*y
  localparam int unsigned EXT_W  = 8;    // a priori / extrinsic LLR
  localparam int unsigned GAM_W  = 10;   // branch metric
  localparam int unsigned SM_W   = 10;   // state metric (alpha, beta)
  localparam int unsigned IDX_W  = 3;    // index of one of the 8 states
  localparam int unsigned INC_W  = 6;    // increase metric alpha_inc
  localparam int unsigned AH_W   = INC_W + IDX_W; // regenerated alpha (0..7*inc)
  localparam int unsigned NST    = 8;    // trellis states
  localparam int unsigned SMC_W  = NST * IDX_W + INC_W; // 30-bit SMC word
  localparam int unsigned SUM_W  = 14;   // alpha+gamma+beta sums in the LLR unit
  localparam int unsigned APO_W  = SUM_W + 2; // a posteriori LLR
  localparam int unsigned W_DEF  = 20;   // window length in trellis steps

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [EXT_W-1:0] ext_t;
  typedef logic signed [GAM_W-1:0] gam_t;
  typedef logic signed [SM_W-1:0]  sm_t;
  typedef logic [IDX_W-1:0]        idx_t;
  typedef logic [INC_W-1:0]        inc_t;
  typedef logic [AH_W-1:0]         ahat_t;
  typedef logic signed [APO_W-1:0] apo_t;

  // Soft inputs of one trellis step: four channel LLRs and the a priori LLRs
  // of symbols 01, 10, 11 (the one of symbol 00 is the reference, 0).
  typedef struct packed {
    llr_t s1;
    llr_t s2;
    llr_t p1;
    llr_t p2;
    ext_t apr1;
    ext_t apr2;
    ext_t apr3;
  } sym_in_t;

  // One word of the state metrics cache: the index sequence (is_0 = state
  // with the smallest metric ... is_7 = state with the largest) and the
  // increase metric.
  typedef struct packed {
    idx_t [NST-1:0] is;
    inc_t           inc;
  } smc_word_t;

  // Next state reached from state s with input symbol z
  function automatic idx_t next_state(idx_t s, logic [1:0] z);
    logic fb;
    fb = z[0] ^ z[1] ^ s[2] ^ s[0];
    return {fb, s[2] ^ z[1], s[1] ^ z[1]};
  endfunction

  // State from which input symbol z leads to state ns
  function automatic idx_t prev_state(idx_t ns, logic [1:0] z);
    logic s1, s2, s3;
    s1 = ns[1] ^ z[1];
    s2 = ns[0] ^ z[1];
    s3 = ns[2] ^ z[0] ^ z[1] ^ s1;
    return {s1, s2, s3};
  endfunction

  // Parity pair {W,Y} produced on the branch leaving s with input z
  function automatic logic [1:0] parity(idx_t s, logic [1:0] z);
    logic fb;
    fb = z[0] ^ z[1] ^ s[2] ^ s[0];
    return {fb ^ s[0], fb ^ s[1] ^ s[0]};
  endfunction

  // Index into the 16 branch metrics of one step: {z, W, Y}
  function automatic logic [3:0] gam_idx(idx_t s, logic [1:0] z);
    return {z, parity(s, z)};
  endfunction

endpackage
