// bmu: branch metric unit of one trellis step (BMU_alpha feeds the forward
// recursion, BMU_beta the backward recursion and the LLR calculators; both
// are instances of this module).
//
// The branch metric of the log-domain MAP algorithm is
//     gamma(z) = Lc/2 * sum(x*y) + La(z),   x = +1/-1 the transmitted bits.
// Writing x = 2*bit - 1 and dropping the term that is common to all 32
// branches of a step (it cancels in the normalised recursions and in the LLR
// differences), this becomes
//     gamma(z, W, Y) = A*L_s1 + B*L_s2 + Y*L_p1 + W*L_p2 + La(z)
// with L = Lc*y the channel LLRs at the input. A branch is fully described by
// its input symbol z = {B,A} and parity pair {W,Y}, so a step has only 16
// distinct metrics; output gamma[{z,W,Y}]. La(00) = 0 is the reference.
// Combinational. The dropped common term is this design's simplification.
// As a consequence some output bits are constant or copies of inputs:
// gamma[0] (symbol 00, parity 00) is always 0, and gamma[1], gamma[2] are
// just the sign-extended parity LLRs. They are kept so that every branch is
// addressed the same way downstream.
module bmu
  import ctc_pkg::*;
(
  input  sym_in_t sym,
  output gam_t    gamma [16]
);
  always_comb begin
    for (int i = 0; i < 16; i++) begin
      gam_t g;
      g = '0;
      if (i[2]) g += gam_t'(sym.s1);    // A
      if (i[3]) g += gam_t'(sym.s2);    // B
      if (i[0]) g += gam_t'(sym.p1);    // Y
      if (i[1]) g += gam_t'(sym.p2);    // W
      case (i[3:2])
        2'b01:   g += gam_t'(sym.apr1);
        2'b10:   g += gam_t'(sym.apr2);
        2'b11:   g += gam_t'(sym.apr3);
        default: ;
      endcase
      gamma[i] = g;
    end
  end
endmodule
