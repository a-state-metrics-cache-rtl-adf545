// llr_ext: extrinsic information calculator
//     Lex(z) = delta * ( Lapo(z) - Lapr(z) - Lin(z) ),   z = 01, 10, 11,
// with the intrinsic (systematic) part Lin(01) = L_s1, Lin(10) = L_s2,
// Lin(11) = L_s1 + L_s2. The extrinsic scaling factor delta (0.85 for this
// decoder) is realised as DELTA_NUM / 2^DELTA_SH, by default 109/128 =
// 0.852, rounding toward minus infinity; the result saturates to the EXT_W-bit
// a priori format of the other constituent decoder. The fixed-point scale
// factor and the saturation are this design's. Only the systematic and a
// priori fields of sym are used; its parity LLRs are ignored. Combinational.
module llr_ext
  import ctc_pkg::*;
#(
  parameter int unsigned DELTA_NUM = 109,
  parameter int unsigned DELTA_SH  = 7
) (
  input  apo_t    apo [3],
  input  sym_in_t sym,
  output ext_t    ex  [3]
);
  localparam int unsigned XW = APO_W + 2;
  localparam int unsigned PW = XW + 8;
  localparam logic signed [PW-1:0] EMAX = PW'(2 ** (EXT_W - 1) - 1);
  localparam logic signed [PW-1:0] EMIN = -PW'(2 ** (EXT_W - 1));

  logic signed [XW-1:0] lin [3];
  logic signed [XW-1:0] lapr[3];
  logic signed [XW-1:0] raw [3];
  logic signed [PW-1:0] scl [3];

  always_comb begin
    lin[0]  = XW'(sym.s1);
    lin[1]  = XW'(sym.s2);
    lin[2]  = XW'(sym.s1) + XW'(sym.s2);
    lapr[0] = XW'(sym.apr1);
    lapr[1] = XW'(sym.apr2);
    lapr[2] = XW'(sym.apr3);
    for (int z = 0; z < 3; z++) begin
      raw[z] = XW'(apo[z]) - lapr[z] - lin[z];
      scl[z] = (PW'(raw[z]) * signed'(PW'(DELTA_NUM))) >>> DELTA_SH;
      if (scl[z] > EMAX)      ex[z] = ext_t'(EMAX);
      else if (scl[z] < EMIN) ex[z] = ext_t'(EMIN);
      else                    ex[z] = ext_t'(scl[z]);
    end
  end
endmodule
