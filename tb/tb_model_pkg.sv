// tb_model_pkg: integer reference model of the DB-CTC SISO decoding window,
// written independently of the RTL for the self-checking testbenches. It
// works on plain ints and reproduces the fixed-point rules of the design
// (quarter-step linear max*, normalisation to a maximum of 0 with clipping
// at -512, rounded and saturated increase metric, 109/128 extrinsic scaling,
// 8-bit extrinsic saturation). The trellis is obtained by running the
// encoder's shift-register equations bit by bit, not from the RTL package.
package tb_model_pkg;

  localparam int NS = 8;
  localparam int SM_FLOOR = -512;

  typedef struct {
    int s1, s2, p1, p2;
    int apr[4];           // apr[0] = 0
  } msym_t;

  // encoder: state bits d1 (MSB), d2, d3; inputs a, b
  function automatic void enc(input int st, input int a, input int b,
                              output int nst, output int y, output int w);
    int d1, d2, d3, f;
    d1 = (st >> 2) & 1;
    d2 = (st >> 1) & 1;
    d3 = st & 1;
    f  = a ^ b ^ d1 ^ d3;
    y  = f ^ d2 ^ d3;
    w  = f ^ d3;
    nst = (f << 2) | ((d1 ^ b) << 1) | (d2 ^ b);
  endfunction

  function automatic int floor4(int v);
    // floor(v/4) for any sign
    return (v >= 0) ? v / 4 : -((-v + 3) / 4);
  endfunction

  function automatic int ms2(int x1, int x2);
    int t1, t2, r;
    t1 = floor4(x1 + 3 * x2) + 2;
    t2 = floor4(3 * x1 + x2) + 2;
    r = x1;
    if (x2 > r) r = x2;
    if (t1 > r) r = t1;
    if (t2 > r) r = t2;
    return r;
  endfunction

  // n-input simplified max*: the two largest values by a descending
  // bubble sort of a copy
  function automatic int msn(int x[], output bit corr);
    int v[];
    int r;
    v = new[x.size()];
    foreach (x[i]) v[i] = x[i];
    for (int i = 0; i < v.size(); i++)
      for (int j = 0; j < v.size() - 1 - i; j++)
        if (v[j] < v[j+1]) begin
          int t;
          t = v[j]; v[j] = v[j+1]; v[j+1] = t;
        end
    r = ms2(v[0], v[1]);
    corr = (r != v[0]);
    return r;
  endfunction

  function automatic int gamma(msym_t s, int a, int b, int y, int w);
    return a * s.s1 + b * s.s2 + y * s.p1 + w * s.p2 + s.apr[a + 2 * b];
  endfunction

  function automatic void normalize(ref int m[NS]);
    int mx;
    mx = m[0];
    for (int i = 1; i < NS; i++) if (m[i] > mx) mx = m[i];
    for (int i = 0; i < NS; i++) begin
      m[i] = m[i] - mx;
      if (m[i] < SM_FLOOR) m[i] = SM_FLOOR;
    end
  endfunction

  function automatic void fwd_step(ref int al[NS], input msym_t s, ref int ncorr);
    int nw[NS];
    bit c;
    for (int ns = 0; ns < NS; ns++) begin
      int tmp[];
      int n;
      tmp = new[4];
      n = 0;
      // search every branch of the trellis for those ending in ns
      for (int st = 0; st < NS; st++)
        for (int z = 0; z < 4; z++) begin
          int nst, y, w;
          enc(st, z & 1, z >> 1, nst, y, w);
          if (nst == ns) begin
            tmp[n] = al[st] + gamma(s, z & 1, z >> 1, y, w);
            n++;
          end
        end
      nw[ns] = msn(tmp, c);
      ncorr += c;
    end
    normalize(nw);
    al = nw;
  endfunction

  function automatic void bwd_step(ref int be[NS], input msym_t s, ref int ncorr);
    int nw[NS];
    bit c;
    for (int st = 0; st < NS; st++) begin
      int tmp[];
      tmp = new[4];
      for (int z = 0; z < 4; z++) begin
        int nst, y, w;
        enc(st, z & 1, z >> 1, nst, y, w);
        tmp[z] = be[nst] + gamma(s, z & 1, z >> 1, y, w);
      end
      nw[st] = msn(tmp, c);
      ncorr += c;
    end
    normalize(nw);
    be = nw;
  endfunction

  // compression: index sequence by stable sort, increase metric
  function automatic void compress(input int al[NS], output int is[NS],
                                   output int inc, output bit sat);
    int order[NS];
    int q;
    for (int i = 0; i < NS; i++) order[i] = i;
    for (int i = 0; i < NS; i++)
      for (int j = 0; j < NS - 1 - i; j++)
        if (al[order[j]] > al[order[j+1]]) begin
          int t;
          t = order[j]; order[j] = order[j+1]; order[j+1] = t;
        end
    is = order;
    q = (al[order[NS-1]] - al[order[0]] + 3) / 7;
    sat = (q > 63);
    inc = sat ? 63 : q;
  endfunction

  function automatic void regen(input int is[NS], input int inc, output int ah[NS]);
    for (int r = 0; r < NS; r++) ah[is[r]] = r * inc;
  endfunction

  function automatic void apo(input int ah[NS], input int be[NS], input msym_t s,
                              output int lapo[3], ref int ncorr);
    int m[4];
    bit c;
    for (int z = 0; z < 4; z++) begin
      int tmp[];
      tmp = new[NS];
      for (int st = 0; st < NS; st++) begin
        int nst, y, w;
        enc(st, z & 1, z >> 1, nst, y, w);
        tmp[st] = ah[st] + gamma(s, z & 1, z >> 1, y, w) + be[nst];
      end
      m[z] = msn(tmp, c);
      ncorr += c;
    end
    for (int z = 1; z < 4; z++) lapo[z-1] = m[z] - m[0];
  endfunction

  function automatic int floor_div(int v, int d);
    return (v >= 0) ? v / d : -((-v + d - 1) / d);
  endfunction

  function automatic void ext(input int lapo[3], input msym_t s, output int ex[3],
                              output int nsat);
    int lin[3];
    lin[0] = s.s1; lin[1] = s.s2; lin[2] = s.s1 + s.s2;
    nsat = 0;
    for (int z = 0; z < 3; z++) begin
      int v;
      v = floor_div((lapo[z] - s.apr[z+1] - lin[z]) * 109, 128);
      if (v > 127)  begin v = 127;  nsat++; end
      if (v < -128) begin v = -128; nsat++; end
      ex[z] = v;
    end
  endfunction

endpackage
