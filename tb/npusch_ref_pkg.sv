// npusch_ref_pkg: behavioural reference models of the NPUSCH transmitter
// stages, written straight from the 3GPP definitions (bit-by-bit polynomial
// division, direct QPP formula, explicit <NULL> matrices, full gold sequence,
// floating-point DFT/IFFT). The testbenches compare the RTL with these.
package npusch_ref_pkg;

  typedef bit bitq_t[$];

  // CRC24A by long division of a(D) D^24 by g(D); returns p_0..p_23 in [23:0]
  // with p_0 in bit 23.
  function automatic logic [23:0] crc24a_ref(input bitq_t a);
    bit       r [$];
    bit [24:0] g;
    logic [23:0] p;
    g = 25'b1_1000_0110_0100_1100_1111_1011;
    r = a;
    for (int i = 0; i < 24; i++) r.push_back(1'b0);
    for (int i = 0; i < a.size(); i++)
      if (r[i])
        for (int j = 0; j < 25; j++) r[i + j] ^= g[24 - j];
    for (int j = 0; j < 24; j++) p[23 - j] = r[a.size() + j];
    return p;
  endfunction

  // one RSC encoder over a whole sequence plus its 3 tail steps
  function automatic void rsc_ref(input bitq_t u, output bitq_t z, output bitq_t xt,
                                  output bitq_t zt);
    bit s1, s2, s3, a, x;
    s1 = 0; s2 = 0; s3 = 0;
    z = {}; xt = {}; zt = {};
    for (int i = 0; i < u.size(); i++) begin
      a = u[i] ^ s2 ^ s3;
      z.push_back(a ^ s1 ^ s3);
      s3 = s2; s2 = s1; s1 = a;
    end
    for (int t = 0; t < 3; t++) begin
      x = s2 ^ s3;
      a = x ^ s2 ^ s3;
      xt.push_back(x);
      zt.push_back(a ^ s1 ^ s3);
      s3 = s2; s2 = s1; s1 = a;
    end
  endfunction

  function automatic void turbo_ref(input bitq_t c, input int f1, input int f2,
                                    output bitq_t d0, output bitq_t d1, output bitq_t d2);
    int K;
    bitq_t ci, z1, z2, x1t, z1t, x2t, z2t;
    K = c.size();
    ci = {};
    for (int i = 0; i < K; i++) begin
      longint p;
      int pi;
      bit b;
      p = (longint'(f1) * longint'(i) + longint'(f2) * longint'(i) * longint'(i)) % longint'(K);
      pi = int'(p);
      b = c[pi];
      ci.push_back(b);
    end
    rsc_ref(c, z1, x1t, z1t);
    rsc_ref(ci, z2, x2t, z2t);
    d0 = c; d1 = z1; d2 = z2;
    d0.push_back(x1t[0]); d0.push_back(z1t[1]); d0.push_back(x2t[0]); d0.push_back(z2t[1]);
    d1.push_back(z1t[0]); d1.push_back(x1t[2]); d1.push_back(z2t[0]); d1.push_back(x2t[2]);
    d2.push_back(x1t[1]); d2.push_back(z1t[2]); d2.push_back(x2t[1]); d2.push_back(z2t[2]);
  endfunction

  // rate matching straight from the definition; -1 marks <NULL>
  // (rm_walk is set to the number of circular-buffer positions visited)
  int rm_walk;
  function automatic bitq_t rm_ref(input bitq_t d0, input bitq_t d1, input bitq_t d2,
                                   input int e_len, input int rv);
    int D, R, KPI, ND, NCB, k0, j, idx;
    int P [32];
    int y [3][$];
    int v [3][$];
    int w [$];
    bitq_t e;
    for (int c = 0; c < 32; c++) P[c] = {c[0], c[1], c[2], c[3], c[4]};
    D = d0.size();
    R = (D + 31) / 32;
    KPI = 32 * R;
    ND = KPI - D;
    for (int i = 0; i < 3; i++) begin
      y[i] = {};
      for (int k = 0; k < ND; k++) y[i].push_back(-1);
    end
    for (int k = 0; k < D; k++) begin
      y[0].push_back(int'(d0[k])); y[1].push_back(int'(d1[k])); y[2].push_back(int'(d2[k]));
    end
    for (int i = 0; i < 2; i++) begin
      v[i] = {};
      for (int c = 0; c < 32; c++)
        for (int r = 0; r < R; r++) v[i].push_back(y[i][P[c] + 32 * r]);
    end
    v[2] = {};
    for (int k = 0; k < KPI; k++) v[2].push_back(y[2][(P[k / R] + 32 * (k % R) + 1) % KPI]);
    w = {};
    for (int k = 0; k < KPI; k++) w.push_back(v[0][k]);
    for (int k = 0; k < KPI; k++) begin w.push_back(v[1][k]); w.push_back(v[2][k]); end
    NCB = 3 * KPI;
    k0 = R * (2 * ((NCB + 8 * R - 1) / (8 * R)) * rv + 2);
    e = {};
    j = 0;
    while (e.size() < e_len) begin
      idx = (k0 + j) % NCB;
      if (w[idx] != -1) e.push_back(w[idx][0]);
      j++;
    end
    rm_walk = j;
    return e;
  endfunction

  // channel interleaver: Qm-bit symbols written by rows of C = 6 Nslots, read by columns
  function automatic bitq_t ci_ref(input bitq_t e, input int qm, input int nslots);
    int C, R;
    bitq_t h;
    C = 6 * nslots;
    R = e.size() / (qm * C);
    h = {};
    for (int c = 0; c < C; c++)
      for (int r = 0; r < R; r++)
        for (int b = 0; b < qm; b++) h.push_back(e[(r * C + c) * qm + b]);
    return h;
  endfunction

  function automatic int c_init_ref(input int rnti, input int nf, input int ns, input int nid);
    return rnti * (1 << 14) + (nf % 2) * (1 << 13) + (ns / 2) * (1 << 9) + nid;
  endfunction

  // gold sequence c(0..len-1)
  function automatic bitq_t gold_ref(input int cinit, input int len);
    bit x1 [$], x2 [$];
    bitq_t c;
    for (int i = 0; i < 31; i++) begin
      x1.push_back(i == 0);
      x2.push_back(cinit[i]);
    end
    for (int n = 0; n < len + 1600; n++) begin
      x1.push_back(x1[n + 3] ^ x1[n]);
      x2.push_back(x2[n + 3] ^ x2[n + 2] ^ x2[n + 1] ^ x2[n]);
    end
    c = {};
    for (int n = 0; n < len; n++) c.push_back(x1[n + 1600] ^ x2[n + 1600]);
    return c;
  endfunction

  // DFT (sign -1) or IDFT without scaling, in floating point
  function automatic void dft_real(input real xr [], input real xi [], input bit inverse,
                                   output real yr [], output real yi []);
    int N;
    real ang, pi;
    pi = 3.14159265358979323846;
    N = xr.size();
    yr = new[N];
    yi = new[N];
    for (int k = 0; k < N; k++) begin
      yr[k] = 0.0; yi[k] = 0.0;
      for (int n = 0; n < N; n++) begin
        ang = (inverse ? 2.0 : -2.0) * pi * real'(n * k % N) / real'(N);
        yr[k] += xr[n] * $cos(ang) - xi[n] * $sin(ang);
        yi[k] += xr[n] * $sin(ang) + xi[n] * $cos(ang);
      end
    end
  endfunction

endpackage
