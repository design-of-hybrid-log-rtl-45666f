// tb_ref_pkg: reference models for the testbenches, written independently
// of the RTL: the four-state (7,5) RSC code with explicit shift-register
// taps, the hybrid correction evaluated in floating point and rounded, the
// branch metric as a floored division, a procedural forward-backward
// (BCJR) decoder, optionally split into independent segments, the QPP permutation by its direct formula, and a BPSK /
// AWGN channel with a Box-Muller noise source.
package tb_ref_pkg;

  localparam int FRAC = 3;
  localparam real SCALE = 8.0;   // 2**FRAC

  // ---- (7,5) RSC code, state = {s1, s2}, s1 the most recent cell
  function automatic int enc_next(int s, int u);
    int s1, s2, a;
    s1 = (s >> 1) & 1; s2 = s & 1;
    a  = u ^ s1 ^ s2;           // feedback 1 + D + D^2
    return (a << 1) | s1;
  endfunction

  function automatic int enc_par(int s, int u);
    int s1, s2, a;
    s1 = (s >> 1) & 1; s2 = s & 1;
    a  = u ^ s1 ^ s2;
    return a ^ s2;              // feed-forward 1 + D^2
  endfunction

  // ---- hybrid correction term, quantised to FRAC bits
  function automatic int fc_ref(int xq);
    real x, f;
    x = xq / SCALE;
    if (x < 1.5) begin
      f = 0.693 - 0.5 * x;
      if (f < 0.0) f = 0.0;
    end else begin
      f = 0.1693 / (2.0 ** $floor(x));
    end
    return $rtoi(f * SCALE + 0.5);
  endfunction

  function automatic int maxstar_ref(int a, int b);
    int d;
    d = (a > b) ? a - b : b - a;
    return ((a > b) ? a : b) + fc_ref(d);
  endfunction

  function automatic int satr(int v, int w);
    int hi, lo;
    hi = (1 << (w - 1)) - 1; lo = -(1 << (w - 1));
    return (v > hi) ? hi : (v < lo) ? lo : v;
  endfunction

  // gamma for label (u, p): floor((xs*(la+ys) + xp*yp) / 2)
  function automatic int gamma_ref(int la, int ys, int yp, int u, int p);
    int v;
    v = (u ? 1 : -1) * (la + ys) + (p ? 1 : -1) * yp;
    return $rtoi($floor(v / 2.0));
  endfunction

  // ---- one forward step, normalised to state 0
  function automatic void fwd_ref(input int ain[4], input int la, ys, yp, output int aout[4]);
    int m[4], c[4][2], n[4];
    n = '{0, 0, 0, 0};
    for (int s = 0; s < 4; s++)
      for (int u = 0; u < 2; u++) begin
        int t;
        t = enc_next(s, u);
        c[t][n[t]] = ain[s] + gamma_ref(la, ys, yp, u, enc_par(s, u));
        n[t]++;
      end
    for (int t = 0; t < 4; t++) m[t] = maxstar_ref(c[t][0], c[t][1]);
    for (int t = 0; t < 4; t++) aout[t] = m[t] - m[0];
  endfunction

  function automatic void bwd_ref(input int bin[4], input int la, ys, yp, output int bout[4]);
    int m[4];
    for (int s = 0; s < 4; s++)
      m[s] = maxstar_ref(bin[enc_next(s, 0)] + gamma_ref(la, ys, yp, 0, enc_par(s, 0)),
                         bin[enc_next(s, 1)] + gamma_ref(la, ys, yp, 1, enc_par(s, 1)));
    for (int s = 0; s < 4; s++) bout[s] = m[s] - m[0];
  endfunction

  // LLR: per bit value, max* over states paired (0,1), (2,3), then together
  function automatic int llr_ref(input int al[4], input int be[4], input int la, ys, yp);
    int r[2];
    for (int u = 0; u < 2; u++) begin
      int v[4];
      for (int s = 0; s < 4; s++)
        v[s] = al[s] + gamma_ref(la, ys, yp, u, enc_par(s, u)) + be[enc_next(s, u)];
      r[u] = maxstar_ref(maxstar_ref(v[0], v[1]), maxstar_ref(v[2], v[3]));
    end
    return satr(r[1] - r[0], 12);
  endfunction

  // ---- whole-frame SISO: a-posteriori and extrinsic LLRs
  function automatic void siso_ref(input int n, input int la[], input int ys[], input int yp[],
                                   output int llr[], output int ext[], input bit start_known = 1);
    int al[][4];
    int a[4], b[4], nb[4];
    al  = new[n];
    llr = new[n];
    ext = new[n];
    a = start_known ? '{0, -512, -512, -512} : '{0, 0, 0, 0};
    for (int k = 0; k < n; k++) begin
      al[k] = a;
      fwd_ref(a, la[k], ys[k], yp[k], a);
    end
    b = '{0, 0, 0, 0};
    for (int k = n - 1; k >= 0; k--) begin
      llr[k] = llr_ref(al[k], b, la[k], ys[k], yp[k]);
      ext[k] = satr(llr[k] - la[k] - ys[k], 9);
      bwd_ref(b, la[k], ys[k], yp[k], nb);
      b = nb;
    end
  endfunction

  function automatic int qpp_ref(int x, int n, int f1, int f2);
    longint v;
    v = (longint'(f1) * x + longint'(f2) * x * x) % n;
    return int'(v);
  endfunction

  // ---- turbo encoder: returns systematic, parity 1, parity 2
  function automatic void turbo_enc_ref(input int n, input int f1, input int f2, input bit u[],
                                        output bit p1[], output bit p2[]);
    int s;
    p1 = new[n]; p2 = new[n];
    s = 0;
    for (int k = 0; k < n; k++) begin p1[k] = enc_par(s, u[k]) != 0; s = enc_next(s, u[k]); end
    s = 0;
    for (int k = 0; k < n; k++) begin
      int ui;
      ui = u[qpp_ref(k, n, f1, f2)];
      p2[k] = enc_par(s, ui) != 0;
      s = enc_next(s, ui);
    end
  endfunction

  // ---- a frame decoded as p independent segments of n/p bits
  function automatic void seg_ref(input int n, input int p, input int la[], input int ys[],
                                  input int yp[], output int llr[], output int ext[]);
    int m;
    m = n / p;
    llr = new[n]; ext = new[n];
    for (int j = 0; j < p; j++) begin
      int sl[], sy[], sp[], ol[], oe[];
      sl = new[m]; sy = new[m]; sp = new[m];
      for (int i = 0; i < m; i++) begin
        sl[i] = la[j*m + i]; sy[i] = ys[j*m + i]; sp[i] = yp[j*m + i];
      end
      siso_ref(m, sl, sy, sp, ol, oe, j == 0);
      for (int i = 0; i < m; i++) begin llr[j*m + i] = ol[i]; ext[j*m + i] = oe[i]; end
    end
  endfunction

  // ---- full turbo decoder, ITER iterations, p segments; returns hard decisions
  function automatic void turbo_dec_ref(input int n, input int f1, input int f2, input int iter,
                                        input int ys[], input int p1[], input int p2[],
                                        output bit dec[], input int p = 1);
    int la1[], ys2[], la2[], llr[], ext[], e1[], e2[];
    la1 = new[n]; ys2 = new[n]; la2 = new[n]; e2 = new[n]; dec = new[n];
    foreach (la1[k]) la1[k] = 0;
    for (int it = 0; it < iter; it++) begin
      seg_ref(n, p, la1, ys, p1, llr, e1);
      for (int k = 0; k < n; k++) begin
        int pk;
        pk = qpp_ref(k, n, f1, f2);
        ys2[k] = ys[pk];
        la2[k] = e1[pk];
      end
      seg_ref(n, p, la2, ys2, p2, llr, e2);
      for (int k = 0; k < n; k++) begin
        int pk;
        pk = qpp_ref(k, n, f1, f2);
        la1[pk] = e2[k];
        dec[pk] = (llr[k] >= 0);
      end
    end
  endfunction

  // ---- BPSK over AWGN at Eb/N0 (dB), rate 1/3, channel LLR in Q(FRAC), 7 bits
  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic int channel_llr(bit b, real ebn0_db);
    real sigma2, y, l;
    sigma2 = 1.0 / (2.0 * (1.0 / 3.0) * (10.0 ** (ebn0_db / 10.0)));
    y = (b ? 1.0 : -1.0) + $sqrt(sigma2) * gauss();
    l = 2.0 * y / sigma2 * SCALE;
    return satr($rtoi(l + ((l >= 0.0) ? 0.5 : -0.5)), 7);
  endfunction

endpackage
