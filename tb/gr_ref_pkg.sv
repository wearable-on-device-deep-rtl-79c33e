// gr_ref_pkg: reference models for the testbenches of the gesture
// recognition accelerator.  Each function computes a whole block's result
// from its mathematical definition on plain integer arrays (no streaming,
// no line buffers, no shared multipliers), with the same number formats
// and rounding rules as the hardware, so results can be compared exactly.
package gr_ref_pkg;

  typedef int iq_t[$];

  function automatic longint r_shift(input longint v, input int sh);
    return (v + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction

  function automatic int sat16(input longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic int relu(input int v);
    return (v < 0) ? 0 : v;
  endfunction

  // ------------------------------------------------------------- DB4
  function automatic void wt_taps(output int g[4], output int h[4],
                                  output int ngs[4], output int nhs[4]);
    real s, a0, a1;
    s = 0.483; a0 = 1.732; a1 = -0.268;
    g[0] = int'(s * 16384.0);            g[1] = int'(s * a0 * 16384.0);
    g[2] = int'(-s * a0 * a1 * 16384.0); g[3] = int'(s * a1 * 16384.0);
    h[0] = -g[3]; h[1] = g[2]; h[2] = -g[1]; h[3] = g[0];
    // -H(-z) and G(-z): synthesis taps carrying the bank's sign inversion
    for (int i = 0; i < 4; i++) begin
      ngs[i] = ((i % 2) == 0) ? -h[i] : h[i];
      nhs[i] = ((i % 2) == 0) ?  g[i] : -g[i];
    end
  endfunction

  // y[n] for every fed sample n; y[n] approximates x[n-3]
  function automatic iq_t wavelet(input iq_t x, input int th);
    int g[4], h[4], ngs[4], nhs[4];
    iq_t y;
    int L;
    int av [int];
    int dv [int];
    wt_taps(g, h, ngs, nhs);
    L = x.size();
    for (int k = -2; 2 * k + 1 < L; k++) begin
      longint sa, sd;
      int d;
      sa = 0; sd = 0;
      for (int i = 0; i < 4; i++) begin
        int j, xv;
        j = 2 * k + 1 - i;
        xv = (j < 0) ? x[0] : x[j];
        sa += longint'(g[i]) * xv;
        sd += longint'(h[i]) * xv;
      end
      av[k] = int'(r_shift(sa, 14));
      d = int'(r_shift(sd, 14));
      dv[k] = ((d < 0 ? -d : d) < th) ? 0 : d;
    end
    for (int n = 0; n < L; n++) begin
      longint s;
      int k;
      if (n % 2 == 1) begin
        k = (n - 1) / 2;
        s = longint'(ngs[0]) * av[k] + longint'(ngs[2]) * av[k-1]
          + longint'(nhs[0]) * dv[k] + longint'(nhs[2]) * dv[k-1];
      end else begin
        k = n / 2 - 1;
        s = longint'(ngs[1]) * av[k] + longint'(ngs[3]) * av[k-1]
          + longint'(nhs[1]) * dv[k] + longint'(nhs[3]) * dv[k-1];
      end
      y.push_back(sat16(r_shift(s, 14)));
    end
    return y;
  endfunction

  // ------------------------------------------------------------- CNN
  // maps are flattened as ((r * W) + c) * C + ch
  function automatic iq_t conv(input iq_t x, input int H, input int W, input int CIN,
                               input int COUT, input int layer);
    iq_t y;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        for (int co = 0; co < COUT; co++) begin
          longint acc;
          acc = longint'(gr_pkg::cnn_b(layer, co)) <<< 6;
          for (int ci = 0; ci < CIN; ci++)
            for (int t = 0; t < 9; t++) begin
              int rr, cc, v;
              rr = r + t / 3 - 1;
              cc = c + t % 3 - 1;
              v = (rr < 0 || rr >= H || cc < 0 || cc >= W) ? 180 * 128
                                                           : x[(rr * W + cc) * CIN + ci];
              acc += longint'(v) * int'(gr_pkg::cnn_w(layer, co, ci, t));
            end
          y.push_back(relu(sat16(r_shift(acc, 6))));
        end
    return y;
  endfunction

  function automatic iq_t pool(input iq_t x, input int H, input int W, input int C,
                               input int OH, input int OW);
    iq_t y;
    for (int i = 0; i < OH; i++)
      for (int j = 0; j < OW; j++)
        for (int k = 0; k < C; k++) begin
          int m;
          m = -32768;
          for (int r = 2 * i; r < 2 * i + 2; r++)
            for (int c = 2 * j; c < 2 * j + 2; c++)
              if (r < H && c < W && x[(r * W + c) * C + k] > m) m = x[(r * W + c) * C + k];
          y.push_back(m);
        end
    return y;
  endfunction

  function automatic iq_t fc(input iq_t x, input int NOUT, input int layer);
    iq_t y;
    for (int o = 0; o < NOUT; o++) begin
      longint acc;
      acc = longint'(gr_pkg::cnn_b(layer, o)) <<< 6;
      for (int i = 0; i < x.size(); i++) acc += longint'(x[i]) * int'(gr_pkg::cnn_w(layer, o, 0, i));
      y.push_back(relu(sat16(r_shift(acc, 6))));
    end
    return y;
  endfunction

  function automatic iq_t fem(input iq_t win);
    iq_t a;
    a = conv(win, 50, 12, 1, 4, 1);
    a = pool(a, 50, 12, 4, 25, 6);
    a = conv(a, 25, 6, 4, 6, 2);
    a = pool(a, 25, 6, 6, 12, 3);
    a = conv(a, 12, 3, 6, 6, 3);
    a = pool(a, 12, 3, 6, 6, 2);
    return fc(a, 4, 4);
  endfunction

  // ------------------------------------------------------------ Tanh
  function automatic void tanh_coef(input int t, output int c2, output int c1,
                                    output int c0, output bit sat);
    real tab [4][3];
    int s;
    tab[0] = '{-0.3275, 1.0977, -0.0038};
    tab[1] = '{-0.1690, 0.7021,  0.2324};
    tab[2] = '{-0.0282, 0.1703,  0.7370};
    tab[3] = '{-0.0039, 0.0313,  0.9363};
    sat = 0;
    if (t <= 128) s = 0; else if (t <= 256) s = 1; else if (t <= 384) s = 2;
    else if (t <= 512) s = 3; else s = 4;
    if (s == 4) begin c2 = 0; c1 = 0; c0 = 16384; sat = 1; end
    else begin
      c2 = int'(tab[s][0] * 16384.0);
      c1 = int'(tab[s][1] * 16384.0);
      c0 = int'(tab[s][2] * 16384.0);
    end
  endfunction

  // fitted tanh of z (Q9.7 in and out)
  function automatic int tanh_fit(input int z);
    int t, c2, c1, c0, m;
    bit sat;
    longint p, q, r;
    t = (z < 0) ? -z : z;
    if (t > 513) t = 513;
    tanh_coef(t, c2, c1, c0, sat);
    p = longint'(t) * t;
    q = longint'(c2) * (p >>> 7);
    r = longint'(c1) * t;
    m = sat ? 128 : sat16(r_shift(q + r + (longint'(c0) <<< 7), 14));
    return (z < 0) ? -m : m;
  endfunction

  // ------------------------------------------------------------- MLP
  // w: 128-word map of cm (w1 at 4j+i, b1 32+j, w2 40+8j+i, b2 104+j,
  // w3 112+i, b3 120), Q7.8.  Returns {y, gesture}.
  function automatic void mlp(input int x[4], input int w[128], output int y, output int g);
    int h1[8], h2[8];
    longint acc;
    for (int j = 0; j < 8; j++) begin
      acc = longint'(w[32 + j]) <<< 7;
      for (int i = 0; i < 4; i++) acc += longint'(x[i]) * w[4 * j + i];
      h1[j] = tanh_fit(sat16(r_shift(acc, 8)));
    end
    for (int j = 0; j < 8; j++) begin
      acc = longint'(w[104 + j]) <<< 7;
      for (int i = 0; i < 8; i++) acc += longint'(h1[i]) * w[40 + 8 * j + i];
      h2[j] = relu(tanh_fit(sat16(r_shift(acc, 8))));
    end
    acc = longint'(w[120]) <<< 7;
    for (int i = 0; i < 8; i++) acc += longint'(h2[i]) * w[112 + i];
    y = relu(sat16(r_shift(acc, 8)));
    g = (y + 64) >>> 7;
    if (g > 15) g = 15;
  endfunction

  // ---------------------------------------------------- segmentation
  // den is frame-major (f * 12 + ch).  Returns the window start.
  function automatic int segment(input iq_t den, input int nfr, input longint th,
                                 output int fa, output int la, output bit any);
    longint base;
    int s;
    any = 0; fa = 0; la = 0; base = 0;
    for (int f = 0; f < nfr; f++) begin
      longint sq, d;
      sq = 0;
      for (int c = 0; c < 12; c++) sq += longint'(den[f * 12 + c]) * den[f * 12 + c];
      sq = sq >>> 14;
      if (f == 0) base = sq;
      d = (sq > base) ? sq - base : base - sq;
      if (f > 0 && d > th) begin
        if (!any) fa = f;
        la = f;
        any = 1;
      end
    end
    s = (fa + la) / 2 - 25;
    if (!any || nfr <= 50 || s < 0) s = 0;
    else if (s > nfr - 50) s = nfr - 50;
    return s;
  endfunction

  // whole preprocessing: raw is frame-major; returns the 50x12 window
  function automatic iq_t preprocess(input iq_t raw, input int nfr, input int wt_th,
                                     input longint seg_th, output int start,
                                     output int fa, output int la, output bit any);
    iq_t den, win;
    den = {};
    for (int i = 0; i < nfr * 12; i++) den.push_back(0);
    for (int c = 0; c < 12; c++) begin
      iq_t xs, ys;
      for (int n = 0; n < nfr + 3; n++) xs.push_back(raw[((n < nfr) ? n : nfr - 1) * 12 + c]);
      ys = wavelet(xs, wt_th);
      for (int m = 0; m < nfr; m++) den[m * 12 + c] = ys[m + 3];
    end
    start = segment(den, nfr, seg_th, fa, la, any);
    for (int r = 0; r < 50; r++)
      for (int c = 0; c < 12; c++) begin
        int f;
        f = start + r;
        if (f >= nfr) f = nfr - 1;
        win.push_back(den[f * 12 + c]);
      end
    return win;
  endfunction

  // synthetic glove record: still, a smooth bend of some fingers, still,
  // plus noise.  Angles in Q9.7.
  function automatic iq_t make_record(input int nfr, input int move_at, input int seed);
    iq_t raw;
    int unsigned s;
    s = seed;
    for (int f = 0; f < nfr; f++)
      for (int c = 0; c < 12; c++) begin
        real base, amp, ph;
        int noise;
        base = 20.0 + 7.0 * c;
        amp  = 30.0 + 5.0 * ((c * 7 + seed) % 5);
        ph   = (f < move_at) ? 0.0 : (f < move_at + 20) ? (f - move_at) / 20.0 : 1.0;
        s = s * 1103515245 + 12345;
        noise = int'((s >> 16) % 97) - 48;
        raw.push_back(int'((base + amp * ph) * 128.0) + noise);
      end
    return raw;
  endfunction

endpackage
