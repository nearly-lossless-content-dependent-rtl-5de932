// dct_ref_pkg: reference model of the content-dependent DA DCT, used by the
// testbenches. Unlike the RTL, it works on whole words. A bit-serial DA
// pass over the top N bits of four values v_i equals the inner product with
// the values truncated to those bits:
//   y = round(sum_i K_i * floor(v_i / 2^s) * 2^s / 2^12),  s = W - N,
// where W is the group's two's complement width and N = min(W, nmax, 8).
// The coefficients are computed here from cos(), not taken from the design:
//   K(k,i) = round(4096 * sqrt(2) * cos((2i+1) k pi / 16)).
// It also has a floating-point 2-D DCT scaled by 8 (the 1/a^2 factor).
package dct_ref_pkg;

  typedef struct {
    int cls_even, cls_odd, w_even, w_odd, n_even, n_odd;
  } ref_stat_t;

  // Threshold tables and class budget, as in the design's defaults.
  // [mode][k]: mode 0 = intra, 1 = inter.
  function automatic int th_even(int mode, int k);
    int t [2][3] = '{'{1, 1, 2}, '{2, 4, 8}};
    return t[mode][k];
  endfunction
  function automatic int th_odd(int mode, int k);
    int t [2][3] = '{'{1, 2, 4}, '{3, 6, 12}};
    return t[mode][k];
  endfunction
  function automatic int class_bits(int c);
    int b [4] = '{0, 4, 6, 8};
    return b[c];
  endfunction

  function automatic int kcoef(int k, int i);
    real v;
    v = 4096.0 * $sqrt(2.0) * $cos((2.0 * i + 1.0) * k * 3.14159265358979 / 16.0);
    return (v >= 0.0) ? int'($floor(v + 0.5)) : -int'($floor(-v + 0.5));
  endfunction

  function automatic int swidth(int v);
    int w = 1;
    while (!(v >= -(1 <<< (w - 1)) && v < (1 <<< (w - 1)))) w++;
    return w;
  endfunction

  function automatic int sat(longint v, int ow);
    longint hi = (64'sd1 <<< (ow - 1)) - 1;
    longint lo = -(64'sd1 <<< (ow - 1));
    if (v > hi) return int'(hi);
    if (v < lo) return int'(lo);
    return int'(v);
  endfunction

  function automatic int min3(int a, int b, int c);
    int m = a;
    if (b < m) m = b;
    if (c < m) m = c;
    return m;
  endfunction

  // One 1-D pass: x[8] in, y[8] out, with the classifier and DEBE decisions.
  function automatic void ref_1d(input int x [8], input int mode, input int qp,
                                 input int stage, input int ow,
                                 output int y [8], output ref_stat_t st);
    int ev [4], od [4];
    int mx, mn, ppa, ce, co, nmax_e, nmax_o, sh;
    longint acc;
    mx = x[0];
    mn = x[0];
    foreach (x[i]) begin
      if (x[i] > mx) mx = x[i];
      if (x[i] < mn) mn = x[i];
    end
    ppa = mx - mn;
    ce = 0;
    co = 0;
    for (int k = 0; k < 3; k++) begin
      if (ppa >= th_even(mode, k) * qp * stage) ce++;
      if (ppa >= th_odd(mode, k) * qp * stage) co++;
    end
    nmax_e = class_bits(ce);
    nmax_o = class_bits(co);
    for (int i = 0; i < 4; i++) begin
      ev[i] = x[i] + x[7-i];
      od[i] = x[i] - x[7-i];
    end
    st.cls_even = ce;
    st.cls_odd  = co;
    st.w_even = 1;
    st.w_odd  = 1;
    for (int i = 0; i < 4; i++) begin
      if (swidth(ev[i]) > st.w_even) st.w_even = swidth(ev[i]);
      if (swidth(od[i]) > st.w_odd)  st.w_odd  = swidth(od[i]);
    end
    st.n_even = min3(st.w_even, nmax_e, 8);
    st.n_odd  = min3(st.w_odd,  nmax_o, 8);
    y[0] = sat(ev[0] + ev[1] + ev[2] + ev[3], ow);
    y[4] = sat(ev[0] - ev[1] - ev[2] + ev[3], ow);
    for (int k = 1; k < 8; k++) begin
      if (k == 4) continue;
      acc = 0;
      if (k % 2 == 0) begin
        sh = st.w_even - st.n_even;
        if (st.n_even > 0)
          for (int i = 0; i < 4; i++) acc += longint'(kcoef(k, i)) * ((ev[i] >>> sh) <<< sh);
      end else begin
        sh = st.w_odd - st.n_odd;
        if (st.n_odd > 0)
          for (int i = 0; i < 4; i++) acc += longint'(kcoef(k, i)) * ((od[i] >>> sh) <<< sh);
      end
      y[k] = sat((acc + 2048) >>> 12, ow);
    end
  endfunction

  // Floating-point 2-D DCT, scaled by 8: z[v][u].
  function automatic real fdct8(int blk [8][8], int v, int u);
    real s = 0.0, cu, cv;
    cu = (u == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    cv = (v == 0) ? 1.0 / $sqrt(2.0) : 1.0;
    for (int yy = 0; yy < 8; yy++)
      for (int xx = 0; xx < 8; xx++)
        s += blk[yy][xx] * $cos((2.0 * xx + 1.0) * u * 3.14159265358979 / 16.0)
                         * $cos((2.0 * yy + 1.0) * v * 3.14159265358979 / 16.0);
    return 8.0 * cu * cv * s / 4.0;
  endfunction

endpackage
