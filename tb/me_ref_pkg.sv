// me_ref_pkg: behavioural reference model used by the testbenches.
//
// Written straight from the defining formulas, with integers and reals,
// independently of the RTL structure: the basic-mask step functions, the
// three gradient filters with border replication, the floating threshold
// and mask, the threshold-parameter update (rounded with real
// arithmetic), and the full search with the content-based SAD.
// Images are flat int arrays indexed y*N + x; the search area is indexed
// by (X, Y) = (x + u + p, y + v + p) and stored as sa[X*L + Y].
package me_ref_pkg;

  function automatic int step(int n);
    return (n >= 0) ? 1 : 0;
  endfunction

  // SM_8:m(i,j) = BM_8:m(i mod 4, j mod 4), BM from the step functions.
  function automatic int sm_ref(int m, int i, int j);
    int off [4][4] = '{'{2, 5, 2, 6}, '{3, 7, 4, 8}, '{2, 5, 2, 6}, '{3, 7, 4, 8}};
    return step(m - off[i % 4][j % 4]);
  endfunction

  function automatic int iabs(int a);
    return (a < 0) ? -a : a;
  endfunction

  function automatic int pix_at(const ref int img[], input int n, input int x, input int y);
    if (x < 0) x = 0;
    if (y < 0) y = 0;
    if (x > n - 1) x = n - 1;
    if (y > n - 1) y = n - 1;
    return img[y * n + x];
  endfunction

  // Window w[r][c] = pixel at (x + c - 1, y + r - 1). filt: 0 HPF, 1 Sobel, 2 morph.
  function automatic int grad_win(int filt, int w[3][3]);
    int s, gx, gy, mx, mn;
    case (filt)
      0: begin
        s = 0;
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) s += w[r][c];
        return iabs(9 * w[1][1] - s);
      end
      1: begin
        gx = (w[2][0] + 2 * w[2][1] + w[2][2]) - (w[0][0] + 2 * w[0][1] + w[0][2]);
        gy = (w[0][2] + 2 * w[1][2] + w[2][2]) - (w[0][0] + 2 * w[1][0] + w[2][0]);
        return iabs(gx) + iabs(gy);
      end
      default: begin
        mx = 0; mn = 255;
        for (int r = 0; r < 3; r++) for (int c = 0; c < 3; c++) begin
          if (w[r][c] > mx) mx = w[r][c];
          if (w[r][c] < mn) mn = w[r][c];
        end
        return mx - mn;
      end
    endcase
  endfunction

  function automatic int grad_ref(input int filt, const ref int img[], input int n, input int x, input int y);
    int w[3][3];
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) w[r][c] = pix_at(img, n, x + c - 1, y + r - 1);
    return grad_win(filt, w);
  endfunction

  // Content-based mask from gradients g[], threshold parameter m1/one.
  function automatic int csm_from_grad(const ref int g[], input int n, input int m1, input int one, input int m,
                                       ref int csm[]);
    int mx, mn, cnt;
    longint thr;
    mx = g[0]; mn = g[0];
    foreach (g[k]) begin
      if (g[k] > mx) mx = g[k];
      if (g[k] < mn) mn = g[k];
    end
    thr = longint'(m1) * mx + longint'(one - m1) * mn;
    csm = new[n * n];
    cnt = 0;
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) begin
        int e;
        e = (longint'(g[y * n + x]) * one >= thr) ? 1 : 0;
        csm[y * n + x] = e | sm_ref(m, x, y);
        cnt += csm[y * n + x];
      end
    return cnt;
  endfunction

  function automatic int csm_ref(input int filt, const ref int img[], input int n, input int m1, input int one,
                                 input int m, ref int csm[]);
    int g[];
    g = new[n * n];
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++) g[y * n + x] = grad_ref(filt, img, n, x, y);
    return csm_from_grad(g, n, m1, one, m, csm);
  endfunction

  // m1 <- clamp(m1 + Kp*(cnt - trg)/N^2), Kp = kp_q/256, m1 in units of 1/one.
  function automatic int m1_update(int m1, int one, int kp_q, int cnt, int trg, int nn);
    real d;
    int  nx;
    d  = (real'(kp_q) / 256.0) * real'(cnt - trg) / real'(nn) * real'(one);
    nx = m1 + int'($floor(d + 0.5));
    if (nx < 0) nx = 0;
    if (nx > one) nx = one;
    return nx;
  endfunction

  function automatic int cssad_ref(const ref int cmb[], const ref int sa[], const ref int csm[],
                                   input int n, input int p, input int u, input int v);
    int l, s;
    l = n + 2 * p - 1;
    s = 0;
    for (int y = 0; y < n; y++)
      for (int x = 0; x < n; x++)
        if (csm[y * n + x] != 0)
          s += iabs(sa[(x + u + p) * l + (y + v + p)] - cmb[y * n + x]);
    return s;
  endfunction

  // Full search, u outer and v inner, first minimum kept.
  function automatic void search_ref(const ref int cmb[], const ref int sa[], const ref int csm[],
                                     input int n, input int p, output int bu, output int bv, output int bs);
    bs = -1;
    bu = 0;
    bv = 0;
    for (int u = -p; u < p; u++)
      for (int v = -p; v < p; v++) begin
        int s;
        s = cssad_ref(cmb, sa, csm, n, p, u, v);
        if (bs < 0 || s < bs) begin
          bs = s; bu = u; bv = v;
        end
      end
  endfunction

endpackage
