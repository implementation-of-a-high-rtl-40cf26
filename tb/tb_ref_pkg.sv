// tb_ref_pkg: double-precision reference model of the MPC problem, used by
// the testbenches. It builds the dense matrices of the sparse formulation
// (A_eq, C) from the stacked model matrices and runs the same primal-dual
// interior-point iteration with a dense Gaussian-elimination solve of the
// unreordered, unpreconditioned KKT system. It therefore shares with the
// design only the mathematics, not the storage formats, the reordering,
// the preconditioner or the iterative solver.
// Matrices are flat dynamic arrays, row-major.
package tb_ref_pkg;

  // solve M x = r in place (n x n, partial pivoting)
  function automatic void gauss(input int n, ref real mm[], ref real r[], output real x[]);
    int p;
    real t, f;
    x = new[n];
    for (int c = 0; c < n; c++) begin
      p = c;
      for (int k = c + 1; k < n; k++)
        if ((mm[k*n+c] < 0 ? -mm[k*n+c] : mm[k*n+c]) > (mm[p*n+c] < 0 ? -mm[p*n+c] : mm[p*n+c])) p = k;
      if (p != c) begin
        for (int j = 0; j < n; j++) begin
          t = mm[c*n+j]; mm[c*n+j] = mm[p*n+j]; mm[p*n+j] = t;
        end
        t = r[c]; r[c] = r[p]; r[p] = t;
      end
      for (int k = c + 1; k < n; k++) begin
        f = mm[k*n+c] / mm[c*n+c];
        if (f != 0.0) begin
          for (int j = c; j < n; j++) mm[k*n+j] -= f * mm[c*n+j];
          r[k] -= f * r[c];
        end
      end
    end
    for (int c = n - 1; c >= 0; c--) begin
      t = r[c];
      for (int j = c + 1; j < n; j++) t -= mm[c*n+j] * x[j];
      x[c] = t / mm[c*n+c];
    end
  endfunction

  // dense equality matrix (NEC x NOV) and inequality matrix (NIC x NOV)
  function automatic void build(input int n, input int m, input int nh, ref real ad[], ref real bd[],
                                input bit cp[], output real aeq[], output real cc[]);
    int nov, nec, nic, base;
    nov = nh * (n + m);
    nec = nh * n;
    nic = 2 * nh * (n + m);
    aeq = new[nec * nov];
    cc  = new[nic * nov];
    foreach (aeq[k]) aeq[k] = 0.0;
    foreach (cc[k]) cc[k] = 0.0;
    for (int k = 0; k < nh; k++)
      for (int i = 0; i < n; i++) begin
        for (int j = 0; j < m; j++) aeq[(k*n+i)*nov + k*(n+m) + j] = -bd[(k*n+i)*m + j];
        if (k > 0)
          for (int j = 0; j < n; j++) aeq[(k*n+i)*nov + (k-1)*(n+m) + m + j] = -ad[(k*n+i)*n + j];
        aeq[(k*n+i)*nov + k*(n+m) + m + i] = 1.0;
      end
    for (int k = 0; k < nh; k++) begin
      base = 2 * k * (n + m);
      for (int j = 0; j < m; j++) begin
        cc[(base + j) * nov + k*(n+m) + j] = 1.0;
        cc[(base + m + j) * nov + k*(n+m) + j] = -1.0;
      end
      for (int j = 0; j < n; j++) if (cp[j]) begin
        cc[(base + 2*m + j) * nov + k*(n+m) + m + j] = 1.0;
        cc[(base + 2*m + n + j) * nov + k*(n+m) + m + j] = -1.0;
      end
    end
  endfunction

  // Reference interior-point solve. Returns xi; alphas gets every step length.
  function automatic void ipm(input int n, input int m, input int nh, input int iters,
                              ref real ad[], ref real bd[], ref real d[], ref real x0[],
                              ref real qd[], ref real ql[], input bit cp[],
                              input real sigma, input real beta,
                              output real xi[], output real alphas[]);
    int nov, nec, nic, nk;
    real aeq[], cc[], b[], lam[], v[], s[], rd[], rp[], rc[], rn[], kk[], rhs[], sol[], cdx[], dv[], ds[];
    real sigmu, alpha, t, w;
    nov = nh * (n + m);
    nec = nh * n;
    nic = 2 * nh * (n + m);
    nk  = nov + nec;
    build(n, m, nh, ad, bd, cp, aeq, cc);
    b = new[nec];
    foreach (b[k]) b[k] = 0.0;
    for (int i = 0; i < n; i++) for (int j = 0; j < n; j++) b[i] += ad[i*n+j] * x0[j];
    xi = new[nov]; lam = new[nec]; v = new[nic]; s = new[nic];
    foreach (xi[k]) xi[k] = 0.0;
    foreach (lam[k]) lam[k] = 0.0;
    foreach (v[k]) begin v[k] = 1.0; s[k] = 1.0; end
    alphas = new[iters];
    sigmu = sigma;
    for (int it = 0; it < iters; it++) begin
      rd = new[nov]; rp = new[nec]; rc = new[nic]; rn = new[nov];
      for (int i = 0; i < nov; i++) rd[i] = qd[i] * xi[i] + ql[i];
      for (int e = 0; e < nec; e++) begin
        t = -b[e];
        for (int i = 0; i < nov; i++) begin
          t += aeq[e*nov+i] * xi[i];
          rd[i] += aeq[e*nov+i] * lam[e];
        end
        rp[e] = t;
      end
      for (int c = 0; c < nic; c++) begin
        t = s[c] - d[c];
        for (int i = 0; i < nov; i++) begin
          t += cc[c*nov+i] * xi[i];
          rd[i] += cc[c*nov+i] * v[c];
        end
        rc[c] = t;
      end
      for (int i = 0; i < nov; i++) rn[i] = rd[i];
      for (int c = 0; c < nic; c++) begin
        w = v[c] * rc[c] / s[c] - v[c] + sigmu / s[c];
        for (int i = 0; i < nov; i++) rn[i] += cc[c*nov+i] * w;
      end
      kk = new[nk * nk];
      rhs = new[nk];
      foreach (kk[k]) kk[k] = 0.0;
      for (int i = 0; i < nov; i++) begin
        kk[i*nk+i] = qd[i];
        for (int c = 0; c < nic; c++) kk[i*nk+i] += cc[c*nov+i] * cc[c*nov+i] * v[c] / s[c];
        rhs[i] = -rn[i];
      end
      for (int e = 0; e < nec; e++) begin
        for (int i = 0; i < nov; i++) begin
          kk[(nov+e)*nk + i] = aeq[e*nov+i];
          kk[i*nk + nov + e] = aeq[e*nov+i];
        end
        rhs[nov+e] = -rp[e];
      end
      gauss(nk, kk, rhs, sol);
      dv = new[nic]; ds = new[nic];
      for (int c = 0; c < nic; c++) begin
        t = 0.0;
        for (int i = 0; i < nov; i++) t += cc[c*nov+i] * sol[i];
        dv[c] = v[c] / s[c] * (t + rc[c] - s[c] + sigmu / v[c]);
        ds[c] = -s[c] - s[c] / v[c] * dv[c] + sigmu / v[c];
      end
      alpha = 1.0;
      for (int c = 0; c < nic; c++) begin
        if (dv[c] < 0.0 && -beta * v[c] / dv[c] < alpha) alpha = -beta * v[c] / dv[c];
        if (ds[c] < 0.0 && -beta * s[c] / ds[c] < alpha) alpha = -beta * s[c] / ds[c];
      end
      alphas[it] = alpha;
      for (int i = 0; i < nov; i++) xi[i] += alpha * sol[i];
      for (int e = 0; e < nec; e++) lam[e] += alpha * sol[nov+e];
      t = 0.0;
      for (int c = 0; c < nic; c++) begin
        v[c] += alpha * dv[c];
        s[c] += alpha * ds[c];
        t += v[c] * s[c];
      end
      sigmu = sigma * t / nic;
    end
  endfunction
endpackage
