// vb_tb_pkg: reference arithmetic for the VB decoder testbenches.
//
// Models, in double-precision real arithmetic, the parts of the receiver
// that lie outside the hardware: a real-valued 4x4 channel with Gaussian
// noise, and the preprocessing software (Cholesky factorisation of the
// Gram matrix, zero-forcing estimate, initial radius from the rounded
// zero-forcing point). It also gives the exhaustive maximum-likelihood
// search the hardware result is judged against. The lattice is taken in
// index space: a PAM level s = 2u - 3 with u in 0..3, so y = H s + n
// becomes y' = y + 3 H 1 = (2H) u + n.
package vb_tb_pkg;
  localparam int NA = 4;          // antennas
  localparam int FB = vb_pkg::DEF_F;  // fraction bits of the hardware words
  localparam int WB = vb_pkg::DEF_W;  // hardware word width

  typedef real rvec_t [NA];
  typedef real rmat_t [NA][NA];
  typedef int  ivec_t [NA];

  // one problem as the hardware sees it, still in real numbers
  typedef struct {
    rmat_t q;       // q_ij = r_ij / r_ii, i < j
    rvec_t qd;      // q_ii = r_ii^2
    rvec_t iq;      // 1 / q_ii
    rvec_t rho;     // zero-forcing solution in index space
    real   radius;  // initial squared radius
  } vbprob_t;

  function automatic real urand();
    return real'($urandom) / 4294967296.0;
  endfunction

  // approximately standard normal (sum of 12 uniforms)
  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 12; i++) s += urand();
    return s - 6.0;
  endfunction

  // well-conditioned random real channel: I + 0.3 N(0,1)
  function automatic rmat_t rand_channel();
    rmat_t h;
    for (int i = 0; i < NA; i++)
      for (int j = 0; j < NA; j++)
        h[i][j] = (i == j ? 1.0 : 0.0) + 0.3 * gauss();
    return h;
  endfunction

  // y = H s + sigma n, s = 2u - 3
  function automatic rvec_t channel(rmat_t h, ivec_t u, real sigma);
    rvec_t y;
    for (int i = 0; i < NA; i++) begin
      y[i] = sigma * gauss();
      for (int j = 0; j < NA; j++) y[i] += h[i][j] * real'(2 * u[j] - 3);
    end
    return y;
  endfunction

  // index-space observation y' = y + 3 H 1
  function automatic rvec_t shift_obs(rmat_t h, rvec_t y);
    rvec_t yp;
    for (int i = 0; i < NA; i++) begin
      yp[i] = y[i];
      for (int j = 0; j < NA; j++) yp[i] += 3.0 * h[i][j];
    end
    return yp;
  endfunction

  // squared distance || y' - 2H u ||^2
  function automatic real metric(rmat_t h, rvec_t yp, ivec_t u);
    real d = 0.0;
    for (int i = 0; i < NA; i++) begin
      real e = yp[i];
      for (int j = 0; j < NA; j++) e -= 2.0 * h[i][j] * real'(u[j]);
      d += e * e;
    end
    return d;
  endfunction

  // exhaustive ML over all 4^NA index vectors
  function automatic ivec_t ml_search(rmat_t h, rvec_t yp, output real dmin);
    ivec_t best, u;
    dmin = 1.0e30;
    best = '{default: 0};
    for (int c = 0; c < (1 << (2 * NA)); c++) begin
      real d;
      for (int j = 0; j < NA; j++) u[j] = (c >> (2 * j)) & 3;
      d = metric(h, yp, u);
      if (d < dmin) begin
        dmin = d;
        best = u;
      end
    end
    return best;
  endfunction

  // solve A x = b by Gaussian elimination with partial pivoting
  function automatic rvec_t lin_solve(rmat_t a, rvec_t b);
    rvec_t x;
    for (int c = 0; c < NA; c++) begin
      int p = c;
      for (int r = c + 1; r < NA; r++) if ((a[r][c] < 0 ? -a[r][c] : a[r][c]) >
                                           (a[p][c] < 0 ? -a[p][c] : a[p][c])) p = r;
      for (int j = 0; j < NA; j++) begin
        real t = a[c][j]; a[c][j] = a[p][j]; a[p][j] = t;
      end
      begin real t = b[c]; b[c] = b[p]; b[p] = t; end
      for (int r = c + 1; r < NA; r++) begin
        real f = a[r][c] / a[c][c];
        for (int j = c; j < NA; j++) a[r][j] -= f * a[c][j];
        b[r] -= f * b[c];
      end
    end
    for (int r = NA - 1; r >= 0; r--) begin
      real s = b[r];
      for (int j = r + 1; j < NA; j++) s -= a[r][j] * x[j];
      x[r] = s / a[r][r];
    end
    return x;
  endfunction

  // the preprocessing software; the initial squared radius is the
  // distance of the rounded zero-forcing point times radius_scale, + 0.05
  function automatic vbprob_t preprocess(rmat_t h, rvec_t yp, real radius_scale);
    vbprob_t p;
    rmat_t g, r, hu;
    ivec_t ub;
    for (int i = 0; i < NA; i++)
      for (int j = 0; j < NA; j++) hu[i][j] = 2.0 * h[i][j];
    for (int i = 0; i < NA; i++)
      for (int j = 0; j < NA; j++) begin
        g[i][j] = 0.0;
        for (int k = 0; k < NA; k++) g[i][j] += hu[k][i] * hu[k][j];
        r[i][j] = 0.0;
      end
    for (int i = 0; i < NA; i++) begin
      real s = g[i][i];
      for (int k = 0; k < i; k++) s -= r[k][i] * r[k][i];
      r[i][i] = $sqrt(s);
      for (int j = i + 1; j < NA; j++) begin
        real t = g[i][j];
        for (int k = 0; k < i; k++) t -= r[k][i] * r[k][j];
        r[i][j] = t / r[i][i];
      end
    end
    for (int i = 0; i < NA; i++) begin
      p.qd[i] = r[i][i] * r[i][i];
      p.iq[i] = 1.0 / p.qd[i];
      for (int j = 0; j < NA; j++) p.q[i][j] = (j > i) ? r[i][j] / r[i][i] : 0.0;
    end
    p.rho = lin_solve(hu, yp);
    for (int i = 0; i < NA; i++) begin
      int v = $rtoi(p.rho[i] + 100.5) - 100;
      ub[i] = v < 0 ? 0 : (v > 3 ? 3 : v);
    end
    p.radius = metric(h, yp, ub) * radius_scale + 0.05;
    return p;
  endfunction

  // real -> Q.FB word of WB bits, rounded to nearest and saturated (the
  // preprocessing must saturate: a nearly singular channel gives a q_ii
  // close to 0 and a 1/q_ii beyond the word range)
  function automatic logic signed [WB-1:0] fx(real v);
    real s = v * $pow(2.0, FB);
    real mx = $pow(2.0, WB - 1) - 1.0;
    if (s >  mx) s =  mx;
    if (s < -mx) s = -mx;
    return WB'(longint'(s));  // real to integer casts round to nearest
  endfunction

  function automatic real unfx(logic signed [WB-1:0] v);
    return real'(v) / $pow(2.0, FB);
  endfunction
endpackage
