// iir_design_pkg: textbook IIR filter design in real arithmetic, for the
// workload testbenches.
//
// Produces cascades of second-order sections in the engine's convention
//   H(z) = g * prod_k (b0k + b1k z^-1 + b2k z^-2) / (1 + a1k z^-1 + a2k z^-2)
// from analog prototypes: Butterworth low-pass/high-pass (any order; an odd order
// ends with a first-order section, b2 = a2 = 0), Chebyshev type I band-pass and
// elliptic band-stop. Method: prototype poles (and zeros), pre-warping with
// tan(w/2), the low-pass to high-pass, band-pass or band-stop transform, and the
// bilinear transform z = (1+s)/(1-s); one section per pole pair with Im(z) > 0.
// The elliptic prototype uses Jacobi elliptic functions computed by descending
// Landen transformations and the degree equation for its selectivity; from the
// highest-Q pole pair down, each takes the nearest zero pair, and the sections
// are ordered by pole radius, lowest first, which keeps the intermediate signals
// small. The gain g makes the peak passband response 1 (at DC, at Nyquist or at
// the band centre; odd prototype orders reach it there, even ones are set to
// the ripple level there).
// Also here: resp() (magnitude of a design at a frequency), float_model() (the
// cascade in double precision, fed with the engine's LFSR test sequence) and
// to_cand() (quantisation of a design to a frame for the engine).
package iir_design_pkg;
  import iir_pkg::*;
  import iir_tb_pkg::*;
  localparam real PI = 3.14159265358979323846;

  typedef struct { real re; real im; } cplx_t;

  function automatic cplx_t cx(real re, real im);
    cplx_t r; r.re = re; r.im = im; return r;
  endfunction
  function automatic cplx_t cadd(cplx_t a, cplx_t b); return cx(a.re + b.re, a.im + b.im); endfunction
  function automatic cplx_t csub(cplx_t a, cplx_t b); return cx(a.re - b.re, a.im - b.im); endfunction
  function automatic cplx_t cmul(cplx_t a, cplx_t b);
    return cx(a.re * b.re - a.im * b.im, a.re * b.im + a.im * b.re);
  endfunction
  function automatic cplx_t cdiv(cplx_t a, cplx_t b);
    real d; d = b.re * b.re + b.im * b.im;
    return cx((a.re * b.re + a.im * b.im) / d, (a.im * b.re - a.re * b.im) / d);
  endfunction
  function automatic cplx_t cscale(cplx_t a, real k); return cx(a.re * k, a.im * k); endfunction
  function automatic real cabs(cplx_t a); return $sqrt(a.re * a.re + a.im * a.im); endfunction
  function automatic cplx_t csqrt(cplx_t a);
    real m, re, im;
    m  = cabs(a);
    re = $sqrt((m + a.re) / 2.0);
    im = $sqrt((m - a.re) / 2.0);
    if (a.im < 0.0) im = -im;
    return cx(re, im);
  endfunction

  // One designed filter: real-valued coefficients plus section count.
  typedef struct {
    string name;
    int    nsec;
    real   g;
    real   c [MAX_SOS][COEFS_PER_SOS];  // b0 b1 b2 a1 a2 (denominator 1 + a1 z^-1 + a2 z^-2)
    real   f_ref;                       // frequency of unit gain, x pi rad/sample
    real   f_edge;                      // band edge used to check the design
    real   edge_gain;                   // expected gain there
    real   bs_bw, bs_w0sq, omega_s, stop_gain;  // band-stop prototype mapping (elliptic)
  } design_t;

  // Response of the cascade at w = f * pi.
  function automatic real resp(design_t d, real f);
    cplx_t z1, z2, h;
    z1 = cx($cos(f * PI), -$sin(f * PI));  // z^-1
    z2 = cmul(z1, z1);
    h  = cx(d.g, 0.0);
    for (int k = 0; k < d.nsec; k++) begin
      cplx_t num, den;
      num = cadd(cadd(cx(d.c[k][0], 0.0), cscale(z1, d.c[k][1])), cscale(z2, d.c[k][2]));
      den = cadd(cadd(cx(1.0, 0.0), cscale(z1, d.c[k][3])), cscale(z2, d.c[k][4]));
      h   = cmul(h, cdiv(num, den));
    end
    return cabs(h);
  endfunction

  // Set the section from its z-plane pole and its numerator.
  function automatic void set_section(ref design_t d, input int k, input cplx_t s,
                                      input real b0, input real b1, input real b2);
    cplx_t zp;
    zp = cdiv(cadd(cx(1.0, 0.0), s), csub(cx(1.0, 0.0), s));
    d.c[k][0] = b0; d.c[k][1] = b1; d.c[k][2] = b2;
    d.c[k][3] = -2.0 * zp.re;
    d.c[k][4] = zp.re * zp.re + zp.im * zp.im;
  endfunction

  function automatic design_t butter(input string name, input int order, input real fc, input bit hp);
    design_t d;
    real wc;
    d.name = name;
    d.nsec = (order + 1) / 2;
    wc = $tan(PI * fc / 2.0);
    for (int k = 0; k < order / 2; k++) begin
      real th;
      cplx_t p, s;
      th = PI * real'(2 * k + 1) / real'(2 * order);
      p  = cx(-$sin(th), $cos(th));
      s  = hp ? cdiv(cx(wc, 0.0), p) : cscale(p, wc);
      if (hp) set_section(d, k, s, 1.0, -2.0, 1.0);
      else    set_section(d, k, s, 1.0, 2.0, 1.0);
    end
    if (order % 2 == 1) begin
      // real prototype pole at -1: first-order section
      real sr, zr;
      sr = hp ? -1.0 / wc : -wc;
      zr = (1.0 + sr) / (1.0 - sr);
      d.c[d.nsec-1][0] = 1.0;
      d.c[d.nsec-1][1] = hp ? -1.0 : 1.0;
      d.c[d.nsec-1][2] = 0.0;
      d.c[d.nsec-1][3] = -zr;
      d.c[d.nsec-1][4] = 0.0;
    end
    d.g = 1.0;
    d.f_ref = hp ? 1.0 : 0.0;
    d.g = 1.0 / resp(d, d.f_ref);
    d.f_edge = fc;
    d.edge_gain = $sqrt(0.5);
    return d;
  endfunction

  // Chebyshev type I band-pass; n is the prototype order, 2n the filter order.
  function automatic design_t cheby_bp(input string name, input int n, input real f1,
                                       input real f2, input real rp_db);
    design_t d;
    real w1, w2, w0sq, bw, eps, mu;
    int k;
    d.name = name;
    d.nsec = 0;
    w1 = $tan(PI * f1 / 2.0);
    w2 = $tan(PI * f2 / 2.0);
    w0sq = w1 * w2;
    bw = w2 - w1;
    eps = $sqrt($pow(10.0, rp_db / 10.0) - 1.0);
    mu = $asinh(1.0 / eps) / real'(n);
    for (k = 0; k < n; k++) begin
      real th;
      cplx_t p, pb, disc;
      th = PI * real'(2 * k + 1) / real'(2 * n);
      p  = cx(-$sinh(mu) * $sin(th), $cosh(mu) * $cos(th));
      // s^2 - p*bw*s + w0^2 = 0
      pb   = cscale(p, bw);
      disc = csqrt(csub(cmul(pb, pb), cx(4.0 * w0sq, 0.0)));
      for (int sgn = 0; sgn < 2; sgn++) begin
        cplx_t s, zp;
        s  = cscale((sgn != 0) ? csub(pb, disc) : cadd(pb, disc), 0.5);
        zp = cdiv(cadd(cx(1.0, 0.0), s), csub(cx(1.0, 0.0), s));
        if (zp.im > 1e-12) begin
          set_section(d, d.nsec, s, 1.0, 0.0, -1.0);
          d.nsec++;
        end
      end
    end
    d.g = 1.0;
    d.f_ref = 2.0 * $atan($sqrt(w0sq)) / PI;
    // an even-order Chebyshev response sits at the ripple level at the centre
    d.g = ((n % 2 == 0) ? 1.0 / $sqrt(1.0 + eps * eps) : 1.0) / resp(d, d.f_ref);
    d.f_edge = f2;
    d.edge_gain = 1.0 / $sqrt(1.0 + eps * eps);
    return d;
  endfunction

  // ---- Elliptic (Cauer) band-stop --------------------------------------------
  // Jacobi elliptic functions through descending Landen transformations:
  // k_{n+1} = (k_n / (1 + sqrt(1 - k_n^2)))^2, then cd(uK, k) and sn(uK, k) are
  // built from cos(u pi/2) and sin(u pi/2) by w <- (1 + k_n) w / (1 + k_n w^2),
  // applied from the smallest modulus back up.
  localparam int LANDEN_N = 8;

  function automatic void landen(input real k, output real v [LANDEN_N]);
    real kk;
    kk = k;
    for (int n = 0; n < LANDEN_N; n++) begin
      kk = kk / (1.0 + $sqrt(1.0 - kk * kk));
      kk = kk * kk;
      v[n] = kk;
    end
  endfunction

  function automatic cplx_t landen_up(input cplx_t w0, input real k);
    real v [LANDEN_N];
    cplx_t w;
    landen(k, v);
    w = w0;
    for (int n = LANDEN_N - 1; n >= 0; n--)
      w = cdiv(cscale(w, 1.0 + v[n]), cadd(cx(1.0, 0.0), cscale(cmul(w, w), v[n])));
    return w;
  endfunction

  // cd(u K, k) for complex u
  function automatic cplx_t cde(input cplx_t u, input real k);
    real a, b;
    a = u.re * PI / 2.0;
    b = u.im * PI / 2.0;
    return landen_up(cx($cos(a) * $cosh(b), -$sin(a) * $sinh(b)), k);
  endfunction

  // sn(u K, k) for complex u
  function automatic cplx_t sne(input cplx_t u, input real k);
    real a, b;
    a = u.re * PI / 2.0;
    b = u.im * PI / 2.0;
    return landen_up(cx($sin(a) * $cosh(b), $cos(a) * $sinh(b)), k);
  endfunction

  // Imaginary part of the inverse sn of the imaginary argument j*y: returns t
  // with sn(j t K, k) = j y.
  function automatic real asne_imag(input real y, input real k);
    real v [LANDEN_N];
    real w, v1;
    landen(k, v);
    w = y;
    for (int n = 0; n < LANDEN_N; n++) begin
      v1 = (n == 0) ? k : v[n-1];
      w = w / (1.0 + $sqrt(1.0 + w * w * v1 * v1)) * 2.0 / (1.0 + v[n]);
    end
    return 2.0 / PI * $asinh(w);
  endfunction

  // n: prototype order, 2n the band-stop order; ap/as: passband ripple and
  // stopband attenuation of the prototype in dB.
  function automatic design_t ellip_bs(input string name, input int n, input real f1,
                                       input real f2, input real ap, input real as_db);
    design_t d;
    real w1, w2, w0sq, bw, ep, es, k1, k1p, kp, k, v0, sn_prod;
    real pa [MAX_SOS], za [MAX_SOS];  // z-plane pole radii and zero angles, for pairing
    cplx_t pz [MAX_SOS];
    int np, nz, l;
    d.name = name;
    w1 = $tan(PI * f1 / 2.0);
    w2 = $tan(PI * f2 / 2.0);
    w0sq = w1 * w2;
    bw = w2 - w1;
    ep = $sqrt($pow(10.0, ap / 10.0) - 1.0);
    es = $sqrt($pow(10.0, as_db / 10.0) - 1.0);
    k1 = ep / es;
    k1p = $sqrt(1.0 - k1 * k1);
    l = n / 2;
    // degree equation: selectivity k from the discrimination k1
    sn_prod = 1.0;
    for (int i = 1; i <= l; i++) begin
      cplx_t s;
      s = sne(cx(real'(2 * i - 1) / real'(n), 0.0), k1p);
      sn_prod = sn_prod * s.re;
    end
    kp = $pow(k1p, real'(n)) * $pow(sn_prod, 4.0);
    k = $sqrt(1.0 - kp * kp);
    v0 = asne_imag(1.0 / ep, k1) / real'(n);
    np = 0; nz = 0;
    // prototype poles p (upper half) and zeros j*wz, mapped by s_lp = bw s / (s^2 + w0^2)
    for (int i = 0; i <= l; i++) begin
      cplx_t p, root, sq;
      if (i == 0) begin
        if (n % 2 == 0) continue;
        p = cmul(cx(0.0, 1.0), sne(cx(0.0, v0), k));      // real pole
        // its zero at infinity maps to s = +-j w0
        za[nz++] = 2.0 * $atan($sqrt(w0sq));
      end else begin
        cplx_t zeta;
        real wz, b4;
        p    = cmul(cx(0.0, 1.0), cde(cx(real'(2 * i - 1) / real'(n), -v0), k));
        zeta = cde(cx(real'(2 * i - 1) / real'(n), 0.0), k);
        wz   = 1.0 / (k * zeta.re);
        // j wz s^2 - bw s + j wz w0^2 = 0 -> s = -j (bw +- sqrt(bw^2 + 4 wz^2 w0^2)) / (2 wz)
        b4 = $sqrt(bw * bw + 4.0 * wz * wz * w0sq);
        za[nz++] = 2.0 * $atan((b4 + bw) / (2.0 * wz));
        za[nz++] = 2.0 * $atan((b4 - bw) / (2.0 * wz));
      end
      // p s^2 - bw s + p w0^2 = 0, both roots and those of the conjugate pole
      sq = csqrt(csub(cx(bw * bw, 0.0), cscale(cmul(p, p), 4.0 * w0sq)));
      for (int c = 0; c < 2; c++) begin
        cplx_t pc;
        pc = (c == 0) ? p : cx(p.re, -p.im);
        if (c == 1) sq = csqrt(csub(cx(bw * bw, 0.0), cscale(cmul(pc, pc), 4.0 * w0sq)));
        for (int sgn = 0; sgn < 2; sgn++) begin
          cplx_t s, zp;
          root = (sgn != 0) ? csub(cx(bw, 0.0), sq) : cadd(cx(bw, 0.0), sq);
          s  = cdiv(root, cscale(pc, 2.0));
          zp = cdiv(cadd(cx(1.0, 0.0), s), csub(cx(1.0, 0.0), s));
          if (zp.im > 1e-12 && np < MAX_SOS) begin
            bit dup;
            dup = 1'b0;
            for (int j = 0; j < np; j++)
              if (cabs(csub(pz[j], s)) < 1e-9) dup = 1'b1;
            if (!dup) begin
              pz[np] = s;
              pa[np] = cabs(zp);
              np++;
            end
          end
        end
        if (i == 0) break;
      end
    end
    // Pairing and ordering as usual for cascades: sections sorted by pole radius,
    // lowest first; from the highest-Q pole down, each pole takes the nearest
    // unused zero.
    for (int a = 0; a < np; a++) begin
      cplx_t za_;
      za_ = cdiv(cadd(cx(1.0, 0.0), pz[a]), csub(cx(1.0, 0.0), pz[a]));
      pa[a] = cabs(za_);
    end
    for (int a = 0; a < np; a++)
      for (int b = a + 1; b < np; b++)
        if (pa[b] < pa[a]) begin
          real t; cplx_t ts;
          t = pa[a]; pa[a] = pa[b]; pa[b] = t;
          ts = pz[a]; pz[a] = pz[b]; pz[b] = ts;
        end
    begin
      bit    used [MAX_SOS];
      real   zsel [MAX_SOS];
      for (int j = 0; j < MAX_SOS; j++) used[j] = 1'b0;
      for (int a = np - 1; a >= 0; a--) begin
        cplx_t zp;
        int best;
        real bd;
        zp = cdiv(cadd(cx(1.0, 0.0), pz[a]), csub(cx(1.0, 0.0), pz[a]));
        best = -1;
        bd = 1e30;
        for (int j = 0; j < nz; j++)
          if (!used[j] && cabs(csub(cx($cos(za[j]), $sin(za[j])), zp)) < bd) begin
            bd = cabs(csub(cx($cos(za[j]), $sin(za[j])), zp));
            best = j;
          end
        used[best] = 1'b1;
        zsel[a] = za[best];
      end
      for (int a = 0; a < np; a++) za[a] = zsel[a];
    end
    d.nsec = np;
    for (int s = 0; s < np; s++)
      set_section(d, s, pz[s], 1.0, -2.0 * $cos(za[s]), 1.0);
    d.g = 1.0;
    d.f_ref = 0.0;
    // an even-order elliptic response sits at the ripple level at DC
    d.g = ((n % 2 == 0) ? 1.0 / $sqrt(1.0 + ep * ep) : 1.0) / resp(d, d.f_ref);
    d.f_edge = f1;
    d.edge_gain = 1.0 / $sqrt(1.0 + ep * ep);
    d.bs_bw = bw;
    d.bs_w0sq = w0sq;
    d.omega_s = 1.0 / k;
    d.stop_gain = 1.0 / $sqrt(1.0 + es * es);
    return d;
  endfunction

  // Floating-point cascade driven by the same test sequence.
  function automatic void float_model(input design_t d, input int n_vec, ref real fo [$]);
    real x1 [MAX_SOS], x2 [MAX_SOS], y1 [MAX_SOS], y2 [MAX_SOS];
    logic [31:0] q;
    fo.delete();
    for (int k = 0; k < MAX_SOS; k++) begin x1[k] = 0.0; x2[k] = 0.0; y1[k] = 0.0; y2[k] = 0.0; end
    q = 32'h0;
    for (int m = 0; m < n_vec; m++) begin
      real v, y;
      v = d.g * real'(coef_t'(q)) / 536870912.0;
      for (int k = 0; k < d.nsec; k++) begin
        y = d.c[k][0] * v + d.c[k][1] * x1[k] + d.c[k][2] * x2[k] - d.c[k][3] * y1[k] - d.c[k][4] * y2[k];
        x2[k] = x1[k]; x1[k] = v;
        y2[k] = y1[k]; y1[k] = y;
        v = y;
      end
      fo.push_back(v);
      q = lfsr_model_next(q);
    end
  endfunction

  // Frame for the engine: coefficients and g truncated toward zero to fix_32_29,
  // unused slots and stuffing words zero.
  function automatic cand_t to_cand(input design_t d, input logic [31:0] uid);
    cand_t cd;
    cd.uid = uid;
    cd.nsos_word = d.nsec;
    cd.g = to_fix29(d.g);
    for (int k = 0; k < MAX_SOS; k++) begin
      for (int j = 0; j < COEFS_PER_SOS; j++) cd.c[k][j] = (k < d.nsec) ? to_fix29(d.c[k][j]) : '0;
      for (int j = 0; j < MOD_DELAY - COEFS_PER_SOS; j++) cd.stuff[k][j] = '0;
    end
    return cd;
  endfunction

endpackage
