// dirac_ref_pkg: reference model of the Wilson-Dirac stencil for the
// testbenches, written in the simulator's IEEE double (`real`) arithmetic.
// It works from the explicit 4x4 gamma matrices (DeGrand-Rossi basis) and
// projects all four spin components, so it shares no tables with the RTL.
// The order of every floating-point operation is the one the hardware
// specifies (products, complex sums, accumulation from zero, the pairwise
// tree, mass term, halving), so results agree bit for bit.
package dirac_ref_pkg;
  import lqcd_pkg::*;

  typedef struct { real re; real im; } rc_t;
  typedef rc_t rvec_t [3];
  typedef rvec_t rspin_t [4];

  // gamma[mu][row] = column of the single non-zero entry and its value
  function automatic int gcol(input int mu, input int row);
    int t [4][4] = '{'{3, 2, 1, 0}, '{3, 2, 1, 0}, '{2, 3, 0, 1}, '{2, 3, 0, 1}};
    return t[mu][row];
  endfunction
  // value code: 0 = +1, 1 = +i, 2 = -1, 3 = -i
  function automatic int gval(input int mu, input int row);
    int t [4][4] = '{'{1, 1, 3, 3}, '{2, 0, 0, 2}, '{1, 3, 3, 1}, '{0, 0, 0, 0}};
    return t[mu][row];
  endfunction

  function automatic rc_t to_rc(input complex_t c);
    rc_t r; r.re = $bitstoreal(c.re); r.im = $bitstoreal(c.im); return r;
  endfunction
  function automatic complex_t to_c(input rc_t r);
    complex_t c; c.re = $realtobits(r.re); c.im = $realtobits(r.im); return c;
  endfunction

  function automatic rc_t ph_mul(input int code, input rc_t a);
    rc_t r;
    case (code & 3)
      0: begin r.re = a.re;  r.im = a.im;  end
      1: begin r.re = -a.im; r.im = a.re;  end
      2: begin r.re = -a.re; r.im = -a.im; end
      default: begin r.re = a.im; r.im = -a.re; end
    endcase
    return r;
  endfunction

  function automatic rc_t cadd(input rc_t a, input rc_t b);
    rc_t r; r.re = a.re + b.re; r.im = a.im + b.im; return r;
  endfunction

  function automatic rc_t cmul(input rc_t a, input rc_t b);
    rc_t r; real rr, ii, ri, ir;
    rr = a.re * b.re; ii = a.im * b.im; ri = a.re * b.im; ir = a.im * b.re;
    r.re = rr - ii; r.im = ri + ir;
    return r;
  endfunction

  function automatic rspin_t to_rspin(input su3_spinor_t s);
    rspin_t r;
    for (int a = 0; a < 4; a++) for (int c = 0; c < 3; c++) r[a][c] = to_rc(s[a][c]);
    return r;
  endfunction
  function automatic su3_spinor_t from_rspin(input rspin_t r);
    su3_spinor_t s;
    for (int a = 0; a < 4; a++) for (int c = 0; c < 3; c++) s[a][c] = to_c(r[a][c]);
    return s;
  endfunction

  // (1 + sgn*gamma_mu) psi, all four components
  function automatic rspin_t project(input rspin_t psi, input int mu, input int sgn);
    rspin_t r;
    for (int a = 0; a < 4; a++)
      for (int c = 0; c < 3; c++)
        r[a][c] = cadd(psi[a][c], ph_mul(gval(mu, a) + (sgn < 0 ? 2 : 0), psi[gcol(mu, a)][c]));
    return r;
  endfunction

  // w = M v, or M-dagger v, accumulated from zero
  function automatic rvec_t matvec(input su3_matrix_t m, input rvec_t v, input bit adj);
    rvec_t w; rc_t a, p;
    for (int i = 0; i < 3; i++) begin
      w[i].re = 0.0; w[i].im = 0.0;
      for (int j = 0; j < 3; j++) begin
        if (adj) begin a = to_rc(m[j][i]); a.im = -a.im; end
        else a = to_rc(m[i][j]);
        p = cmul(a, v[j]);
        w[i] = cadd(w[i], p);
      end
    end
    return w;
  endfunction

  function automatic rspin_t spin_add(input rspin_t a, input rspin_t b);
    rspin_t r;
    for (int s = 0; s < 4; s++) for (int c = 0; c < 3; c++) r[s][c] = cadd(a[s][c], b[s][c]);
    return r;
  endfunction

  // hopping term k of a site: k < 4 forward (1 -+ gamma), k >= 4 backward
  function automatic rspin_t hop_term(input int k, input su3_matrix_t u, input su3_spinor_t psi, input bit dagger);
    rspin_t pr, r;
    int mu, sgn;
    mu  = k % 4;
    sgn = (k < 4) ? (dagger ? 1 : -1) : (dagger ? -1 : 1);
    pr  = project(to_rspin(psi), mu, sgn);
    for (int s = 0; s < 4; s++) r[s] = matvec(u, pr[s], k >= 4);
    return r;
  endfunction

  function automatic su3_spinor_t stencil(input su3_matrix_t u [8], input su3_spinor_t psi [8],
                                          input su3_spinor_t psi_c, input real coef, input bit dagger);
    rspin_t t [8];
    rspin_t s, pc;
    for (int k = 0; k < 8; k++) t[k] = hop_term(k, u[k], psi[k], dagger);
    s  = spin_add(spin_add(spin_add(t[0], t[1]), spin_add(t[2], t[3])),
                  spin_add(spin_add(t[4], t[5]), spin_add(t[6], t[7])));
    pc = to_rspin(psi_c);
    for (int a = 0; a < 4; a++)
      for (int c = 0; c < 3; c++) begin
        s[a][c].re = (s[a][c].re + coef * pc[a][c].re) * 0.5;
        s[a][c].im = (s[a][c].im + coef * pc[a][c].im) * 0.5;
      end
    return from_rspin(s);
  endfunction

  // random double in (-1, 1), never zero
  function automatic fp64_t rnd_fp();
    real x;
    x = (real'($urandom % 32'h7FFF_FFFF) + 1.0) / 2147483648.0;
    if ($urandom % 2 == 1) x = -x;
    return $realtobits(x);
  endfunction

  function automatic su3_spinor_t rnd_spinor();
    su3_spinor_t s;
    for (int a = 0; a < 4; a++) for (int c = 0; c < 3; c++) begin
      s[a][c].re = rnd_fp(); s[a][c].im = rnd_fp();
    end
    return s;
  endfunction

  function automatic su3_matrix_t rnd_matrix();
    su3_matrix_t m;
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++) begin
      m[i][j].re = rnd_fp(); m[i][j].im = rnd_fp();
    end
    return m;
  endfunction

endpackage
