// fsd_ref_pkg: reference model and stimulus generator shared by the decoder testbenches.
//
// The model recomputes every arithmetic step of the decoder with 64-bit integers in a
// straightforward sequential style (no pipelining, candidates visited one by one), using
// the number formats documented in fsd_pkg: products are exact, right shifts are floor
// divisions, s_hat and z saturate to 16 bits and distances to 32 bits.
// The generator builds channels whose zero-forcing and Cholesky data are consistent:
// the channel matrix is an upper triangular U with a positive real diagonal, so that
// H^H H = U^H U, the Cholesky factor is U itself and H_pinv = U^-1.
package fsd_ref_pkg;
  import fsd_pkg::*;

  function automatic longint floordiv(longint x, longint d);
    if (x >= 0) return x / d;
    return -((-x + d - 1) / d);
  endfunction

  function automatic longint sat16(longint x);
    if (x > 32767) return 32767;
    if (x < -32768) return -32768;
    return x;
  endfunction

  function automatic longint sat32u(longint x);
    if (x > 64'hFFFF_FFFF) return 64'hFFFF_FFFF;
    return x;
  endfunction

  // Nearest odd integer in -7..7; a tie (even integer) goes up.
  function automatic int slice(longint z);
    longint v;
    v = 2 * floordiv(z, 2 * (1 << FRAC_S)) + 1;
    if (v > 7) v = 7;
    if (v < -7) v = -7;
    return int'(v);
  endfunction

  function automatic longint ped(int sre, int sim, longint zre, longint zim,
                                 longint usq, bit l1);
    longint er, ei, n;
    er = longint'(sre) * (1 << FRAC_S) - zre;
    ei = longint'(sim) * (1 << FRAC_S) - zim;
    if (l1) n = (er < 0 ? -er : er) + (ei < 0 ? -ei : ei);
    else    n = (er * er + ei * ei) / (1 << FRAC_S);
    return sat32u((n * usq) / (1 << FRAC_G));
  endfunction

  // s_hat = sat16(floor((H_pinv r) / 2^(FRAC_H+FRAC_R-FRAC_S)))
  function automatic cplx_t [M-1:0] zf(cplx_t [M-1:0][M-1:0] hp, cplx_t [M-1:0] r);
    cplx_t [M-1:0] sh;
    for (int i = 0; i < M; i++) begin
      longint are, aim;
      are = 0; aim = 0;
      for (int j = 0; j < M; j++) begin
        are += longint'(hp[i][j].re) * r[j].re - longint'(hp[i][j].im) * r[j].im;
        aim += longint'(hp[i][j].im) * r[j].re + longint'(hp[i][j].re) * r[j].im;
      end
      sh[i].re = DW'(sat16(floordiv(are, 1 << (FRAC_H + FRAC_R - FRAC_S))));
      sh[i].im = DW'(sat16(floordiv(aim, 1 << (FRAC_H + FRAC_R - FRAC_S))));
    end
    return sh;
  endfunction

  // Extend a candidate whose points on levels above `lev` are fixed: z, slice, distance.
  function automatic void level_step(ctx_t c, int lev, bit l1,
                                     ref int sre[M], ref int sim[M], ref longint d);
    longint are, aim, zre, zim;
    are = 0; aim = 0;
    for (int j = lev + 1; j < M; j++) begin
      longint xr, xi, ur, ui;
      xr = longint'(sre[j]) * (1 << FRAC_S) - c.s_hat[j].re;
      xi = longint'(sim[j]) * (1 << FRAC_S) - c.s_hat[j].im;
      ur = c.u_rat[uidx(lev, j)].re;
      ui = c.u_rat[uidx(lev, j)].im;
      are += ur * xr - ui * xi;
      aim += ui * xr + ur * xi;
    end
    zre = sat16(longint'(c.s_hat[lev].re) - floordiv(are, 1 << FRAC_U));
    zim = sat16(longint'(c.s_hat[lev].im) - floordiv(aim, 1 << FRAC_U));
    sre[lev] = slice(zre);
    sim[lev] = slice(zim);
    d = sat32u(d + ped(sre[lev], sim[lev], zre, zim, longint'(c.u_sq[lev]), l1));
  endfunction

  // Complete detection of one vector: all 64 first-level points, in enumeration order
  // k = 0..63 (Re = 2(k mod 8) - 7, Im = 2(k div 8) - 7); ties keep the earlier candidate.
  function automatic void detect(ctx_t c, bit l1, output qam_t [M-1:0] s_best,
                                 output longint d_best);
    d_best = -1;
    s_best = '0;
    for (int k = 0; k < NPTS; k++) begin
      int sre[M], sim[M];
      longint d;
      foreach (sre[i]) begin sre[i] = 0; sim[i] = 0; end
      sre[M-1] = 2 * (k % 8) - 7;
      sim[M-1] = 2 * (k / 8) - 7;
      d = ped(sre[M-1], sim[M-1], c.s_hat[M-1].re, c.s_hat[M-1].im,
              longint'(c.u_sq[M-1]), l1);
      for (int lev = M - 2; lev >= 0; lev--) level_step(c, lev, l1, sre, sim, d);
      if (d_best < 0 || d < d_best) begin
        d_best = d;
        for (int i = 0; i < M; i++) begin
          s_best[i].re = QW'(sre[i]);
          s_best[i].im = QW'(sim[i]);
        end
      end
    end
  endfunction

  // ---- stimulus -----------------------------------------------------------------------------
  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 100000) / 100000.0;
  endfunction

  function automatic longint q(real x, int frac);
    return longint'($floor(x * real'(longint'(1) << frac) + 0.5));
  endfunction

  // Random consistent channel: U upper triangular (real diagonal 0.8..2.0, off-diagonal
  // components -0.6..0.6), H_pinv = U^-1, u_rat = u_ij / u_ii, u_sq = u_ii^2.
  // ur/ui return the unquantised U for generating received vectors.
  function automatic void gen_channel(output cplx_t [M-1:0][M-1:0] hp,
                                      output cplx_t [NU-1:0] urat,
                                      output logic [M-1:0][DW-1:0] usq,
                                      output real ur[M][M], output real ui[M][M]);
    real vr[M][M], vi[M][M];
    for (int i = 0; i < M; i++)
      for (int j = 0; j < M; j++) begin
        ur[i][j] = 0.0; ui[i][j] = 0.0; vr[i][j] = 0.0; vi[i][j] = 0.0;
        if (j == i) ur[i][j] = urand(0.8, 2.0);
        if (j > i) begin ur[i][j] = urand(-0.6, 0.6); ui[i][j] = urand(-0.6, 0.6); end
      end
    // back substitution for V = U^-1 (upper triangular)
    for (int j = 0; j < M; j++) begin
      vr[j][j] = 1.0 / ur[j][j];
      for (int i = j - 1; i >= 0; i--) begin
        real sr, si;
        sr = 0.0; si = 0.0;
        for (int k = i + 1; k <= j; k++) begin
          sr += ur[i][k] * vr[k][j] - ui[i][k] * vi[k][j];
          si += ur[i][k] * vi[k][j] + ui[i][k] * vr[k][j];
        end
        vr[i][j] = -sr / ur[i][i];
        vi[i][j] = -si / ur[i][i];
      end
    end
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < M; j++) begin
        hp[i][j].re = DW'(q(vr[i][j], FRAC_H));
        hp[i][j].im = DW'(q(vi[i][j], FRAC_H));
        if (j > i) begin
          urat[uidx(i, j)].re = DW'(q(ur[i][j] / ur[i][i], FRAC_U));
          urat[uidx(i, j)].im = DW'(q(ui[i][j] / ur[i][i], FRAC_U));
        end
      end
      usq[i] = DW'(q(ur[i][i] * ur[i][i], FRAC_G));
    end
  endfunction

  // Random 64-QAM vector s and r = U s + noise (noise uniform in +-amp per component).
  function automatic void gen_vector(real ur[M][M], real ui[M][M], real amp,
                                     output qam_t [M-1:0] s, output cplx_t [M-1:0] r);
    int sr[M], si[M];
    for (int j = 0; j < M; j++) begin
      sr[j] = 2 * int'($urandom % 8) - 7;
      si[j] = 2 * int'($urandom % 8) - 7;
      s[j].re = QW'(sr[j]);
      s[j].im = QW'(si[j]);
    end
    for (int i = 0; i < M; i++) begin
      real ar, ai;
      ar = urand(-amp, amp); ai = urand(-amp, amp);
      for (int j = i; j < M; j++) begin
        ar += ur[i][j] * sr[j] - ui[i][j] * si[j];
        ai += ur[i][j] * si[j] + ui[i][j] * sr[j];
      end
      r[i].re = DW'(sat16(q(ar, FRAC_R)));
      r[i].im = DW'(sat16(q(ai, FRAC_R)));
    end
  endfunction
endpackage
