// tb_fsd_ber: workload test of the decoder on random Rayleigh channels, the kind of run
// used to measure its bit error ratio. Two decoders receive the same stimulus: the default
// one (FSD-B, exact squared distance) and FSD-C (L1 distance), so their error ratios can be
// compared.
//
// For each channel realisation the testbench does the offline preprocessing itself, in
// floating point:
//  * a 4x4 channel H with independent CN(0,1) entries;
//  * the detection ordering: the level detected first (all 64 points) takes the
//    remaining stream with the largest noise amplification, diag((H_R^H H_R)^-1);
//    each later level takes the remaining stream with the smallest;
//  * the Cholesky factor U of G = Hp^H Hp and H_pinv = G^-1 Hp^H of the reordered
//    channel Hp.
// The transmitted 64-QAM symbols have E|s_i|^2 = 1/M (scale a = 1/sqrt(42 M)). The
// noise is complex Gaussian with N0 = N / (M log2(P) Eb/N0). The received vector is
// divided by a before quantisation, which puts s_hat in integer-lattice units.
//
// NREAL channel realisations of NVEC vectors are streamed at each of four Eb/N0 values.
// Checked:
//  * every result of each decoder equals the bit-exact reference model for its metric;
//  * each stream of NVEC vectors finishes within NVEC*8 + latency + 8 cycles, i.e. at
//    the constant rate of one vector per 8 cycles;
//  * the bit error ratio of each decoder, Gray-mapped per axis, stays below loose bounds
//    (0.15 at 15 dB, 0.02 at 20 dB, 0.002 at 25 dB, 0.0002 at 30 dB). The last bound
//    catches an error floor, e.g. from H_pinv entries of ill-conditioned channels
//    saturating.
// The measured ratios are printed. Both decoders have the same latency and rate, so they
// share one input handshake.
module tb_fsd_ber;
  import fsd_pkg::*;
  import fsd_ref_pkg::*;

  localparam int  NREAL = 50;
  localparam int  NVEC = 200;
  localparam int  NSNR = 4;
  localparam real EBN0_DB [NSNR] = '{15.0, 20.0, 25.0, 30.0};
  localparam real BER_MAX [NSNR] = '{0.15, 0.02, 0.002, 0.0002};
  localparam real PI = 3.14159265358979;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic             ch_we = 1'b0;
  logic [CH_AW-1:0] ch_addr = '0;
  cplx_t            ch_wdata = '0;
  logic             r_valid = 1'b0;
  cplx_t [M-1:0]    r_data = '0;
  logic             r_ready [2], buf_empty [2], out_valid [2];
  qam_t [M-1:0]     out_s [2];
  aed_t             out_d [2];

  // decoder 0: FSD-B (defaults); decoder 1: FSD-C
  fsd_top dut_b (.clk, .rst_n, .ch_we, .ch_addr, .ch_wdata, .r_valid, .r_ready(r_ready[0]),
                 .r_data, .buf_empty(buf_empty[0]), .out_valid(out_valid[0]),
                 .out_s(out_s[0]), .out_d(out_d[0]));
  fsd_top #(.L1(1'b1)) dut_c (.clk, .rst_n, .ch_we, .ch_addr, .ch_wdata, .r_valid,
                 .r_ready(r_ready[1]), .r_data, .buf_empty(buf_empty[1]),
                 .out_valid(out_valid[1]), .out_s(out_s[1]), .out_d(out_d[1]));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ---- floating-point channel preprocessing -------------------------------------------------
  typedef real rmat [M][M];

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom % 1000000) + 1.0) / 1000001.0;
    u2 = real'($urandom % 1000000) / 1000000.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  // Cholesky G = U^H U of the leading n x n block (Hermitian, positive definite).
  function automatic void chol(int n, rmat gr, rmat gi, output rmat ur, output rmat ui);
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) begin ur[i][j] = 0.0; ui[i][j] = 0.0; end
    for (int i = 0; i < n; i++) begin
      real acc;
      acc = gr[i][i];
      for (int k = 0; k < i; k++) acc -= ur[k][i] * ur[k][i] + ui[k][i] * ui[k][i];
      ur[i][i] = $sqrt(acc);
      for (int j = i + 1; j < n; j++) begin
        real ar, ai;
        ar = gr[i][j]; ai = gi[i][j];
        for (int k = 0; k < i; k++) begin   // conj(u_ki) u_kj
          ar -= ur[k][i] * ur[k][j] + ui[k][i] * ui[k][j];
          ai -= ur[k][i] * ui[k][j] - ui[k][i] * ur[k][j];
        end
        ur[i][j] = ar / ur[i][i];
        ui[i][j] = ai / ur[i][i];
      end
    end
  endfunction

  // Inverse of an upper triangular n x n matrix with real diagonal.
  function automatic void triinv(int n, rmat ur, rmat ui, output rmat vr, output rmat vi);
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) begin vr[i][j] = 0.0; vi[i][j] = 0.0; end
    for (int j = 0; j < n; j++) begin
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
  endfunction

  // Gram matrix of the columns cols[0..n-1] of H.
  function automatic void gram(int n, int cols[M], rmat hr, rmat hi, output rmat gr, output rmat gi);
    for (int a = 0; a < M; a++) for (int b = 0; b < M; b++) begin gr[a][b] = 0.0; gi[a][b] = 0.0; end
    for (int a = 0; a < n; a++) for (int b = 0; b < n; b++)
      for (int k = 0; k < M; k++) begin  // conj(h_ka) h_kb
        gr[a][b] += hr[k][cols[a]] * hr[k][cols[b]] + hi[k][cols[a]] * hi[k][cols[b]];
        gi[a][b] += hr[k][cols[a]] * hi[k][cols[b]] - hi[k][cols[a]] * hr[k][cols[b]];
      end
  endfunction

  function automatic longint qs(real x, int frac);
    return sat16(q(x, frac));
  endfunction

  // Current channel: quantised decoder data and the reordered channel for transmission.
  cplx_t [M-1:0][M-1:0] hp_q;
  cplx_t [NU-1:0]       urat_q;
  logic [M-1:0][DW-1:0] usq_q;
  rmat                  hpr, hpi;   // reordered channel Hp

  task automatic make_channel();
    rmat hr, hi, gr, gi, ur, ui, vr, vi;
    int  rem [M], perm [M], nrem;
    for (int i = 0; i < M; i++) for (int j = 0; j < M; j++) begin
      hr[i][j] = gauss() * $sqrt(0.5);
      hi[i][j] = gauss() * $sqrt(0.5);
    end
    // ordering, from the first detected level (M-1) down to level 0
    nrem = M;
    for (int i = 0; i < M; i++) rem[i] = i;
    for (int lev = M - 1; lev >= 0; lev--) begin
      int best;
      real bestv;
      gram(nrem, rem, hr, hi, gr, gi);
      chol(nrem, gr, gi, ur, ui);
      triinv(nrem, ur, ui, vr, vi);
      best = 0; bestv = 0.0;
      for (int a = 0; a < nrem; a++) begin
        real amp;   // diag of G^-1 = V V^H
        amp = 0.0;
        for (int b = 0; b < nrem; b++) amp += vr[a][b] * vr[a][b] + vi[a][b] * vi[a][b];
        if (a == 0 || (lev == M - 1 ? amp > bestv : amp < bestv)) begin best = a; bestv = amp; end
      end
      perm[lev] = rem[best];
      for (int a = best; a < nrem - 1; a++) rem[a] = rem[a + 1];
      nrem--;
    end
    for (int i = 0; i < M; i++) for (int lev = 0; lev < M; lev++) begin
      hpr[i][lev] = hr[i][perm[lev]];
      hpi[i][lev] = hi[i][perm[lev]];
    end
    // Cholesky and pseudoinverse of the reordered channel
    for (int lev = 0; lev < M; lev++) rem[lev] = lev;
    gram(M, rem, hpr, hpi, gr, gi);
    chol(M, gr, gi, ur, ui);
    triinv(M, ur, ui, vr, vi);
    for (int i = 0; i < M; i++) for (int k = 0; k < M; k++) begin
      real pr, pi;   // H_pinv[i][k] = sum_a sum_b V[i][a] conj(V[b][a]) conj(Hp[k][b])
      pr = 0.0; pi = 0.0;
      for (int b = 0; b < M; b++) begin
        real gir, gii;  // (G^-1)[i][b] = sum_a V[i][a] conj(V[b][a])
        gir = 0.0; gii = 0.0;
        for (int a = 0; a < M; a++) begin
          gir += vr[i][a] * vr[b][a] + vi[i][a] * vi[b][a];
          gii += vi[i][a] * vr[b][a] - vr[i][a] * vi[b][a];
        end
        pr += gir * hpr[k][b] + gii * hpi[k][b];
        pi += gii * hpr[k][b] - gir * hpi[k][b];
      end
      hp_q[i][k].re = DW'(qs(pr, FRAC_H));
      hp_q[i][k].im = DW'(qs(pi, FRAC_H));
    end
    for (int i = 0; i < M; i++) begin
      longint g;
      for (int j = i + 1; j < M; j++) begin
        urat_q[uidx(i, j)].re = DW'(qs(ur[i][j] / ur[i][i], FRAC_U));
        urat_q[uidx(i, j)].im = DW'(qs(ui[i][j] / ur[i][i], FRAC_U));
      end
      g = q(ur[i][i] * ur[i][i], FRAC_G);
      usq_q[i] = DW'(g > 65535 ? 65535 : g);
    end
  endtask

  // ---- stimulus and checking ---------------------------------------------------------------
  typedef struct { qam_t [M-1:0] s_ref; longint d_ref; qam_t [M-1:0] s_tx; } exp_t;
  exp_t expq [2][$];
  int   pushed = 0, snr_idx = 0;
  int   outs [2] = '{0, 0};
  int   bit_err [2][NSNR], bit_cnt [2][NSNR];

  function automatic int gray_err(logic signed [QW-1:0] a, logic signed [QW-1:0] b);
    int ia, ib, ga, gb;
    ia = (int'(a) + 7) / 2; ib = (int'(b) + 7) / 2;
    ga = ia ^ (ia >> 1);    gb = ib ^ (ib >> 1);
    return $countones(ga ^ gb);
  endfunction

  for (genvar v = 0; v < 2; v++) begin : g_mon
    always @(negedge clk) begin
      if (rst_n && out_valid[v]) begin
        exp_t e;
        if (expq[v].size() == 0) check(1'b0, $sformatf("decoder %0d: unexpected output", v));
        else begin
          e = expq[v].pop_front();
          check(out_s[v] == e.s_ref && longint'(out_d[v]) == e.d_ref,
                $sformatf("decoder %0d: vector %0d differs from the reference", v, outs[v]));
          for (int i = 0; i < M; i++)
            bit_err[v][snr_idx] += gray_err(out_s[v][i].re, e.s_tx[i].re)
                                 + gray_err(out_s[v][i].im, e.s_tx[i].im);
          bit_cnt[v][snr_idx] += M * 6;
        end
        outs[v]++;
      end
    end
  end

  task automatic push_vec(real n0);
    real a;
    qam_t [M-1:0] s;
    cplx_t [M-1:0] r;
    ctx_t c;
    exp_t e, ec;
    a = 1.0 / $sqrt(42.0 * M);
    for (int j = 0; j < M; j++) begin
      s[j].re = QW'(2 * int'($urandom % 8) - 7);
      s[j].im = QW'(2 * int'($urandom % 8) - 7);
    end
    for (int i = 0; i < M; i++) begin
      real yr, yi;
      yr = gauss() * $sqrt(n0 / 2.0);
      yi = gauss() * $sqrt(n0 / 2.0);
      for (int j = 0; j < M; j++) begin
        yr += a * (hpr[i][j] * s[j].re - hpi[i][j] * s[j].im);
        yi += a * (hpr[i][j] * s[j].im + hpi[i][j] * s[j].re);
      end
      r[i].re = DW'(qs(yr / a, FRAC_R));
      r[i].im = DW'(qs(yi / a, FRAC_R));
    end
    c.s_hat = zf(hp_q, r);
    c.u_rat = urat_q;
    c.u_sq  = usq_q;
    detect(c, 1'b0, e.s_ref, e.d_ref);
    detect(c, 1'b1, ec.s_ref, ec.d_ref);
    e.s_tx  = s;
    ec.s_tx = s;
    r_valid = 1'b1;
    r_data  = r;
    forever begin
      bit rdy;
      rdy = r_ready[0];
      check(r_ready[1] == rdy, "the two decoders disagree on r_ready");
      @(negedge clk);
      if (rdy) break;
    end
    expq[0].push_back(e);
    expq[1].push_back(ec);
    pushed++;
    r_valid = 1'b0;
  endtask

  initial begin
    for (int v = 0; v < 2; v++) for (int k = 0; k < NSNR; k++) begin
      bit_err[v][k] = 0;
      bit_cnt[v][k] = 0;
    end
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < NSNR; k++) begin
      real n0;
      n0 = real'(M) / (real'(M) * 6.0 * (10.0 ** (EBN0_DB[k] / 10.0)));
      for (int ch = 0; ch < NREAL; ch++) begin
        int t0;
        while (outs[0] != pushed || outs[1] != pushed) @(negedge clk);
        snr_idx = k;
        make_channel();
        for (int adr = 0; adr < fsd_pkg::NCH; adr++) begin
          ch_we = 1'b1;
          ch_addr = CH_AW'(adr);
          if (adr < ADDR_U)      ch_wdata = hp_q[(adr - ADDR_H) / M][(adr - ADDR_H) % M];
          else if (adr < ADDR_G) ch_wdata = urat_q[adr - ADDR_U];
          else                   ch_wdata = '{re: usq_q[adr - ADDR_G], im: '0};
          @(negedge clk);
        end
        ch_we = 1'b0;
        t0 = cyc;
        for (int v = 0; v < NVEC; v++) push_vec(n0);
        while (outs[0] != pushed || outs[1] != pushed) @(negedge clk);
        check(cyc - t0 <= NVEC * NGRP + fsd_latency(1'b1, 0) + NGRP,
              $sformatf("stream of %0d vectors took %0d cycles", NVEC, cyc - t0));
      end
      for (int v = 0; v < 2; v++) begin
        $display("%s Eb/N0 = %4.1f dB: %0d bit errors in %0d bits, BER = %e",
                 v == 0 ? "FSD-B" : "FSD-C", EBN0_DB[k], bit_err[v][k], bit_cnt[v][k],
                 real'(bit_err[v][k]) / real'(bit_cnt[v][k]));
        check(bit_cnt[v][k] == NREAL * NVEC * M * 6,
              $sformatf("decoder %0d: wrong number of results at %0.1f dB", v, EBN0_DB[k]));
        check(real'(bit_err[v][k]) / real'(bit_cnt[v][k]) < BER_MAX[k],
              $sformatf("decoder %0d: BER too high at %0.1f dB", v, EBN0_DB[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
