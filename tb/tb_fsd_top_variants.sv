// tb_fsd_top_variants: end-to-end test of the published design variants side by side:
// FSD-A (4-multiplier complex products), FSD-C (l1-norm distances) and the optimized
// FSD-B (one more register behind every multiplier). All three see the same stimulus.
//
// Four channel realisations are loaded one after the other through the channel write
// port. For each, received vectors r = U s + noise are generated and pushed into the
// decoder: single vectors into an idle pipeline (the latency must be exactly
// fsd_latency cycles), bursts longer than the vector buffer (back-pressure through
// r_ready, several vectors in flight, results exactly 8 cycles apart) and vectors with
// random gaps. Every result is compared bit for bit with the reference model of
// fsd_ref_pkg (detected points and distance); for noiseless vectors the detected vector
// must also equal the transmitted one. Mechanisms that must occur at least once: a
// channel reload, back-pressure, overlapping vectors, back-to-back results 8 cycles
// apart, an idle-pipeline latency measurement and a first-level point at the edge of the
// constellation being the winner.
module tb_fsd_top_variants;
  import fsd_pkg::*;
  import fsd_ref_pkg::*;

  localparam int NDUT = 3;
  localparam bit ARCH3_V [NDUT] = '{1'b0, 1'b1, 1'b1};
  localparam bit L1_V    [NDUT] = '{1'b0, 1'b1, 1'b0};
  localparam int MP_V    [NDUT] = '{0, 0, 1};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic             ch_we = 1'b0;
  logic [CH_AW-1:0] ch_addr = '0;
  cplx_t            ch_wdata = '0;
  logic             r_valid = 1'b0;
  cplx_t [M-1:0]    r_data = '0;
  logic             r_ready [NDUT];
  logic             buf_empty [NDUT];
  logic             out_valid [NDUT];
  qam_t [M-1:0]     out_s [NDUT];
  aed_t             out_d [NDUT];

  for (genvar k = 0; k < NDUT; k++) begin : g_dut
    fsd_top #(.ARCH3(ARCH3_V[k]), .L1(L1_V[k]), .MULT_PIPE(MP_V[k])) dut (
      .clk, .rst_n, .ch_we, .ch_addr, .ch_wdata, .r_valid, .r_ready(r_ready[k]), .r_data,
      .buf_empty(buf_empty[k]), .out_valid(out_valid[k]), .out_s(out_s[k]), .out_d(out_d[k]));
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // expected results, one queue per DUT
  typedef struct {
    qam_t [M-1:0] s_ref;
    longint       d_ref;
    qam_t [M-1:0] s_tx;
    bit           noiseless;
    int           push_cyc;
    bit           idle;
  } exp_t;
  exp_t expq [NDUT][$];
  int   pushed = 0;
  int   outs [NDUT];
  int   last_out [NDUT];
  int   n_backpressure = 0, n_overlap = 0, n_rate8 = 0, n_latency = 0, n_reload = 0;
  int   n_edge = 0;

  // channel currently loaded (quantised) and its real-valued U
  cplx_t [M-1:0][M-1:0] hp;
  cplx_t [NU-1:0]       urat;
  logic [M-1:0][DW-1:0] usq;
  real                  ur [M][M], ui [M][M];

  function automatic bit drained();
    for (int k = 0; k < NDUT; k++) if (outs[k] != pushed) return 1'b0;
    return 1'b1;
  endfunction

  task automatic load_channel();
    gen_channel(hp, urat, usq, ur, ui);
    for (int a = 0; a < NCH; a++) begin
      ch_we   = 1'b1;
      ch_addr = CH_AW'(a);
      if (a < ADDR_U)      ch_wdata = hp[(a - ADDR_H) / M][(a - ADDR_H) % M];
      else if (a < ADDR_G) ch_wdata = urat[a - ADDR_U];
      else                 ch_wdata = '{re: usq[a - ADDR_G], im: '0};
      @(negedge clk);
    end
    ch_we = 1'b0;
    n_reload++;
  endtask

  // Push one vector; waits while r_ready is low.
  task automatic push_vec(real amp);
    qam_t [M-1:0] s;
    cplx_t [M-1:0] r;
    ctx_t c;
    exp_t e;
    bit idle;
    gen_vector(ur, ui, amp, s, r);
    c.s_hat = zf(hp, r);
    c.u_rat = urat;
    c.u_sq  = usq;
    r_valid = 1'b1;
    r_data  = r;
    forever begin
      bit rdy;
      rdy = r_ready[0];   // r_ready only changes at a rising edge
      @(negedge clk);
      if (rdy) break;
      n_backpressure++;
    end
    // the push happened at the last posedge
    idle = drained();
    for (int k = 0; k < NDUT; k++) begin
      longint d;
      detect(c, L1_V[k], e.s_ref, d);
      e.d_ref = d;
      e.s_tx = s;
      e.noiseless = (amp == 0.0);
      e.push_cyc = cyc;
      e.idle = idle;
      expq[k].push_back(e);
    end
    pushed++;
    r_valid = 1'b0;
  endtask

  // ---- output monitors --------------------------------------------------------------------
  for (genvar k = 0; k < NDUT; k++) begin : g_mon
    always @(negedge clk) begin
      if (rst_n && pushed - outs[k] >= 2 && k == 0) n_overlap++;
      if (rst_n && out_valid[k]) begin
        if (expq[k].size() == 0) begin
          check(1'b0, $sformatf("dut %0d: unexpected output", k));
        end else begin
          exp_t e;
          e = expq[k].pop_front();
          check(out_s[k] == e.s_ref, $sformatf("dut %0d vector %0d: points %h, expected %h",
                                                k, outs[k], out_s[k], e.s_ref));
          check(longint'(out_d[k]) == e.d_ref, $sformatf("dut %0d vector %0d: distance %0d, expected %0d",
                                                k, outs[k], out_d[k], e.d_ref));
          if (e.noiseless)
            check(out_s[k] == e.s_tx, $sformatf("dut %0d vector %0d: noiseless vector not recovered",
                                                 k, outs[k]));
          if (e.idle) begin
            check(cyc - e.push_cyc == fsd_latency(ARCH3_V[k], MP_V[k]),
                  $sformatf("dut %0d: latency %0d, expected %0d", k, cyc - e.push_cyc,
                            fsd_latency(ARCH3_V[k], MP_V[k])));
            if (k == 0) n_latency++;
          end
          if (outs[k] > 0) begin
            check(cyc - last_out[k] >= NGRP, $sformatf("dut %0d: results %0d cycles apart",
                                                       k, cyc - last_out[k]));
            if (cyc - last_out[k] == NGRP && k == 0) n_rate8++;
          end
          if (k == 0 && (out_s[k][M-1].re == 4'sd7 || out_s[k][M-1].re == -4'sd7 ||
                         out_s[k][M-1].im == 4'sd7 || out_s[k][M-1].im == -4'sd7)) n_edge++;
        end
        last_out[k] = cyc;
        outs[k]++;
      end
    end
  end

  initial begin
    for (int k = 0; k < NDUT; k++) begin outs[k] = 0; last_out[k] = 0; end
    repeat (4) @(negedge clk);
    rst_n <= 1'b1;
    @(negedge clk);
    for (int chn = 0; chn < 4; chn++) begin
      real amp;
      amp = (chn == 0) ? 0.0 : (chn == 1) ? 0.3 : (chn == 2) ? 1.0 : 0.0;
      while (!drained()) @(negedge clk);
      load_channel();
      // two vectors into an idle pipeline
      for (int v = 0; v < 2; v++) begin
        push_vec(amp);
        while (!drained()) @(negedge clk);
      end
      // a burst longer than the buffer
      for (int v = 0; v < 24; v++) push_vec(amp);
      // vectors with random gaps
      for (int v = 0; v < 8; v++) begin
        repeat ($urandom % 12) @(negedge clk);
        push_vec(amp);
      end
    end
    while (!drained()) @(negedge clk);
    repeat (20) @(negedge clk);
    for (int k = 0; k < NDUT; k++) check(expq[k].size() == 0, "results missing");
    $display("mechanisms: reloads=%0d backpressure_cycles=%0d overlap_cycles=%0d rate8=%0d latency_checks=%0d edge_winners=%0d",
             n_reload, n_backpressure, n_overlap, n_rate8, n_latency, n_edge);
    check(n_reload >= 2, "no channel reload");
    check(n_backpressure > 0, "no back-pressure");
    check(n_overlap > 0, "no overlapping vectors");
    check(n_rate8 > 0, "no back-to-back results");
    check(n_latency > 0, "no latency measurement");
    check(n_edge > 0, "no edge point selected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
