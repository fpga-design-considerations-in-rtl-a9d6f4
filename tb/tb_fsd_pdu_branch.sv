// tb_fsd_pdu_branch: checks single PDU branches against the reference model's level step
// (cancellation, slicing, partial and accumulated distance). Instances cover level 0
// (three cancelled levels, default parameters), level 2 (one cancelled level), the
// 4-multiplier complex products, the l1 distance and the extra multiplier registers.
// Random contexts, points and incoming distances (including values near saturation)
// enter every cycle; each output is compared with the reference for the inputs given
// exactly branch_lat cycles earlier (10 cycles for the default branch).
module tb_fsd_pdu_branch;
  import fsd_pkg::*;
  import fsd_ref_pkg::*;
  localparam int NCFG = 5;
  localparam int LEVV [NCFG] = '{0, 2, 1, 0, 1};
  localparam bit A3V  [NCFG] = '{1'b1, 1'b1, 1'b0, 1'b1, 1'b1};
  localparam bit L1V  [NCFG] = '{1'b0, 1'b0, 1'b0, 1'b1, 1'b0};
  localparam int MPV  [NCFG] = '{0, 0, 0, 0, 1};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  ctx_t         ctx;
  qam_t [M-1:0] s_in;
  aed_t         d_in;
  qam_t         s_out [NCFG];
  aed_t         d_out [NCFG];

  fsd_pdu_branch dut (.clk, .ctx, .s_in, .d_in, .s_out(s_out[0]), .d_out(d_out[0]));
  for (genvar k = 1; k < NCFG; k++) begin : g_cfg
    fsd_pdu_branch #(.LEVEL(LEVV[k]), .ARCH3(A3V[k]), .L1(L1V[k]), .MULT_PIPE(MPV[k])) u (
      .clk, .ctx, .s_in, .d_in, .s_out(s_out[k]), .d_out(d_out[k]));
  end

  typedef struct { int sre; int sim; longint d; } res_t;
  res_t expr [NCFG][int];
  int checks = 0, failures = 0, n_sat = 0;

  initial begin
    ctx = '0; s_in = '0; d_in = '0;
    for (int n = 0; n < 800; n++) begin
      @(negedge clk);
      for (int k = 0; k < NCFG; k++) begin
        int t;
        t = cyc - branch_lat(A3V[k], MPV[k]);
        if (expr[k].exists(t)) begin
          checks++;
          if (int'(s_out[k].re) != expr[k][t].sre || int'(s_out[k].im) != expr[k][t].sim ||
              longint'(d_out[k]) != expr[k][t].d) begin
            failures++;
            if (failures < 10) $display("FAIL cfg %0d @%0d: (%0d,%0d) %0d expected (%0d,%0d) %0d", k, cyc,
              s_out[k].re, s_out[k].im, d_out[k], expr[k][t].sre, expr[k][t].sim, expr[k][t].d);
          end
          if (expr[k][t].d == 64'hFFFF_FFFF) n_sat++;
        end
      end
      for (int i = 0; i < M; i++) begin
        s_in[i].re = QW'(2 * int'($urandom % 8) - 7);
        s_in[i].im = QW'(2 * int'($urandom % 8) - 7);
        ctx.s_hat[i].re = DW'(int'(s_in[i].re) * 1024 + int'($urandom % 4096) - 2048);
        ctx.s_hat[i].im = DW'(int'(s_in[i].im) * 1024 + int'($urandom % 4096) - 2048);
        ctx.u_sq[i] = DW'($urandom);
      end
      for (int u = 0; u < NU; u++) begin
        ctx.u_rat[u].re = DW'(int'($urandom % 8192) - 4096);
        ctx.u_rat[u].im = DW'(int'($urandom % 8192) - 4096);
        if (n % 13 == 0) ctx.u_rat[u].re = 16'sh7fff;
      end
      d_in = (n % 11 == 0) ? 32'hFFFF_FF00 : AW'($urandom % (1 << 24));
      for (int k = 0; k < NCFG; k++) begin
        int sre[M], sim[M];
        longint dd;
        for (int i = 0; i < M; i++) begin sre[i] = s_in[i].re; sim[i] = s_in[i].im; end
        dd = d_in;
        level_step(ctx, LEVV[k], L1V[k], sre, sim, dd);
        expr[k][cyc] = '{sre[LEVV[k]], sim[LEVV[k]], dd};
      end
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
