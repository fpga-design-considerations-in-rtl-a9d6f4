// tb_fsd_pdu: checks a PDU below the first level (level 0, "PDU 1", default parameters,
// and level 2, "PDU 3", with the 4-multiplier complex products). Random beats, with
// random gaps in the valid stream, enter the unit; each must leave exactly branch_lat
// cycles later with its valid bit, group and context unchanged, the points above the
// level unchanged, the point on the level and the accumulated distance of every one of
// the 8 candidates equal to the reference model's level step.
module tb_fsd_pdu;
  import fsd_pkg::*;
  import fsd_ref_pkg::*;
  localparam int NCFG = 2;
  localparam int LEVV [NCFG] = '{0, 2};
  localparam bit A3V  [NCFG] = '{1'b1, 1'b0};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  beat_t in;
  beat_t out [NCFG];
  fsd_pdu dut (.clk, .rst_n, .in, .out(out[0]));
  fsd_pdu #(.LEVEL(2), .ARCH3(1'b0)) dut3 (.clk, .rst_n, .in, .out(out[1]));

  beat_t expb [NCFG][int];
  int checks = 0, failures = 0;

  initial begin
    in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      for (int k = 0; k < NCFG; k++) begin
        int t;
        t = cyc - branch_lat(A3V[k], 0);
        checks++;
        if (expb[k].exists(t) && expb[k][t].valid) begin
          if (out[k] != expb[k][t]) begin
            failures++;
            if (failures < 10) $display("FAIL cfg %0d @%0d: beat differs", k, cyc);
          end
        end else if (rst_n && out[k].valid) begin
          failures++;
          if (failures < 10) $display("FAIL cfg %0d @%0d: unexpected valid beat", k, cyc);
        end
      end
      in = '0;
      in.valid = ($urandom % 4) != 0;
      in.grp = 3'($urandom);
      for (int i = 0; i < M; i++) begin
        in.ctx.s_hat[i].re = DW'(int'($urandom % 16384) - 8192);
        in.ctx.s_hat[i].im = DW'(int'($urandom % 16384) - 8192);
        in.ctx.u_sq[i] = DW'($urandom % 4096);
      end
      for (int u = 0; u < NU; u++) begin
        in.ctx.u_rat[u].re = DW'(int'($urandom % 4096) - 2048);
        in.ctx.u_rat[u].im = DW'(int'($urandom % 4096) - 2048);
      end
      for (int b = 0; b < NBR; b++) begin
        for (int i = 0; i < M; i++) begin
          in.cand[b].s[i].re = QW'(2 * int'($urandom % 8) - 7);
          in.cand[b].s[i].im = QW'(2 * int'($urandom % 8) - 7);
        end
        in.cand[b].d = AW'($urandom % (1 << 20));
      end
      for (int k = 0; k < NCFG; k++) begin
        beat_t e;
        e = in;
        for (int b = 0; b < NBR; b++) begin
          int sre[M], sim[M];
          longint dd;
          for (int i = 0; i < M; i++) begin sre[i] = in.cand[b].s[i].re; sim[i] = in.cand[b].s[i].im; end
          dd = in.cand[b].d;
          level_step(in.ctx, LEVV[k], 1'b0, sre, sim, dd);
          e.cand[b].s[LEVV[k]].re = QW'(sre[LEVV[k]]);
          e.cand[b].s[LEVV[k]].im = QW'(sim[LEVV[k]]);
          e.cand[b].d = AW'(dd);
        end
        expb[k][cyc] = e;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
