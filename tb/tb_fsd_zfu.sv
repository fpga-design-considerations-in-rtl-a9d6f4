// tb_fsd_zfu: checks the zero-forcing unit with the 3-multiplier (default) and the
// 4-multiplier complex products. A source offers a new random vector and channel
// (including full-scale values that make s_hat saturate) whenever the previous one was
// taken, and sometimes waits. Checked: in_ready never lets two vectors in less than 8
// cycles apart and does let them in exactly 8 apart; each result leaves exactly
// M + cmult_lat cycles after its vector was taken, in order; s_hat equals the reference
// H_pinv r and the Cholesky data are passed through unchanged.
module tb_fsd_zfu;
  import fsd_pkg::*;
  import fsd_ref_pkg::*;
  localparam int NCFG = 2;
  localparam bit A3V [NCFG] = '{1'b1, 1'b0};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic                 in_valid [NCFG];
  logic                 in_ready [NCFG];
  cplx_t [M-1:0]        in_r [NCFG];
  cplx_t [M-1:0][M-1:0] in_hp [NCFG];
  cplx_t [NU-1:0]       in_u_rat [NCFG];
  logic [M-1:0][DW-1:0] in_u_sq [NCFG];
  logic                 out_valid [NCFG];
  ctx_t                 out_ctx [NCFG];

  fsd_zfu dut (.clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]), .in_r(in_r[0]),
               .in_hp(in_hp[0]), .in_u_rat(in_u_rat[0]), .in_u_sq(in_u_sq[0]),
               .out_valid(out_valid[0]), .out_ctx(out_ctx[0]));
  fsd_zfu #(.ARCH3(1'b0)) dut_a (.clk, .rst_n, .in_valid(in_valid[1]), .in_ready(in_ready[1]),
               .in_r(in_r[1]), .in_hp(in_hp[1]), .in_u_rat(in_u_rat[1]), .in_u_sq(in_u_sq[1]),
               .out_valid(out_valid[1]), .out_ctx(out_ctx[1]));

  int checks = 0, failures = 0, n_sat = 0, n_gap8 = 0;
  typedef struct { int due; ctx_t c; } exp_t;
  exp_t expq [NCFG][$];
  int last_take [NCFG];

  task automatic fail(int k, string m);
    failures++;
    if (failures < 10) $display("FAIL cfg %0d @%0d: %s", k, cyc, m);
  endtask

  task automatic new_vec(int k);
    for (int i = 0; i < M; i++) begin
      in_r[k][i].re = DW'(($urandom % 5 == 0) ? 16'h7fff : $urandom);
      in_r[k][i].im = DW'($urandom);
      for (int j = 0; j < M; j++) begin
        in_hp[k][i][j].re = DW'(($urandom % 3 == 0) ? $urandom : $urandom % 2048);
        in_hp[k][i][j].im = DW'(($urandom % 3 == 0) ? $urandom : $urandom % 2048);
      end
      in_u_sq[k][i] = DW'($urandom);
    end
    for (int u = 0; u < NU; u++) in_u_rat[k][u] = cplx_t'($urandom);
    in_valid[k] = ($urandom % 3) != 0;
  endtask

  for (genvar k = 0; k < NCFG; k++) begin : g_drv
    initial begin
      last_take[k] = -100;
      in_valid[k] = 1'b0;
      new_vec(k);
      in_valid[k] = 1'b0;
      repeat (3) @(negedge clk);
      rst_n = 1'b1;
      for (int n = 0; n < 600; n++) begin
        bit took;
        took = in_valid[k] && in_ready[k];  // sampled before the rising edge
        @(negedge clk);
        // results
        if (out_valid[k]) begin
          exp_t e;
          checks++;
          if (expq[k].size() == 0) fail(k, "unexpected result");
          else begin
            e = expq[k].pop_front();
            if (e.due != cyc) fail(k, $sformatf("result due at %0d", e.due));
            if (out_ctx[k] != e.c) fail(k, "s_hat or channel data differ");
            for (int i = 0; i < M; i++)
              if (e.c.s_hat[i].re == 16'sh7fff || e.c.s_hat[i].re == -16'sh8000) n_sat++;
          end
        end
        // input side: was the vector offered in the last cycle taken?
        if (took) begin
          ctx_t c;
          int t;
          t = cyc;  // taken at the edge just passed
          checks++;
          if (t - last_take[k] < NGRP) fail(k, "vectors taken less than 8 cycles apart");
          if (t - last_take[k] == NGRP) n_gap8++;
          last_take[k] = t;
          c.s_hat = zf(in_hp[k], in_r[k]);
          c.u_rat = in_u_rat[k];
          c.u_sq  = in_u_sq[k];
          expq[k].push_back('{t + M + cmult_lat(A3V[k], 0), c});
          new_vec(k);
        end else if (!in_valid[k]) begin
          in_valid[k] = ($urandom % 3) != 0;
        end
        if (k == 0 && cyc - last_take[k] > NGRP && in_valid[k] && !in_ready[k] && last_take[k] > 0)
          fail(k, "not ready 8 cycles after the last transfer");
      end
      checks++;
      if (k == 0) begin
        if (n_sat == 0) fail(k, "saturation never exercised");
        if (n_gap8 == 0) fail(k, "never two vectors 8 cycles apart");
      end
    end
  end

  initial begin
    repeat (610) @(negedge clk);
    repeat (5) @(negedge clk);
    $display("saturated=%0d gap8=%0d", n_sat, n_gap8);
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
