// tb_fsd_pdu_root: checks the first-level PDU. Random vector contexts are started with
// one-cycle pulses, back to back every 8 cycles and also with idle gaps. Each pulse must
// produce exactly 8 valid beats, in consecutive cycles starting 1 + ped_lat = 4 cycles
// after the pulse, with groups 0..7, the context passed through, the enumerated points on
// the first level, zeros elsewhere, and distances equal to the reference model's
// u^2 |s - s_hat|^2 for each of the 64 points.
module tb_fsd_pdu_root;
  import fsd_pkg::*;
  import fsd_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic  in_valid;
  ctx_t  in_ctx;
  beat_t out;
  fsd_pdu_root dut (.clk, .rst_n, .in_valid, .in_ctx, .out);

  typedef struct { int due; int g; ctx_t c; } exp_t;
  exp_t expq[$];
  int checks = 0, failures = 0;

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL @%0d: %s", cyc, m);
  endtask

  always @(negedge clk) begin
    if (rst_n && out.valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) fail("unexpected beat");
      else begin
        e = expq.pop_front();
        if (e.due != cyc) fail($sformatf("beat due at %0d", e.due));
        if (int'(out.grp) != e.g) fail("group");
        if (out.ctx != e.c) fail("context");
        for (int b = 0; b < NBR; b++) begin
          int k;
          k = e.g * NBR + b;
          checks++;
          if (int'(out.cand[b].s[M-1].re) != 2 * (k % 8) - 7 || int'(out.cand[b].s[M-1].im) != 2 * (k / 8) - 7)
            fail($sformatf("point of candidate %0d", k));
          for (int l = 0; l < M - 1; l++) if (out.cand[b].s[l] != '0) fail("lower levels not zero");
          if (longint'(out.cand[b].d) != ped(2 * (k % 8) - 7, 2 * (k / 8) - 7, e.c.s_hat[M-1].re,
                                             e.c.s_hat[M-1].im, longint'(e.c.u_sq[M-1]), 1'b0))
            fail($sformatf("distance of candidate %0d: %0d", k, out.cand[b].d));
        end
      end
    end
  end

  initial begin
    in_valid = 1'b0; in_ctx = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 12; v++) begin
      @(negedge clk);
      for (int w = 0; w < $bits(ctx_t) / 32; w++) in_ctx[w*32 +: 32] = $urandom;
      in_valid = 1'b1;
      for (int g = 0; g < NGRP; g++) expq.push_back('{cyc + 1 + ped_lat(0) + g, g, in_ctx});
      @(negedge clk);
      in_valid = 1'b0;
      repeat (NGRP - 2 + ((v % 4 == 3) ? 10 : 0)) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    checks++;
    if (expq.size() != 0) fail("beats missing");
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
