// tb_fsd_msu: checks the minimum search. Vectors of 8 beats (8 candidates each) are fed
// with one or more idle cycles between them and sometimes one inside them; distances are random, often
// from a small range so that equal minima occur, sometimes all equal or all saturated.
// Each result must appear exactly 2 cycles after the last beat of its vector and carry
// the points and distance of the first candidate (lowest group, then lowest branch) with
// the smallest distance. Equal minima must actually have occurred.
module tb_fsd_msu;
  import fsd_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  beat_t        in;
  logic         out_valid;
  qam_t [M-1:0] out_s;
  aed_t         out_d;
  fsd_msu dut (.clk, .rst_n, .in, .out_valid, .out_s, .out_d);

  typedef struct { int due; qam_t [M-1:0] s; aed_t d; } exp_t;
  exp_t expq[$];
  int checks = 0, failures = 0, n_ties = 0;

  task automatic fail(string m);
    failures++;
    if (failures < 10) $display("FAIL @%0d: %s", cyc, m);
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      checks++;
      if (expq.size() == 0) fail("unexpected result");
      else begin
        e = expq.pop_front();
        if (e.due != cyc) fail($sformatf("result due at %0d", e.due));
        if (out_s != e.s || out_d != e.d) fail($sformatf("got %0d expected %0d", out_d, e.d));
      end
    end
  end

  initial begin
    in = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 200; v++) begin
      exp_t e;
      int mode, nmin;
      mode = $urandom % 5;
      e.d = '1; e.s = '0; nmin = 0;
      // find the minimum over all 64 first, by a full scan
      for (int g = 0; g < NGRP; g++) begin
        @(negedge clk);
        if (v % 7 == 3 && g == 4) begin in.valid = 1'b0; @(negedge clk); end
        in.valid = 1'b1;
        in.grp = 3'(g);
        for (int b = 0; b < NBR; b++) begin
          for (int i = 0; i < M; i++) in.cand[b].s[i] = qam_t'($urandom);
          case (mode)
            0: in.cand[b].d = AW'($urandom);
            1, 2: in.cand[b].d = AW'($urandom % 6 + 100);
            3: in.cand[b].d = 32'd5;
            default: in.cand[b].d = '1;
          endcase
          if (in.cand[b].d < e.d || (g == 0 && b == 0)) begin
            e.d = in.cand[b].d; e.s = in.cand[b].s; nmin = 1;
          end else if (in.cand[b].d == e.d) nmin++;
        end
      end
      e.due = cyc + 2;
      if (nmin > 1) n_ties++;
      expq.push_back(e);
      @(negedge clk);
      in.valid = 1'b0;
      if (v % 3 == 0) repeat ($urandom % 5) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (expq.size() != 0) fail("results missing");
    if (n_ties == 0) fail("no equal minima");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
