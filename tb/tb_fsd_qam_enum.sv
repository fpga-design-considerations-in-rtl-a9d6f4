// tb_fsd_qam_enum: checks that the eight groups of the enumerator together visit each of
// the 64 constellation points exactly once, that every coordinate is an odd integer in
// -7..7, and that candidate k = 8*group + branch is the point (2(k mod 8) - 7,
// 2(k div 8) - 7), the order the minimum search relies on for tie-breaking.
module tb_fsd_qam_enum;
  import fsd_pkg::*;
  logic [$clog2(NGRP)-1:0] grp;
  qam_t [NBR-1:0]          pts;
  fsd_qam_enum dut (.grp, .pts);

  int checks = 0, failures = 0;
  int seen [int];

  initial begin
    for (int g = 0; g < NGRP; g++) begin
      grp = ($clog2(NGRP))'(g);
      #1;
      for (int b = 0; b < NBR; b++) begin
        int re, im, k;
        re = pts[b].re; im = pts[b].im; k = g * NBR + b;
        checks++;
        if (re % 2 == 0 || im % 2 == 0 || re < -7 || re > 7 || im < -7 || im > 7 ||
            re != 2 * (k % 8) - 7 || im != 2 * (k / 8) - 7) begin
          failures++;
          $display("FAIL group %0d branch %0d: (%0d,%0d)", g, b, re, im);
        end
        seen[re * 16 + im] = 1;
      end
    end
    checks++;
    if (seen.num() != 64) begin
      failures++;
      $display("FAIL: %0d distinct points", seen.num());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
