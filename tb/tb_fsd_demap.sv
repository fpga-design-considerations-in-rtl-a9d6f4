// tb_fsd_demap: checks the 64-QAM slicer. Every real component value from -20 to +20 in
// steps of 1/64 (including all decision boundaries) is sliced and compared with the
// nearest odd integer found by searching all eight levels by distance (a tie goes to the
// larger point), then random full-range complex values are checked the same way.
module tb_fsd_demap;
  import fsd_pkg::*;
  cplx_t z;
  qam_t  s;
  fsd_demap dut (.z, .s);

  int checks = 0, failures = 0;

  function automatic int nearest(int x);  // x has FRAC_S fractional bits
    int best, bd;
    best = -7; bd = 1 << 30;
    for (int p = -7; p <= 7; p += 2) begin
      int dd;
      dd = (x - p * (1 << FRAC_S)) < 0 ? -(x - p * (1 << FRAC_S)) : (x - p * (1 << FRAC_S));
      if (dd <= bd) begin bd = dd; best = p; end
    end
    return best;
  endfunction

  task automatic try(int xr, int xi);
    z.re = DW'(xr); z.im = DW'(xi);
    #1;
    checks++;
    if (int'(s.re) != nearest(xr) || int'(s.im) != nearest(xi)) begin
      failures++;
      if (failures < 10) $display("FAIL z=(%0d,%0d): got (%0d,%0d) expected (%0d,%0d)",
                                 xr, xi, s.re, s.im, nearest(xr), nearest(xi));
    end
  endtask

  initial begin
    for (int x = -20 * 1024; x <= 20 * 1024; x += 16) try(x, -x);
    for (int n = 0; n < 2000; n++) try(int'($signed(16'($urandom))), int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
