// tb_fsd_ped: checks the partial-distance unit in its squared-l2 form (default), its l1
// form and with one extra multiplier register. Random points, estimates (near the point
// and anywhere in range) and u_ii^2 values enter every cycle; each result is compared
// with the reference model's distance for the inputs given exactly ped_lat cycles
// earlier (3, or 5 with the extra registers).
module tb_fsd_ped;
  import fsd_pkg::*;
  import fsd_ref_pkg::*;
  localparam int NCFG = 3;
  localparam bit L1V [NCFG] = '{1'b0, 1'b1, 1'b0};
  localparam int MPV [NCFG] = '{0, 0, 1};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  qam_t          s;
  cplx_t         z;
  logic [DW-1:0] u_sq;
  aed_t          d [NCFG];
  fsd_ped dut (.clk, .s, .z, .u_sq, .d(d[0]));
  fsd_ped #(.L1(1'b1)) dut_l1 (.clk, .s, .z, .u_sq, .d(d[1]));
  fsd_ped #(.MULT_PIPE(1)) dut_p (.clk, .s, .z, .u_sq, .d(d[2]));

  longint expd [NCFG][int];
  int checks = 0, failures = 0;

  initial begin
    s = '0; z = '0; u_sq = '0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      for (int k = 0; k < NCFG; k++) begin
        int t;
        t = cyc - ped_lat(MPV[k]);
        if (expd[k].exists(t)) begin
          checks++;
          if (longint'(d[k]) != expd[k][t]) begin
            failures++;
            if (failures < 10) $display("FAIL cfg %0d @%0d: %0d expected %0d", k, cyc, d[k], expd[k][t]);
          end
        end
      end
      s.re = QW'(2 * int'($urandom % 8) - 7);
      s.im = QW'(2 * int'($urandom % 8) - 7);
      if (n % 2 == 0) begin
        z.re = DW'(int'(s.re) * 1024 + int'($urandom % 2048) - 1024);
        z.im = DW'(int'(s.im) * 1024 + int'($urandom % 2048) - 1024);
      end else begin
        z.re = DW'($urandom);
        z.im = DW'($urandom);
      end
      u_sq = (n % 7 == 0) ? '1 : DW'($urandom);
      for (int k = 0; k < NCFG; k++)
        expd[k][cyc] = ped(s.re, s.im, z.re, z.im, longint'(u_sq), L1V[k]);
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
