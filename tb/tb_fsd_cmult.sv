// tb_fsd_cmult: checks the complex multiplier in its three configurations against exact
// 64-bit products: the 3-multiplier form (default, latency 3), the direct 4-multiplier
// form (latency 2) and the 3-multiplier form with one extra multiplier register
// (latency 4). New random operands, including full-scale corner values, enter every
// cycle, and every output is compared with the product of the operands given exactly
// `latency` cycles earlier, which checks the published 2- and 3-cycle latencies too.
module tb_fsd_cmult;
  localparam int WA = 16, WB = 18, WP = WA + WB + 2;
  localparam int NCFG = 3;
  localparam int LAT [NCFG] = '{3, 2, 4};

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int cyc = 0;
  always @(posedge clk) cyc++;

  logic signed [WA-1:0] a, b;
  logic signed [WB-1:0] c, d;
  logic signed [WP-1:0] pre [NCFG], pim [NCFG];

  fsd_cmult #(.WA(WA), .WB(WB)) dut (.clk, .a, .b, .c, .d, .p_re(pre[0]), .p_im(pim[0]));
  fsd_cmult #(.WA(WA), .WB(WB), .ARCH3(1'b0)) dut_a (.clk, .a, .b, .c, .d, .p_re(pre[1]), .p_im(pim[1]));
  fsd_cmult #(.WA(WA), .WB(WB), .ARCH3(1'b1), .MULT_PIPE(1)) dut_p (.clk, .a, .b, .c, .d, .p_re(pre[2]), .p_im(pim[2]));

  longint exp_re [int], exp_im [int];
  int checks = 0, failures = 0;

  function automatic longint pick(int w);
    case ($urandom % 6)
      0: return -(longint'(1) << (w - 1));
      1: return (longint'(1) << (w - 1)) - 1;
      default: return longint'($signed($urandom)) % (longint'(1) << (w - 1));
    endcase
  endfunction

  initial begin
    a = '0; b = '0; c = '0; d = '0;
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int k = 0; k < NCFG; k++) begin
        if (exp_re.exists(cyc - LAT[k])) begin
          checks++;
          if (longint'(pre[k]) != exp_re[cyc - LAT[k]] || longint'(pim[k]) != exp_im[cyc - LAT[k]]) begin
            failures++;
            if (failures < 10) $display("FAIL cfg %0d @%0d: got (%0d,%0d) expected (%0d,%0d)", k, cyc,
                                       pre[k], pim[k], exp_re[cyc - LAT[k]], exp_im[cyc - LAT[k]]);
          end
        end
      end
      a = WA'(pick(WA)); b = WA'(pick(WA)); c = WB'(pick(WB)); d = WB'(pick(WB));
      exp_re[cyc] = longint'(a) * c - longint'(b) * d;
      exp_im[cyc] = longint'(b) * c + longint'(a) * d;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
