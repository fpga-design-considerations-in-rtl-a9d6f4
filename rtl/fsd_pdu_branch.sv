// fsd_pdu_branch: one branch of a partial distance unit (PDU) below the first level.
// For a candidate whose points s_j on the levels above (j > LEVEL) are already fixed, it
//  1. cancels their interference from the zero-forcing estimate,
//        z = s_hat_l - sum_{j>l} (u_lj / u_ll) * (s_j - s_hat_j),
//  2. slices z to the nearest 64-QAM point s_l (only one point per level is kept),
//  3. computes the partial distance d_l = u_ll^2 * |s_l - z|^2 (or its l1 approximation)
//     and the accumulated distance D_l = d_l + D_{l+1}.
// This is the branch structure of the published design: a sum of complex products, a
// subtractor, the 64-QAM demapper, a subtractor, the norm block and a multiplier by u_ll^2.
//
// Pipeline, one candidate per cycle, latency branch_lat(ARCH3, MULT_PIPE):
//   1 cycle    differences s_j - s_hat_j
//   cmult_lat  one complex multiplier per level above (3 - LEVEL of them)
//   1 cycle    sum of the products, subtraction from s_hat_l, saturation to 16 bits
//   1 cycle    slicing
//   ped_lat    partial distance
//   1 cycle    accumulation, saturating at 2^AW - 1
// The products keep FRAC_U + FRAC_S fractional bits; the sum is truncated to FRAC_S before
// the subtraction (this rounding choice, like all word widths here, is this design's own).
module fsd_pdu_branch
  import fsd_pkg::*;
#(
  parameter int LEVEL     = 0,     // 0 .. M-2
  parameter bit ARCH3     = 1'b1,
  parameter bit L1        = 1'b0,
  parameter int MULT_PIPE = 0
) (
  input  logic             clk,
  input  ctx_t             ctx,    // estimate and Cholesky data of this vector
  input  qam_t [M-1:0]     s_in,   // points already chosen (levels > LEVEL are used)
  input  aed_t             d_in,   // D_{LEVEL+1}
  output qam_t             s_out,  // point chosen on this level
  output aed_t             d_out   // D_LEVEL
);
  localparam int NJ   = M - 1 - LEVEL;
  localparam int LCM  = cmult_lat(ARCH3, MULT_PIPE);
  localparam int LPED = ped_lat(MULT_PIPE);
  localparam int LBR  = branch_lat(ARCH3, MULT_PIPE);
  localparam int WP   = DW + EW + 2;

  // ---- stage 1: operand differences --------------------------------------------------
  logic signed [EW-1:0] dre [NJ], dim [NJ];
  cplx_t                rat [NJ];
  cplx_t                sh1;
  always_ff @(posedge clk) begin
    for (int k = 0; k < NJ; k++) begin
      dre[k] <= qam_to_fix(s_in[LEVEL+1+k].re) - EW'(ctx.s_hat[LEVEL+1+k].re);
      dim[k] <= qam_to_fix(s_in[LEVEL+1+k].im) - EW'(ctx.s_hat[LEVEL+1+k].im);
      rat[k] <= ctx.u_rat[uidx(LEVEL, LEVEL+1+k)];
    end
    sh1 <= ctx.s_hat[LEVEL];
  end

  // ---- complex multipliers (u_lj/u_ll) * (s_j - s_hat_j) -------------------------------
  logic signed [WP-1:0] pre [NJ], pim [NJ];
  for (genvar k = 0; k < NJ; k++) begin : g_mul
    fsd_cmult #(.WA(DW), .WB(EW), .ARCH3(ARCH3), .MULT_PIPE(MULT_PIPE)) u_cm (
      .clk, .a(rat[k].re), .b(rat[k].im), .c(dre[k]), .d(dim[k]),
      .p_re(pre[k]), .p_im(pim[k]));
  end
  cplx_t sh2;
  fsd_delay #(.W($bits(cplx_t)), .N(LCM)) u_dsh (.clk, .d(sh1), .q(sh2));

  // ---- cancellation -----------------------------------------------------------------------
  cplx_t z3;
  always_ff @(posedge clk) begin
    logic signed [47:0] acc_re, acc_im;
    acc_re = '0;
    acc_im = '0;
    for (int k = 0; k < NJ; k++) begin
      acc_re += 48'(pre[k]);
      acc_im += 48'(pim[k]);
    end
    z3.re <= sat_dw(48'(sh2.re) - (acc_re >>> FRAC_U));
    z3.im <= sat_dw(48'(sh2.im) - (acc_im >>> FRAC_U));
  end

  // ---- slicing ----------------------------------------------------------------------------
  qam_t  s_sl, s4;
  cplx_t z4;
  fsd_demap u_dm (.z(z3), .s(s_sl));
  always_ff @(posedge clk) begin
    s4 <= s_sl;
    z4 <= z3;
  end

  // ---- partial distance -------------------------------------------------------------------
  logic [DW-1:0] g4;
  aed_t          ped;
  fsd_delay #(.W(DW), .N(LCM + 3)) u_dg (.clk, .d(ctx.u_sq[LEVEL]), .q(g4));
  fsd_ped #(.L1(L1), .MULT_PIPE(MULT_PIPE)) u_ped (.clk, .s(s4), .z(z4), .u_sq(g4), .d(ped));

  // ---- accumulation -----------------------------------------------------------------------
  aed_t dprev;
  qam_t s5;
  fsd_delay #(.W(AW), .N(LBR - 1)) u_dd (.clk, .d(d_in), .q(dprev));
  fsd_delay #(.W($bits(qam_t)), .N(LPED)) u_ds (.clk, .d(s4), .q(s5));
  always_ff @(posedge clk) begin
    d_out <= sat_aw(48'(ped) + 48'(dprev));
    s_out <= s5;
  end
endmodule
