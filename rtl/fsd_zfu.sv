// fsd_zfu: zero-forcing unit. Computes the unconstrained estimate s_hat = H_pinv * r of
// one received vector and hands it, together with the Cholesky data of the channel, to
// the first-level PDU as a per-vector context.
//
// Four complex multipliers work in parallel, one per row i of H_pinv; the M columns are
// issued on M consecutive cycles and each row accumulates its products:
//   s_hat_i = sat16( (sum_j H_pinv[i][j] * r_j) >>> (FRAC_H + FRAC_R - FRAC_S) ).
// Four complex multipliers matches the published multiplier counts (4 x 4 real multipliers
// in FSD-A, 4 x 3 in FSD-B); the column-serial schedule is this design's choice.
//
// Handshake: a vector is taken when in_valid and in_ready are both high. in_ready is high
// again NGRP = 8 cycles after a transfer, so a new vector enters at most every 8 cycles,
// the constant rate at which the PDUs consume vectors (8 cycles of 8 candidates each).
// out_valid pulses for one cycle, M + cmult_lat clock edges after the edge at which the
// vector is taken. The channel data are sampled at that edge; later changes do not affect
// a vector already taken. Reset is synchronous and active low.
module fsd_zfu
  import fsd_pkg::*;
#(
  parameter bit ARCH3     = 1'b1,
  parameter int MULT_PIPE = 0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  output logic                   in_ready,
  input  cplx_t [M-1:0]          in_r,       // received vector
  input  cplx_t [M-1:0][M-1:0]   in_hp,      // H_pinv[i][j]
  input  cplx_t [NU-1:0]         in_u_rat,   // u_ij / u_ii
  input  logic  [M-1:0][DW-1:0]  in_u_sq,    // u_ii^2
  output logic                   out_valid,
  output ctx_t                   out_ctx
);
  localparam int LCM   = cmult_lat(ARCH3, MULT_PIPE);
  localparam int SHIFT = FRAC_H + FRAC_R - FRAC_S;
  localparam int WP    = 2 * DW + 2;
  localparam int CW    = $clog2(M);
  localparam int GW    = $clog2(NGRP);

  // ---- rate limiter and column issue --------------------------------------------------------
  logic [GW-1:0]        gap;
  logic                 issuing;
  logic [CW-1:0]        col;
  cplx_t [M-1:0]        r_hold;
  cplx_t [M-1:0][M-1:0] hp_hold;
  cplx_t [NU-1:0]       urat_hold;
  logic [M-1:0][DW-1:0] usq_hold;

  assign in_ready = (gap == '0);
  wire take = in_valid && in_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gap     <= '0;
      issuing <= 1'b0;
      col     <= '0;
    end else begin
      if (take)            gap <= GW'(NGRP - 1);
      else if (gap != '0)  gap <= gap - 1'b1;
      if (take) begin
        issuing <= 1'b1;
        col     <= '0;
      end else if (issuing) begin
        col <= col + 1'b1;
        if (col == CW'(M - 1)) issuing <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (take) begin
      r_hold    <= in_r;
      hp_hold   <= in_hp;
      urat_hold <= in_u_rat;
      usq_hold  <= in_u_sq;
    end
  end

  // ---- four complex multipliers, one per row --------------------------------------------
  logic signed [WP-1:0] pre [M], pim [M];
  for (genvar i = 0; i < M; i++) begin : g_row
    fsd_cmult #(.WA(DW), .WB(DW), .ARCH3(ARCH3), .MULT_PIPE(MULT_PIPE)) u_cm (
      .clk,
      .a(hp_hold[i][col].re), .b(hp_hold[i][col].im),
      .c(r_hold[col].re),     .d(r_hold[col].im),
      .p_re(pre[i]), .p_im(pim[i]));
  end

  // Tag pipeline: which column leaves the multipliers in each cycle.
  logic [LCM-1:0]         tv;
  logic [LCM-1:0][CW-1:0] tc;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tv <= '0;
      tc <= '0;
    end else begin
      tv <= {tv[LCM-2:0], issuing};
      tc <= {tc[LCM-2:0], col};
    end
  end
  wire           pv = tv[LCM-1];
  wire [CW-1:0]  pc = tc[LCM-1];

  // Cholesky data aligned with the last product of the vector.
  cplx_t [NU-1:0]       urat_d;
  logic [M-1:0][DW-1:0] usq_d;
  fsd_delay #(.W($bits(urat_hold) + $bits(usq_hold)), .N(M - 1 + LCM)) u_du (
    .clk, .d({urat_hold, usq_hold}), .q({urat_d, usq_d}));

  // ---- accumulation ---------------------------------------------------------------------
  logic signed [47:0] acc_re [M], acc_im [M];
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= pv && (pc == CW'(M - 1));
    end
  end
  always_ff @(posedge clk) begin
    for (int i = 0; i < M; i++) begin
      logic signed [47:0] nre, nim;
      nre = (pc == '0 ? 48'sd0 : acc_re[i]) + 48'(pre[i]);
      nim = (pc == '0 ? 48'sd0 : acc_im[i]) + 48'(pim[i]);
      if (pv) begin
        acc_re[i] <= nre;
        acc_im[i] <= nim;
      end
      if (pv && pc == CW'(M - 1)) begin
        out_ctx.s_hat[i].re <= sat_dw(nre >>> SHIFT);
        out_ctx.s_hat[i].im <= sat_dw(nim >>> SHIFT);
      end
    end
    if (pv && pc == CW'(M - 1)) begin
      out_ctx.u_rat <= urat_d;
      out_ctx.u_sq  <= usq_d;
    end
  end

  // A new vector may only be taken once the previous one has left the multipliers' input.
  assert property (@(posedge clk) disable iff (!rst_n) take |-> !issuing || col == CW'(M - 1))
    else $error("fsd_zfu: vector accepted while columns were still being issued");
endmodule
