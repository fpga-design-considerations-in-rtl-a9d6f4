// fsd_pdu_root: partial distance unit of the first detected level (level M-1, "PDU 4").
// Every one of the 64 constellation points is a candidate on this level (n = 64), so no
// cancellation or slicing is needed: z = s_hat_{M-1} and each candidate gets
//   D_{M-1} = u^2 * |s - s_hat_{M-1}|^2   (or the l1 approximation with L1 = 1).
// A one-cycle in_valid pulse with the vector's context starts a burst of NGRP = 8 beats;
// beat g carries the 8 candidates g*8 .. g*8+7 from the point enumerator through 8 PED
// branches. Beats leave 1 + ped_lat(MULT_PIPE) cycles after they are formed, i.e. the first
// beat 1 + ped_lat cycles after in_valid. A new in_valid must not come before the previous
// burst has been formed (at most one vector per 8 cycles), which an assertion checks.
// Reset is synchronous, active low, and clears the burst state.
module fsd_pdu_root
  import fsd_pkg::*;
#(
  parameter bit L1        = 1'b0,
  parameter int MULT_PIPE = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  ctx_t  in_ctx,
  output beat_t out
);
  localparam int GW   = $clog2(NGRP);
  localparam int LPED = ped_lat(MULT_PIPE);

  // ---- burst generation ---------------------------------------------------------------------
  logic          active;
  logic [GW-1:0] grp;
  ctx_t          ctx_q;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      grp    <= '0;
    end else if (in_valid) begin
      active <= 1'b1;
      grp    <= '0;
    end else if (active) begin
      grp <= grp + 1'b1;
      if (grp == GW'(NGRP - 1)) active <= 1'b0;
    end
    if (in_valid) ctx_q <= in_ctx;
  end

  qam_t [NBR-1:0] pts;
  fsd_qam_enum u_enum (.grp(grp), .pts(pts));

  beat_t b0;
  always_comb begin
    b0       = '0;
    b0.valid = active;
    b0.grp   = grp;
    b0.ctx   = ctx_q;
    for (int b = 0; b < NBR; b++) b0.cand[b].s[M-1] = pts[b];
  end

  // ---- 8 parallel PED branches ---------------------------------------------------------------
  aed_t ped [NBR];
  for (genvar b = 0; b < NBR; b++) begin : g_br
    fsd_ped #(.L1(L1), .MULT_PIPE(MULT_PIPE)) u_ped (
      .clk, .s(b0.cand[b].s[M-1]), .z(ctx_q.s_hat[M-1]), .u_sq(ctx_q.u_sq[M-1]), .d(ped[b]));
  end

  // ---- beat alignment -------------------------------------------------------------------------
  beat_t         bd;
  logic [LPED-1:0] vp;
  fsd_delay #(.W($bits(beat_t)), .N(LPED)) u_db (.clk, .d(b0), .q(bd));
  always_ff @(posedge clk) begin
    if (!rst_n) vp <= '0;
    else        vp <= {vp[LPED-2:0], b0.valid};
  end
  always_comb begin
    out       = bd;
    out.valid = vp[LPED-1];
    for (int b = 0; b < NBR; b++) out.cand[b].d = ped[b];
  end

  assert property (@(posedge clk) disable iff (!rst_n) in_valid |-> !active || grp == GW'(NGRP - 1))
    else $error("fsd_pdu_root: new vector before the previous burst was formed");
endmodule
