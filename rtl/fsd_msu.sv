// fsd_msu: minimum search unit. Over the NGRP = 8 beats of one received vector it finds
// the candidate with the smallest accumulated distance D_1 among all 64 and outputs its
// points as the detected vector s_fsd, together with that distance.
//
// Cycle 1: the 8 candidates of a beat are compared and the smallest is registered.
// Cycle 2: it is compared with the best of the earlier beats of the same vector (the
// running minimum restarts at group 0). On the beat of group NGRP-1 the result is
// registered as the output: out_valid pulses 2 cycles after the last beat of a vector,
// so one vector leaves every 8 cycles when the pipeline is full.
// Ties go to the candidate enumerated first (lower group, then lower branch), because
// a later candidate replaces the current best only if it is strictly smaller.
// Reset is synchronous, active low.
module fsd_msu
  import fsd_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  beat_t        in,
  output logic         out_valid,
  output qam_t [M-1:0] out_s,
  output aed_t         out_d
);
  localparam int GW = $clog2(NGRP);

  // ---- cycle 1: minimum of one beat -----------------------------------------------------------
  cand_t         bmin_c, bmin;
  logic          v1;
  logic [GW-1:0] g1;
  always_comb begin
    bmin_c = in.cand[0];
    for (int b = 1; b < NBR; b++)
      if (in.cand[b].d < bmin_c.d) bmin_c = in.cand[b];
  end
  always_ff @(posedge clk) begin
    if (!rst_n) v1 <= 1'b0;
    else        v1 <= in.valid;
    bmin <= bmin_c;
    g1   <= in.grp;
  end

  // ---- cycle 2: running minimum over the beats of one vector ------------------------------
  cand_t best, best_n;
  always_comb begin
    if (g1 == '0 || bmin.d < best.d) best_n = bmin;
    else                             best_n = best;
  end
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
    end else begin
      out_valid <= v1 && g1 == GW'(NGRP - 1);
    end
    if (v1) best <= best_n;
    if (v1 && g1 == GW'(NGRP - 1)) begin
      out_s <= best_n.s;
      out_d <= best_n.d;
    end
  end
endmodule
