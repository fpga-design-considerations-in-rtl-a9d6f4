// fsd_qam_enum: 64-QAM point enumerator of the first-level PDU. The first level visits
// every constellation point, NBR = 8 of them per cycle over NGRP = 8 cycles. In group g,
// branch b receives point k = g*NBR + b, whose coordinates are
//   Re = 2*(k mod 8) - 7,  Im = 2*(k div 8) - 7.
// The source says only that such an enumerating block exists; this ordering is this
// design's choice and fixes the candidate index used for tie-breaking in the minimum search.
// Purely combinational.
module fsd_qam_enum
  import fsd_pkg::*;
(
  input  logic [$clog2(NGRP)-1:0] grp,
  output qam_t [NBR-1:0]          pts
);
  localparam int SIDE = 8;  // points per axis of 64-QAM
  always_comb begin
    for (int b = 0; b < NBR; b++) begin
      int k;
      k = int'(grp) * NBR + b;
      pts[b].re = QW'(2 * (k % SIDE) - 7);
      pts[b].im = QW'(2 * (k / SIDE) - 7);
    end
  end
endmodule
