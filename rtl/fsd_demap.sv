// fsd_demap: 64-QAM slicer. Returns the constellation point closest to a complex estimate
// z, which is the "64-QAM Demapper" of every PDU branch below the first level.
//
// The square 64-QAM grid is separable, so each axis is sliced on its own: the closest odd
// integer to x is 2*floor(x/2) + 1, clamped to -7..7. With FRAC_S fractional bits,
// floor(x/2) is an arithmetic right shift by FRAC_S+1. A value exactly on a decision
// boundary (an even integer) goes to the point above it. Purely combinational.
// The slicing rule is the standard one; the source names the block and its purpose only.
module fsd_demap
  import fsd_pkg::*;
(
  input  cplx_t z,
  output qam_t  s
);
  function automatic logic signed [QW-1:0] slice(logic signed [DW-1:0] x);
    logic signed [DW-1:0] h;
    logic signed [DW:0]   v;
    h = x >>> (FRAC_S + 1);
    v = (DW+1)'(h) * 2 + 1;
    if (v > 7)  return QW'(7);
    if (v < -7) return -QW'(7);
    return QW'(v);
  endfunction

  always_comb begin
    s.re = slice(z.re);
    s.im = slice(z.im);
  end
endmodule
