// fsd_ped: partial Euclidean distance of one level, d = u_ii^2 * ||s - z||, where the norm
// is the squared l2 norm |Re e|^2 + |Im e|^2 (FSD-A, FSD-B) or, with L1 = 1, the l1-norm
// approximation |Re e| + |Im e| (FSD-C), e = s - z.
//
// Pipeline (latency ped_lat(MULT_PIPE) = 3 + 2*MULT_PIPE, one new input per cycle):
//   cycle 1  e = s - z, both components, FRAC_S fractional bits
//   cycle 2  norm: two squarers and an adder (result shifted back to FRAC_S fractional
//            bits), or two absolute values and an adder; MULT_PIPE extra stages follow
//   cycle 3  scaling by u_ii^2 (FRAC_G fractional bits), shifted back to FRAC_S fractional
//            bits and saturated to AW bits; MULT_PIPE extra stages follow
// The l1 path keeps the same latency so that the three variants are interchangeable.
// The structure follows the branch diagram (a norm block followed by a multiplier by
// u_ii^2); word widths, rounding by truncation and saturation are this design's choices.
module fsd_ped
  import fsd_pkg::*;
#(
  parameter bit L1        = 1'b0,
  parameter int MULT_PIPE = 0
) (
  input  logic          clk,
  input  qam_t          s,
  input  cplx_t         z,
  input  logic [DW-1:0] u_sq,
  output aed_t          d
);
  localparam int NW = 2 * EW - FRAC_S + 1;  // norm width

  // cycle 1
  logic signed [EW-1:0] er, ei;
  logic [DW-1:0]        g1;
  always_ff @(posedge clk) begin
    er <= qam_to_fix(s.re) - EW'(z.re);
    ei <= qam_to_fix(s.im) - EW'(z.im);
    g1 <= u_sq;
  end

  // cycle 2
  logic [NW-1:0] n2, n2q;
  logic [DW-1:0] g2, g2q;
  always_ff @(posedge clk) begin
    if (L1) begin
      logic [EW-1:0] ar, ai;
      ar = er < 0 ? EW'(-er) : EW'(er);
      ai = ei < 0 ? EW'(-ei) : EW'(ei);
      n2 <= NW'(ar) + NW'(ai);
    end else begin
      logic signed [2*EW-1:0] sqr, sqi;
      logic [2*EW:0]          sq;
      sqr = er * er;
      sqi = ei * ei;
      sq  = (2*EW+1)'(unsigned'(sqr)) + (2*EW+1)'(unsigned'(sqi));
      n2 <= NW'(sq >> FRAC_S);
    end
    g2 <= g1;
  end
  fsd_delay #(.W(NW + DW), .N(MULT_PIPE)) u_p2 (.clk, .d({n2, g2}), .q({n2q, g2q}));

  // cycle 3
  aed_t d3;
  always_ff @(posedge clk) begin
    logic [NW+DW-1:0] prod;
    prod = (NW+DW)'(n2q) * (NW+DW)'(g2q);
    d3 <= sat_aw(48'(prod >> FRAC_G));
  end
  fsd_delay #(.W(AW), .N(MULT_PIPE)) u_p3 (.clk, .d(d3), .q(d));
endmodule
