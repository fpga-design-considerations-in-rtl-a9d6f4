// fsd_cmult: pipelined complex multiplier p = x * y with x = a + jb and y = c + jd.
//
// Two structures are selectable, as in the published design variants:
//  * ARCH3 = 0 (FSD-A): direct form (ac - bd) + j(bc + ad). Four real multipliers in the
//    first cycle, one subtractor and one adder in the second: latency 2.
//  * ARCH3 = 1 (FSD-B, FSD-C): [a(c-d) + d(a-b)] + j[b(c+d) + d(a-b)]. Three pre-adders in
//    the first cycle, three real multipliers (d(a-b) is shared) in the second, two adders
//    in the third: latency 3, one multiplier fewer.
// MULT_PIPE adds register stages directly behind the multipliers (the "optimized FSD-B"
// variant raised the clock rate that way); latency is then cmult_lat(ARCH3, MULT_PIPE).
// Both forms are exact, so they give bit-identical products. Fully pipelined: a new
// operand pair is accepted every cycle; there is no valid signal and no reset.
module fsd_cmult #(
  parameter int WA        = 16,   // width of each component of x
  parameter int WB        = 16,   // width of each component of y
  parameter bit ARCH3     = 1'b1,
  parameter int MULT_PIPE = 0,
  localparam int WP       = WA + WB + 2
) (
  input  logic                 clk,
  input  logic signed [WA-1:0] a,  // Re x
  input  logic signed [WA-1:0] b,  // Im x
  input  logic signed [WB-1:0] c,  // Re y
  input  logic signed [WB-1:0] d,  // Im y
  output logic signed [WP-1:0] p_re,
  output logic signed [WP-1:0] p_im
);
  if (ARCH3) begin : g_three
    // cycle 1: pre-adders
    logic signed [WB:0]   cmd, cpd;
    logic signed [WA:0]   amb;
    logic signed [WA-1:0] a1, b1;
    logic signed [WB-1:0] d1;
    always_ff @(posedge clk) begin
      cmd <= (WB+1)'(c) - (WB+1)'(d);
      cpd <= (WB+1)'(c) + (WB+1)'(d);
      amb <= (WA+1)'(a) - (WA+1)'(b);
      a1  <= a;
      b1  <= b;
      d1  <= d;
    end
    // cycle 2: three multipliers
    logic signed [WP-1:0] m1, m2, m3, m1q, m2q, m3q;
    always_ff @(posedge clk) begin
      m1 <= WP'(a1) * WP'(cmd);
      m2 <= WP'(b1) * WP'(cpd);
      m3 <= WP'(d1) * WP'(amb);
    end
    fsd_delay #(.W(3*WP), .N(MULT_PIPE)) u_mp (.clk, .d({m1, m2, m3}), .q({m1q, m2q, m3q}));
    // cycle 3: post-adders
    always_ff @(posedge clk) begin
      p_re <= m1q + m3q;
      p_im <= m2q + m3q;
    end
  end else begin : g_four
    // cycle 1: four multipliers
    logic signed [WP-1:0] ac, bd, bc, ad, acq, bdq, bcq, adq;
    always_ff @(posedge clk) begin
      ac <= WP'(a) * WP'(c);
      bd <= WP'(b) * WP'(d);
      bc <= WP'(b) * WP'(c);
      ad <= WP'(a) * WP'(d);
    end
    fsd_delay #(.W(4*WP), .N(MULT_PIPE)) u_mp (.clk, .d({ac, bd, bc, ad}), .q({acq, bdq, bcq, adq}));
    // cycle 2: subtractor and adder
    always_ff @(posedge clk) begin
      p_re <= acq - bdq;
      p_im <= bcq + adq;
    end
  end
endmodule
