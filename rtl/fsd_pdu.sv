// fsd_pdu: partial distance unit of level LEVEL < M-1 ("PDU 3", "PDU 2", "PDU 1" for
// LEVEL = 2, 1, 0). It takes one beat per cycle, 8 candidates of one received vector, and
// passes each candidate through its own fsd_pdu_branch (8 branches in parallel), which
// appends the point nearest to the cancelled estimate on this level (n = 1) and adds the
// level's partial distance to the accumulated distance. The beat, with the vector context
// it carries, is delayed alongside the branches so that context, group number and
// candidates leave together, branch_lat(ARCH3, MULT_PIPE) cycles after they entered.
// The valid bit has its own reset pipeline (synchronous, active low); the wide beat
// register chain needs no reset.
module fsd_pdu
  import fsd_pkg::*;
#(
  parameter int LEVEL     = 0,
  parameter bit ARCH3     = 1'b1,
  parameter bit L1        = 1'b0,
  parameter int MULT_PIPE = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  beat_t in,
  output beat_t out
);
  localparam int LBR = branch_lat(ARCH3, MULT_PIPE);

  qam_t s_new [NBR];
  aed_t d_new [NBR];
  for (genvar b = 0; b < NBR; b++) begin : g_br
    fsd_pdu_branch #(.LEVEL(LEVEL), .ARCH3(ARCH3), .L1(L1), .MULT_PIPE(MULT_PIPE)) u_br (
      .clk, .ctx(in.ctx), .s_in(in.cand[b].s), .d_in(in.cand[b].d),
      .s_out(s_new[b]), .d_out(d_new[b]));
  end

  beat_t          bd;
  logic [LBR-1:0] vp;
  fsd_delay #(.W($bits(beat_t)), .N(LBR)) u_db (.clk, .d(in), .q(bd));
  always_ff @(posedge clk) begin
    if (!rst_n) vp <= '0;
    else        vp <= {vp[LBR-2:0], in.valid};
  end
  always_comb begin
    out       = bd;
    out.valid = vp[LBR-1];
    for (int b = 0; b < NBR; b++) begin
      out.cand[b].s[LEVEL] = s_new[b];
      out.cand[b].d        = d_new[b];
    end
  end
endmodule
