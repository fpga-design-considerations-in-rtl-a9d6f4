// fsd_top: fixed-throughput sphere decoder (FSD) for a 4x4 MIMO link with 64-QAM.
//
// For every received vector r the decoder evaluates the same 64 candidate vectors: the 64
// points of the first detected level, each completed on the three other levels by the
// point nearest to the interference-cancelled estimate. The candidate with the smallest
// accumulated distance ||U (s - s_hat)||^2 is the detected vector. Because the search is
// fixed, the pipeline is fixed too, and one vector is detected every 8 cycles whatever
// the channel or the noise.
//
// Data path (as in the published block diagram):
//   fsd_imem      channel data and a buffer of received vectors
//   fsd_zfu       s_hat = H_pinv r, one vector per 8 cycles
//   fsd_pdu_root  level 3 (PDU 4): 64 candidates, 8 per cycle
//   fsd_pdu x3    levels 2, 1, 0 (PDU 3, 2, 1): 8 branches each
//   fsd_msu       minimum over the 64 distances
// Variants of the published design are parameters of this module:
//   FSD-A            ARCH3 = 0, L1 = 0, MULT_PIPE = 0
//   FSD-B (default)  ARCH3 = 1, L1 = 0, MULT_PIPE = 0
//   FSD-C            ARCH3 = 1, L1 = 1, MULT_PIPE = 0
//   optimized FSD-B  ARCH3 = 1, L1 = 0, MULT_PIPE = 1 (one more register behind every
//                    multiplier; the number of stages used there is not published)
// Timing: with an idle pipeline, out_valid pulses fsd_latency(ARCH3, MULT_PIPE) cycles
// after the edge that writes r (52 cycles for FSD-B); vectors then leave every 8 cycles.
// The detected points out_s[l] are odd integers -7..7 per axis; out_d is the winning
// distance (FRAC_S fractional bits, an l1-based metric with L1 = 1).
// Reset is synchronous and active low. The channel should be rewritten only when the
// vector buffer is empty (buf_empty) and the last vector has been taken.
module fsd_top
  import fsd_pkg::*;
#(
  parameter bit ARCH3     = 1'b1,
  parameter bit L1        = 1'b0,
  parameter int MULT_PIPE = 0,
  parameter int RDEPTH    = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             ch_we,
  input  logic [CH_AW-1:0] ch_addr,
  input  cplx_t            ch_wdata,
  input  logic             r_valid,
  output logic             r_ready,
  input  cplx_t [M-1:0]    r_data,
  output logic             buf_empty,
  output logic             out_valid,
  output qam_t [M-1:0]     out_s,
  output aed_t             out_d
);
  logic                 rd_valid, rd_ready;
  cplx_t [M-1:0]        rd_r;
  cplx_t [M-1:0][M-1:0] hp;
  cplx_t [NU-1:0]       u_rat;
  logic [M-1:0][DW-1:0] u_sq;

  fsd_imem #(.RDEPTH(RDEPTH)) u_imem (
    .clk, .rst_n, .ch_we, .ch_addr, .ch_wdata,
    .r_valid, .r_ready, .r_data,
    .rd_valid, .rd_ready, .rd_r, .hp, .u_rat, .u_sq, .empty(buf_empty));

  logic zf_valid;
  ctx_t zf_ctx;
  fsd_zfu #(.ARCH3(ARCH3), .MULT_PIPE(MULT_PIPE)) u_zfu (
    .clk, .rst_n, .in_valid(rd_valid), .in_ready(rd_ready), .in_r(rd_r), .in_hp(hp),
    .in_u_rat(u_rat), .in_u_sq(u_sq), .out_valid(zf_valid), .out_ctx(zf_ctx));

  beat_t beat [M+1];   // beat[M] leaves the first level, beat[l] leaves level l
  fsd_pdu_root #(.L1(L1), .MULT_PIPE(MULT_PIPE)) u_pdu_root (
    .clk, .rst_n, .in_valid(zf_valid), .in_ctx(zf_ctx), .out(beat[M-1]));

  for (genvar l = M - 2; l >= 0; l--) begin : g_pdu
    fsd_pdu #(.LEVEL(l), .ARCH3(ARCH3), .L1(L1), .MULT_PIPE(MULT_PIPE)) u_pdu (
      .clk, .rst_n, .in(beat[l+1]), .out(beat[l]));
  end
  assign beat[M] = '0;

  fsd_msu u_msu (.clk, .rst_n, .in(beat[0]), .out_valid, .out_s, .out_d);
endmodule
