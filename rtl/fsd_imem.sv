// fsd_imem: internal memory of the decoder. It holds the data of the current channel
// realisation (the pseudoinverse H_pinv and the Cholesky-derived values u_ij/u_ii and
// u_ii^2, all computed offline) and buffers the received vectors r until the zero-forcing
// unit takes them.
//
// Channel storage: NCH = 26 complex words written one per cycle through ch_we / ch_addr /
// ch_wdata, with the map given in fsd_pkg (H_pinv[i][j] at i*M+j, u_ij/u_ii at 16 +
// uidx(i,j), u_ii^2 in the real part of word 22 + i). All words are read in parallel.
// A write takes effect for every vector that the zero-forcing unit takes afterwards, so
// the channel should be rewritten only when the buffer is empty (empty = 1) and the
// previous vectors have been taken.
//
// Received vectors: a first-in first-out buffer of RDEPTH whole vectors with a
// valid/ready handshake on both sides (r_valid/r_ready in, rd_valid/rd_ready out). A
// vector written in one cycle can be read from the next. The buffer lets a source deliver
// vectors in bursts while the decoder takes one every 8 cycles; r_ready low is the
// back-pressure. The source says only what this memory stores; the organisation, depth
// and handshakes are this design's choices. Reset is synchronous, active low, and empties
// the buffer; the channel words are not reset.
module fsd_imem
  import fsd_pkg::*;
#(
  parameter int RDEPTH = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // channel write port
  input  logic                   ch_we,
  input  logic [CH_AW-1:0]       ch_addr,
  input  cplx_t                  ch_wdata,
  // received-vector input
  input  logic                   r_valid,
  output logic                   r_ready,
  input  cplx_t [M-1:0]          r_data,
  // read side towards the zero-forcing unit
  output logic                   rd_valid,
  input  logic                   rd_ready,
  output cplx_t [M-1:0]          rd_r,
  output cplx_t [M-1:0][M-1:0]   hp,
  output cplx_t [NU-1:0]         u_rat,
  output logic  [M-1:0][DW-1:0]  u_sq,
  output logic                   empty
);
  localparam int PW = $clog2(RDEPTH);

  // ---- channel words --------------------------------------------------------------------------
  cplx_t chan [NCH];
  always_ff @(posedge clk) begin
    if (ch_we && int'(ch_addr) < NCH) chan[ch_addr] <= ch_wdata;
  end
  always_comb begin
    for (int i = 0; i < M; i++) begin
      for (int j = 0; j < M; j++) hp[i][j] = chan[ADDR_H + i * M + j];
      u_sq[i] = chan[ADDR_G + i].re;
    end
    for (int k = 0; k < NU; k++) u_rat[k] = chan[ADDR_U + k];
  end

  // ---- vector buffer ----------------------------------------------------------------------------
  cplx_t [M-1:0]  mem [RDEPTH];
  logic [PW-1:0]  wp, rp;
  logic [PW:0]    cnt;
  wire push = r_valid && r_ready;
  wire pop  = rd_valid && rd_ready;

  assign r_ready  = (cnt != (PW+1)'(RDEPTH));
  assign rd_valid = (cnt != '0);
  assign empty    = (cnt == '0);
  assign rd_r     = mem[rp];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wp  <= '0;
      rp  <= '0;
      cnt <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
      cnt <= cnt + (PW+1)'(push) - (PW+1)'(pop);
    end
    if (push) mem[wp] <= r_data;
  end
endmodule
