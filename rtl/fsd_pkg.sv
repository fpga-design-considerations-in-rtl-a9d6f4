// fsd_pkg: sizes, number formats, shared types and small arithmetic helpers of the
// fixed-throughput sphere decoder (FSD).
//
// The decoder detects a 4x4 spatially multiplexed 64-QAM vector by evaluating a fixed set
// of 64 candidate vectors: all 64 points on the first detected level and, on each of the
// three remaining levels, the single point closest to the interference-cancelled estimate.
// These sizes (M = 4, P = 64, point distribution n = (1,1,1,64), 8 parallel branches per
// level, 8 cycles per vector, 16 bits per real input component) follow the published
// architecture. The fixed-point formats below are this design's own choice; the source
// fixes only the 16-bit input width.
//
// Symbol domain: constellation points are the odd integers -7..7 on each axis (the
// normalisation of the transmitted energy is folded into the pseudoinverse offline).
// The unconstrained estimate s_hat and the cancelled estimate z are signed 16-bit numbers
// with FRAC_S fractional bits. Levels are numbered 0..M-1 in the RTL; level l is level
// l+1 in the usual 1-based notation, and level M-1 is detected first.
package fsd_pkg;

  // ---- architecture sizes -------------------------------------------------------------
  localparam int M     = 4;            // transmit (and receive) antennas
  localparam int NPTS  = 64;           // constellation size P (64-QAM)
  localparam int NBR   = 8;            // parallel branches per PDU
  localparam int NGRP  = NPTS / NBR;   // cycles per MIMO vector, C = 8
  localparam int NU    = M * (M - 1) / 2; // off-diagonal Cholesky entries u_ij, i<j

  // ---- number formats -----------------------------------------------------------------
  localparam int DW     = 16;  // bits per real component of every stored input value
  localparam int FRAC_S = 10;  // s_hat, z, s - z        (range +-32)
  localparam int FRAC_R = 9;   // received vector r     (range +-64)
  localparam int FRAC_H = 9;   // pseudoinverse entries  (range +-64)
  localparam int FRAC_U = 11;  // ratios u_ij / u_ii     (range +-16)
  localparam int FRAC_G = 10;  // squared diagonal u_ii^2, unsigned (range 0..64)
  localparam int AW     = 32;  // accumulated distance, unsigned, FRAC_S fractional bits
  localparam int EW     = 18;  // width of differences s - s_hat and s - z
  localparam int QW     = 4;   // constellation coordinate, signed odd integer -7..7

  // ---- channel memory map (word addresses of the internal memory) --------------------
  localparam int NCH      = M * M + NU + M;  // 26 words per channel realisation
  localparam int CH_AW    = $clog2(NCH);
  localparam int ADDR_H   = 0;               // H_pinv[i][j] at ADDR_H + i*M + j
  localparam int ADDR_U   = M * M;           // u_ij/u_ii at ADDR_U + uidx(i,j)
  localparam int ADDR_G   = M * M + NU;      // u_ii^2 at ADDR_G + i (real part)

  // ---- types ----------------------------------------------------------------------------
  typedef struct packed {
    logic signed [DW-1:0] re;
    logic signed [DW-1:0] im;
  } cplx_t;

  typedef struct packed {
    logic signed [QW-1:0] re;
    logic signed [QW-1:0] im;
  } qam_t;

  typedef logic [AW-1:0] aed_t;

  // Per-vector context: everything the PDUs need about one received vector.
  typedef struct packed {
    cplx_t [M-1:0]      s_hat;  // zero-forcing estimate
    cplx_t [NU-1:0]     u_rat;  // u_ij / u_ii, i<j
    logic  [M-1:0][DW-1:0] u_sq; // u_ii^2
  } ctx_t;

  // One candidate vector travelling down the PDU chain.
  typedef struct packed {
    qam_t [M-1:0] s;   // points chosen so far (levels below the current one are 0)
    aed_t         d;   // accumulated distance
  } cand_t;

  // One beat of the pipeline: 8 candidates of one vector, group grp of 0..NGRP-1.
  typedef struct packed {
    logic                    valid;
    logic [$clog2(NGRP)-1:0] grp;
    ctx_t                    ctx;
    cand_t [NBR-1:0]         cand;
  } beat_t;

  // ---- helpers --------------------------------------------------------------------------
  // Index of u_ij (0-based, i<j) in the packed off-diagonal array.
  function automatic int uidx(int i, int j);
    return i * (2 * M - i - 1) / 2 + (j - i - 1);
  endfunction

  // Saturate a wide signed value to DW bits.
  function automatic logic signed [DW-1:0] sat_dw(logic signed [47:0] x);
    localparam logic signed [47:0] MAXV = 48'sd32767;
    localparam logic signed [47:0] MINV = -48'sd32768;
    if (x > MAXV) return DW'(MAXV);
    if (x < MINV) return DW'(MINV);
    return DW'(x);
  endfunction

  // Saturate a non-negative wide value to AW bits.
  function automatic aed_t sat_aw(logic [47:0] x);
    if (x > 48'({AW{1'b1}})) return '1;
    return AW'(x);
  endfunction

  // Constellation point as a number with FRAC_S fractional bits.
  function automatic logic signed [EW-1:0] qam_to_fix(logic signed [QW-1:0] q);
    return EW'(q) <<< FRAC_S;
  endfunction

  // Latency of the complex multiplier: 2 cycles for the 4-multiplier form, 3 cycles for
  // the 3-multiplier form, plus any extra register stages behind the multipliers.
  function automatic int cmult_lat(bit arch3, int mult_pipe);
    return (arch3 ? 3 : 2) + mult_pipe;
  endfunction

  // Latency of the partial-distance unit: difference, norm, scaling by u_ii^2.
  function automatic int ped_lat(int mult_pipe);
    return 3 + 2 * mult_pipe;
  endfunction

  // Latency of one PDU branch below the first level: operand differences, complex
  // multipliers, cancellation, slicing, PED and the accumulation of the distance.
  function automatic int branch_lat(bit arch3, int mult_pipe);
    return 1 + cmult_lat(arch3, mult_pipe) + 1 + 1 + ped_lat(mult_pipe) + 1;
  endfunction

  // Cycles from the clock edge that writes a received vector into the empty internal
  // memory to the out_valid pulse of its detected vector, with an idle pipeline:
  // buffer (1), zero-forcing unit (M + cmult_lat), first-level PDU (1 + ped_lat),
  // three further PDUs, the remaining 7 beats of the vector and the minimum search (2).
  function automatic int fsd_latency(bit arch3, int mult_pipe);
    return 1 + (M + cmult_lat(arch3, mult_pipe)) + (1 + ped_lat(mult_pipe))
         + (M - 1) * branch_lat(arch3, mult_pipe) + (NGRP - 1) + 2;
  endfunction

endpackage
