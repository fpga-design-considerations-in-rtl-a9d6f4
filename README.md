# Fixed-throughput sphere decoder for 4x4 MIMO with 64-QAM

Maximum-likelihood detection of a 4x4 spatially multiplexed 64-QAM vector means choosing
one of 64^4 = 16,777,216 hypotheses. An ordinary sphere decoder prunes that tree search,
but the amount of pruning depends on the channel and the noise, so its throughput varies.
This decoder instead checks the same small set of 64 candidate vectors for every
received vector:

* On the first detected level, all 64 constellation points are tried.
* On each of the three other levels, only the single point nearest to the
  interference-cancelled estimate is kept.

The search is fixed, so the hardware can be a fixed pipeline. It takes a new received
vector every 8 clock cycles and gives out one detected vector every 8 cycles,
whatever the channel or SNR. With good channel ordering (done offline), the result is
close to maximum-likelihood.

The RTL is SystemVerilog-2017 and synthesizable. It is written from a published FPGA
architecture: the block structure, the 8-way parallelism, the rate of one vector per 8
cycles and the variants with fewer multipliers all follow that architecture. Word
formats, handshakes, memory organisation and exact pipeline depths are this
implementation's own choices. They are listed under [Departures and open points](#departures-and-open-points).

## The algorithm in the datapath

The channel is preprocessed offline, once per channel realisation:

* the pseudoinverse `H_pinv = (H^H H)^-1 H^H`;
* the upper-triangular Cholesky factor `U` of `H^H H`, with entries `u_ij`;
* the detection ordering of the columns of `H`.

For a received vector `r` the decoder computes the zero-forcing estimate
`s_hat = H_pinv r`. It then minimises `||U (s - s_hat)||^2` over the candidate set.
That distance splits into one term per level. It is built up from the last level
(level 3 in the RTL's 0-based numbering) down to level 0:

```
z_l  = s_hat_l - sum_{j>l} (u_lj / u_ll) (s_j - s_hat_j)      cancelled estimate
d_l  = u_ll^2 |s_l - z_l|^2                                    partial distance (PED)
D_l  = d_l + D_{l+1},  D_4 = 0                                 accumulated distance (AED)
```

On level 3, `z_3 = s_hat_3` and all 64 points `s_3` are candidates. On levels 2, 1 and 0,
`s_l` is the 64-QAM point closest to `z_l`. The output is the candidate with the smallest
`D_0`.

## Pipeline organisation

```
 r ──► fsd_imem ──► fsd_zfu ──► fsd_pdu_root ──► fsd_pdu ──► fsd_pdu ──► fsd_pdu ──► fsd_msu ──► s_fsd
      (buffer +    (s_hat)     level 3           level 2     level 1     level 0     (minimum)
       channel)                ("PDU 4")         ("PDU 3")   ("PDU 2")   ("PDU 1")
```

The unit of work between the PDUs is a **beat** (`beat_t` in `fsd_pkg`). A beat holds 8
of the 64 candidates of one received vector. A vector therefore passes as 8
consecutive beats, with groups 0..7, and each PDU has 8 identical branches that handle
one candidate each. This 8-way parallelism is what fixes the rate at 8 cycles per vector.

Every beat also carries the vector's **context** (`ctx_t`): `s_hat`, the ratios
`u_ij/u_ii` and the `u_ii^2` values. While one PDU works on the last beats of vector
*t*, the next PDU is already on vector *t-1*. A single shared register for the context
would therefore not be enough. Carrying it in the beat costs flip-flops (384 bits for
each beat register), but every stage stays self-contained. The valid bit has its own
resettable shift register in every PDU, so the wide data chains need no reset.

### Latency

Latency is counted from the clock edge that writes `r` into an empty buffer to the
`out_valid` pulse (`fsd_latency()` in `fsd_pkg`):

| stage | cycles (FSD-B) |
|---|---|
| buffer | 1 |
| ZFU: 4 columns + complex multiplier | 4 + 3 |
| first-level PDU: beat formation + PED | 1 + 3 |
| 3 PDUs, 10 cycles each | 30 |
| remaining 7 beats of the vector + minimum search | 7 + 2 |
| **total** | **51** |

The table below lists the variants (see the next section). The published
implementation reports larger initial latencies (62, 66, 66 and 78 cycles) with the same
differences between the variants. The absolute values differ because the per-block
pipeline depths are not published.

| variant | parameters | complex mult. latency | latency | real multipliers |
|---|---|---|---|---|
| FSD-A | `ARCH3=0 L1=0 MULT_PIPE=0` | 2 | 47 | 304 |
| FSD-B (default) | `ARCH3=1 L1=0 MULT_PIPE=0` | 3 | 51 | 252 |
| FSD-C | `ARCH3=1 L1=1 MULT_PIPE=0` | 3 | 51 | 188 |
| optimized FSD-B | `ARCH3=1 L1=0 MULT_PIPE=1` | 4 | 63 | 252 |

The multiplier counts assume one multiplier per real product. They come from:

* the ZFU: 4 complex multipliers;
* per branch, one complex multiplier for each level above the branch's own level;
* per branch, two squarers and one multiplier by `u_ii^2`.

These counts match the published figures for the three versions.

## Design variants

* **3-multiplier complex product (`ARCH3`, `fsd_cmult`).** The direct form
  `(a+jb)(c+jd) = (ac-bd) + j(bc+ad)` uses 4 multipliers and takes 2 cycles: multiply,
  then add. The rewritten form `[a(c-d) + d(a-b)] + j[b(c+d) + d(a-b)]` shares the
  product `d(a-b)`, so it needs 3 multipliers and 5 adders. It takes 3 cycles: pre-add,
  multiply, post-add. Both forms are exact, so the results are bit-identical; only
  latency and resources change.
* **l1 distance (`L1`, `fsd_ped`).** `|s - z|^2` is replaced by `|Re(s-z)| + |Im(s-z)|`.
  This is still multiplied by `u_ii^2`. It removes the two squarers from every branch.
  Detection quality drops, by more than published (see the departures below), and
  `out_d` is no longer a squared distance. The l1
  path has the same latency as the l2 path, so the variants can be swapped freely.
* **Extra multiplier registers (`MULT_PIPE`).** This adds register stages directly
  behind every multiplier, in the complex multipliers and in the PED. The aim is a
  higher clock rate at the cost of latency and flip-flops. With 1 stage, the latency grows by
  12 cycles, the same increase the published "optimized" version shows.

## Blocks

| file | role |
|---|---|
| `fsd_pkg.sv` | sizes, number formats, channel memory map, `beat_t`/`ctx_t`, latency functions |
| `fsd_imem.sv` | internal memory: 26 channel words (read in parallel) and a 16-vector FIFO for `r` |
| `fsd_zfu.sv` | `s_hat = H_pinv r` with 4 complex multipliers, one per row; the 4 columns are issued on consecutive cycles; takes at most one vector per 8 cycles |
| `fsd_cmult.sv` | pipelined complex multiplier, 4- or 3-multiplier form |
| `fsd_pdu_root.sv` | first level: turns one context into 8 beats of enumerated points and computes their PEDs |
| `fsd_qam_enum.sv` | point `k = 8*group + branch` is `(2(k mod 8) - 7, 2(k div 8) - 7)` |
| `fsd_pdu.sv` | one lower level: 8 branches plus the aligned beat/context delay line |
| `fsd_pdu_branch.sv` | one branch: cancellation products, subtract from `s_hat_l`, slice, PED, add `D_{l+1}` |
| `fsd_demap.sv` | 64-QAM slicer: per axis `2*floor(x/2) + 1`, clamped to ±7 |
| `fsd_ped.sv` | `u_ii^2` times the squared-l2 or l1 norm of `s - z` |
| `fsd_msu.sv` | minimum of 8 candidates per cycle, then a running minimum over the 8 beats |
| `fsd_delay.sv` | generic register chain used for alignment |
| `fsd_top.sv` | the complete decoder |

**Ties.** When two candidates have exactly the same distance, the one enumerated first
wins. That is the lower group, then the lower branch, i.e. the smaller `k` of its
first-level point. `fsd_msu` replaces its current best only on a strictly smaller
distance.

## Number formats and preparing channel data

Constellation points are the odd integers -7..7 on each axis, stored as signed 4-bit
values. The usual energy normalisation of the transmitted symbols (and any common scale
of the channel) must be removed offline, either by folding it into `H_pinv` or by a
gain on `r`. Then `s_hat` comes out in these integer-lattice units. A common scale on all `u_ii^2` only scales every distance and
does not change the decision.

| quantity | format | range |
|---|---|---|
| `r` | 16-bit signed, 9 fractional bits | ±64 |
| `H_pinv` entries | 16-bit signed, 9 fractional bits | ±64 |
| `u_ij / u_ii` (i < j) | 16-bit signed, 11 fractional bits | ±16 |
| `u_ii^2` | 16-bit unsigned, 10 fractional bits | 0..64 |
| `s_hat`, `z` | 16-bit signed, 10 fractional bits, saturating | ±32 |
| distances `d`, `D` | 32-bit unsigned, 10 fractional bits, saturating | |

The 16-bit input width follows the published design; the splits between integer and
fraction bits are this design's choice (constants in `fsd_pkg`). Every product is kept
exact, then truncated toward minus infinity to the stated format.

The wide range of `H_pinv` matters. On badly conditioned Rayleigh channels its entries
grow as large as the inverse of the smallest singular value of `H`. With a ±16 range,
about 2 % of random 4x4 channels saturated, and each such channel lost most of its
vectors, which set a BER floor near 2e-3 at 30 dB. With ±64 no floor was seen in
`tb_fsd_ber`, and the finer step gave no measurable gain.

Channel words are written through `ch_we`/`ch_addr`/`ch_wdata`, one complex word per
cycle. The map is:

| address | content |
|---|---|
| `i*4 + j` (0..15) | `H_pinv[i][j]` |
| `16 + uidx(i,j)` (16..21) | `u_ij / u_ii` for i < j; `uidx(i,j) = i(7-i)/2 + j-i-1` |
| `22 + i` (22..25) | `u_ii^2` in the real part |

Levels are indexed in detection order. Level 3 is detected first and gets all 64
points, so the offline ordering must put the stream meant for full enumeration last.

## Interface and usage rules

* Reset `rst_n` is synchronous and active low.
* **Received vectors** use a valid/ready handshake: `r_valid`, `r_ready`, `r_data`
  (4 complex words). The FIFO accepts up to 16 vectors in a burst. After that,
  `r_ready` stays low until the ZFU has taken enough of them, at one per 8 cycles.
* **Results:** `out_valid` pulses once per vector, in input order. `out_s[l]` is the
  detected point of level `l`, and `out_d` is its distance.
* **Channel updates** apply to every vector the ZFU takes after the write. Rewrite
  the channel only when `buf_empty` is high and no vector is waiting. The testbenches
  wait until all results have come out. Vectors already inside the pipeline carry
  their own copy of the channel data and are not affected.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog. The arithmetic reference is
`tb/fsd_ref_pkg.sv`. It is a sequential, integer-only model of the same number formats:
it visits the 64 candidates one at a time, with no pipelining. It also generates
consistent test channels: `H = U` upper triangular, so `H_pinv = U^-1` is exact and `U`
is its own Cholesky factor.

* `tb_fsd_top` runs the whole decoder at its default parameters (FSD-B). It loads 4
  channels and sends 136 vectors: idle single vectors, bursts longer than the buffer,
  and randomly spaced vectors.
  * Every result is compared bit for bit with the reference.
  * Noiseless vectors must come back exactly as transmitted.
  * Latency is checked on an idle pipeline, and consecutive results must be exactly 8
    cycles apart.
  * It counts, and requires, at least one of each of these: channel reload,
    back-pressure, overlapping vectors, back-to-back results, and a winner on the edge
    of the constellation.
* `tb_fsd_top_variants` runs the same test on FSD-A, FSD-C and optimized FSD-B side by
  side.
* `tb_fsd_ber` is a scaled-down bit-error-ratio run on random Rayleigh channels
  (CN(0,1) entries). The testbench does the offline work in floating point: the FSD
  ordering, the Cholesky factor and the pseudoinverse, all quantised to 16 bits. It
  streams 50 channels x 200 vectors at each of Eb/N0 = 15, 20, 25 and 30 dB into an
  FSD-B and an FSD-C decoder side by side. Every result must match the reference. Each
  200-vector stream must finish within 200 x 8 cycles plus the latency. The Gray-mapped
  bit error ratio must stay under loose bounds. Measured (240,000 bits per point):

  | Eb/N0 | FSD-B | FSD-C |
  |---|---|---|
  | 15 dB | 4.1e-2 | 7.0e-2 |
  | 20 dB | 3.1e-3 | 9.4e-3 |
  | 25 dB | 7.9e-5 | 2.9e-4 |
  | 30 dB | 0 | 0 |
* Unit testbenches: `tb_fsd_cmult`, `tb_fsd_demap`, `tb_fsd_qam_enum`, `tb_fsd_ped`,
  `tb_fsd_pdu_branch`, `tb_fsd_pdu_root`, `tb_fsd_pdu`, `tb_fsd_zfu`, `tb_fsd_imem`,
  `tb_fsd_msu`. They check exact values, the published 2- and 3-cycle complex multiplier
  latencies, the 8-cycle rate, saturation, FIFO full/empty behaviour and tie-breaking.

Run one with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/fsd_pkg.sv tb/fsd_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v fsd_pkg) tb/tb_fsd_top.sv --top-module tb_fsd_top -o sim
./obj_dir/sim
```

The testbenches use only `$urandom` for stimulus. `tb_fsd_ber` takes under a minute
and the others well under a second. Full BER curves were not reproduced. They need
10,000 channels per point, and the ML reference curve needs a separate floating-point
detector.

## Departures and open points

* **Pipeline depths** are this design's own, so the initial latency is 51 cycles instead
  of the published 66. The differences between variants (+4, +12) match.
* **Internal memory:** a register file plus a FIFO. The published design uses block
  RAM whose organisation is not described.
* **ZFU structure:** 4 complex multipliers, column-serial over 4 of the 8 cycles. It was
  chosen because it reproduces the published multiplier totals exactly.
* **Extra multiplier registers:** the number added in the published "optimized"
  version is not given. `MULT_PIPE=1` is the setting whose latency increase matches.
* **FSD-C error ratio:** with the L1 distance weighted by `u_ii^2`, as eq. (8) writes
  it, FSD-C shows about three times the bit errors of FSD-B at 20 and 25 dB in
  `tb_fsd_ber`, roughly 2 dB on these curves. The published loss is only 0.35 dB at a
  BER of 1e-3. A separate floating-point model of the same search, with 300 channels
  per point, shows the same trend. At 20 dB it
  gives 2.2e-3 for the squared distance and 7.9e-3 for eq. (8). An L1 distance weighted
  by `u_ii` instead of `u_ii^2` gives 4.3e-3, closer to the published loss. The metric
  was left as eq. (8) writes it, since that is what the document describes.
* **Clock frequency and FPGA resources** (slices, LUTs, block RAM) were not measured.
  The RTL targets no specific device.
* **Preprocessing** (pseudoinverse, Cholesky, ordering) and the test system around the
  decoder (source, channel, noise, input/output memories of the prototyping board) are
  outside this RTL.
