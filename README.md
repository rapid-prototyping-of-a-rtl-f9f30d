# Fixed-throughput sphere decoder for 4×4 16-QAM MIMO

A MIMO receiver with M = 4 transmit and N = 4 receive antennas sees
`r = H s + v` and must find which of the P^M = 16^4 = 65 536 possible
16-QAM vectors `s` was sent. Maximum-likelihood detection minimises
`‖r − H s‖²` over all of them. A classic sphere decoder reaches the same answer
by a depth-first tree search, but how long that search takes depends on noise
and channel, so it cannot be pipelined and its throughput varies.

This design is a **fixed-sphere decoder (FSD)**. It searches the same tree
along a fixed set of paths, chosen in advance. The result is close to
maximum-likelihood, and the decoder becomes one straight pipeline. It takes a
new received vector every 4 clock cycles and always returns a detected vector
(16 bits) every 4 cycles. That is 400 Mbit/s at 100 MHz, whatever the noise
or the channel.

## The fixed search

The host factors the channel once per frame. It computes the Gram matrix
`G = Hᴴ H`, its Cholesky factor `U` (upper triangular, `G = Uᴴ U`, with a real
diagonal `u_ii`) and the pseudoinverse `H⁺`. With the zero-forcing estimate
`ŝ = H⁺ r`, the metric becomes a sum over levels i = M … 1, detected in that
order:

```
‖U (s − ŝ)‖² = Σ_i d_i,     d_i = u_ii² · |s_i − z_i|²
z_i = ŝ_i − Σ_{j>i} (u_ij / u_ii) · (s_j − ŝ_j)
D_i = D_{i+1} + d_i            (accumulated distance, D_{M+1} = 0)
```

Each level's centre `z_i` depends only on the symbols already chosen at the
levels above it. A sphere decoder follows these branches in a data-dependent
order. The FSD instead fixes how many candidates `n_i` each level keeps, so it
checks exactly `N_S = Π n_i` paths. This decoder uses
`n_S = (n_1, n_2, n_3, n_4) = (1, 1, 1, 16)`:

* **Level 4** (detected first) tries all 16 points, so `z_4 = ŝ_4`.
* **Levels 3, 2 and 1** each keep one point, the one nearest `z_i`. This is
  the first point in Schnorr–Euchner order. For square QAM it is found by
  slicing each axis against the thresholds −2, 0 and +2.

The answer is the path with the smallest `D_1`. There are `N_S = 16` paths,
against 65 536 vectors for exhaustive search.

The host also has to order the columns of `H`, which it does with the same
rule as the candidate distribution. The level that keeps all P points gets the
signal with the *largest* noise amplification, which is the largest row norm
of the pseudoinverse. Every later level gets the *smallest* of those that
remain, with the pseudoinverse recomputed after each choice. The testbench
package implements this ordering (`make_channel` in `tb/fsd_tb_pkg.sv`).

## Pipeline

```
 host ─► fsd_host_if ─► fsd_zfu ─► issue ─► lane 0: PDU4 ─► PDU3 ─► PDU2 ─► PDU1 ─┐
          (coefficients,  ŝ = H⁺r           lane 1: PDU4 ─► PDU3 ─► PDU2 ─► PDU1 ─┤
           in/out buffers)                   lane 2: …                            ├─► fsd_msu ─► fsd_du ─► fsd_host_if ─► host
                                             lane 3: …                            ┘   (minimum)   (bits)
```

| Module | Role |
|---|---|
| `fsd_top` | Wires the units together and holds the issue stage. |
| `fsd_host_if` | Coefficient bank, input buffer of vectors, output buffer of words, and the credit-based stall. |
| `fsd_fifo` | The synchronous FIFO used for both buffers. |
| `fsd_zfu` | Zero-forcing unit: `ŝ = H⁺ r`, one row per cycle on 4 complex multipliers. |
| `fsd_pdu #(LEVEL)` | Partial distance unit. It extends one path by one level per cycle. |
| `fsd_cmult` | Complex multiplier: 4 real multipliers and 2 adders with latency 2, or 3 and 5 with latency 3 (`MULT3`). |
| `fsd_msu` | Minimum search over the 16 paths of a vector. |
| `fsd_du` | Demapper: 16-QAM points to Gray-coded bits. |
| `fsd_pkg` | Sizes, fixed-point types, the path record and the helper functions. |

### Why four lanes and four cycles

The zero-forcing product needs 16 complex multiplications per vector. The
16 paths each need one pass through the four PDUs. The design spreads both
over C = 4 cycles:

* The ZFU has 4 complex multipliers and produces one element of `ŝ` per
  cycle.
* The issue stage holds a finished `ŝ`. In slot k = 0…3 it sends top-level
  candidates `4k … 4k+3` into the four lanes, one each.

So every unit is busy in every cycle, and a vector enters and leaves every
4 cycles.

This also fixes the multiplier budget:

* ZFU: 4 × 4 = 16 real multipliers.
* Each lane: PDU4 = 3 (two squares and the `u_ii²` scaling). PDU3 = 4 + 3,
  PDU2 = 8 + 3, PDU1 = 12 + 3, with 4 per feedback complex product. That is
  36 per lane, or 144 for four lanes.

The total is 160 real multipliers. That is the count usually quoted for an FSD
of this size.

### Spending fewer multipliers

Multipliers are what limits this decoder on an FPGA. `fsd_top` has two
parameters that trade them away. Both default to 0, the 160-multiplier design
above.

**`MULT3 = 1`: three-multiplier complex products.** Every `fsd_cmult` uses

```
(a + jb)(c + jd) = [a(c − d) + d(a − b)] + j[b(c + d) + d(a − b)]
```

This needs 3 multipliers and 5 adders instead of 4 and 2. The cycles are:

1. the three pre-additions;
2. the three 16×17-bit products;
3. the two post-additions, with the shift and saturation.

In integers this is exactly `ac − bd` and `bc + ad`, so the detected bits do
not change. The 28 complex multipliers (4 in the ZFU, 1 + 2 + 3 per lane) save
one each: 160 → 132. The ZFU and each of the three lower PDU levels take one
cycle longer. The push-to-pop latency becomes 39 edges; the rate stays one
vector per 4 cycles.

**`MANHATTAN = 1`: Manhattan metric.** Each PDU uses
`d_i = u_ii · (|Re(s_i − z_i)| + |Im(s_i − z_i)|)` instead of
`u_ii² · |s_i − z_i|²`. That removes the two squaring multipliers from all
16 PDUs: 132 → 100 with `MULT3`. The host must then write `u_ii`, not
`u_ii²`, to addresses 32 to 35 (same format). The metric is no longer the
ML metric, so detection gets a little worse (see the results under
Verification). The timing does not change.

For scale, a generic synthesis of `fsd_top` at the default parameters gives
about 18,900 flip-flop bits plus 9,700 memory bits. The two FIFOs account
for about 2,300 of the memory bits. A published FPGA implementation of the same configuration
(4×4, 16-QAM, 160 multipliers, 100 MHz) used about 15,300 flip-flops, so the
two are of the same order. No FPGA timing closure was done here; the 100 MHz
clock is a target, not a verified result.

### 64-QAM

The same structure detects 64-QAM. Set `P = 64` in `fsd_pkg`; everything else
follows from it:

* `BPS` = 6 bits per symbol, 3 per axis, and 8 levels per axis (±1 … ±7);
* the slicer `floor(x/2) + 4`, clamped to 0 … 7;
* a 3-bit Gray code per axis, `a ^ (a >> 1)`;
* `C` = 8 cycles per vector and `LANES` = 64 / 8 = 8 lanes.

That is 16 + 8 × 36 = 304 real multipliers, and 24 bits every 8 cycles
(300 Mbit/s at 100 MHz). The ZFU could take a vector every 4 cycles, but the
lanes need 8. So in `fsd_top` a small counter releases one vector every `C`
cycles (it is left out when `C = M`). The push-to-pop latency is
`31 + C` = 39 edges.

With `P = 64` these testbenches pass: `tb_fsd_top` (words 8 cycles apart,
latency 39), `tb_fsd_pdu`, `tb_fsd_msu`, `tb_fsd_zfu`, `tb_fsd_du` and
`tb_fsd_host_if`. `tb_fsd_ber` is for 16-QAM only, because its exhaustive ML
search would need 64⁴ vectors per received vector.

### The path record

A path travels through a lane as one packed struct, `path_t` in `fsd_pkg`. It
carries:

* `ŝ` of its vector;
* the chosen points `sym`;
* the differences `e_j = s_j − ŝ_j` of the levels already decided;
* the distance `acc`;
* the slot number, and a flag on the vector's last slot.

Carrying `e_j` means a PDU at level i only multiplies the `M − i` stored
differences by the constant ratios `u_ij/u_ii`. Carrying `ŝ` costs flip-flops
but keeps every unit free of cross-pipeline timing: each PDU simply delays the
record alongside its own arithmetic.

Each PDU works in stages:

* Level 4 (3 cycles): `e_4 = s_4 − ŝ_4`, then `|e_4|²`, then the scaling by
  `u_44²`.
* Lower levels (5 cycles): two cycles of complex multiplication, then the sum
  giving `z_i` together with the slicing, then `|s_i − z_i|²`, then the
  scaling and the addition to `D`.

The MSU compares the four lanes with a comparator scan. It then keeps a
running minimum across the four slots and emits the winner on the last one.
On equal distances the lower candidate index wins.

### Timing

| Quantity | Value |
|---|---|
| Vectors accepted / detected | one every 4 cycles (fixed) |
| ZFU accept → `ŝ` complete | 7 clock edges (8 with `MULT3`) |
| PDU latency | 3 (level 4), 5 (levels 3, 2, 1): 18 per lane; 6 for levels 3, 2, 1 with `MULT3` |
| Host push into an idle decoder → word readable | 35 clock edges (1 input buffer + 7 ZFU + 1 issue + 18 PDUs + 3 for the last slot + 2 MSU + 1 DU + 1 output buffer + 1 read) |

## Host interface and coefficient format

`fsd_top` ports (`W = 16`, `M = 4`):

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock; asynchronous active-low reset. |
| `cfg_we`, `cfg_addr`, `cfg_wdata` | in | 1, 6, 32 | Coefficient write. Allowed only while `busy` is low; an assertion checks this. |
| `rx_valid`, `rx_ready`, `rx_r` | in/out/in | 1, 1, 4×32 | Received vector, valid/ready. |
| `tx_valid`, `tx_ready`, `tx_bits` | out/in/out | 1, 1, 16 | Detected word, valid/ready. |
| `busy` | out | 1 | Vectors buffered or in flight. |
| `stall` | out | 1 | A vector is held back because the output buffer might overflow. |

Coefficient address map:

* `4i + j`: `H⁺[i][j]`.
* `16 + 4i + j`: `u_ij/u_ii`, used for `j > i`.
* `32 + i`: `u_ii²`, in the low 16 bits.

Here i and j count from 0, so level i + 1 is row i. A complex word is
`{re[31:16], im[15:0]}`.

The decoder cannot stall internally: once a vector enters the ZFU, its word
arrives 4 cycles per vector later without fail. `fsd_host_if` therefore only
releases a vector when the output buffer has room for it *and* for every
vector already in flight. If the host stops reading, the input side backs up
(`stall`, then `rx_ready` low) and nothing is lost.

The coefficient bank has a single copy, so change coefficients between frames
only, once `busy` has fallen. Both buffers hold 16 entries, which is one
channel realisation of 16 vectors. Set the depths with the `IN_DEPTH` and
`OUT_DEPTH` parameters of `fsd_top`.

Output bit order: level i fills `tx_bits[4i−1 : 4i−4]` (`BPS` bits per level
in general), I bits above Q bits.
Each axis uses the Gray code −3 → 00, −1 → 01, +1 → 11, +3 → 10. The bits
come out in the *ordered* column order. The host, which chose the ordering,
maps them back to antennas.

## Fixed-point formats

Every real or imaginary component is 16 bits, two's complement, with 8
fractional bits, which gives a range of about ±128. There are two formats that
differ only in meaning:

* data (`r`, `ŝ`, `z_i`, `e_i`) has `FRAC` = 8 fractional bits;
* coefficients (`H⁺` and `u_ij/u_ii`) have `CFRAC` = 8 fractional bits.

Scaling is left to the host so that the hardware sees 16-QAM points at the odd
integers −3, −1, +1, +3 on each axis. The testbench does this as follows:

* It scales `r` by 1/4 and multiplies `H⁺` by 4, so `ŝ` comes out in
  constellation units.
* Any normalisation of the constellation power goes into `H⁺` in the same way.

Arithmetic rules:

* Complex products are truncated (an arithmetic shift right by `CFRAC`) and
  saturated to 16 bits. The sums in the ZFU and in `z_i` also saturate.
* `u_ii²` is an unsigned 16-bit value with 8 fractional bits, so it must be
  below 256.
* Distances are unsigned 32-bit values with 8 fractional bits and saturate.

With 8 coefficient fraction bits, `H⁺` entries up to about ±128 fit, so even
badly conditioned random channels rarely clip. The price is coarser
coefficients on well-conditioned channels; in simulation the symbol error rate
of the fixed-point decoder matched a floating-point version of the same search.

## Where the design makes its own choices

The overall structure, the candidate distribution and the multiplier budget
are as described above. The following details are choices made for this RTL:

* the binary-point position and the rounding;
* the ZFU's row-per-cycle schedule;
* the per-level pipeline depths;
* tie-breaking in the minimum search;
* the stage split of the three-multiplier product, and scaling the Manhattan
  metric by `u_ii`;
* the counter that paces the ZFU when `C > M` (64-QAM);
* the Gray mapping and the bit order;
* the host interface as a whole: register map, FIFOs, credits and
  single-buffered coefficients.

Scope:

* Only 4×4 16-QAM with `n_S = (1,1,1,16)` is built. `fsd_pdu` supports
  `n_i = P` at the top level and `n_i = 1` below it, nothing in between.
* 64-QAM is a compile-time package setting, not a port or parameter of
  `fsd_top`. The testbenches listed under 64-QAM above were run with it.
  The default build is 16-QAM.
* `MANHATTAN` is checked end to end only, in `tb_fsd_ber`. `tb_fsd_pdu`
  covers the default Euclidean metric.
* The host-side ordering, pseudoinverse and Cholesky factorisation are
  software. The testbenches model them in floating point.
* There is no soft-output (list) version. Such a version would keep two
  points at some lower levels, sort and keep the best 16 paths, and compute
  bit log-likelihood ratios for a turbo decoder. The decoder gives hard bits
  only.

## Verification

Every unit has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. The reference models are in
`tb/fsd_tb_pkg.sv`:

* a bit-accurate integer model of the arithmetic, written from the equations;
* a floating-point channel generator that does the host's work.

| Testbench | What it checks |
|---|---|
| `tb_fsd_cmult` | Products against integer arithmetic, a hand-worked case and saturation. Both forms are checked: latency 2, and latency 3 with `MULT3`. |
| `tb_fsd_zfu` | `ŝ` for random matrices, back-to-back and gapped input; acceptance every 4 cycles; latency 7. |
| `tb_fsd_pdu` | A full lane of PDUs: symbol, `e_i` and `D_i` after every level, and the per-level latencies. |
| `tb_fsd_msu` | Minimum over 16 paths, with ties (lowest index wins) and a 2-cycle latency. |
| `tb_fsd_du` | Every point at every level, random vectors and a hand-worked word. |
| `tb_fsd_host_if` | The register map; in-order delivery through a 30-cycle decoder model; no loss when the host stops reading; stall seen; `busy`. |
| `tb_fsd_top` | 12 random channels × 16+ vectors at default parameters. Each word is checked bit-exact against the model, and noise-free frames must return the transmitted bits. It also checks full-rate output (4 cycles apart), the 35-cycle latency, at least one input stall and coefficient reloads. |
| `tb_fsd_ber` | Detection quality. 50 random channels × 16 noisy vectors at 14 dB and 20 dB SNR per receive antenna, every word bit-exact against the model, and bit errors compared with an exhaustive ML detector (see below). Two more decoders get the same vectors. One, with `MULT3 = 1`, must return the same words exactly 4 cycles later (latency 39). The other, with `MULT3 = MANHATTAN = 1`, is checked bit-exact against the Manhattan-metric model. |

The fixed search visits 16 of the 65,536 possible vectors, so it is close to
ML but not equal to it. One run of `tb_fsd_ber` (800 vectors, 12,800 bits per
SNR) gave:

| SNR | FSD bit errors | ML bit errors | Same vector as ML | FSD bit errors, Manhattan |
|---|---|---|---|---|
| 14 dB | 1148 | 1132 | 743 of 800 | 1197 |
| 20 dB | 82 | 36 | 785 of 800 | 86 |

The testbench requires at most 3 × the ML bit errors plus 16, and agreement
on at least 90% of the vectors. The Manhattan-metric decoder may make at most
2 × the bit errors of the Euclidean one, plus 16. The gap grows with SNR, as expected for a
search that keeps only one branch below the top level.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb --Mdir build_top \
    rtl/fsd_pkg.sv tb/fsd_tb_pkg.sv tb/tb_fsd_top.sv --top-module tb_fsd_top
./build_top/Vtb_fsd_top
```

Substitute any other `tb_*` file and module. Verilator finds the other modules
through `-Irtl`. To lint the RTL:

```
verilator --lint-only -Wall -Irtl rtl/fsd_pkg.sv rtl/fsd_top.sv --top-module fsd_top
```

Lint reports some unused bits, which are deliberate:

* the low bits dropped by the fixed-point shifts;
* `cand`, which only the top-level PDU uses;
* `ratio`, which the top-level PDU does not use;
* the minimum distance, which is computed but not brought out.

It also reports two harmless style points:

* `rst_n` is used both as an asynchronous reset and in the assertions'
  `disable iff`;
* the input FIFO's `count` output is left open in `fsd_host_if`.
