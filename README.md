# Real-time EEG functional connectivity: PLI matrix and graph parameters in hardware

This design turns one window of multichannel EEG into a functional brain
connectivity network, then describes that network with the usual
graph-theoretic measures. It is all done in fixed-point logic, within a fraction
of a millisecond.

- **Connectivity.** For every pair of channels it computes the **Phase Lag
  Index** (PLI). This is the magnitude of the average sign of the phase
  difference between the two channels over the window. The PLI values form a
  symmetric N x N weight matrix with entries in 0..1.
- **Per node.** From that matrix it derives the binary and weighted
  **degree**, the **triangle sum** and the **clustering coefficient**.
- **Whole network.** It also derives the **mean clustering coefficient**,
  **density**, **transitivity** and **characteristic path length**, plus the
  **eccentricity** of every node, **radius** and **diameter**.

The default configuration is 19 channels (the 10-20 montage) and 128-sample
windows. At 256 Hz that is two windows per second. From the last sample of a
window to the last result takes 8,573 clocks: 5,657 for the PLI matrix and
2,916 for the graph measures. At 22.16 MHz that is 0.39 ms, inside a 0.5 ms
real-time budget.

The main idea on the graph side is to get nearly everything from **one pass
over all triangles** of the matrix:

- The clustering coefficient is computed without the cube root, so a triangle
  contributes only the product `w_ij * w_ik * w_jk`.
- The degrees are picked up from the same weights the triangle pass already
  reads.
- Density and transitivity are small accumulators on the per-node results of
  that pass.
- Path lengths come from a separate Dijkstra engine. It runs beside the
  triangle pass on the same matrix and finishes much earlier.

## Block structure

```
EEG (channel-major) -> analytic_signal -> phase_calc -> phase memory -> pli_calc (N-1 lanes)
   (FFT, mask, IFFT)   (CORDIC bank)    (N banks x L)     shared reference FIFO
                                                              |  matrix writes (i, j, PLI)
                                                              v
                  graph_connectivity:  pli_matrix_reg --- clustering_coeff --+-- density
                                             |          (geometric_mean,     +-- transitivity
                                             |           degree_unit,
                                             |           pipe_div)
                                             +-------- cpl_unit (spfu x N, min_finder) -- ecc_rad_dia
```

| Module | Role |
|---|---|
| `eeg_connectivity_top` | `pli_unit` followed by `graph_connectivity`; the graph run starts when the last PLI value is written |
| `pli_unit` | input counting, analytic signal, phases, phase memory, PLI sequencer and the writer for matrix results |
| `analytic_signal` | x(t) + j·H{x}(t) of one channel by radix-2 FFT, Hilbert mask, inverse FFT |
| `phase_calc`, `cordic_atan2` | bank of 16 iterative CORDIC units computing atan2, round-robin in and out |
| `pli_calc` | reference FIFO and N-1 lanes of subtract / \|·\| / π−\|·\| / multiply / sign / accumulate |
| `graph_connectivity` | PLI matrix register plus all graph engines, with `start`/`done` |
| `pli_matrix_reg` | symmetric N x N weight register; triangle read port (i,j,k) and row read port |
| `clustering_coeff` | triangle-sweep controller; per-node degree, t_i, CC_i; mean CC |
| `geometric_mean`, `degree_unit` | the multiply-accumulate of t_i; degree counting during the sweep |
| `pipe_div` | three-stage pipelined integer divider (used for CC_i and transitivity) |
| `density`, `transitivity` | accumulators on the per-node stream |
| `cpl_unit`, `spfu`, `min_finder` | Dijkstra from every source, N shortest-path units in parallel |
| `ecc_rad_dia` | maxima/minima on the serial distance stream |
| `fc_pkg` | shared sizes, formats and the reciprocal-constant function |

## Number formats

| Quantity | Format |
|---|---|
| EEG sample | signed 16 bit |
| Analytic signal | signed 24 bit, sample · 2^4 |
| Phase | signed Q3.12 radians (π = 12868) |
| PLI weight `w` | unsigned Q1.7 in 8 bits: 0..128 means 0..1. With L = 128 every PLI value is exact. |
| Edge length `1 - w` | Q.7 (128 - w). Path distances are Q.7 in `7 + clog2(N) + 1` = 13 bits. |
| Triangle sum `t_i` | Q.21 (a product of three Q1.7 values), 33 bits |
| Weighted degree | Q.7, 13 bits |
| CC_i, mean CC, density, transitivity | unsigned Q.16 in 17 bits: 65536 means 1.0 |
| Characteristic path length | Q.16 in units of edge length, 22 bits |
| Eccentricity, radius, diameter | Q.7 distances |

Divisions by constants (1/N, 1/(N²−N)) are multiplications by a rounded Q.16
reciprocal, `round(2^16 / d)`, computed at elaboration by `fc_pkg::recip_q16`.
For N = 19 that is 3449 for 1/19 and 192 for 1/342. The per-node clustering
coefficient and transitivity use a real divider, as they must.

## From EEG to phase

**Input order.** The window enters channel-major: all 128 samples of channel
0, then channel 1, and so on. `eeg_valid`/`eeg_ready` form the handshake.
`eeg_ready` drops while the analytic-signal engine is transforming a channel,
so channel c+1 loads as soon as channel c has been emitted.

**Analytic signal.** `analytic_signal` is an in-place, one-butterfly-per-clock
radix-2 engine on a 128-word complex register file. It runs four phases:

1. **LOAD:** samples are written at bit-reversed addresses.
2. **FWD:** a decimation-in-time FFT, halving at every stage against
   overflow.
3. **INV:** a decimation-in-frequency inverse FFT with conjugate twiddles.
   The first stage applies the **Hilbert mask** while it reads: bin 0 and bin
   L/2 are kept, bins 1..L/2−1 are doubled, and the negative-frequency bins
   are zeroed.
4. **OUT:** the result is read back in time order. The real part is the
   (scaled) input and the imaginary part its Hilbert transform.

A channel takes 2L + L·log2 L = 1152 clocks. Twiddles are
`round(2^14 · cos/sin(2πk/L))`, computed at elaboration with `$cos`/`$sin`.

**Phase.** `phase_calc` hands consecutive samples to 16 iterative CORDIC
units in turn. Each unit needs 16 clocks per vector, so the bank takes one
sample per clock. Because every unit has the same latency, the results return
in order behind a second round-robin pointer.

`cordic_atan2` works in two steps:

1. It rotates vectors in the left half plane by ±π/2 and starts the angle
   accumulator at ±π/2.
2. It runs 16 vectoring micro-rotations with an `atan(2^-i)` table.

The phases are stored in a **phase memory** with one 128-word bank per
channel: 19 x 128 x 16 bit. With one bank per channel, sample l of every
channel can be read in the same clock.

## Phase Lag Index: one reference FIFO, N−1 lanes

For channels a and b, PLI = |(1/L) Σ sign(φa − φb)|, with the phase difference
taken modulo 2π into (−π, π].

The hardware avoids an explicit modulo. It uses

```
d = φref − φ ;   p = π − |d| ;   s = sign(d · p) ;   acc += s
```

When |d| > π the factor p is negative and flips the sign, which is exactly the
sign of the wrapped difference. A difference of exactly ±π contributes 0.
After L samples the lane outputs |acc| as a Q1.7 weight (|acc| · 128 / L) and
restarts.

`pli_unit` takes the reference channels i = 0..17 in turn:

1. For 128 clocks it pushes channel i into the **reference FIFO**.
2. For the next 128 clocks the FIFO output meets channels i+1..18, one per
   lane, all at the same sample index. Meanwhile the FIFO recirculates its
   own output through the input select, so the reference is kept.
3. Three clocks after the last sample, the lanes hold the N−1−i results of
   that reference. The writer sends them one per clock to the matrix register
   as pairs (i, i+1) .. (i, 18), while the next reference is loading.

So the PLI part of a window takes 18 · 256 = 4,608 clocks plus a few for the
pipeline. The unused lanes of later references compute values that are
simply not written.

## The triangle sweep: clustering coefficient, degree, density, transitivity

`clustering_coeff` visits, for each node i, every unordered pair (j, k) of the
other N−1 nodes. That is one pair per clock, M = N·C(N−1,2) clocks in all
(2,907 for N = 19). The pairs run in rows: j is fixed and k runs over the
nodes after j. The matrix register returns `w_ij`, `w_ik` and `w_jk`
combinationally.

- **Triangle sum.** `geometric_mean` accumulates `t_i = Σ_{j<k} w_ij·w_ik·w_jk`,
  which is half of the usual ordered-pair sum. That is why the coefficient
  below uses 2t_i.
- **Degree.** `degree_unit` must see each edge (i, x) exactly once, although
  the sweep shows it many times. It counts `w_ij` on the **first pair of
  every row** ("new row"). It counts `w_ik` only in the **last row**, which
  holds a single pair and brings the one remaining neighbour. The binary
  degree counts weights above the threshold (0); the weighted degree sums
  them.
- **Clustering coefficient.** At the end of a node, k(k−1) is formed and
  `pipe_div` divides 2t_i by it in a three-stage pipeline:
  `CC_i = 2 t_i / (k_i (k_i − 1))`. A node with fewer than two neighbours
  gets 0. The CC_i are summed, and the sum times 1/N gives the mean.
- **Density.** `density` adds the per-node degrees and multiplies by
  1/(N²−N).
- **Transitivity.** `transitivity` accumulates 2t_i and k_i(k_i−1) separately
  and divides once, at the end.

Clock counts, counted from the edge that samples `start`:

| Result | Clocks | N = 19 |
|---|---|---|
| last degree / weighted degree / t_i | M + 1 | 2,908 |
| density | M + 2 | 2,909 |
| transitivity | M + 6 | 2,913 |
| mean clustering coefficient | M + 7 | 2,914 |
| characteristic path length, eccentricity, radius, diameter | N² + N + 1 | 381 |

The per-node results stream out during the sweep, each as soon as its node is
finished. `graph_connectivity` pulses `done` one clock after the last of
these. Keeping the degree inside the triangle sweep makes it no faster than
the clustering coefficient. In return, no second copy of the matrix or its
read logic is needed.

## Shortest paths: SPFU array, minimum finder, serial distances

Edge length is `1 − w`. A zero weight means no edge, which is an infinite
length. `cpl_unit` runs Dijkstra's algorithm from every source s with one
**shortest-path finding unit (SPFU)** per node and one algorithm step per
clock:

- **Step 0.** s becomes the current node at distance 0. Every SPFU loads the
  length of its direct edge from s, or infinity.
- **Steps 1..N−1.**
  1. `min_finder` picks the unvisited node with the smallest tentative
     distance. Finite beats infinite, and ties go to the lowest index.
  2. The picked node is marked visited and its matrix row is read.
  3. Every unvisited SPFU compares `dist(cur) + (1 − w(cur, j))` with its
     tentative distance and keeps the smaller.
- **Output.** After N steps the N distances are copied into a
  **parallel-to-serial register**. They are shifted out one per clock while
  the next source runs.

The serial stream (`fd_*`) feeds two consumers:

- an accumulator of the finite distances d(s, j), j ≠ s, whose sum times
  1/(N²−N) is the **characteristic path length**;
- `ecc_rad_dia`, which keeps the running maximum per source (the
  **eccentricity**), and the minimum and maximum of the eccentricities
  (**radius** and **diameter**).

A source takes N clocks and the last one needs N more to drain, so the total
is N² + N + 1 = 381 clocks.

## Top-level interface

`eeg_connectivity_top` (defaults N = 19, L = 128) has:

- **Input:** `clk`, `rst` (synchronous, active high), and `eeg_valid` /
  `eeg_ready` / `eeg_data[15:0]`.
- **PLI matrix writes:** `m_we`, `m_wi`, `m_wj`, `m_wdata`.
- **Per-node streams:**
  - `deg_valid` with `deg_node`, `deg_k`, `deg_kw`, `tri_sum`;
  - `cc_valid` with `cc_node`, `cc`.
- **Status:** `busy` and a one-clock `done` pulse.
- **Network results:** `cc_mean`, `dens`, `trans`, `cpl`, `ecc[N]`, `radius`,
  `diameter`. These hold until the next window replaces them.

A new window can be sent as soon as `eeg_ready` returns, which happens when
the PLI matrix of the previous window is complete. The graph results of the
previous window are finished long before the new matrix is.

## Departures from the source description and design choices

- **FFT.** The source architecture uses an external FFT and gives only the
  FFT → mask → IFFT structure. The radix-2 engine here is this design's own.
  - It is small and slow: one butterfly per clock.
  - The Nyquist bin is kept at unit gain.
- **PLI parallelism.** The source draws one PLI datapath with a FIFO. Here
  that datapath is replicated into N−1 lanes behind one shared FIFO, so each
  reference channel needs a single pass. With one datapath the PLI part would
  take about 24,000 clocks per window instead of 4,600, well over the 0.5 ms
  budget.
- **Phase memory.** The banked phase memory and the channel-major input order
  are this design's choices.
- **Mean clustering coefficient.** The mean uses a constant-reciprocal
  multiply, like density. The divider latency (3 stages) was chosen so that
  the clock counts match the table above.
- **Disconnected nodes.** Infinite distances are left out of the path-length
  sum, but the sum is still divided by N²−N. A node with no finite path has
  eccentricity 0. The source does not treat disconnected graphs.
- **Widths, formats and reset.** All widths and formats, the handshakes and
  the synchronous reset are this design's own.
- **Accuracy.** There is no comparison against a software toolbox on recorded
  EEG. The graph engines are checked bit-exactly against integer reference
  models. The PLI front end is checked against closed-form phases of
  synthetic signals, to within 4/128.

## Verification

Every module has a self-checking testbench `tb/tb_<module>.sv`. The shared
reference models (Floyd–Warshall distances, triangle sums and so on) live in
`tb/tb_ref_pkg.sv`. Each testbench:

- prints `TB_RESULT checks=<n> failures=<m>`;
- has a cycle watchdog;
- checks the clock counts given above wherever they apply.

Notable ones:

- `tb_eeg_connectivity_top` runs the whole design at its default size. It
  sends two 19-channel windows of two-tone signals with known phases.
  Channels 17 and 18 repeat channels 0 and 1, which gives exact zero-weight
  edges. The testbench:
  - checks every PLI value against the value from the exact phases, within
    4/128;
  - checks every graph result bit-exactly against the reference model applied
    to the matrix the hardware built;
  - checks the window latency against the 0.5 ms budget (11,080 clocks at
    22.16 MHz);
  - counts input stalls, left-half-plane CORDIC inputs, phase wraps,
    zero-weight edges and reference FIFO loads. Each must occur.
- `tb_eeg_windows` streams eight windows back to back at the default size,
  as a recording delivers them. Each window has its own random tones and
  phases. The input of each window overlaps the graph computation of the one
  before, and every window is checked like the one above. PLI samples whose
  exact phase difference is within 0.01 rad of 0 or ±π are treated as
  ambiguous: there the sign is set by rounding, so each such sample widens
  the PLI tolerance by 2/128.
- `tb_graph_connectivity`, `tb_clustering_coeff` and `tb_cpl_unit` use random
  matrices and check every clock count in the table. The matrices include
  sparse ones, with nodes of degree below two and unreachable nodes.
- `tb_analytic_signal` feeds cosines and tone mixes, whose Hilbert transforms
  are known sines.

To run a testbench with Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Wno-lint -Wno-style \
  rtl/*.sv tb/tb_ref_pkg.sv tb/tb_eeg_connectivity_top.sv \
  --top-module tb_eeg_connectivity_top -Mdir obj_top
./obj_top/Vtb_eeg_connectivity_top
```

The full-size end-to-end run takes a few seconds. Use the same command with
another `tb_<module>.sv` for a single block.

## Changing the size

- **Channels and window length.** `N` (channels) and `L` (window length, a
  power of two) are parameters of the top. All widths follow from them
  through the derived parameters. `fc_pkg` holds the defaults.
- **Throughput.** `NUM` and `ITER` in `pli_unit` set the CORDIC bank. Keep
  `NUM >= ITER` for one sample per clock.
- **PLI lanes.** The lane count of `pli_calc` is fixed to N−1 by `pli_unit`.
- **Degree threshold.** `THRESH` in `graph_connectivity` sets the binary
  degree threshold (default 0).
