# Detection blocks for a 2x2 golden-code MIMO-OFDM receiver

A receiver with two transmit and two receive antennas sends one golden-code
space-time codeword over two channel uses. On each OFDM sub-carrier it must
solve a lattice detection problem in 8 real dimensions:

    y = M s + z,    M: 8x8 real,    s: 8 PAM symbols (2-, 4- or 8-PAM)

Each real dimension carries one PAM symbol. 4-, 16- and 64-QAM therefore
give 2-, 4- and 8-PAM symbols from {±1, ±3, ±5, ±7}.

This RTL provides the three blocks that do the heavy work:

| Block | Module | What it computes |
|---|---|---|
| QR factorisation | `sgr_qr_array` | `M = Q R` by squared Givens rotations (SGR), one 8x8 matrix every 48 clocks, with no square roots and no general divider |
| Z8 sphere decoder | `sphere_decoder` | maximum-likelihood `s^ = argmin ||Q^T y - R s||²`, depth first, one tree node per clock, modulation chosen per vector |
| E8 branch metrics | `e8_branch_metric` | 16 sphere decoders, each restricted to one coset of the Gosset lattice E8 in Z8; they give the branch metrics a Viterbi decoder needs for a golden space-time trellis-coded modulation (GST-TCM) |

`mimo_detector_top` instantiates the three blocks side by side, each with its
own ports. The glue between them is not part of this RTL:

- taking the square root of the diagonal of U to get R;
- forming `Q^T y`;
- the Viterbi decoder that uses the branch metrics.

See "What is not here" below.

## Number format

The whole design uses one data word: 16-bit two's complement with 7 integer
and 9 fraction bits (the *7.9* format), defined as `mimo_pkg::data_t`. The
other formats are:

- **Symbols:** 4-bit signed integers (`sym_t`).
- **Partial metrics:** unsigned 16-bit words (`metric_t`) with 9 fraction
  bits. They saturate at 65535, which is about 128.0.
- **QR weights:** unsigned 1.15 fractions (see below).

## Sphere decoder

### The search

R is upper triangular, so `||y~ - R s||²` splits into a sum over levels,
where `y~ = Q^T y`. Dimension 7 is the root of an 8-level tree, and dimension
0 holds the leaves. At level `l`, with the symbols above already fixed:

    psi_l = y~_l - sum_{j>l} R_lj s_j          (interference-cancelled value)
    T_l   = T_{l+1} + (psi_l - R_ll s_l)²       (partial distance)

A node whose `T` reaches the current radius is pruned. A leaf inside the
radius becomes the new best point, and its `T` becomes the new radius.
Candidates within a level are visited in Schnorr-Euchner order: nearest
first, then zig-zagging outward (`s, s+2, s-2, s+4, ...` or the mirror
image), so `T` never decreases along a level. The search can therefore leave
a level as soon as one candidate is pruned.

`radius_init` sets the starting radius. If it is all ones (infinite), the
first leaf reached is the ZF-DFE (Babai) point, and its distance becomes the
first finite radius.

### One node per clock

The datapath has three combinational units around a set of per-level
registers. The registers hold:

- the psi memory;
- the T memory;
- the current symbol;
- the zig-zag state: highest and lowest point visited, and the side to try
  next.

In every clock of the `SEARCH` state, all three units work in parallel:

- **`metric_compute`** scores the current node. It uses the psi value that
  was stored when the node's level was entered.
- **`u_psi_unit`** prepares the child of the current node: its psi, its
  nearest PAM point and the side of its second-nearest point. These values
  are written to the child's level only if the node survives, so descending
  costs no extra clock.
- **`u_psi_step_unit`** prepares the next zig-zag candidate of the parent
  level. If the node is pruned, or is a leaf, the decoder moves to that
  candidate in the same clock edge.

The one extra clock appears when the parent level has no candidate left in
the constellation. The decoder then spends one `POP` clock moving up a
further level. The counters report this cost: `cycles = nodes + pops + 2`
per vector.

### Slicing without a divider

The nearest PAM point to `psi/R_ll` is found with the first `log2(Q)` steps
of a restoring (successive-subtraction) divider, not a full division:

1. The first step compares `|psi|` with `(Q-1)·R_ll` to detect the
   outermost point.
2. The remaining `log2(Q) - 1` steps produce `q = floor(|psi| / 2R_ll)`. The
   chosen point is then `±(2q+1)`.
3. The sign of the final remainder tells which side of that point
   `psi/R_ll` falls on. The zig-zag starts on that side.

`R_ll` must be positive.

### Ports and timing

- **Start:** `r`, `y`, `mode`, `e8_en`, `cbar` and `radius_init` are sampled
  on the clock in which `start` is high and the decoder is idle.
- **Done:** `done` pulses for one clock. After it, `found`, `s_hat` and
  `metric` hold until the next `start`. `metric` is the squared distance
  with 9 fraction bits.
- **Counters:**
  - `nodes`: nodes scored;
  - `prunes`: nodes pruned;
  - `leaves`: radius updates;
  - `pops`: idle clocks for exhausted levels;
  - `cycles`: clocks from start to done.

The search time depends on the data: the channel, the noise level and the
modulation. A noiseless vector needs about one node per level plus the
backtracking that proves the point optimal. `tb_workload_sd_16qam` measures
16-QAM at 20 dB SNR with an i.i.d. Gaussian 8x8 real channel. Over 200
vectors it averages 48.7 clocks per vector, with a worst case of 558.
That is 70 Mbit/s at 213 MHz, below the roughly 150 Mbit/s reported for the
original design. The golden-code channel statistics and the SNR definition
behind that figure are not reproduced here.

## E8 coset decoding

E8 is built from Z8 with the (8,4,4) extended Hamming code: a point `s` of
Z8 is in E8 when its bit vector is a codeword. Here the bits come from the
PAM classes of the symbols:

- **class 0:** {−7, −3, 1, 5}
- **class 1:** {−5, −1, 3, 7}

Z8 falls into 16 cosets `cbar + E8`. The Viterbi decoder of the outer
trellis code needs, at every trellis stage, the distance from the received
vector to the nearest point of each coset.

`constraint_maker` makes the sphere decoder respect a coset during the
search. The code bits follow the tree order:

- **Free bits:** c7, c6, c5 and c3.
- **Parity bits**, fixed by the bits above them:

      c4 = c7 ^ c6 ^ c5
      c2 = c4 ^ c3 ^ c5
      c1 = c4 ^ c3 ^ c6
      c0 = c4 ^ c3 ^ c7

At a fixed dimension j, the code bit is recovered from the symbol already
chosen, as `class(s_j) ^ cbar_j`. When the level being entered is a parity
level, the unit tells the decoder which class it needs. The decoder then:

- moves the first candidate to the nearest point of that class (`u_psi_unit`);
- steps through that level in strides of 4 instead of 2 (`u_psi_step_unit`).

The parity equations are the XOR form of the extended Hamming code. An
AND-based variant would not give a code of minimum distance 4. The testbench
checks that the 16 codewords have minimum distance 4.

`e8_branch_metric` runs 16 decoders in E8 mode side by side. Decoder k
serves the coset leader whose bits 4, 2, 1, 0 are bits 3..0 of k. Together,
these 16 words reach every one of the 256 class patterns exactly once.
`done` pulses when the slowest decoder finishes. For each coset, the unit
outputs `metric[k]`, `s_hat[k]` and `found[k]`.

## QR factorisation by squared Givens rotations

### The arithmetic

SGR avoids square roots by keeping the rows of R scaled. Row i of the array
stores row i of:

    U = diag(R) [ R | Q^T ]         (M = Q R, diagonal of R positive)

so `U_ii = R_ii²`. An incoming row `v` carries a weight `w`, equal to 1 for
rows entering the array. When this row meets stored row `u` at pivot k
(`u_k` = X_in, `v_k` = Y_in), the operations are:

    Reg2 = v_k / u_k
    u'_k = u_k + w v_k²
    w'   = w u_k / u'_k
    u'_j = u_j + w v_k v_j            for all j
    v'_j = v_j - Reg2 u_j             (v'_k = 0)

The updated `v'` and `w'` then go on to the next row of the array. The first
row to reach an empty stored row initialises it with `u_j = w v_k v_j`; this
is boundary mode. Every later row rotates it; this is internal mode.

Each matrix row is extended inside the array by the matching row of the
identity, so the array actually triangularises `[M | I]`. The right half of
U is then `diag(R) Q^T`, which is ready at the same time as R.

### Division

Each row stage has one `sgr_divider`. It approximates division with a
first-order Taylor expansion:

    X / Y  ~  X (Y_H - Y_L) / Y_H²

1. Y is normalised by its leading-zero count.
2. `Y_H` is the leading one plus the next 8 bits; `Y_L` is the rest.
3. `1/Y_H²` comes from a 256-entry table of 8-bit words,
   `entry(i) = round(2^24 / (256+i)^2)`. A constant function builds the
   table at elaboration.

The divider has two pipeline stages and a relative error below 1%; the
8-bit table words dominate that error. Its output `q` is 24 bits with 15
fraction bits, and saturates when Y = 0.

### Timing

A step is three clocks. The array's `phase` counter drives it:

| phase | Action in every row stage |
|---|---|
| 0 | Latch the incoming row. Start `v_k / u_k`. Emit `w'` of the previous row. |
| 1 | Latch `w`. Form `u'_k = u_k + w v_k²`. Start `u_k / u'_k`. |
| 2 | `Reg2` is ready. Update the stored row. Register `v'` for the next stage. |

The two divisions overlap, so a row passes a stage in three clocks. The
weight follows one clock behind the row, because the next stage first needs
it in phase 1.

Matrix rows are accepted with a valid/ready handshake: `in_ready` is high in
phase 0. After the 8th row, the array refuses input for 8 steps, while the
identity rows drain. This gives:

- **Period:** one new matrix every 16 steps = 48 clocks. At 223 MHz that is
  4.6 M matrices/s.
- **Latency:** `out_valid` pulses 45 clocks after the first row of a matrix
  was accepted. `out_u` must be captured in that clock, because the next
  matrix starts overwriting it. `out_u[i][j]` is 0 for `j < i`.

A full IEEE 802.11n burst of 128 matrices takes 6141 clocks (27.5 µs at
223 MHz). The budget is 28 µs.

### Precision

With 9 fraction bits, accuracy depends on the conditioning of the leading
sub-matrices of M:

- **Well-conditioned input** (diagonal entries 0.75..1 in magnitude, the
  rest within ±0.35): U is within about 0.035 of a floating-point reference.
- **Leading sub-matrix close to singular:** a small pivot `u_kk` and a tiny
  weight `w` lose most of their bits. The result degrades well beyond that
  bound.

The testbenches use the well-conditioned class. Check the error on your own
channel statistics before relying on this block, and widen the words
(`data_t`, and the 1.15 weight in `sgr_row_stage`) if needed.

## Departures from the published architecture

- **PE count.** The original array has 32 processing elements. This array
  has 8 row stages. Stage i holds the diagonal operation and 15−i internal
  operations across the 16 augmented columns, and all of them share one
  divider. The PE operations, the 3-clock step and the 48-clock period match
  the original; the PE count does not.
- **Divider multipliers.** The divider uses two multipliers, one per stage,
  so a division can start every clock. The original uses one.
- **Design choices.** The original does not specify these, so this design
  chose them:
  - table scaling and normalisation;
  - weight format;
  - saturation everywhere;
  - handshakes;
  - asynchronous active-low reset `rst_n` on all state;
  - the idle clock for an exhausted level;
  - the E8 coset-leader set, and running the 16 coset decoders in
    parallel rather than sharing one decoder between them.
- **Sphere-decoder throughput.** The measured 16-QAM average (see
  "Ports and timing" above) falls short of the published figure under the
  stand-in channel model used here.

## What is not here

The following receiver parts are outside this RTL:

- the OFDM FFTs;
- the RF/analog front end;
- the space-time decoder/demapper;
- the Viterbi decoder of the outer trellis code;
- conversion of U into R and `Q^T y`, which needs a square root per row.

The top brings out the signals where these parts would connect.

## Files

| File | Contents |
|---|---|
| `rtl/mimo_pkg.sv` | word formats, symbol type, modulation enum |
| `rtl/metric_compute.sv` | `T + (psi - R s)²` |
| `rtl/u_psi_unit.sv` | psi, successive-subtraction slicing, E8 class correction |
| `rtl/u_psi_step_unit.sv` | zig-zag next candidate |
| `rtl/constraint_maker.sv` | E8 parity constraints |
| `rtl/sphere_decoder.sv` | search control, per-level memories |
| `rtl/e8_branch_metric.sv` | 16 coset decoders |
| `rtl/sgr_divider.sv` | Taylor-series divider |
| `rtl/sgr_row_stage.sv` | one row of the SGR array |
| `rtl/sgr_qr_array.sv` | the array, input handshake, identity generation |
| `rtl/mimo_detector_top.sv` | top |

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=... failures=...`. The references they compare against are
computed independently in the testbench:

- **Sphere decoder** (`tb_sphere_decoder`, `tb_mimo_detector_top`):
  - exhaustive ML search over all 2^8 or 4^8 points for 4- and 16-QAM;
  - an N = 4 instance for 64-QAM;
  - a single-coset exhaustive search for E8.
- **QR** (`tb_sgr_qr_array`, `tb_mimo_detector_top`): modified Gram-Schmidt
  in floating point.
- **16-QAM workload** (`tb_workload_sd_16qam`): 200 noisy vectors over
  random Gaussian channels, checked against exhaustive ML; reports the
  average clocks per vector.
- **802.11n workload** (`tb_workload_qr_80211n`): 128 matrices streamed back
  to back at the default size, checked against the 48-clock period and the
  28 µs budget.
- **Units** (`tb_metric_compute`, `tb_u_psi_unit`, `tb_u_psi_step_unit`,
  `tb_constraint_maker`, `tb_sgr_divider`, `tb_sgr_row_stage`): exhaustive or
  random sweeps against behavioural formulas.

`tb_mimo_detector_top` runs the top at its default sizes. It covers QR,
every modulation and all 16 E8 cosets, and it counts that each mechanism
occurs:

- QR initialisation, rotation and input hold-off;
- modulation switch;
- pruning, radius update and exhausted-level pop;
- constrained E8 levels.

## Simulating

Verilator 5:

    verilator --binary --timing -y rtl +libext+.sv rtl/mimo_pkg.sv \
        tb/tb_mimo_detector_top.sv --top-module tb_mimo_detector_top
    ./obj_dir/Vtb_mimo_detector_top

Swap in any other testbench name. The full-size top testbench runs in under
half a minute; the others take seconds.

Parameters you can change:

- `N` (tree levels) of the sphere decoder and `N` of the QR array (the E8
  mode needs N = 8);
- the sphere decoder's datapath: `DW` (word width), `FW` (fraction bits)
  and `TW` (metric width). The testbench runs a 20-bit instance with 12
  fraction bits next to the default one;
- the divider's table size and output format;
- `NDEC` of the branch-metric unit.

The QR array and the branch-metric unit use the widths in `mimo_pkg`.
