# Fixed-point single-Gaussian LDLC decoder

A low-density lattice code (LDLC) sends a point of a lattice, `x = G b`: `b` is a
vector of integers, and `H = G^-1` is sparse. The receiver gets `y = x + z` with
white Gaussian noise `z` and must find `b`. It does this with belief propagation
on the graph of `H`, as an LDPC decoder does. The difference is that the
messages are probability densities over the real line, not bit probabilities.

This decoder keeps each message as a single Gaussian: a mean and a variance.
Where the exact algorithm would produce a Gaussian mixture, the mixture is
collapsed back to one Gaussian by matching its first two moments. Everything
is fixed point in Q12.8: 21 bits, with a sign bit, 12 integer bits and 8
fraction bits. Division and `exp()` are built from small tables plus
arithmetic.

Structure of the decoder:

- one check node unit that handles a check node every clock cycle;
- a pipelined variable node stage of 5 clusters × 10 forward-backward units;
- banked message memories between the two, addressed through connection ROMs.

The default configuration is a block length of N = 1000, row and column degree
d = 3, and at most 20 iterations.

## The message-passing iteration

Every edge `(c, v)` of `H` carries two Gaussians: variable→check and
check→variable. Variances are stored in units of σ², the channel noise
variance. `1/σ²` is an input to the decoder, and it is needed wherever the
absolute spread of means matters.

**Start.** The message on every edge of `v` is `(y_v, 1)`, meaning mean `y_v`
and variance `1·σ²`.

**Check node.** For row `c` with weights `h_1..h_3` and incoming
`(m_l, V_l)`, the message sent back on edge `p` is:

    m_p = -Σ_{l≠p} (h_l/h_p) m_l
    V_p =  Σ_{l≠p} (h_l/h_p)² V_l

This is linear. The weights are ±1 and ±1/√3, so the ratios come from a 3×3
constant table. The sign is the XOR of the two edge signs. This is `cnu`, with
one registered stage.

**Variable node.** This is where the work is. It happens in three steps.

1. *Periodic extension* (`periodic_ext`). A check message `(m, V)` on an edge of
   weight `h` means "`h·x_v` is an integer plus `m·h`". So it becomes the
   mixture `m + i/h`, for all integers `i`, each component with variance `V`.
   Only NEXT = 3 components are kept. They are centred on
   `i0 = round((y_v − m)·h)`, the copy nearest the channel value.

2. *Forward-backward recursion* (`fwbw`). Each outgoing message must exclude
   the edge it goes out on. So two running products are formed:
   - forward: FW1 = channel, FW(l+1) = FW(l) × ext(l);
   - backward: BW3 = channel, BW(l−1) = BW(l) × ext(l).

   Here "channel" is `(y_v, 2)`. Each step multiplies a Gaussian by a
   3-component mixture (`mix_product`), which gives 3 components:
   - means `(m_a V_b + m_i V_a)/(V_a+V_b)`;
   - variance `V_a V_b/(V_a+V_b)`;
   - weights `exp(−(m_a−m_i)²/(2σ²(V_a+V_b)))`.

   The result is reduced to one Gaussian (`gmr`) by weighted mean and second
   moment. The variance is kept at or above MINVAR = 0.1σ². That floor stops
   the variances collapsing to zero in fixed point.

3. *Outputs* (`vout`). The message on edge `l` is the Gaussian product
   `FW_l · BW_l`. The codeword estimate `w_v` is the mean of `FW_2 · BW_1`,
   which is the product of all three extended messages and the channel.

**Decision.** After each iteration, `dec_int` forms `b̂_c = round(Σ_j H[c][j] w_j)`
for every row. It also records whether any `b̂_c` differs from the previous
iteration.

**Stopping.** Decoding ends when `b̂` has come out the same in 3 iterations in a
row (parameter `STABLE` = 2 unchanged comparisons), or after MAX_ITER = 20
iterations. A receiver cannot see whether a decoding is correct; a stable
decision is the test used here.

Stopping at the first repeated decision was tried and proved too eager. In a
1000-symbol frame at 5 dB from capacity it stopped after 3 iterations with 2
integers wrong. The default rule ran 6 iterations and decoded the frame with no
errors.

## Division and exponential

**`nr_div`** computes `u/a` with no divider.

1. `|a|` is normalised to `s·2^P`, with `1 ≤ s < 2`.
2. The three bits after the leading one pick a seed for `1/s` from 8 entries.
   Entry `i` is `1/sqrt(((8+i)/8)·((9+i)/8))`, the geometric middle of its
   interval. The table is computed by a constant function at elaboration.
3. Two Newton–Raphson steps `r ← r(2 − s r)` refine the seed.
4. The reciprocal is multiplied by each numerator in full width. The product
   is shifted once by `P` and the fraction width, so small denominators lose no
   precision.
5. Dividing by zero gives the saturated value with the numerator's sign.

One reciprocal serves several numerators. For example, `mix_product` divides 7
quantities by the same `V_a+V_b`.

**`exp_lut`** computes `exp(−a/2)` for `a ≥ 0`. It splits `a` into bit fields:

| Field | Bits | Role |
|---|---|---|
| I0 | `a[5:0]` | weight 2^-8, lower table |
| I1 | `a[11:6]` | weight 2^-2, upper table |
| I2 | `a[20:12]` | any bit set means `a ≥ 16` |

The result is `T0[I0]·T1[I1]`, with two 64-entry tables. When I2 is non-zero,
`exp(−8)` is already below one LSB of Q12.8, so the result underflows to 0.
These bit boundaries follow from one rule: the split points are `P0 = −8`
(the LSB) and `P2 = 4`, the smallest power of two whose exponential
underflows, and the middle point is `P1 = ⌊(P0+P2)/2⌋ = −2`. The tables are
generated at elaboration from a Taylor series, so no data file is read.

## Parity-check matrix

`H` is a Latin square. Every row and every column has one entry of each
magnitude 1, 1/√3 and 1/√3, called slots 0, 1 and 2.

- **Columns.** Row `c`, slot `j` has its entry in column `(A_j·c + B_j) mod N`,
  with `A = {1, 3, 7}` and `B = {0, 101, 331}`. This needs N divisible by 4 and
  not by 3 or 7 (1000 and 40 both qualify).
- **Signs.** Slot 0 is always positive. Slots 1 and 2 take a sign from bit
  `13+j` of `c·2654435761`.

At N = 1000 this `H` is non-singular, and `|det H|^(1/N)` is 1.002. It is used
without rescaling.

`ldlc_pkg` holds the construction. `h_rom` fills its tables from it at start-up:
- port A: row → columns and signs;
- port B: column → the rows holding it and their signs;
- port C: column → rows, for memory write-back.

To use another matrix of the same kind, change `perm_col` and `sign_neg`.

## Architecture and schedule

```
        ch_y ──► channel memory ─────────────────┐
          │                                       ▼
          └─► VN message banks 0..2 ─► router ─► cnu ─► CN message banks 0..2
                    ▲                     │                       │
                    │                     └──◄── router ◄─────────┘
                    │                            │ (y, 3 check msgs, signs)
                    └──── vn_proc: 5 × vnu_cluster(10 × fwbw + vout) ──► dec_int ─► out_b
```

**Memories.** Both message memories are kept in check-node order:
- bank `j`, address `c` holds the message on the slot-`j` edge of row `c`;
- every column has exactly one edge of each slot, so a variable node's three
  messages are in three different banks and can be read in one cycle;
- each bank is a single-port RAM (`sp_ram`) with a one-cycle synchronous read.

**Phases.** A frame runs through these phases, one after another:

| Phase | Cycles | What happens |
|---|---|---|
| load | N | Each `y_v` is written to the channel memory and, as `(y_v, 1)`, to its three variable-message slots. |
| check | N + 2 | `msg_router` reads row `c` from the three variable banks, one row per cycle. `cnu` writes the three results to the check banks at address `c`. |
| variable | ≥ N + ~10 | `msg_router` reads, for column `v`, the channel value and the three check messages at the rows port B names. It hands them to `vn_proc` with a valid/ready handshake. Results go back to the variable banks (port C gives the addresses), and `w_v` goes to `dec_int`. |
| decision | N | `dec_int` sweeps the rows and forms `b̂`. |
| output | N | `out_b` for rows 0..N−1, one per cycle. |

In the variable phase the router holds its read address and data while
`vn_proc` is not ready.

**Variable node stage.** `vn_proc` deals nodes to the clusters in turn: node
`k` goes to cluster `k mod 5`. Each `vnu_cluster` is a two-stage pipeline:
- ten `fwbw` units, filled in turn, each working on its own node;
- one shared `vout`, which takes the finished units in the same order.

A cluster accepts a node only when the `fwbw` unit in turn is free. Otherwise
the input stalls (`vn_stall`). Cluster outputs are merged one per cycle by a
round-robin arbiter. `vn_conflict` flags cycles where several clusters have a
result waiting.

Results therefore leave in almost the order they entered, but not
necessarily exactly. Every message carries its node index, and the write-back
uses that index.

**Unit latencies.**
- `fwbw`: 4 cycles. It steps both lanes together, one product and reduction
  per step, with the step results registered.
- `vout`: 4 cycles. It reuses one Gaussian product unit for three messages and
  the estimate.
- With 50 units in flight, the variable stage is limited by the router and the
  arbiter (about one node per cycle), not by the arithmetic.

## Top-level interface (`ldlc_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `inv_s2` | in | 21 | 1/σ² in Q12.8, held for the frame |
| `start` | in | 1 | pulse in idle to begin a frame |
| `ch_valid` / `ch_ready` / `ch_y` | in/out/in | 1/1/21 | channel values `y_0..y_{N−1}`, Q12.8, accepted when both valid and ready |
| `out_valid`, `out_idx`, `out_b` | out | 1, ⌈log2 N⌉, 14 | decoded integers, one per cycle, no back-pressure |
| `done`, `iters`, `converged` | out | 1, ⌈log2(MAX_ITER+1)⌉, 1 | end of frame; iterations used; whether it stopped on a stable decision |
| `busy` | out | 1 | frame in progress |
| `vn_stall`, `vn_conflict`, `clamp_evt`, `uflow_evt` | out | 1 each | monitoring events (see above; clamp = variance floor hit, uflow = an exponential gave 0) |

Parameters with their defaults:

| Parameter | Default | Meaning |
|---|---|---|
| `N` | 1000 | block length |
| `MAX_ITER` | 20 | iterations at most |
| `NCL` | 5 | clusters |
| `NFW` | 10 | fwbw units per cluster |
| `NEXT` | 3 | periodic-extension components |
| `MINVAR` | 26 | 0.1016σ² |
| `STABLE` | 2 | unchanged decisions needed to stop |

The number format (`W`, `WF`) is in `ldlc_pkg`.

## How this differs from the published decoder

The defaults match the published design in these respects:
- the Q12.8 format;
- the 8-entry seed table and 2 Newton–Raphson steps;
- the split-table exponential;
- the single-Gaussian messages with a 0.1σ² floor;
- degree 3 with generating sequence {1, 1/√3, 1/√3};
- N = 1000 and 20 iterations;
- one check node unit and 5 × 10 pipelined variable units sharing 5 output
  units.

The following are this design's own choices:

- **Phases do not overlap.** Load, check, variable and decision phases run one
  after another. At 5 dB from capacity a 1000-symbol frame takes about 21,300
  cycles in all (6 iterations), which is about 5.9 Msymbols/s at 125 MHz. The
  published pipelined decoder reaches about 10.5 Msymbols/s at that point.
- **Unit timing.** The published units reuse a few adders and multipliers over
  many cycles: about 109 cycles for forward-backward and 10 for the output
  step. Here each unit has its own arithmetic and takes 4 cycles. The
  cluster/dealing structure is kept.
- **Matrix.** The published decoder uses a randomly generated Latin square,
  scaled so that the N-th root of `|det H|` is 1. This one uses the structured
  construction above without scaling (it is 1.002 already).
- **`1/σ²` is an input.** The published text keeps variances relative to σ²
  but does not say how σ² reaches the hardware.
- **Stopping rule.** Early termination is described only as "when decoding
  succeeds". The stable-decision test is this design's own.
- **Exponential split.** P2 = 4 (bit 12) is taken from the rule above. One
  drawing of the split places P2 at 2³; the rule was followed, and it gives
  the same P1.
- **All weights zero.** When every mixture weight underflows to zero, the
  middle component is kept on its own.
- **Target device.** There is no FPGA-specific logic.

## Verification

Each block has a self-checking testbench in `tb/`. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. `ldlc_ref_pkg` holds
real-valued models of:
- the Gaussian product;
- periodic extension;
- the mixture product and reduction;
- forward-backward;
- the complete variable node;
- the check node.

Fixed-point results are compared with these models within stated tolerances.

| testbench | what it checks |
|---|---|
| `tb_nr_div` | quotients over a wide range of magnitudes, zero denominator |
| `tb_exp_lut` | every argument up to underflow against `exp`, the underflow flag |
| `tb_cnu` | check rule for random messages and signs, one-cycle latency |
| `tb_periodic_ext` | component means and centring |
| `tb_mix_product`, `tb_gmr`, `tb_gauss_prod` | against the real models, including the variance floor and all-zero weights |
| `tb_fwbw`, `tb_vout` | full recursions and outputs, cycle latency, handshakes |
| `tb_vnu_cluster`, `tb_vn_proc` | random streams with stalls and back-pressure; order, completeness, values |
| `tb_sp_ram`, `tb_h_rom`, `tb_msg_router`, `tb_dec_int` | memory semantics, the matrix and its inverse maps (at N = 40 and 1000), routing in both phases, rounding and change detection |
| `tb_ldlc_decoder` | 6 frames, N = 40, 2 × 2 variable units |
| `tb_ldlc_full` | one 1000-symbol frame at 5 dB from capacity, all defaults |

`tb_ldlc_decoder` checks decoding at low noise. In the two noisiest frames it
also compares every first-iteration variable-node message against the models.
It counts each mechanism and fails if one never happens:
- input stalls;
- variance-floor hits;
- exponential underflows;
- early stops;
- iteration-limit stops.

A second instance limited to one iteration and with a higher variance floor
forces the last two. Cluster output conflicts are counted but not required:
in-order dealing makes them rare at this size.

`tb_ldlc_full` encodes `b ∈ {−2..2}^1000` by Gaussian elimination on `H`. It
then checks that all 1000 integers come back and that the decoder stops by
itself. It runs in under a minute.

To simulate one testbench with Verilator, from the directory holding `rtl/`
and `tb/`:

```
verilator --binary --timing -Wno-fatal --top-module tb_ldlc_full \
    -y rtl -y tb rtl/ldlc_pkg.sv tb/ldlc_ref_pkg.sv tb/tb_ldlc_full.sv
./obj_dir/Vtb_ldlc_full
```

Frame error rate has not been measured. One frame at 5 dB decodes without
error, but the published rate of about 3·10⁻³ would need some 10⁴ frames to
confirm. Timing closure and resource use on a real device have not been
checked.
