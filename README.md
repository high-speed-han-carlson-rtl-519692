# Variable-latency speculative Han-Carlson adder with a square-root carry-select correction path

A fast parallel-prefix adder spends most of its depth on carries that almost
never matter: in a 16-bit addition of random operands, a carry that travels
more than 8 bit positions happens in fewer than 1 addition out of 100. This
design exploits that. A Han-Carlson prefix network with its last Kogge-Stone
row removed computes every carry from a window of only the 8 or 9 bits below
it. That is shallower and faster, and right almost always. A small
detector recognises the rare operand pairs for which a window is too short.
For those, the adder takes one extra clock cycle and delivers the exact sum
of a modified square-root carry-select adder (SQRT CSLA), whose second
ripple adder per group is replaced by a binary to excess-1 converter (BEC).

The result is a variable-latency adder: one cycle per addition when the
speculation holds, two when it fails, so the mean time per addition is

    Tavg = Tclk * (1 + Perr)

For 16 bits and an 8-bit window, Perr is exactly 1/128 (0.78%) on uniform
random operands.

Everything is written in synthesizable SystemVerilog (IEEE 1800-2017). The
default size is N = 16 bits with a speculation window of K = 8.

## Datapath

```
 a, b ──► operand regs ──► gp_preproc ──► spec_hc_prefix ──► sum_postproc ──┐
                  │             │  g, p                       speculative   │
                  │             └──────► err_detect ── err                  ├─► result regs ─► sum, cout
                  └───────────► sqrt_csla (exact sum, carry in 0) ──────────┘
```

The datapath has five stages. Three form the speculative adder:
pre-processing, prefix network and post-processing. The other two are
error detection and error correction. They all work in the same clock cycle
from the same operand registers. The control logic in `spec_hc_csla_top`
decides which sum is registered.

* **Pre-processing** (`gp_preproc`): bit generate `g_i = a_i & b_i` and bit
  propagate `p_i = a_i ^ b_i`. Because propagate is the XOR form, a bit never
  both generates and propagates.
* **Prefix network** (`spec_hc_prefix`, built from `prefix_cell`): produces
  the speculative carry out of every bit. See the next section.
* **Post-processing** (`sum_postproc`): `s_i = p_i ^ c_(i-1)`, with
  `c_(-1) = 0`.
* **Error detection** (`err_detect`): raises `err` when some carry might be
  wrong.
* **Error correction** (`sqrt_csla`): an independent exact adder whose sum
  replaces the speculative one in the second cycle.

## The speculative Han-Carlson network

Every prefix adder combines (generate, propagate) pairs with the black-cell
operator

    (G, P)_hi o (G, P)_lo = (G_hi | P_hi & G_lo,  P_hi & P_lo)

This operator is one AND-OR gate plus one AND gate. A Han-Carlson network
runs a Kogge-Stone tree on the odd bits only, and puts one Brent-Kung row
at each end. The first row pairs each odd bit with the even bit below it.
The last row gives each even bit its carry from the finished odd bit below
it. That makes `1 + log2(N)` rows with about half the cells of Kogge-Stone.
For N = 16:

| row | span | black cells at bits     | window after the row                 |
|-----|------|-------------------------|--------------------------------------|
| 1   | 1    | 1, 3, 5, ..., 15        | odd bits: 2 bits                     |
| 2   | 2    | 3, 5, ..., 15           | odd bits: 4 bits                     |
| 3   | 4    | 5, 7, ..., 15           | odd bits: 8 bits                     |
| 4   | 8    | 9, 11, 13, 15 (**pruned**) | (would be 16 bits: exact)         |
| 5   | 1    | 2, 4, ..., 14           | even bits: odd neighbour's window + 1 |

Pruning row 4 leaves:

* each odd bit `i` with the group generate of bits `i .. i-7`;
* each even bit with the group generate of bits `i .. i-8`.

Windows are clipped at bit 0, so every carry of bits 0 to 7 (and 8) is still
exact. In general the RTL keeps the Kogge-Stone rows whose span `d`
satisfies `2d <= K`. `K = N` keeps every row, which gives an ordinary exact
Han-Carlson adder. The testbench uses that as its reference network.

A speculative carry is wrong only if a carry is generated below its window
and propagates all the way through the window. That needs a run of at
least K propagating bits directly above a generating bit.

## Error detection

`err_detect` looks for exactly that pattern:

    err = OR over j of ( g_j & p_(j+1) & ... & p_(j+K) ),   j = 0 .. N-1-K

* **No error is ever missed.** Every carry window is at least K bits wide.
* **False alarms are possible, and only cost time.** Take a chain of exactly
  K propagates whose top bit is odd, so that the even bit above it sees K + 1
  bits and is in fact correct. The adder still takes the two-cycle path.
  The result is still right; only the time is lost.

For N = 16, K = 8 the chain positions `j = 0..7` exclude each other: a
second generate would have to sit inside the first run of propagates. So
the flag probability on uniform operands is exactly 8 · (1/4) · (1/2)^8 =
1/128.

## Error correction: modified square-root carry-select adder

The correction path must be exact and fast enough for one cycle. Its
structure:

* It splits the word into groups of growing width: 2, 2, 3, 4, 5 for 16
  bits. For wider words it continues with 6, 7, ..., and the last group is
  cut at N. The layout comes from `hc_pkg::csla_*`.
* The first group is a ripple-carry adder fed by the carry input.
* Every other group of width `w` has a single ripple-carry adder with carry
  in 0, producing the `(w+1)`-bit value `{cout, sum}`.
* A `(w+1)`-bit BEC adds one to that value, which gives the carry-in-1
  result. It does this without a second adder:
  `x_0 = ~b_0`, `x_i = b_i ^ (b_0 & ... & b_(i-1))`.
* The carry out of the group below picks one of the two results.

Because all groups work in parallel, the carry only crosses one mux per
group. The classic carry-select adder uses two ripple adders per group; the
BEC version needs less area.

Inside the top-level adder the carry input of `sqrt_csla` is tied to 0. The
module itself supports a carry input, and its testbench tests it.

## Timing and handshake (`spec_hc_csla_top`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock, rising edge |
| `rst_n`     | in  | 1     | asynchronous active-low reset |
| `in_valid`  | in  | 1     | `a`, `b` hold an operand pair |
| `in_ready`  | out | 1     | the pair is taken on this edge if `in_valid` |
| `a`, `b`    | in  | N     | operands |
| `out_valid` | out | 1     | one-cycle pulse: `sum`, `cout`, `corrected` are new |
| `sum`       | out | N     | exact sum |
| `cout`      | out | 1     | carry out of bit N-1 |
| `corrected` | out | 1     | this result took the two-cycle path |

* An operand pair is registered on an edge where `in_valid & in_ready`.
* **Speculation holds:** the speculative sum is registered on the next edge
  and `out_valid` pulses. A new pair can be registered on that same edge,
  so error-free additions stream at one per cycle.
* **`err` is high:** `in_ready` drops for that cycle and nothing is
  registered at the output. On the following edge the SQRT CSLA sum is
  registered, with `out_valid` and `corrected` high.

So the latency is 1 or 2 cycles after the operands were registered. There
is no output back-pressure: a result is valid for exactly one cycle.
Two assertions in the top check these rules:

* a correction cycle always completes its addition;
* the operand registers are never overwritten while an addition is in
  progress.

## Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `N` | 16 | top, `gp_preproc`, `spec_hc_prefix`, `sum_postproc`, `err_detect`, `sqrt_csla` | word width; a power of two for the prefix network |
| `K` | 8 | top, `spec_hc_prefix`, `err_detect` | speculation window; a power of two, `2 <= K <= N` |
| `W` | 4 | `bec`, `rca` | width of one converter or ripple adder; `sqrt_csla` sets it per group |

A larger K means fewer corrections but a deeper prefix network. For
uniform operands the correction rate is roughly `(N-K) / 2^(K+2)`.

## Design choices not fixed by the underlying description

The points below are choices made for this implementation. Keep them in mind
when judging how faithful it is.

* **Role of the SQRT CSLA.** The adder architecture pairs a speculative
  Han-Carlson adder with a modified SQRT CSLA. Here the CSLA is the exact
  adder of the correction cycle, and the speculative path is a pure prefix
  adder. One could also read the architecture differently, for example with
  carry-select groups inside the speculative path. This RTL does not do
  that.
* **Which row is pruned.** The last *Kogge-Stone* row is pruned and the
  final Brent-Kung row is kept. Removing the Brent-Kung row instead would
  leave the even carries with only a 1-bit look-back, not a K-bit window.
* **Error condition.** The detector tests for a run of K propagates above a
  generate. It is conservative for even-bit carries, whose windows are one
  bit wider.
* **Group sizes** 2-2-3-4-5 of the SQRT CSLA, and the plain ripple adder in
  its first group.
* **Interface.** The valid/ready handshake, the registered operands and
  results, the asynchronous reset and the `corrected` flag are all
  interface choices of this design. There is no carry input.
* **Not built:** the Kogge-Stone and non-speculative baselines that such a
  design is usually compared against. An exact Han-Carlson adder can still
  be had with `K = N`.
* **Delay figures.** No FPGA or ASIC timing has been measured with this RTL.
  Delay improvements reported for this architecture (about 5% over a plain
  Han-Carlson adder on an FPGA) are not verified here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one:

* compares against values computed independently, by integer addition or
  bit-by-bit reference models;
* ends with a `TB_RESULT checks=<n> failures=<n>` line;
* has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_gp_preproc`, `tb_prefix_cell`, `tb_sum_postproc` | bit-level definitions, exhaustive or random |
| `tb_bec`, `tb_rca` | all inputs at 4 and 6 (BEC) or 4 bits (RCA); random at 8 bits |
| `tb_spec_hc_prefix` | every speculative carry against the carry of its own window; the `K = N` network against exact carries; operands with long carry chains included |
| `tb_err_detect` | `err` against the longest carry chain for K = 8 and K = 4; and that the windowed sum is exact whenever `err` is low |
| `tb_sqrt_csla` | 16 and 32 bits, both carry inputs, carries crossing every group boundary, random operands |
| `tb_spec_hc_csla_top` | 20 000 additions at the default size with random `in_valid`. Each result is checked for its value, for 1 or 2 cycles of latency matching the chain test, and for the `corrected` flag. It also counts speculative and corrected results, back-to-back acceptances and stalls, and fails if any never occurs |
| `tb_error_rate` | 12 million uniform random additions streamed back to back (about 10 s). It measures Perr = 0.7806% against the exact 0.78125%, and checks that the cycle count equals `n (1 + Perr)` |

The 12 million samples give better than 1% relative accuracy on Perr at
99% confidence.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wall -Wno-fatal \
    --top-module tb_spec_hc_csla_top -y rtl -y tb +libext+.sv -Irtl \
    rtl/hc_pkg.sv tb/tb_spec_hc_csla_top.sv
./obj_dir/Vtb_spec_hc_csla_top
```

Replace the top module and file to run any other testbench. `hc_pkg.sv` must
always come first. The simulator has no X state, so all state the design
reads is reset.

## Files

| file | contents |
|------|----------|
| `rtl/hc_pkg.sv` | `gp_t` pair type, prefix operator, SQRT CSLA group layout functions |
| `rtl/gp_preproc.sv` | generate/propagate stage |
| `rtl/prefix_cell.sv` | black cell |
| `rtl/spec_hc_prefix.sv` | speculative (or, with `K = N`, exact) Han-Carlson network |
| `rtl/sum_postproc.sv` | sum stage |
| `rtl/err_detect.sv` | long-carry-chain detector |
| `rtl/rca.sv` | ripple-carry adder |
| `rtl/bec.sv` | binary to excess-1 converter |
| `rtl/sqrt_csla.sv` | modified square-root carry-select adder |
| `rtl/spec_hc_csla_top.sv` | variable-latency adder: datapath, control, handshake |
| `tb/tb_*.sv` | testbenches listed above |
