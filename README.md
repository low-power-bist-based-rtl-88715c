# Low-power weighted-random BIST with uniform scan chains

Pseudo-random BIST has two weak points. Random patterns miss the
random-pattern-resistant faults, and shifting them into scan chains toggles a
lot of flip-flops, which costs power. 3-valued weighting fixes the first one.
For each of a few *weight sets*, every scan cell is forced to 0, forced to 1
or left random (R). Done cell by cell, that needs a decoder that looks at both
the weight set and the bit position, and such a decoder is large.

This design uses the scheme described in *Low Power BIST Based on Scan
Partitioning*. Scan cells are grouped into chains so that, in most chains, all
cells want the same weight in every weight set. Such a **uniform chain** is
weighted as a whole:

* its decoder needs only the weight counter, not the bit counter, which makes
  it tiny;
* while its weight is 0 or 1 its scan input is constant, so shifting it causes
  no transitions at all.

The few cells that fit no uniform chain go into **non-uniform chains**. These
get a conventional per-cell 3-weight decoder. Only the partition of cells into
chains is constrained. The order of cells inside a chain is free, so routing
can still order them.

## Weights, weight cubes and scan weights

A cell's **weight cube** lists its weight in each weight set, using `0`, `1`,
`R` and `x` (don't care). `lpbist_pkg::weight_t` encodes these as
`W_0 / W_1 / W_R / W_X`. Two cubes are *compatible* if no weight set has
different specified values in the two. Cells with mutually compatible cubes
can share a uniform chain. The chain's **scan weight** is the merge of its
cells' cubes: in each weight set the specified value wins over `x`.

The default configuration of `lpbist_top` is a small worked example: nine
cells `s1..s9` (indices 0..8) and four weight sets. Cubes are written weight
set 1..4, left to right:

| cell | cube | cell | cube | cell | cube |
|------|------|------|------|------|------|
| s1   | xxxx | s4   | xxxx | s7   | xxx1 |
| s2   | x0xx | s5   | 01xR | s8   | 1RRx |
| s3   | 1xx1 | s6   | 1x1x | s9   | 0x1x |

With a fixed scan length of 3 this partitions into:

| chain | cells (scan-in → scan-out) | kind        | scan weight |
|-------|----------------------------|-------------|-------------|
| 0     | s2 s3 s6                   | uniform     | 1 0 1 1     |
| 1     | s5 s9 s1                   | uniform     | 0 1 1 R     |
| 2     | s8 s7 s4                   | non-uniform | per cell    |

Finding the partition is a software step: a greedy minimum clique cover of
the cube compatibility graph, then balancing with don't-care cells. It is not
part of the RTL. The RTL takes its result as parameters: `CELL_CUBE`,
`CHAIN_CELL`, `CHAIN_LEN` and `UNIFORM`. From these it derives the decoder
contents at elaboration. An `initial` assertion rejects a uniform chain whose
cells conflict, and a cell that is placed in no position or in two.

## Data path of one chain

```
LFSR ──► LT-RTPG ──rnd[c]──► weight logic ──si[c]──► scan chain c ──so[c]──► MISR
                             ▲ force0/force1
     weight counter ──► scan weight decoder   (uniform chains)
     weight counter ─┐
     bit counter ────┴► 3-weight decoder      (non-uniform chains)
```

* **LFSR** (`lfsr`): 32-bit Fibonacci register with polynomial
  x^32+x^22+x^2+x+1. It advances once per shift cycle.
* **LT-RTPG** (`lt_rtpg`): per chain, the AND of `K` LFSR bits toggles a T
  flip-flop, and that flip-flop is the chain's random bit. The random bit
  changes with probability 1/2^K: about 0.25 for the default `K = 2`, instead
  of 0.5. The same bit serves as the random value of R positions in the
  weighted phase.
* **Weight logic** (`weight_logic`): `si = (rnd | force1) & ~force0`. That is
  one OR gate and one AND gate per chain.
* **Scan chain** (`scan_chain`): mux-D cells. They shift when `scan_en` is
  high and capture `d` when it is low.
* **MISR** (`misr`): 32-bit multiple-input signature register over the
  scan-out bits.

## Scan weight decoder and decoder sharing

`scan_weight_decoder` gets one scan weight per uniform chain. Chains whose
scan weights are compatible in every weight set can share one decoder output.
At elaboration the chains are grouped greedily: each chain joins the first
compatible group, and that group's cube absorbs the chain's specified values.
The result is `NUM_DEC` decoders, each a decode of the weight counter that
drives one force0/force1 pair. Each pair fans out to all chains of its group.
The module's default table is a five-chain, five-weight-set example. There,
chains {1,3,4} and {2,5} are compatible, so two decoders serve all five
chains. A `W_X` that survives merging leaves the chain random.

## The 3-weight decoder and bit order

`three_weight_decoder` handles the non-uniform chains. A load takes
`SHIFT_LEN` shift cycles, where `SHIFT_LEN` is the longest chain. The bit
shifted in at bit count `t` ends in position `SHIFT_LEN-1-t`, with position 0
at the scan input. So the decoder looks up, for the active weight set, the
cube of the cell at that reversed position. If a chain is shorter than
`SHIFT_LEN` (variable-length architecture), its first
`SHIFT_LEN - NU_LEN` bits fall out of the chain. They are left random.

The decoder is written as a table lookup, and synthesis produces the logic.
The scheme itself has it produced by two-level logic minimisation. This
decoder is the expensive part of the hardware, and its size grows with the
number and length of the non-uniform chains.

## A test run

`bist_controller` sequences the run after a `start` pulse:

1. `PH_RANDOM`: `NUM_RAND_PATS` LT-RTPG patterns with no weighting. This
   catches the easy faults.
2. `PH_WEIGHTED`: `PATS_PER_WS` patterns for each weight set. `ws_idx` is the
   weight counter and runs 0 .. `NUM_WS-1`.
3. `PH_UNLOAD`: one more shift, so that the last response reaches the MISR.
4. `PH_DONE`: `done` is high and `signature` is valid, until the next `start`.

Every pattern takes `SHIFT_LEN` shift cycles followed by one capture cycle. A
run therefore lasts

    (NUM_RAND_PATS + NUM_WS*PATS_PER_WS) * (SHIFT_LEN + 1) + SHIFT_LEN   cycles

which is 264 195 cycles at the defaults. The MISR is cleared by `start`. It
compacts only shift cycles that come after the first capture, so the
power-up content of the scan cells, which is never reset, does not reach the
signature.

## Fixed-length and variable-length chains

When all `CHAIN_LEN` entries are equal, this is the fixed-length
architecture. Different lengths give the variable-length architecture: the
number of chains is fixed instead of their length. This often removes
non-uniform chains completely. The price is a longer shift, set by the
longest chain. For the example above with three chains, the chains become
{s2,s3,s6,s7}, {s5,s9,s1,s4} and {s8}. All three are uniform, no 3-weight
decoder is built (`NUM_NU = 0`), and a load takes 4 cycles instead of 3.
`tb/tb_lpbist_top_varlen.sv` shows the parameter override.

When overriding `MAX_LEN` together with `CHAIN_CELL`, pass `CHAIN_CELL`
(and the other array parameters) as typed `localparam`s, as that testbench
does. Verilator sizes a literal `'{...}` pattern given in the instance
parameter list from the default `MAX_LEN`.

## Top-level interface (`lpbist_top`)

| port        | dir | width       | meaning |
|-------------|-----|-------------|---------|
| `clk`, `rst_n` | in | 1        | clock; synchronous active-low reset |
| `start`     | in  | 1           | start a run (taken when idle or done) |
| `cell_d`    | in  | `NUM_CELLS` | responses of the circuit under test, captured when `scan_en` is low |
| `cell_q`    | out | `NUM_CELLS` | scan cell states, indexed by cell number, not by chain |
| `scan_en`   | out | 1           | shift (1) / capture (0) |
| `phase`, `weighted`, `ws_idx` | out | | controller state, weight counter |
| `busy`, `done` | out | 1        | run in progress / finished |
| `signature` | out | `MISR_W`    | MISR contents, valid while `done` |

The circuit under test is not included. Connect its combinational logic
between `cell_q` and `cell_d`.

## Files

`rtl/`: `lpbist_pkg.sv` (types, compatibility and merge),
`lfsr.sv`, `lt_rtpg.sv`, `weight_logic.sv`, `scan_weight_decoder.sv`,
`three_weight_decoder.sv`, `scan_chain.sv`, `misr.sv`, `bist_controller.sv`,
and `lpbist_top.sv`.

`tb/`: one self-checking testbench per module and package
(`tb_<name>.sv`), plus `tb_lpbist_top_varlen.sv` and
`tb_lpbist_top_share.sv`. Each testbench prints
`TB_RESULT checks=N failures=M`.

Simulate with Verilator 5, for example:

    verilator --binary --timing --assert -Irtl -y rtl rtl/lpbist_pkg.sv \
              tb/tb_lpbist_top.sv --top-module tb_lpbist_top
    ./obj_dir/Vtb_lpbist_top

## What the testbenches establish

* `tb_lpbist_top` runs the whole default configuration, all 65 536 random and
  4×128 weighted patterns. A small stand-in function plays the circuit under
  test. The testbench checks:
  * every weighted pattern, cell by cell, against the weight the cell must
    get;
  * that R cells take both values;
  * that forced uniform chains have a constant scan input;
  * that LT-RTPG scan inputs toggle on about 25 % of shift cycles;
  * the signature, against an independent MISR model fed with the observed
    scan-out cells;
  * the exact run length;
  * the pattern transitions (see below).

  It also counts each mechanism (random and weighted patterns, weight-set
  switches, force-0, force-1, random weight, per-bit weighting of the
  non-uniform chain, unload, compaction) and fails if one never occurs.
* `tb_lpbist_top_varlen` repeats these checks for the variable-length
  partition, with a shortened run.
* `tb_lpbist_top_share` builds five two-cell uniform chains from the
  decoder-sharing example. It checks that exactly two decoders are built.
  It also checks that cells receive the merged group weight where their own
  chain had a don't care.
* The module testbenches cover:
  * the LFSR period (an 8-bit instance) and the 32-bit recurrence;
  * the LT-RTPG against a model, and its toggle rate;
  * all input combinations of the weight logic;
  * decoder sharing (two decoders for the five-chain example);
  * the reversed bit order of the 3-weight decoder, including a short chain;
  * scan shift and capture;
  * the MISR against a model, and the signature change from one flipped bit;
  * the controller's counters and cycle count.

## Measured switching activity

Every pair of neighbouring cells that differ in a loaded pattern becomes one
transition that travels down the chain while shifting. In a plain
pseudo-random pattern, half of these pairs differ. `tb_lpbist_top` counts
them at the default configuration:

| patterns counted              | differing neighbour pairs | plain random |
|-------------------------------|---------------------------|--------------|
| first 512 random patterns     | 0.26                      | 0.5          |
| all 4×128 weighted patterns   | 0.14                      | 0.5          |

The first row comes from the LT-RTPG. The second row comes mainly from the
uniform chains: in a weight set where their weight is 0 or 1, they shift in a
constant. These figures describe only the nine-cell example. They say
nothing about the gains on large circuits.

## Choices not fixed by the scheme

These are this design's own and can be changed through parameters or small
edits:

* `K = 2` in the LT-RTPG, and its tap assignment. Chain `c` uses LFSR bits
  `(c*K + j) mod LFSR_W`.
* The LFSR and MISR polynomial (x^32+x^22+x^2+x+1), the seed, and the MISR
  width.
* `PATS_PER_WS = 128` and `NUM_RAND_PATS = 65536`. The scheme's benchmark
  runs use 65 536 or 131 072 random patterns and evaluate power over the
  first 128 patterns of each weight set.
* One capture cycle per pattern, the unload phase, and the start/done
  handshake.
* Don't-care positions of a uniform chain stay random unless decoder sharing
  fills them. Don't-care cells in a non-uniform chain are likewise random.
* The 3-weight decoder is a lookup table rather than hand-minimised
  two-level logic.

## Limits

* The configurations for the large benchmark circuits the scheme was
  evaluated on (about 230 to 1 600 scan cells, 16 to 50 chains, 8 to 19
  weight sets) are not provided. Their weight sets and partitions come from
  ATPG and fault simulation, which are outside this RTL. The parameters scale
  to such sizes, but the cube tables must be produced by that flow.
* Weight-set generation and scan partitioning (clique cover, chain
  balancing) are offline algorithms. They are not implemented here.
