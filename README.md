# A ROM-walk Knuth-Yao sampler for the FALCON half-Gaussian

FALCON signing and key generation need integers drawn from a fixed discrete
half-Gaussian, the base distribution chi: the values 0..18 with standard
deviation 1.8205, each probability given exactly as a 72-bit integer over
2^72. The usual hardware for this is a cumulative-table comparator. This design
uses Knuth-Yao sampling instead, in a form reduced almost entirely to memory.

Knuth-Yao sampling walks a binary tree, the discrete distribution generating
(DDG) tree, one uniform random bit per level until it reaches a leaf. That leaf
is the sample. The tree is fixed by the distribution, so this design works it
out ahead of time and stores it in a ROM as a next-node table. Each clock cycle
the ROM gets `{random bit, current node index}` and returns the index of the
child. Feeding the output back as the next index is the whole datapath. There
is no search logic and no arithmetic: one ROM, a 7-bit counter, and two
multiplexers.

For chi the tree has 72 levels, 19 leaves, the root and 458 intermediate
nodes, 478 nodes in all. A 9-bit index covers them, so the ROM is 1024 x 9 bits
with a 10-bit address. That fits one 18-kbit FPGA block RAM.

## The index scheme

The trick is in how the nodes are numbered.

* **Leaves** are numbered with the value they return: leaf "7" has index 7.
  The ROM output at the end of a walk is therefore the sample itself, with no
  decoding step.
* **The root** gets index N, where N is the number of values (19 here).
* **Intermediate nodes** get N+1, N+2, ... level by level from the top. Within
  a level they are numbered from the rightmost node to the leftmost.
* **Children**: the word at address `{0, I}` is the index of node I's right
  child, and the word at `{1, I}` is its left child.
* **A leaf is its own child** under every bit value.

The last rule makes the sampler constant-time. The walk never stops early: it
always makes exactly 72 reads. Once it lands on a leaf, the remaining reads
return that leaf again. The time per sample, and the pattern of ROM accesses,
are the same whatever value is drawn.

The tree itself comes from the probability matrix. Row i holds P(i)·2^72 in
binary, and column c is level c+1 of the tree, MSB first. Level l has twice as
many nodes as level l-1 has intermediate nodes. The ones in column l-1 are the
leaves of level l. Those leaves sit at the right end of the level, and the
value with the highest row number is rightmost. All remaining nodes on the
level are intermediate.

Take a node at distance t from the right edge, among the intermediate nodes of
its level. Its right child sits at distance 2t of the next level, and its left
child at 2t+1. Because the probabilities sum to exactly 2^72, every path ends
in a leaf by level 72. So 72 reads are always enough.

A small example is the 4-value distribution with 6-bit probabilities
`011110, 010011, 001110, 000001`. Its tree has 4 leaves, a root (index 4) and
9 intermediate nodes (indices 5..13), giving a 32 x 4 ROM. The bit string
`110010` walks root → 6 → 8 → 9 → leaf 2, then reads leaf 2 twice more. The
testbenches check this example word for word.

## The ROM contents are computed, not stored

`ky_ddg_rom` builds its table at elaboration time. The constant function
`build_rom()` takes the probability matrix parameter `PROB` and applies the
rules above. There is no memory file. Changing the distribution only means
passing another `PROB`, `N` and `THETA`. Set `W` and `L` to match: an
elaboration-time `$error` reports a tree that does not fit in `W` index bits.
Addresses that no node uses hold 0.

The builder needs, per level l:

```
h[l] = number of ones in column l-1            (leaves on level l)
m[l] = 2*m[l-1] - h[l],  m[0] = 1              (intermediate nodes on level l)
index of intermediate node t on kept level l = N + 1 + (sum of m over earlier kept levels) + t
```

For chi this gives m[72] = 0 and a total of 458 intermediate nodes.

## Several random bits per read (`RAND_BITS`)

With X random bits per cycle, the tree is compacted: only levels X, 2X, ...
keep their intermediate nodes. A ROM word then covers X levels of the walk.
When a walk meets a leaf on one of the skipped levels, the word holds that
leaf directly. The address becomes `{X random bits, index}`. The bit used
first by the tree is the MSB of the group. So the compacted sampler returns
exactly the same sample as the 1-bit sampler fed the same bit stream, MSB
first. X must divide 72.

| RAND_BITS | nodes | W | ROM (addr x data) | bits used | cycles/sample |
|-----------|-------|---|-------------------|-----------|---------------|
| 1 (default) | 478 | 9 | 1024 x 9  | 8,604  | 72 |
| 2           | 245 | 8 | 1024 x 8  | 7,840  | 36 |
| 3           | 171 | 8 | 2048 x 8  | 10,944 | 24 |
| 4           | 131 | 8 | 4096 x 8  | 16,768 | 18 |

Fewer levels mean fewer nodes, but every extra address bit doubles the
number of words per node. Memory use is lowest at 2 bits per cycle. The
3-bit version is a good compromise: it still fits an 18-kbit block RAM
(2048 x 9) at a third of the 1-bit latency. The 4-bit version needs a 36-kbit
block. For 2..4 bits set `W = 8`; the 1-bit default uses `W = 9`.

## Control and timing

`ky_fsm` is a two-state machine (IDLE, READ) with a read counter.

```
cycle        0           1 .. 71          72
start        1 (idle)    ignored          may be 1 again (next sample)
load_root    1           0                1 if start
ROM index    ROOT (19)   previous data    ROOT if start
random_bit   bit 1       bits 2..72       bit 1 of the next sample
ready        0           0                1 (one cycle)
sample       31          31               value 0..18
```

* The first read happens in the cycle `start` is seen. The random bit of a
  read must be valid in the same cycle as the read.
* `ready` is high for exactly one cycle, 72 cycles after `start`, or 72/X
  with X bits per cycle.
* The FSM is idle again in the `ready` cycle. A `start` then begins the next
  sample at once, so back-to-back sampling delivers one sample every 72 (or
  72/X) cycles.
* `start` during a sampling is ignored.
* Outside the `ready` cycle, `sample` shows the idle code 31. No value of chi
  takes that code.

The ROM read is synchronous: the address is registered and the data is valid
one cycle later, as in an FPGA block RAM. The ROM's output register has no
reset. The FSM has a synchronous, active-high reset.

## Modules

| module | role |
|--------|------|
| `ky_pkg` | chi as 19 x 72-bit integers; default sizes |
| `ky_ddg_rom` | next-node ROM; builds its contents from `PROB` at elaboration |
| `ky_fsm` | start/ready control and the read counter |
| `ky_root_mux` | feeds the root index on the first read and the fed-back ROM data afterwards |
| `ky_output_mux` | drives the sample when `ready` is high and the idle code otherwise |
| `ky_sampler` | top: wires the four together; ports `clk, rst, start, random_bit[RAND_BITS-1:0], ready, sample[L-1:0]` |

The random-bit source is not part of this RTL. Drive `random_bit` with any
uniform source that gives X fresh bits per cycle, for example a TRNG or PRNG
behind a small FIFO. Sign selection and the rejection step of FALCON's full
integer sampler are also left to the surrounding design.

## What was verified

Every testbench is self-checking and prints `TB_RESULT checks=N failures=M`.
The reference model in `tb/ky_ref_pkg.sv` does not use the ROM at all. It runs
Knuth-Yao directly on the probability matrix, tracking the distance of the
current node from the right edge of its level and subtracting the ones of each
column.

* `ky_ddg_rom_tb` checks:
  * the whole 4-value example ROM against its published table;
  * that the FALCON ROM's largest stored index is 477 (478 nodes), the root's
    children are 20 and 21, and leaves point to themselves;
  * 300 random 72-bit walks plus the one 72-bit path (to value 18), against
    the reference;
  * that the 3-bit ROM holds 171 nodes.
* `ky_fsm_tb` compares the FSM cycle by cycle with a model at 72 and at 3
  steps, across random starts, back-to-back starts, ignored starts and a reset
  in the middle of a sampling.
* `ky_root_mux_tb` and `ky_output_mux_tb` use random vectors.
* `ky_sampler_tb` runs the top with all defaults for 3000 samples, checking:
  * the sample, the 72-cycle latency, the one-cycle `ready` and the idle code
    in every cycle;
  * that back-to-back starts, ignored starts, idle gaps, a reset during a
    sampling, the 72-bit deepest path and early leaves (dummy reads) all
    occur;
  * that every value 0..18 comes out. Rare values are reached by forcing the
    bit string to their shallowest leaf;
  * that the frequencies of 0 and 1 are within 5 sigma of 0.3594 and 0.3091.
* `ky_sampler_variants_tb` runs the 1-, 2-, 3- and 4-bit samplers side by
  side. They share the same bit strings, so they must agree with the
  reference at 72/36/24/18 cycles per sample. It also runs the example
  distribution over all 64 six-bit strings.

FPGA area and clock frequency are outside what simulation can show and were
not measured. The design is meant to map the ROM onto one block RAM. Apart
from the ROM, the logic is the 7-bit counter, a state flop, the ready flop and two
narrow multiplexers.

## Design choices not fixed by the architecture

* The idle code is all ones (31).
* The FSM reset is synchronous and active high.
* `start` during a sampling is ignored.
* The first read is in the `start` cycle, which gives back-to-back samples
  with no gap.
* With several random bits per cycle, the MSB of `random_bit` is used first.
* Unused ROM words are 0.
* The ROM contents are computed in SystemVerilog rather than loaded from a
  file.
* The default configuration is one random bit per cycle. The 3-bit variant is
  the same RTL with `RAND_BITS = 3, W = 8`.
* Not built: a pipelined version with the ROM split by tree level, which
  would give one sample per cycle. Also not built: the random number
  generator and its FIFO.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ky_pkg.sv tb/ky_ref_pkg.sv tb/ky_sampler_tb.sv --top-module ky_sampler_tb
./obj_dir/Vky_sampler_tb
```

Replace `ky_sampler_tb` with any other testbench name to run that test. The
full-size run takes well under a minute. To instantiate another
configuration:

```
ky_sampler #(.RAND_BITS(3), .W(8)) u_sampler (.clk, .rst, .start,
    .random_bit(rnd3), .ready, .sample);
```
