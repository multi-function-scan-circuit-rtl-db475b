# A multi-function scan network on a Beneš–Waksman frame

A linear array of N processing cells (a *map* array) is good at work that stays inside
each cell, and poor at anything that needs all cells at once: summing a vector, finding
its minimum, compacting the interesting elements to the left, computing running sums or
moving data between cells. This RTL gives such an array one shared log-depth network
that does all of those jobs. The network takes one N-component vector per cycle. It
returns either a vector (permute, pack, prefix sum) to the cells, or a scalar reduction
(add, min, max) to the control processor.

The network is a Beneš permutation network, with Waksman's reduction of the switch
count. Its 2×2 switches are replaced by a *multi-function cell*. The function code
travels through the pipe with the data, so a permute can follow a reduction in the
next cycle. Every cell registers its outputs, which gives these latencies:

| result | latency (cycles) | N = 8 |
|---|---|---|
| vector (permute, pack, prefix add) | 2·log2 N − 1 | 5 |
| REDUCE scalar (add, min, max) | log2 N | 3 |
| throughput | one vector per cycle | |

A second version, `seq_scan_net`, has only one column of N/2 cells. It reuses that
column for every stage, so its size is O(N) instead of O(N log N). It cannot overlap
operations.

## Files

| file | what it is |
|---|---|
| `rtl/scan_pkg.sv` | function codes, the cell-position type, and the wiring and position functions shared by both nets |
| `rtl/mf_cell.sv` | the multi-function 2×2 cell with its pipeline registers |
| `rtl/scan_net.sv` | the pipelined network: 2·log2 N − 1 stages of N/2 cells |
| `rtl/seq_scan_net.sv` | the sequential (log-step) version |
| `rtl/or_prefix.sv` | the or-prefix network over the cells' activation bits |
| `rtl/scan_system.sv` | top level: the pipelined net, the or-prefix net, and the sequential net with its own ports |
| `tb/scan_ref_pkg.sv` | reference models and a Beneš–Waksman router (looping algorithm) for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_scan_net_large` at N = 256 |

Defaults: N = 8 inputs and 32-bit scalars. N can be any power of two from 4 up. The
testbenches also run N = 16, N = 32 (or-prefix) and N = 256.

## The network frame

The N-input net is built recursively. A first column of N/2 cells sends the upper
output of cell c to input c of an upper N/2-input sub-network, and the lower output to
input c of a lower one. A last column merges the two sub-networks' outputs c into cell
c. The recursion ends at single cells, which form the middle stage.

Stages are numbered t = 0 … 2L−2, where L = log2 N. Stages 0 … L−1 form the
*forward half*, whose last stage is the middle stage. The rest form the *backward
half*. The wiring between stages is an unshuffle inside each sub-network. Port b of
local cell lc in sub-network k of size m goes to position k·m + b·m/2 + lc. The
backward half uses the inverse mapping. `scan_pkg::link_src` gives, for each input of
stage t+1, the output of stage t that feeds it. Both nets use that function, so they
are wired identically.

Following Waksman, the first cell of the last column of every sub-network of size 4 or
more never switches. That makes N/2 − 1 *dummy* cells, which are only pipeline
registers: 3 of the 20 cells for N = 8.

## Cell roles: one cell, five behaviours

This is the part that needs the most care. Every cell is the same `mf_cell`. What it
does depends on the function code and on three facts about its place, packed as
`cell_pos_t`:

* `fwd`: the stage is in the forward half, the middle stage included.
* `lowest`: the cell belongs to the lowest (last) sub-network of its recursion level.
* `first`: the cell is the first cell of its sub-network.

| role | condition | count | permute | pack | prefix add | reduce |
|---|---|---|---|---|---|---|
| reduction | fwd & lowest | N−1 | switch | route | `{a, a+b}` if first, else `{b, a+b}` | lower out = a op b |
| pack | fwd & !lowest | 1 − N + ½N·log N | switch | route | straight | straight |
| dummy | !fwd & first | ½N − 1 | straight | straight | straight | straight |
| subtract | !fwd & lowest & !first | N − 1 − log N | switch | straight | `{b−a, b}` | straight |
| permute | !fwd & !lowest & !first | ½N·log N − 2N + log N + 2 | switch | straight | straight | straight |

In the table, a is the upper input and b the lower one. For N = 8 the counts are 7, 5,
3, 4 and 1, which add up to the 20 cells of the net.

In `scan_net` the position inputs are constants, so synthesis keeps only what each
position needs: an adder and compare in reduction cells, a subtracter in subtract
cells, and bare multiplexers elsewhere. In `seq_scan_net` the same inputs come from the
stage counter, and every cell is fully equipped.

### Reductions

The reduction cells form a binary tree. Stage 0 combines pairs, and the lower output of
each pair goes into the lowest sub-network. There, the next stage combines pairs of
pair-results, and so on. After L stages the whole vector has been reduced onto the
right-most output of the middle stage. The `reduce_*` ports are taken from that point,
L cycles after the input.

The backward half passes this output straight, so the last vector output, `data_o[N-1]`,
also carries the result, 2L − 1 cycles after the input.

For add, a disabled input counts as 0. For min and max, a disabled input is skipped, and
`reduce_en_o` is low when no input was enabled. Min and max compare signed
two's-complement values.

### Prefix sum

The prefix sum reuses the same tree. The forward-half reduction cells send the pair sum
down and one of the original inputs up. The upper sub-networks then carry those
originals straight across to the backward half.

In the last column of each lowest sub-network, cell c receives the running sum up to
element 2c+1 on its lower input, and element 2c+1 itself on its upper input. It outputs
`{sum − x, sum}`: the prefix for element 2c and the prefix for element 2c+1.

The first cell of each sub-network forwards element 2c instead of 2c+1. That element
passes through the dummy cell unchanged, and the dummy cell outputs it as the first
prefix. Disabled inputs count as 0.

### Permute

Every element carries a word of 2L − 1 bits in `dest_i`. Bit t names the output it
leaves its stage-t cell by: 0 for upper, 1 for lower. A cell switches when the word on
its upper input has a 1 in its low bit, and each cell shifts both words right by one.
Dummy cells never switch.

The words come from a routing algorithm run outside the network. `scan_ref::route` in
`tb/scan_ref_pkg.sv` is a ready example. It implements the looping algorithm with
output 0 of every sub-network forced to come from its upper half, level by level.

### Pack

Each enabled element carries its destination: the number of enabled elements before
it, counted from 0. The map array gets this number by running a prefix add over its
activation bits and subtracting 1. Only the forward half routes:

* If neither input is enabled, the cell passes straight.
* If one input is enabled, that element leaves by the output its destination's low bit
  names.
* If both are enabled, the upper element's low bit decides.

The backward half passes straight. The forward half delivers the element bound for d
to position bitreverse(d) of the middle stage. The straight backward half undoes that
bit reversal, so the element arrives at position d.

Two enabled elements that meet in a cell always have consecutive destinations among
the elements that reach that cell, so they never ask for the same output. Enabled
elements come out left-aligned and in order, with `en_o` set. Disabled elements fill
the remaining positions in an order the network chooses, with `en_o` clear.

## Sequential version (`seq_scan_net`)

`seq_scan_net` has one column of N/2 cells. Their registered outputs loop back through
one multiplexer per cell input. That multiplexer picks, for stage j, the output that
`link_src` wires to that input. Stage 0 reads the input vector.

Each cell's role comes from the stage counter through the same position function, and
the function code is held for the whole operation.

1. While idle, the net accepts `start_i`. `busy_o` rises and stays high until the
   operation ends.
2. Vector functions take 2L − 1 cycles. Reductions stop after the middle stage, after
   L cycles.
3. `done_o` pulses for one cycle. The results (`data_o`/`en_o`, or
   `reduce_o`/`reduce_en_o`) are valid in that cycle only.

The net ignores `start_i` while it is busy.

## The or-prefix network

`or_prefix` computes y[i] = b[0] | … | b[i] over the cells' activation bits. It uses
log2 N OR levels (Kogge–Stone) and one output register, so the result comes one cycle
after the input.

## Top level (`scan_system`)

The top brings the map array's side out as ports:

* `map_*`: the vector, enables, destinations and function code in.
* `scan_*`: the vector back to the cells.
* `reduce_*`: the scalar for the control processor.
* `act_*` / `act_or_*`: the or-prefix net.
* `seq_*`: the sequential version, which stands beside the pipelined net on its own ports.

The control processor, the instruction broadcast net and the map cells themselves are
not part of this RTL.

## Using the network from the map array

These sequences are the ones the end-to-end testbench runs:

* **Select `V[i]`.** Enable only cell i (each cell compares its index with i), then
  reduce with add.
* **Matrix × vector.** Each cycle, the cells multiply one matrix row by the vector and
  issue a reduce-add. An inner product leaves REDUCE every cycle, after log2 N cycles,
  so an N×N product takes N + log2 N cycles of network time.
* **Compaction (pooling lines).** First a prefix add over the activation bits, with
  data = enable = B. Then DEST = result − 1. Then a pack. This costs two network
  latencies.
* **Transpose of an N×N matrix.** Cell j holds column j. For k = 0 … N−1, cell i sends
  element (i+k mod N, i), with a rotation by k as the permutation. Cell r stores what it
  receives in register r−k mod N. The N permutations run back to back.
* **FFT data exchange.** For the butterflies whose partners live in other cells, pass k
  swaps each cell's value with the cell at distance 2^k (i ↔ i xor 2^k). It takes
  log2 N permutations.

## Where this RTL makes its own choices

These points follow the published design's description only in outline, or are fixed
here:

* **Function codes.** A 3-bit enum (`scan_pkg::op_e`) carries one of permute, pack,
  prefix add, reduce add, reduce min or reduce max.
* **Valid and reset.** A valid bit travels with the function code. Only the valid bits
  and the sequential controller are reset (asynchronous, active low). Data registers
  have no reset.
* **Permute word.** The convention that the word names each element's output at every
  stage, and that the cell obeys its upper input's bit, is this design's reading of
  "each stage consumes one low bit".
* **Placement of cells.** The dummy cells sit in the first position of each last
  column. The `{a, a+b}` / `{b, a+b}` prefix cells are placed as described above. Both
  choices reproduce the published cell counts for every N.
* **Disabled inputs.** Their treatment in prefix and reduce (zero for add, skipped for
  min and max) and the signed comparison are choices of this RTL.
* **Synthesis by position.** One cell module is used everywhere, with constant position
  inputs. Synthesis specializes it by constant propagation, instead of using five
  hand-written cell modules.
* **Sequential version.** Its handshake (start/busy/done, results valid for one cycle)
  is this design's own.
* **Or-prefix network.** Only its function is given. Its structure and latency here are
  the simplest reasonable ones.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself. This example
runs the end-to-end test at the default size:

```
verilator --binary --timing --assert -Irtl \
  rtl/scan_pkg.sv rtl/mf_cell.sv rtl/scan_net.sv rtl/seq_scan_net.sv \
  rtl/or_prefix.sv rtl/scan_system.sv tb/scan_ref_pkg.sv tb/tb_scan_system.sv \
  --top-module tb_scan_system -o sim && obj_dir/sim
```

The other testbenches and what they cover:

| testbench | what it covers |
|---|---|
| `tb_mf_cell` | every cell role with every function |
| `tb_scan_net` | N = 16, a random function every cycle, with the latencies checked |
| `tb_scan_net_large` | the same test at N = 256 |
| `tb_seq_scan_net` | the sequential version: latency, held function, ignored starts |
| `tb_or_prefix` | the or-prefix network |
| `tb_scan_system` | applications and mechanisms end to end, at the defaults |

Each testbench needs the package files and the modules it instantiates. Check the
random-permutation results with the router in `scan_ref_pkg`, or with your own
looping-algorithm implementation that uses the same word convention.
