# Full-search vector-quantization encoder

Vector quantization (VQ) compresses a signal by cutting it into small vectors
(here 4x4 blocks of 8-bit gray-level pixels) and replacing each vector by the
index of the most similar entry of a fixed table, the *codebook*. Finding that
entry is the expensive part: the input must be compared with every codeword,
and each comparison is a squared Euclidean distance over all components.

This RTL does that search in hardware. It keeps a 32-entry codebook of
16-byte codewords and, for each input vector, returns the 5-bit index of the
nearest codeword. Parallelism is spent *inside* one distance computation: all
16 components are subtracted and squared at once, and the squares are summed
in one adder tree. The codebook itself is walked sequentially, one codeword
per clock, because 32 copies of the distance datapath would be far larger.
Once all 32 distances are stored, a tree of magnitude comparators picks the
smallest one and its index.

Training the codebook (K-means / LBG) is not part of this hardware: a
codebook computed elsewhere is written in through a load port.

## Structure

```
                 cb_we/cb_waddr/cb_wdata
                          |
                 +------------------+        codeword (16 x 8 bit)
  code_selection | codebook_storage |-----------------------+
  counter ------>|  32 x 128 bit    |                       v
     |   count   +------------------+   in_vec --> +-------------------------+
     |                                  (latched)  | euclidean_distance_unit |
     |                                             | 16 x subtractor         |
     |                                             | 16 x squaring_unit      |
     |                                             | adder_array (tree)      |
     |                                             +-------------------------+
     |                                                          | squared distance (20 bit)
     |   write select   +----------------------------+          |
     +----------------->| temporary_distance_storage |<---------+
                        | 32 x 20-bit registers      |
                        +----------------------------+
                                     | all 32 in parallel
                        +----------------------------+
                        | distance_comparison_unit   |--> min_index, min_dist
                        | 31 x magnitude_comparator  |
                        +----------------------------+
```

| Module | Role |
|---|---|
| `vq_encoder_top` | wires the blocks together, latches the input vector, sequences start/done |
| `codebook_storage` | 32 x 128-bit memory, combinational read, synchronous write port |
| `code_selection_counter` | 5-bit scan counter; addresses the codebook and the distance registers |
| `euclidean_distance_unit` | one subtractor and one squarer per component, then `adder_array` |
| `subtractor` | `a - b` of two unsigned bytes as a 9-bit signed value |
| `squaring_unit` | square of a 9-bit signed difference (16-bit result) |
| `adder_array` | balanced adder tree summing the 16 squares into 20 bits |
| `temporary_distance_storage` | one distance register per codeword |
| `distance_comparison_unit` | binary tree of comparators over the 32 registers |
| `magnitude_comparator` | one tree node: passes the smaller distance and its index |
| `vq_pkg` | default sizes and the width formulas |

## The distance

For input vector `v` and codeword `c`, each of 16 unsigned bytes, the unit
computes `D = sum_k (v[k] - c[k])^2`. The square root of the true Euclidean
distance is never taken: it is monotonic, so the codeword with the smallest
`D` is also the nearest one. Widths are chosen so nothing can overflow: a
difference is 9 bits signed, a square at most 255^2 = 65025 (16 bits), and the
sum of 16 squares at most 1 040 400 (20 bits, `2*COMP_W + clog2(VEC_LEN)`).

Byte 1 of a codeword or input vector is element 0 of the packed array
`logic [VEC_LEN-1:0][COMP_W-1:0]`, i.e. bits `[7:0]`.

## Timing of one search

One codeword is handled per clock. The whole path from the counter through
the codebook read, subtractor, squarer and adder tree into a distance register
is combinational within one cycle, so it sets the clock period. The comparison
tree gets a cycle of its own after the scan.

```
edge      0        1        2     ...    32        33
start     ^ sampled (in_vec latched)
count        0        1        2  ...  31
writes            dist[0]  dist[1] ... dist[31]
compare                                   tree -> result register
done                                               ^ pulse, min_index valid
```

* Latency: 33 clock edges from the edge that samples `start` to `done`
  (`NUM_CODES + 1`).
* Throughput: a new `start` is accepted in the last scan cycle, so vectors
  can follow each other every 32 cycles (`NUM_CODES`). The comparison of one
  vector then overlaps the first scan cycle of the next; this is safe because
  the tree reads the distance registers on the same edge on which the new
  scan writes its first one.
* `busy` is high while a `start` would be ignored: during a scan except its
  last cycle. A `start` while `busy` is ignored, and `in_vec` may change freely
  after the start edge.
* `min_index` and `min_dist` hold their value until the next `done`.
* With a 160 ns cycle, the delay reported for the original gate-level FPGA
  implementation, 32 cycles are 5.12 us per vector.

## Ties

When two codewords are equally near, the lower index wins. Each comparator
lets its `a` input win on equality, and the tree always feeds the
lower-numbered half into `a`. For a `NUM_CODES` that is not a power of two the
tree is padded with the largest distance, which therefore can never win.

## Loading the codebook

`cb_we`, `cb_waddr`, `cb_wdata` write one codeword per clock. The codebook
must not be written while a scan is running (an assertion in the top checks
this); writing between searches is fine. Memory contents are not reset.

## Parameters

`vq_encoder_top` has three parameters; the defaults are the sizes of the
original design.

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_CODES` | 32 | codewords; the index is `clog2(NUM_CODES)` bits |
| `VEC_LEN` | 16 | components per vector (a 4x4 pixel block) |
| `COMP_W` | 8 | bits per component |

All blocks are written for any positive sizes. Throughput is one vector per
`NUM_CODES` cycles, so a codebook of 256 entries (as used in typical image
VQ) would take 256 cycles per vector and 256 distance registers.

## How this differs from the original description

The original design was drawn as a gate-level schematic for an FPGA, and
its description names the blocks and their roles but leaves the following
open. The choices made here:

* Start/busy/done sequencing, latching of the input vector, and the overlap
  that gives one vector per 32 cycles.
* The codebook write port.
* The read of the codebook is combinational; the distance registers are
  written on the clock edge; the comparison tree has its own cycle (the
  original only says the comparison starts after all distances are stored).
* Unsigned components; 9-bit signed differences; squarers built as a
  magnitude times itself; a balanced adder tree.
* Lowest index wins a tie.
* `min_dist` is an extra output.
* Active-low asynchronous reset; the distance registers reset to the largest
  value.
* The arithmetic is written behaviourally and left to synthesis, not built
  from gates, so the 160 ns path delay of the original is not reproduced or
  checked here.

Not included: codebook training (K-means), the VQ decoder (a table lookup from
index to codeword), and the software SIMD version of the distance that the
original work compares this hardware against.

## Simulating

Every module has a self-checking testbench in `tb/`, named `tb_<module>`,
that prints `TB_RESULT checks=N failures=M` and ends. For example, with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vq_pkg.sv \
    tb/tb_vq_encoder_top.sv --top-module tb_vq_encoder_top
./obj_dir/Vtb_vq_encoder_top
```

`tb_vq_encoder_top` runs the top at its default size. It loads random,
clustered and all-zero codebooks, encodes about a hundred vectors and
compares each result with a software search. It checks the 33-cycle latency
and the 32-cycle spacing of back-to-back results. It also counts these cases
and fails if any never happens: ties, exact matches, a minimum at the first
and at the last codeword, the largest possible distance, starts ignored
while busy, `in_vec` changing during a scan, and back-to-back starts. The
block testbenches are exhaustive where that is cheap (all byte pairs for
`subtractor`, all differences for `squaring_unit`) and random otherwise.
The adder and comparison trees are also run at a size that is not a power
of two.

`tb_vq_image_workloads` (with its helper `vq_image_runner`) exercises the
encoder at the sizes used in typical image-coding experiments, by overriding
the top's parameters: 256 codewords of 2x2 blocks, 1024 codewords of 2x2
blocks, and 256 codewords of 4x4 blocks. Each encodes every block of a
128x128 tile of a synthetic image against a codebook drawn from that tile,
checks every index and distance against a software search, and checks the
rate of one block per `NUM_CODES` cycles. A full 512x512 image would take
65 536 blocks x 1024 cycles in the largest case, which is why a tile is used.
