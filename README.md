# Connected component labeling on a four-PE linear array

This RTL labels the connected components of an N×N image (binary or
multi-level) using only four processing elements (PEs). Its run time does not
depend on the image: N²+6N−4 clock cycles, 17 148 cycles for the default
128×128 image (0.857 ms at a 50 ns clock).

Two pixels belong to the same component when they have the same value and
touch, diagonals included (8-neighbourhood). Every pixel ends up with the label
`y*N + x` of its component's first pixel in raster order. Rows `y` and columns
`x` are counted from 1. Background pixels are labelled too: value 0 is a value
like any other.

The design is a hardware version of the classic two-scan method that keeps one
small equivalence table per row. Its new idea is to scan several rows at once:

* Rows are handed out to the PEs in turn. In each pair of PEs, the second PE
  starts its row only two pixels behind the first.
* The first PE of a pair sends every label equivalence it finds to the second
  PE, as it finds it. Both rows can therefore be merged at the same time.
* Two pairs work in a staggered way, so that all four PEs stay busy.

## Files

| file | what it is |
|---|---|
| `rtl/ccl_pkg.sv` | pass codes, event struct, label width and cycle-count functions |
| `rtl/ccl_top.sv` | the array: controller, image buffer and four PEs in a ring |
| `rtl/ccl_controller.sv` | forward/backward stage sequencing, table clears, start/busy/done |
| `rtl/skew_sequencer.sv` | skewed row/column schedule of one PE |
| `rtl/image_buffer.sv` | pixel values plus label map, one read and one write port per PE |
| `rtl/pe.sv` | processing element |
| `rtl/connectivity_logic.sv` | the label decision for one pixel (CL) |
| `rtl/label_eq_table.sv` | CAM equivalence table with parallel search / multiple update |
| `rtl/rsr.sv` | relabel shift register |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus end-to-end tests |

## The four passes

Each image row goes through four passes, one pixel per clock in each pass.

| pass | stage | rows go | what happens to a row |
|---|---|---|---|
| 1 (merge) | forward | top to bottom | label each pixel from its left neighbour and the three neighbours above; record equivalences |
| 2 (relabel) | forward | top to bottom | rewrite the row's labels through the row's equivalence table |
| 3 (merge) | backward | bottom to top | combine each pixel's forward label with its left neighbour and the three neighbours below; record equivalences |
| 4 (relabel) | backward | bottom to top | rewrite the row's labels through the table |

**Pass 1.** Let A be the set of earlier neighbours that have the pixel's
value. If A is empty, the pixel gets the new label `y*N+x`. Otherwise it gets
the smallest label in A. If A holds two different labels, the pair
(L-old = larger, L-new = smaller) is added to the table.

**Pass 3.** This pass works the same way. The difference is that the pixel's
own label from the forward stage also takes part in the minimum.

**Why four passes are enough.** New labels grow in raster order, so the first
pixel of a component has the smallest label in it.

1. After the forward stage, all pixels in the bottom row of a component carry
   that smallest label. This is because each row's table joins everything
   connected through the rows above it.
2. The backward stage carries this label upwards. Take a pixel in row `y` of a
   component that continues below row `y`. It reaches the rows below through
   some pixel of row `y` that has the same forward label. That pixel touches a
   row-`y+1` pixel that already has the final label, so the table joins the
   two.

## The schedule

In the forward stage, PE *i* (1–4) handles rows `i+4j`. In the backward stage
it handles rows `N+1−i−4j`. Within a stage, row `j` of each PE starts at a
fixed offset:

| PE | start of its j-th row |
|---|---|
| PE1 | 2j(N+4) |
| PE2 | 2j(N+4)+2 |
| PE3 | (2j+1)(N+4) |
| PE4 | (2j+1)(N+4)+2 |

A row uses 2N consecutive cycles: N cycles of merge, then N cycles of relabel.

**Pairs.** PE1/PE2 form one pair and PE3/PE4 the other. The second PE of a
pair merges its row two pixels behind the first PE. It reads the first PE's
provisional labels and receives its equivalences.

**Handover between pairs.** PE3 starts N+4 cycles after PE1, which is two
pixels behind PE2's relabel pass. PE3 therefore reads PE2's final labels. In
the same way, PE1's next row reads PE4's final labels.

So every PE always reads the output stream of the PE before it in the ring
(PE1 reads PE4), two cycles late:

* the value and label of P(x+1, y−1) arrive while P(x, y) is processed;
* P(x, y−1) and P(x−1, y−1) come out of two delay stages;
* P(x−1, y) comes back from the PE's own output register.

**Cycle count.** One stage takes
2N + 2(N−1) + (N/2−1)·N = N²/2 + 3N − 2 cycles, where:

* 2N is the first row's two passes;
* 2(N−1) is the skew of two cycles per row;
* (N/2−1)·N covers the remaining row pairs, N cycles each.

The backward stage starts right after the forward stage, so the whole
operation takes N²+6N−4 cycles. `ccl_controller` issues pixels for exactly
that many cycles. Each PE processes a pixel in the cycle after it is issued.

## Inside a PE

Each processing cycle the PE does the following:

* **Port 1.** It takes P(x,y) and its stored label from the image buffer. The
  stored label is the forward label in Pass 3, and the Pass 1/3 label in the
  relabel passes.
* **Port 2.** It takes P(x+1,y−1) and the previous PE's equivalence.
* **Delay line.** Two relabel shift registers (`rsr`) delay the Port 2 stream.
  Each stage rewrites a label that equals the L-old the PE found one cycle
  earlier.
* **Resolve.** It looks up all five labels in its equivalence table: four
  neighbours plus the pixel itself.
* **Decide.** It applies the connectivity logic.
* **Output.** It registers the value, label and equivalence for the next PE,
  and writes the label to the image buffer.

Neighbours outside the image get a border value. This value is one bit wider
than a pixel and never equals a real pixel. The `SEND_EQ` parameter sets the
PE's role in its pair. PE1 and PE3 send their equivalences. PE2 and PE4 add
the equivalences they receive to their own table.

### Labels that are still in flight

This is the subtle part of the design. The second PE of a pair reads its
partner's labels before the partner has finished merging them. Suppose the
partner later finds that label 17 equals label 5. Copies of 17 are then
already waiting in the second PE's delay line, or stored in its table.

This implementation keeps them correct with three rules:

1. **Flat table.** Every record in the table points straight at a root
   label. A single CAM search therefore gives the final answer.
2. **Resolve on use.** Every neighbour label is resolved through the table
   in the cycle in which it is used, not when it enters the PE. The
   equivalence arriving from the partner in that same cycle is applied on top
   of the lookups (forwarding).
3. **Union of roots.** Before an equivalence is stored, both of its labels
   are resolved. The larger root becomes L-old. Every record whose L-new
   equals that L-old is rewritten in the same cycle (the parallel search /
   multiple update, PSMU), and the new record is appended. Two such updates
   happen per cycle: the received one first, then the PE's own.

With these rules, the four neighbours of a pixel never fall into more than two
classes, so one equivalence per pixel is enough.

* **Forward stage.** The left neighbour was already joined with the upper-left
  one in the previous cycle.
* **Backward stage.** The neighbours below either already hold the final label
  or share one forward label.

The testbenches check this on random images, with a full comparison against
a flood fill.

### Equivalence table

`label_eq_table` is a CAM of `DEPTH` records. Each record holds
(L-old, L-new) and a fill counter tracks how many are in use. A lookup returns
the L-new of the record whose L-old matches; a label without a record is its
own root.

The table is emptied when the first PE of the pair starts a merge pass. From
then on it serves one row of the first PE, or two rows of the second PE. A PE
records at most one equivalence per pixel. The second PE of a pair also stores
every equivalence it receives from its partner. So N records always suffice in
PE1/PE3, and 2N always suffice in PE2/PE4. These are the defaults
(`TBL_DEPTH_ODD` = N, `TBL_DEPTH_EVEN` = 2N).

The larger table matters in practice. With N records in PE2/PE4, a search over
small images found rows that need about 1.2N records (18 at N=16, 38 at N=32).
Test image 11 in the end-to-end testbenches is built from such a pattern. At
N=16 it needs 18 records in PE4, and at N=128 it needs 144. The other 23
full-size test images peak at 126 records (the checkerboard).

If a table is made smaller than these bounds and runs out, the extra records
are dropped and the sticky `overflow` flag rises. The labels of that run must
then be discarded.

## Interface of `ccl_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `ld_we`, `ld_addr`, `ld_pix` | in | write a pixel value (its label is cleared); address `(y−1)*N+(x−1)` |
| `hr_addr` → `hr_pix`, `hr_lbl` | in → out | read value and label, one cycle latency |
| `start` | in | one-cycle pulse, accepted when not `busy` |
| `busy` | out | high from the cycle after `start` through the last processing cycle |
| `done` | out | one-cycle pulse right after the last processing cycle |
| `overflow` | out | an equivalence table dropped a record during this run |
| `pe_ev[3:0]` | out | per-PE event flags (`pe_events_t`): active, new_label, merge, received, relabel, rsr_hit |

To run an operation:

1. Load all N² pixels.
2. Pulse `start` and wait for `done`. This takes N²+6N−2 cycles after the
   `start` cycle.
3. Read the label map.

The load and read ports must stay idle while `busy` is high.

**Parameters** (defaults in brackets):

* `N` (128): image side. It must be a multiple of 4.
* `PIX_W` (8): pixel width.
* `TBL_DEPTH_ODD` (N): records per table in PE1 and PE3.
* `TBL_DEPTH_EVEN` (2N): records per table in PE2 and PE4.

The label width is `label_bits(N) = ceil(log2(N²+N+1))`, which is 15 bits for
N = 128.

**Size at the defaults** (coarse synthesis):

* about 23 000 word-level cells, most of them the CAM compare and update
  logic;
* 750 flip-flops;
* 400 k memory bits (399 872). Of these, 376 832 are the image buffer
  (16 384 words of 8+15 bits). The rest are the CAMs: 6N = 768 records of
  2×15 bits.

The CAMs synthesise as arrays with parallel compare logic.

## What follows the original architecture and what is this implementation's own

These parts follow the architecture:

* four PEs, the pair roles, the row assignment and the skew offsets;
* the four passes and their rules;
* the CL built from equal-compares, NOR, min/max comparators and an
  incrementing label generator;
* the two-stage RSR delay line;
* a CAM table with parallel search and multiple update;
* the stage length and the total cycle count.

These are this implementation's own choices:

* **Image buffer access.** The skewed input delay lines are replaced by per-PE
  read ports of the image buffer, driven on the same skewed schedule. Each PE
  sees the same data at the same time as with the delay lines.
* **Ring.** PE1 reads its previous row from PE4, which closes the ring.
* **Resolving labels.** Labels are resolved at use time, the partner's
  equivalence is forwarded into the lookups, and the table stores unions of
  roots (see above). The original resolves only the incoming Port 2 label and
  relies on the RSRs for the rest.
* **Pass 3 minimum.** The pixel's own label joins the minimum and maximum.
  When the row below is final, this gives the same result as the original
  rule.
* **Relabel passes.** Passes 2 and 4 always relabel through the table, never
  from the neighbours. The result is the same once the row's table is
  complete.
* **Label generator.** It steps every cycle, so that its value is always
  `y*N+x`.
* **Table records.** Records are kept only for real merges, never (L, L).
  There is an `overflow` flag.
* **Table size.** The original's sizing gives a pair of PEs 2N memory
  cells, i.e. N records per PE. Its per-pixel routine, however, makes PE2 and
  PE4 add their partner's records as well as their own. This
  implementation follows the routine and gives PE2/PE4 2N records, for 6N in
  all. N records can overflow there (see *Equivalence table*).
* **Control and interface.** The host interface, the start/busy/done
  handshake, synchronous buffer reads, reset behaviour, the 8-bit default
  pixel width and the per-PE event outputs are all this implementation's.

Not built: the FPGA prototype flow (a single-PE 8×8 build on a vendor FPGA).
The RTL is technology-independent.

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops with a
watchdog if it hangs. To build one with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/ccl_pkg.sv \
          tb/tb_ccl_full.sv --top-module tb_ccl_full -o sim
./obj_dir/sim
```

`-Wno-fatal` keeps the lint warnings of the testbenches (widths, blocking
assignments in monitors) from stopping the build. To run a block at another
size, change the `localparam`s at the top of its testbench.

| testbench | what it checks |
|---|---|
| `tb_ccl_full` | default size (128×128). Labels 24 images (patterns, one that needs more than N table records, random binary, three-level gray) and compares every pixel with a flood fill. Checks exactly 17 148 processing cycles per image, no overflow, and that every mechanism occurred. Runs in a few seconds. |
| `tb_ccl_top` | the same checks on 120 images at N=16. A second array with N-record tables in PE2/PE4 runs alongside. It must raise `overflow` on the table-filling image, and its labels are checked whenever it does not overflow. |
| `tb_ccl_n8` | the same checks on 120 images at N=8 |
| `tb_pe` | a PE pair against a union-find reference over three rows, in forward and backward passes. Also checks write timing and that equivalences are sent and received. |
| `tb_label_eq_table` | random unions and lookups against a class-minimum model, with clears and overflow |
| `tb_connectivity_logic` | random vectors against the pass rules |
| `tb_rsr` | the relabel shift register |
| `tb_image_buffer` | the buffer ports against a software copy |
| `tb_skew_sequencer` | every issued pixel against the offset table; each pixel issued once per pass |
| `tb_ccl_controller` | issue span, busy/done timing, table clears, pass order |

Development runs at N = 8, 16, 32, 64 and 128 all matched the flood-fill
reference on every pixel.

The simulator used has two-state logic. Everything that is read is either
reset or written before use.
