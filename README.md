# UPGMA tree builder for an FPGA accelerator card

UPGMA (Unweighted Pair-Group Method with Arithmetic means) turns a matrix of
pairwise distances between *n* taxa into a rooted, binary phylogenetic tree.
It repeats one step *n − 1* times: find the closest pair of clusters, join them
under a new node at half their distance, and replace the two by one cluster
whose distance to every other cluster is the size-weighted mean of the two old
distances. In software the two expensive parts are the search for the minimum
over all *m(m−1)/2* remaining pairs and the averaging that follows each merge;
the whole algorithm is O(n³).

This RTL is the processing element (PE) of a small PC-card accelerator that
does both parts in dedicated hardware. The host writes the distance matrix into
one memory bank on the card, starts the PE, waits for an interrupt and reads
the finished tree out of the other bank. At the default size the engine
handles up to 256 taxa, which is exactly what a full 256 × 256 matrix of 32-bit
words needs: the 64K words of one bank.

## Structure

```
              host (LAD port)                      F_Clk
                   │                                  │
          ┌────────┴────────┐                         │
          │     host_if     │ registers, irq, bank arbitration
          └──┬──────────┬───┘
   start/n   │          │ bank requests (engine's or host's)
          ┌──┴──────────┴───┐
          │   upgma_ctrl    │ pass sequencing, cluster slots
          └──┬──────────┬───┘
             │          │
     ┌───────┴──┐  ┌────┴──────┐
     │min_finder│  │ avg_unit  │ multiply-accumulate, size adder,
     └──────────┘  │ seq_divider│ divider
                   └───────────┘
   Left bank (distance matrix)      Right bank (tree)
```

| Module | Role |
|---|---|
| `upgma_pe` | Top. Wires the blocks below; ports to the two memory banks and the host bus. |
| `upgma_ctrl` | Controller: runs the passes, keeps the cluster table, drives both datapaths and the memory requests. |
| `min_finder` | One comparator and a register holding the smallest distance of a pass and its pair of slots. |
| `avg_unit` | Multiplier, numerator accumulator, denominator adder and a divider (`seq_divider`). |
| `seq_divider` | Restoring divider, one quotient bit per cycle. |
| `host_if` | Control and status registers, interrupt, and host access to the banks while the engine is idle. |
| `upgma_pkg` | Widths, the memory request struct, register map and tree layout. |

The memory banks, the bus bridge to the PC, the clock synthesizer and the
card's spare I/O connectors are board parts outside the FPGA. They appear only
as ports of `upgma_pe`. `tb/sram_bank.sv` is a behavioural bank model for
simulation.

## One pass of the engine

This is the part that takes most of the time and most of the logic. Each pass
merges one pair. It follows a fixed sequence of steps: fetch and compare every
distance, form the new cluster, check whether the tree is complete, average,
remove, repeat.

**Cluster slots.** The engine never moves matrix entries. Cluster *c* lives
in slot *c* (0 … n−1). Each slot has three fields: an `active` bit, a size
(how many taxa it holds) and the tree node id it stands for. At the start,
slot *s* is leaf *s* with size 1. When slots *a < b* merge, the new cluster
takes slot *a* and slot *b* is switched off. "Reducing the matrix by one"
therefore costs one cycle and no memory traffic. The cost is that later scans
spend a cycle stepping over each dead slot.

**1 – Minimum search.** The controller walks the upper triangle row by row,
*i < j*, over active slots only. For each pair it issues one read of D[i][j],
waits out the bank's read latency (4 cycles) and hands the word to
`min_finder`. `min_finder` stores the word and (i, j) when the word is strictly
smaller than what it holds. Among equal distances the first one in scan order
wins. UPGMA allows any pick among equal pairs, and this rule makes results
reproducible.

**2 – Form the cluster.** The minimum pair (a, b) with distance d becomes
internal node *n + m* (m = merge number). The engine writes two words to the
Right bank: the ids of the two children and d. The node's height is d/2. d is
stored instead of d/2 so that no bit is lost.

**3 – Done?** If only two clusters were left, this merge produced the root.
The engine writes the root word and stops.

**4 – Averages.** For every other active slot *l*, the engine reads D[a][l]
and D[b][l]. The two terms go through `avg_unit` one per cycle:

```
num = D[a][l]·|Ca| + D[b][l]·|Cb|       (one multiplier, one accumulating adder)
den = |Ca| + |Cb|                       (second adder, same cycles)
D[a][l] ← num / den                     (divider, 43 cycles at default widths)
```

The result is written back over D[a][l]. D[b][l] is never read again.

**5 – Remove.** Slot b is switched off, slot a takes the summed size and the
new node id, and the next pass starts.

Only the entry with the smaller slot index first is ever used, so the host
needs to write only the upper triangle.

### Number format

Distances are unsigned 32-bit integers, and the division truncates. For
fractional distances, scale them by a power of two before loading. The
results are then fixed-point with the same scale. For example, the test
scales the four-taxon matrix

```
 –  6  8  3
 6  –  7  9
 8  7  –  4
 3  9  4  –
```

by 256. The engine joins leaves 0 and 3 at distance 3 (node 4). It then joins
node 4 and leaf 2 at 6 (node 5). The root, node 6, joins node 5 and leaf 1 at
1877/256 ≈ 7.33, the exact value being 22/3.

The numerator needs DATA_W + CNT_W + 1 = 42 bits. The quotient never exceeds
the larger input distance, so it fits back into 32 bits.

## Memory and register map

The bank ports carry `upgma_pkg::mem_req_t` = {rd, wr, addr[18:0], wdata[31:0]}.
A write is done at the edge that samples it. Read data must be on `*_rdata`
at the RD_LAT-th rising edge after the edge that sampled the read (RD_LAT = 4).

| Bank | Word | Content |
|---|---|---|
| Left | `{i[7:0], j[7:0]}`, i < j | distance between taxa i and j. It is overwritten during a run. |
| Right | 0 | `{taxa count[31:16], root node id[15:0]}` |
| Right | 2 + 2m | merge m: `{child id[31:16], child id[15:0]}` |
| Right | 3 + 2m | merge m: merge distance (node height × 2) |

Node ids: leaves 0 … n−1, and internal node n + m for merge m. The root is
2n − 2.

Host side (`lad_space`, `lad_addr`, `lad_wr`/`lad_rd` strobes, `lad_rvalid`):

| Space | Address | Meaning |
|---|---|---|
| `SP_REG` | 0 `REG_CTRL` | bit 0 start (write 1), bit 1 interrupt enable, bits 24:16 taxa count |
| `SP_REG` | 1 `REG_STATUS` | bit 0 busy, bit 1 done, bit 2 interrupt pending. Write 1 to clear done or pending. |
| `SP_LEFT` / `SP_RIGHT` | word address | the banks, reachable while the engine is idle |

Register reads return after one cycle and bank reads after RD_LAT cycles. Keep
one read outstanding at a time. While the engine runs, it owns both banks.
Host bank writes are then dropped, and host bank reads return 0. A start
written while busy is ignored. A taxa count above N_MAX is treated as N_MAX.
With a count below 2, leaf 0 becomes the root. `irq` is high while the
interrupt is pending and enabled.

Typical host sequence: write D → write `REG_CTRL` = (n << 16) | 3 → wait for
`irq` (or poll `REG_STATUS`) → write `REG_STATUS` = 6 → read the Right bank.

## Timing

Memory reads are not overlapped: every distance read costs its full 4-cycle
latency. This read latency is what dominates run time. With m active clusters
and default widths, a pass costs about

```
(RD_LAT + 2) · m(m−1)/2            scan, 6 cycles per pair
+ one cycle per dead slot stepped over, plus one per row
+ (2·RD_LAT + 47) · (m − 2)        averages, 55 cycles each
+ 5                                 record writes, bookkeeping
```

`tb/upgma_ref_pkg.sv` holds the exact count, and the testbenches check it
cycle for cycle. Simulated busy cycles at the default configuration, one
random data set each:

| taxa | 10 | 16 | 32 | 50 | 64 | 100 | 128 | 175 | 200 | 256 |
|---|---|---|---|---|---|---|---|---|---|---|
| cycles | 3,253 | 10,791 | 64,424 | 210,394 | 410,110 | 1,420,471 | 2,839,887 | 6,947,654 | 10,184,351 | 20,771,259 |

Busy time depends on the data only through the pattern of dead slots the scan
steps over. In simulation, relabelling the taxa of one data set changed the
busy time by less than 1 % (for example 409,373 to 413,255 cycles at 64 taxa).

No clock frequency is fixed by this RTL. The board's host bus runs at 33 MHz,
and at that speed 256 taxa take about 0.63 s of engine time.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `N_MAX` | 256 | `upgma_pe`, `upgma_ctrl` | largest taxa count; 2·log2(N_MAX) address bits must fit in 19 |
| `RD_LAT` | 4 | `upgma_pe`, `upgma_ctrl`, `host_if` | bank read latency in cycles (≥ 1) |
| `DATA_W`, `ADDR_W` | 32, 19 | `upgma_pkg` | bank word and address widths |

The cluster table (active bits, 9-bit sizes, 10-bit node ids for 256 slots) is
held in flip-flops. That is about 5,200 of the 5,400 flip-flops of the top.

## Design decisions and limits

The following are not dictated by the UPGMA method or by the card. They are
choices of this implementation:

- **Ties:** among equal distances the first in scan order wins, not a random
  pick.
- **Arithmetic:** integer distances with a truncating divider. Outputs
  therefore match exact UPGMA only up to the chosen scale.
- **Reduction by slots:** the matrix is reduced by dead slots, not by
  compacting it. Memory layout, tree record format, register map and host bus
  protocol are all this design's own. The card's real local-bus protocol is
  vendor-specific and is not modelled, nor is its read-back path.
- **Plain addressing:** the matrix is addressed directly as `{i, j}`.
  256 taxa fill the Left bank exactly. No bank-sharing scheme for larger
  matrices is provided.
- **Record contents:** merge records carry the merge distance (twice the node
  height), not the height itself.
- **Card parts not in the RTL:** the card's I/O connectors and clock
  synthesizer have no counterpart in the RTL.

## Verification

Every testbench is self-checking, ends with a `TB_RESULT checks=… failures=…`
line, and has a cycle watchdog. `upgma_pe` also carries assertions on the
controller–datapath handshakes. They check that no divider start or
accumulation happens during a division. They also check that no tree record
is written without a stored minimum, and that no bank gets a read and a write
in the same cycle.

| Testbench | What it shows |
|---|---|
| `tb_min_finder` | 200 random streams with frequent equal values. Checks `take` every cycle and the stored minimum and pair after each stream. |
| `tb_avg_unit` | 500 random cases, including the largest distances and sizes. Checks numerator, denominator, quotient and the exact divider latency. |
| `tb_host_if` | bank access and read latency; arbitration while busy; start, status and interrupt behaviour |
| `tb_upgma_ctrl` | controller and datapath with bank models at N_MAX = 16. Runs 1, 2, 3 and 16 taxa, random sizes, tie-heavy matrices and clamping. Compares every tree record, read count, read latency and busy cycles with the reference model. |
| `tb_upgma_pe` | end to end through the host port at N_MAX = 32. Runs the four-taxon example against hand-worked values, then random runs. Counts each mechanism (new minimum, tie, skipped slot, read wait, average, interrupt, host access while busy, clamp) and fails if one never occurs. |
| `tb_upgma_full` | default parameters (256 slots). Runs 14 taxa counts from 10 to 256, loading and reading everything through the host port, in about 40 s of simulation. |
| `tb_upgma_permute` | default parameters. Runs three data sets each of 16 and 64 taxa, as generated and under nine random relabellings of the taxa. Checks every tree, checks that relabelling leaves the merge distances unchanged, and checks that busy cycles vary by less than 5 %. |

The reference model (`tb/upgma_ref_pkg.sv`) is a plain software UPGMA with
the same slot, tie and truncation conventions. It also generates the test
matrices from a linear congruential generator: values 1 … max_d, with one
value repeated at several positions so that ties occur.

Run one testbench with Verilator, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/upgma_pkg.sv tb/upgma_ref_pkg.sv tb/tb_upgma_pe.sv \
    --top-module tb_upgma_pe -o sim
./obj_dir/sim
```

Replace `tb_upgma_pe` with any other testbench name. `upgma_ref_pkg.sv` is
only needed by the controller and top-level tests. Lint the design with
`verilator --lint-only -Wall -Irtl -y rtl rtl/upgma_pkg.sv rtl/upgma_pe.sv`.
The remaining warnings are about unused status outputs of the datapath units
and unused package constants.
