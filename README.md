# Unsupervised spike sorter with a histogram front end and a grid-cell CAM

An implanted neural recorder sees, on every electrode, spikes from a handful of
neurons. Sending every spike waveform off the implant costs power; sending only
"which neuron fired" costs three or four bits. This accelerator learns the
neurons of one channel without supervision and then labels each incoming spike
with a 3-bit cluster index and a valid bit.

Each spike is reduced to two 6-bit features: its **peak** voltage and its
**hyperpolarisation** (after-trough) voltage. The algorithm never stores spikes.
It works in four phases that a host drives over a small memory-mapped bus:

1. **Density estimation (ker).** Every spike adds one to the histogram bin of
   its peak value and one to the bin of its hyperpolarisation value. Both
   features share **one** 64-bin histogram. This works only if the two features
   fall in different parts of the 6-bit range, e.g. peaks in the upper half and
   hyperpolarisations in the lower half. A histogram with coarse bins acts as a
   cheap smoothing kernel.
2. **Laplace pass.** The histogram is convolved with `[-1, 2, -1]`. A bin is
   *informative* when `2*F(i) > F(i-1) + F(i+1) + 8`, meaning it sits on the
   concave top of a mode. In every gap between two informative regions, the
   bin with the lowest count becomes a **boundary**. Up to 7 boundaries split
   the shared axis into 8 regions. A spike's two region indexes, 3 bits each,
   name its **grid cell**.
3. **Training.** Spikes are replayed. A spike counts only if both its features
   lie in informative bins. Its grid cell is looked up in an 8-entry CAM: a known
   cell is strengthened, an unknown cell takes a free entry. Now and then the
   host adds a *leak* to an update, which weakens every cluster. Cells that
   stop being hit fall back to Free.
4. **Sorting.** Each spike's grid cell is compared with all learnt clusters. The
   spike goes to the matching cluster, or else to a cluster in an adjacent cell.
   A cell counts as adjacent when it differs by one region on one or both axes.
   The closest such cluster wins. If no cluster is that close, valid stays low.

All sizes are parameters whose defaults are the ones above: 64 bins of 16
bits, 7 boundaries, 8 clusters, Laplace offset 8.

## Bus interface (`spikesort_top`)

The bus is 16 bits wide. A write carries the features in `writedata`: the peak in
bits 13:8 and the hyperpolarisation in bits 5:0. The **word address** says what
to do with them:

| address bit | meaning on write                      | host value |
|-------------|---------------------------------------|-----------|
| 0           | clear: zero the histogram             | 1         |
| 1           | laplace                               | 2         |
| 2           | update: train the CAM with this spike | 4         |
| 3           | leak (only together with update)      | 12 with update |
| 4           | ker: add this spike to the histogram  | 16        |
| none of 4:0 | sort this spike                       | 0         |

Reads are combinational from registers:

| readdata | content |
|----------|---------|
| [2:0]    | cluster index of the last spike |
| [3]      | `fin`: clear/ker/laplace finished. It stays high until a read acknowledges it |
| [4]      | valid: the last sorting spike found a cluster |
| [7:5]    | 0 |
| [15:8]   | with read address bit 5 set: CAM occupancy (one bit per entry); otherwise the number of valid boundaries |

A host sequence is:

1. `clear`, then poll until `fin`.
2. Send `ker` per spike and poll until `fin` each time.
3. Send `laplace` and poll until `fin`.
4. Send `update` per spike, or `update+leak` for every 128th spike. No polling
   is needed: a spike can be written every cycle.
5. Sort: write with address 0, then read the index and valid.

A command is taken only while the distribution controller is idle. The read
that sees `fin` also returns the controller to idle.

### Timing

Counted from the rising edge that registers the bus write:

| operation | cycles |
|-----------|--------|
| ker | `fin` after 5 edges: 1 for the command strobe, then 4 memory cycles (read/write of the peak bin, read/write of the hyperpolarisation bin) |
| ker with overflow | each halving pass adds 2 x 64 cycles |
| clear | 1 + 64 |
| laplace | 1 + 66 |
| sorting, index | on `readdata[2:0]` after 3 edges |
| sorting, valid | on `readdata[4]` after 4 edges, one cycle after the index |
| training | CAM updated at the 2nd edge |

Index and valid hold until the next spike. Valid drops when the next spike is
written and stays low for training and ker spikes.

## The distribution memory and its controller (`distr`)

`distr` owns four things:

- the histogram RAM, `distr_mem`, with a registered read;
- the informative mask, `fis_mem`: a 64-bit shift register with two
  asynchronous 64:1 read multiplexers;
- the boundary registers, `segs_mem`: 7 x 6-bit shift registers, each with a
  valid bit;
- the controller, one FSM with the states IDLE, RD_P, WR_P, RD_H, WR_H, OVF_RD,
  OVF_WR, CLR, LAP and FIN.

**Overflow.** A 16-bit bin can fill up. A read of 65534 or more means the value
written back reaches 65535. Whenever that happens, the controller walks the
whole RAM and halves every bin: 64 read/write pairs. The counts stay in
proportion, and recent spikes weigh more than old ones. If the overflow came
from the peak update, the hyperpolarisation update is done after the pass.

**Laplace pass.** The RAM is read once per bin, from bin 0 upward. A two-word
window (`prv2`, `prv1`) plus the word just read make up the triple
`F(i-1), F(i), F(i+1)`. Bins outside the RAM count as 0. The bin under test is
always two behind the read address, so the pass takes 64 + 2 cycles. In every
cycle of the pass:

- the informative bit of bin *i* is shifted into `fis_mem`; after 64 pushes,
  bit *i* belongs to bin *i*;
- the same bit, with the bin's count and address, goes to `boundary_fsm`.

The boundary registers are emptied when the pass starts.

## Finding boundaries (`boundary_fsm`)

This is the part whose behaviour is least obvious from the outside.
`boundary_fsm` walks the informative bits in bin order through four states:

- **STANDBY**: idle.
- **FT**: before the first informative bin. Gaps here never make a boundary.
- **PK**: inside an informative region, a mode.
- **TR**: in a gap after a mode. On entry it records the count and address of
  the first gap bin. Later bins replace that record only with a strictly lower
  count, so on a tie the first lowest bin wins.

When an informative bin ends a TR gap, the recorded address is pushed into the
boundary registers, one cycle later. A gap that runs into the last bin is
dropped.

Pushes enter `segs_mem` at the top entry (6) and shift down. A 1 shifts into
the valid vector at the same time. After *k* pushes, entries 7-k..6 hold the
boundaries in increasing order. If more than 7 are found, the lowest ones fall
out.

`region_find` gives the region index of a feature: compare it with all 7
entries at once (`feature >= boundary`), mask the comparisons with the valid
bits, and add up the ones that remain. A feature equal to a boundary belongs to
the upper region. `gridfind` uses two `region_find` units on the same boundary
set to make the grid cell `{p, h}`.

Consequence for capacity: *N* neurons with distinct peak modes and distinct
hyperpolarisation modes produce 2N modes on the shared axis. Those need 2N-1
boundaries, so with 7 registers up to 4 such neurons can be separated.

## The cluster CAM (`cam_cluster`, `cam_entry`, `bimodal`, `vac`)

Each of the 8 entries holds a grid cell and a 2-bit usefulness state:

```
Free(0) --alloc--> Outlier(1) --hit--> Weak(2) --hit--> Strong(3)
        <--leak--             <--leak--        <--leak--
```

These moves happen only on update cycles. A miss holds the state. When hit and
leak come together, leak wins. A Free entry never matches.

On an update with an informative spike:

- every occupied entry with the same cell is strengthened;
- if no entry matches, the vacancy tracker `vac` gives the cell to the lowest
  free entry, which starts as Outlier;
- if the CAM is full, the cell is dropped.

A leak lowers every occupied entry by one step. A true cluster, hit many times
between leaks, stays near Strong. A stray cell is vacated at the next leak
unless it was hit again.

For sorting, `grid_adj` compares the spike's cell with each entry. An entry is a
candidate when it is occupied and each axis differs by at most one region. Its
distance is the number of axes that differ (0, 1 or 2). Cells further away are
ignored, which keeps the distance at 2 bits.

## Closest-cluster tree (`wta`, `wta_node`)

Seven `wta_node` cells in a 4-2-1 tree reduce the 8 (valid, distance) pairs to
one. If both inputs of a cell are valid, the smaller distance wins, and input A
(the lower index) wins a tie. Otherwise the valid input wins. Each cell's
select bit steers the index bits coming from below, so the root gives the 3-bit
cluster index and `valid` = "some candidate exists". With no candidate the
index reads 0 and valid stays low.

## Pipeline (`gc`)

`gc` puts one register rank between each pair of blocks:

| stage | logic | registered at the end |
|-------|-------|-----------------------|
| A | `gridfind` | grid cell, informative flag, command bits |
| B | `cam_cluster` compare | candidate bits and distances; a training spike's CAM update takes effect at this edge |
| C | `wta` | index, winner flag |
| then | | valid, one cycle after the index |

A spike can enter every cycle. A training spike updates the CAM before the
next spike reaches the compare stage, so back-to-back training is exact.

## Module map

```
spikesort_top        bus registers, command strobes, read multiplexer
├── distr            histogram controller
│   ├── distr_mem    64 x 16 RAM
│   ├── laplace_cmp  2F(i) > F(i-1)+F(i+1)+offset
│   ├── boundary_fsm gap-minimum boundary finder
│   ├── fis_mem      informative mask, two 64:1 read ports
│   └── segs_mem     7 boundary registers with valid bits
└── gc               three-stage grid/cluster pipeline
    ├── gridfind     2 x region_find
    ├── cam_cluster  vac + 8 x cam_entry (grid_adj, bimodal)
    └── wta          7 x wta_node
spks_pkg             sizes, command bit positions, grid_t, use_t, cmd_t
```

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`. `tb/tb_ref_pkg.sv` holds the shared reference
models: the Laplace test, the gap search, the region count, grid distance, and
a CAM class. They are written independently of the RTL.

To run one testbench, for example the full system:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/spks_pkg.sv tb/tb_ref_pkg.sv tb/tb_spikesort_top.sv --top-module tb_spikesort_top
./obj_dir/Vtb_spikesort_top
```

`tb_spikesort_top` runs the whole flow at the default sizes, through the bus
only:

1. It drives one bin to full scale (about 33 000 ker commands) to force an
   overflow pass, then clears the histogram.
2. It runs density estimation, the Laplace pass, training with leaks and
   sorting over a synthetic recording: three neurons plus background spikes,
   14 822 spikes per phase, the recording length the original host program
   was written for.

The histogram, mask, boundary count, occupancy, every sort index and valid bit,
and the latencies are checked against the reference models. It also counts
each mechanism: overflow, clear, fin wait, allocation, hit, leak, vacate,
rejection of non-informative spikes, and exact, adjacent and failed sorts. A
mechanism that never happens counts as a failure. It takes a few seconds.

`tb_distr` runs with a 6-bit histogram word so that overflow happens often.
It checks every update's contents and its cycle count.

## Sizes and what fits

- **A recording of 14 822 spikes** (the size the reference host program is set
  up for) needs no overflow at all. Each spike adds at most 2 to one bin, and
  2 x 14 822 < 65 535.
- **Clusters:** 8 CAM entries cover the 1 to 6 neurons a channel typically
  picks up.
- **Boundaries:** 7 boundaries allow at most 4 neurons with fully distinct
  feature modes (see above).
- **Output:** index plus valid is 4 bits per spike.
- **Channels:** the design sorts one channel. Multi-electrode use would
  replicate it, which is not designed here.

## Where this RTL departs from the original design, or fills gaps

- **Clocking.** Everything runs on the rising clock edge with synchronous
  reset. The original used a split scheme, computing the next state on the
  falling edge with negedge flip-flops in the usefulness tracker, which came
  from an ASIC version.
- **Command strobes.** Commands are one-cycle strobes. The command register
  does not hold them, so a finished command cannot restart itself after `fin`
  is acknowledged.
- **Clear.** The original names a clear input but not what it does. Here it
  zeroes the histogram, takes 64 cycles and ends in `fin`.
- **Overflow during the peak update.** After the halving pass, the pending
  hyperpolarisation update is completed. It is not dropped.
- **Boundary FSM.** The crossing state of the original boundary FSM is folded
  into the gap-to-mode transition. The boundary registers are emptied at the
  start of each Laplace pass.
- **Boundary count.** Seven boundary registers are built: that is what the
  42-bit boundary bus and the 7 comparators per feature give. One figure of
  the original mentions 8 entries.
- **Training input.** Only informative spikes train: both features must be in
  informative bins. A leak acts only together with update.
- **Tie and full rules.** Leak beats hit. Ties in the tree go to the lower
  index. A new cell is dropped when the CAM is full. The lowest free entry is
  allocated first.
- **Sorting pool.** Sorting considers every occupied cluster, Outlier
  included.
- **Read data.** The positions of `fin` (bit 3) and valid (bit 4) follow the
  field order of the original read-data diagram. The original top-level code
  had the two bits the other way round. The original debug field showed the
  raw boundary valid bits, shifted left by one. Here it shows the boundary
  count in binary.
- **Command codes.** The address bits for laplace (2), update (4), leak (8)
  and ker (16) match the original top level. The original host program sent
  1 for ker, which that top level does not decode as ker. Here bit 0 is used
  for clear, which the original declares but never drives.
- **Latency.** The pipeline stages are this design's own. The CAM update
  comes 2 cycles after the write is registered. The original quotes a
  3-cycle delay for its own pipeline.
- **Not built.** The host processor, the vendor bus fabric and the driver
  software are outside this RTL. `spikesort_top` exposes a plain bus-slave
  port instead.
