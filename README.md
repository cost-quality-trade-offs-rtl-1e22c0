# Approximately repaired image memory

Cheap DRAM and STT-MRAM parts have many more hard faults than premium parts.
Repairing every faulty cell with spare rows and columns gets very expensive
at those fault rates. Image data does not need that: a wrong least
significant bit in a pixel byte is hardly visible, while a wrong most
significant bit is. This memory therefore repairs **approximately**. It
spends a small number of spare rows and columns on the faults that hurt most:
whole faulty rows, columns and clusters, optionally in the most significant
bit planes only. The isolated faults that remain are handled by
**bit-shuffling**. A byte that would sit on a faulty high-order cell is
stored rotated, so that its least significant bit lands in the faulty cell.

The RTL implements the hybrid scheme (limited redundant repair plus compressed
bit-shuffling) described in Fan, Sapatnekar and Lilja, *Cost-Quality
Trade-offs of Approximate Memory Repair Mechanisms for Image Data*. The same
module also covers the paper's other variants through parameters:

| scheme | parameters |
|---|---|
| hybrid redundant repair + compressed bit-shuffling (default) | `NFM>0`, `Q>0`, `SR`/`SC>0` |
| k-MSB redundant repair | `NFM=0`, `K<8`, `SR_LESS`/`SC_LESS` smaller than `SR`/`SC` |
| limited 2D redundant repair | `NFM=0`, `K=8` |
| compressed bit-shuffling alone | `SR=SC=SR_LESS=SC_LESS=0`, `Q>0` |
| uncompressed bit-shuffling (one shift value per byte) | `Q=0` |

## How a byte is laid out

The memory is made of `NUM_BANKS` banks (default 8), chosen by the bank
address. Each bank is one *mat* (`approx_repair_mat`) of `ROWS` lines of
`BYTES` bytes (default 128 x 16).

Inside a mat the bits of a byte are interleaved. Each bit position `p`
(0..7) has its own **bit-plane subarray** for each half of the lines. That
gives 2 x 8 = 16 subarrays of `ROWS/2` x `BYTES` one-bit cells. The line
address MSB picks the half. Bit `p` of the byte *as stored* goes to plane `p`
of that half.

Each subarray (`repair_subarray`) has its own spares:

* `SR` spare rows and a **row CAM** of `SR` entries, each holding the address
  of a subarray row it replaces;
* `SC` spare columns and a **column CAM** of `SC` entries, each holding the
  address of a column it replaces.

Both CAMs are searched with the access address on every access. On a row
match the bit comes from the spare row. On a column match it comes from the
spare column. Otherwise it comes from the main cells. A row match wins over a
column match. A redirected write does not touch the main cell.

**k-MSB skew.** Planes `8-K`..7 (the K most significant) get `SR`/`SC`
spares. Planes below get `SR_LESS`/`SC_LESS`, which may be 0. More repair
goes where it buys image quality. With the default `K = 8` every plane has
the same spares.

## Bit-shuffling

This is the least obvious part of the design.

**One byte.** Number a byte's cells by their significance: the n-th most
significant cell is cell `8-n`. Suppose a byte's most significant faulty cell
is the n-th. Storing the byte **rotated right by n** puts data bit 0 into cell
`8-n`. The fault now corrupts only the LSB. Reading rotates **left by n**
and restores the order. Example with n = 2 (cell 6 faulty):

```
data        d7 d6 d5 d4 d3 d2 d1 d0
stored      d1 d0 d7 d6 d5 d4 d3 d2     cell 6 holds d0
read back   rotate left by 2 -> d7..d0, with only d0 exposed to the fault
```

A shift value has `NFM` bits, so shifts go up to 2^NFM - 1. With `NFM = 3`
the seven top cells can be protected. A fault only in cell 0 needs no shift.
Other faults in the same byte move with the rotation and can land on other
data bits. The scheme protects the most significant fault only.

**Compression.** A shift value per byte costs `NFM` bits per 8 data bits.
Most bytes need no shift, so one shift value is shared by a group of
R = 2^`Q` bytes of a line. A `Q`-bit *position* field names the byte of the
group that the shift applies to. `shuffle_map` holds these two small arrays,
one entry per (line, group). On an access it is indexed by the line and by
`col >> Q`. If the stored position equals `col[Q-1:0]`, the stored shift is
used; otherwise the shift is 0. If two bytes of a group have faults, only one
can be protected.

**Choosing the entry.** `shuffle_encoder` turns the fault map of one group
(8 x R bits) into (position, shift). It takes the byte whose highest fault is
the most significant, and the lowest position on a tie. The paper leaves this
choice open. The mat runs the encoder on a `CFG_SHUFFLE` configuration write,
so a repair flow only has to hand over the faults that spares did not cover.

**Datapath.** A write looks up the shift and rotates `wdata` right
(`circular_shifter`, `LEFT=0`) before it reaches the planes. A read gathers
the 8 plane bits and rotates them left by the same shift (`LEFT=1`). Each
rotator is `NFM` layers of 8 two-input multiplexers.

## Hybrid operation and timing

The CAM searches, the shift lookup, the cell read and both rotators are
combinational within the access cycle, in parallel. The paper argues their
delay is small next to the array access time. Accesses:

* `req=1, we=1`: `wdata` is written at the clock edge.
* `req=1, we=0`: `rdata` and `rvalid` appear after the next clock edge, so a
  read returns one cycle later. One read per cycle is supported. With each
  read, `r_row_spare`, `r_col_spare` and `r_shifted` report whether a spare
  row, a spare column or a rotation was involved.

At the top level the read data comes from the bank registered with the
request, so the address bus may move on right away.

## Programming the repair

Spare allocation, such as essential-spare-pivoting redundancy analysis, and
the memory test that finds faults run off line. Neither is part of this RTL.
The results enter through the configuration port, one write per cycle:

| `cfg_op` | effect | fields used |
|---|---|---|
| `CFG_ROW_CAM` | spare row `cfg_idx` of subarray (half = `cfg_row` MSB, plane `cfg_plane`) replaces row `cfg_row` | `cfg_valid` enables, 0 releases |
| `CFG_COL_CAM` | spare column `cfg_idx` of that subarray replaces column `cfg_col` | as above |
| `CFG_SHUFFLE` | shuffle entry of line `cfg_row`, group `cfg_col >> Q` computed from `cfg_fmask` | `cfg_fmask[b][p]` = cell p of byte b of the group is faulty and not spared |

After reset all CAM entries are invalid and all shifts are 0, so the memory
behaves as an unrepaired array. Spare cells hold data only after a write, so
write the data after programming the repair.

## Cell model and fault injection

`cell_array` is a **behavioural model** of the 1T1C DRAM or 1T1MTJ STT-MRAM
cells of one subarray. It stands in for the process-specific array and its
decoders, column multiplexers and sense amplifiers. It is written as
synthesizable code but is not meant as product logic. The `flt_*` port marks a
cell faulty: it then always reads `flt_val`. This covers stuck-at faults and,
for repair purposes, the other hard-fault types (stuck-open, transition,
coupling, read-disturb, incorrect-read): only the presence of a fault
decides the repair. Faults are cleared by reset. Spare cells and the shuffle
metadata are modelled as fault-free.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NUM_BANKS` | 8 | banks (top only) |
| `ROWS` | 128 | lines per mat, M (two halves of M/2) |
| `BYTES` | 16 | bytes per line, N/W |
| `NFM` | 3 | shift-value bits, n_FM (0 = no bit-shuffling) |
| `Q` | 2 | group size R = 2^Q bytes per shift value (0 = uncompressed) |
| `K` | 8 | planes with `SR`/`SC` spares |
| `SR`, `SC` | 2, 2 | spare rows / columns per subarray of those planes |
| `SR_LESS`, `SC_LESS` | 1, 1 | spares of the other planes |

The paper evaluates n_FM = 1, 2, 3 and an 8-bank DDR3 part. Mat size, group
size and spare counts have no published numbers; the defaults above are this
design's choices. The default memory holds 8 x 16 Kbit = 16 KiB. That is far
below the 1 Gbit DDR3 and 16 Mbit STT-MRAM parts the paper evaluates; grow
`ROWS`, `BYTES` and `NUM_BANKS` for more.
Constraints: `ROWS` and `BYTES` powers of two, `ROWS >= 4`, `BYTES >= 2^Q`,
at most 16 spares of each kind per subarray (`CAM_IDX_W`).

## Differences from the published scheme

* A bank is a single mat. Subbanks and several mats per bank are not
  modelled. Only one bank is accessed per cycle.
* The read path uses one left rotator and the write path one right rotator,
  each `NFM` layers. The paper counts a single shifter of `NFM + 1` layers.
* Spares and shuffle metadata cannot be faulty in the model. In the paper
  faulty spares are simply not used.
* Redundancy analysis, the memory test and the transistor-level periphery
  are not implemented. The configuration port takes their results.
* One passage of the paper says stored data is rotated *left*. The worked
  example and the goal (LSB into the faulty cell) require a *right* rotation
  on writes, and that is what is built.

## Files

`rtl/repair_pkg.sv` (shared constants and `cfg_op_e`),
`rtl/circular_shifter.sv`, `rtl/repair_cam.sv`, `rtl/cell_array.sv`,
`rtl/repair_subarray.sv`, `rtl/shuffle_encoder.sv`, `rtl/shuffle_map.sv`,
`rtl/approx_repair_mat.sv`, `rtl/approx_mem_top.sv` (top).
Each block has a self-checking testbench `tb/tb_<module>.sv`.

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog turns a hang into a failure. For example:

```
verilator --binary --timing --assert -y rtl rtl/repair_pkg.sv \
    tb/tb_approx_mem_top.sv --top-module tb_approx_mem_top -Mdir obj
./obj/Vtb_approx_mem_top
```

What the testbenches establish:

* `tb_circular_shifter`: all 256 values x all amounts, both directions and
  the round trip.
* `tb_repair_cam`, `tb_shuffle_map`, `tb_shuffle_encoder`, `tb_cell_array`:
  each against an independent reference. The map is tested compressed and
  uncompressed. The encoder gets exhaustive single faults plus random maps.
* `tb_repair_subarray`: row, column and scattered faults with 2+2 spares and
  with 0+1 spares. Checks the bits read and the hit flags.
* `tb_approx_repair_mat`: the same faults in the hybrid, k-MSB and
  shuffle-only configurations. Reads are checked cycle by cycle, with the
  one-cycle latency, against a bit-level model.
* `tb_approx_mem_top`: the full default size, 8 banks, with row, column,
  cluster, unspared-column and random faults per bank. A simple repair flow
  programs the memory, then all 16 KiB are written and read round-robin
  across banks. The test requires spare-row reads, spare-column reads,
  rotations, approximate results, hidden faults and bank switches all to
  occur. It runs in about a second after a short build.

### Fault-rate study

`tb/tb_fault_rate_workload.sv` repeats the paper's fault-rate experiment on
the full-size memory, on random byte data rather than a JPEG image. It runs
P_cell = 0.1, 0.25, 0.5 and 0.75 %, with a binomial fault count. Faults are
1 % row faults, 10 % column faults, 2 % 2x2 clusters and 87 % single cells.
The same fault map goes into two memories:

* the default hybrid memory;
* a k-MSB memory with no shuffling: 4+4 spares on the top two planes and
  1+1 on the rest.

A greedy repair flow programs both memories. Every read is checked against
the bit-level model, and the PSNR of the read-back bytes is reported. The
test fails unless both repaired memories beat the unrepaired array. One run
gave:

| P_cell | faults | unrepaired | hybrid | k-MSB |
|---|---|---|---|---|
| 0.10 % | 124 | 28.5 dB | 74.1 dB | 37.1 dB |
| 0.25 % | 312 | 27.6 dB | 54.1 dB | 34.4 dB |
| 0.50 % | 660 | 24.0 dB | 48.1 dB | 31.5 dB |
| 0.75 % | 992 | 19.9 dB | 36.9 dB | 29.9 dB |

These numbers describe this memory size, these spare counts and this
allocation flow. They are not the paper's results, which use essential spare
pivoting, tuned spare counts and JPEG images.

Synthesis note: the cell model, CAMs and shuffle map reset or inject per
cell, so generic synthesis maps much of the storage to flip-flops. A real
part would use memory macros for the cells.
