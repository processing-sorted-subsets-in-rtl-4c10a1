# Sorted-subset accelerator: the largest and smallest items of a large set

Many data-analysis and control tasks need only the extremes of a large data
set: the L largest values, the L smallest values, or either of them taken
only from the values that fall between two bounds. Sorting the whole set in
software and then taking both ends costs O(N log N) time, even though L is much
smaller than N. This design does the job in programmable logic on a Zynq-7000
class device. The processor starts the accelerator. The accelerator then
streams the set from DDR memory, filters it, and keeps two small sorted
windows, the **maximum subset** and the **minimum subset**. After one pass over
the data it writes both windows back to memory. In a second mode, it instead
writes the filtered items themselves back to memory.

The whole system has three levels:

1. A host PC holds the data. It copies the set over PCI Express into the DDR
   memory of the board.
2. The ARM processor of the device runs the control software.
3. The programmable logic does the work.

This repository holds the programmable-logic part (level 3) as synthesizable
SystemVerilog, together with a small mailbox through which the host and the
processor signal each other. The PCIe bridge, the AXI interconnect, the DDR
controller and the processor are vendor parts. They are outside the RTL, and
the testbenches stand in for them.

## The idea: merging blocks into two sorted windows

The set arrives in **blocks** of up to K items (K = 256 by default). The
sorter keeps two register chains, each ordered by an iterative sorting
network:

```
 upper chain (LMAX + K registers, largest first)
 +---------------------------+------------------+
 | maximum subset  (LMAX)    |  block copy (K)  |
 +---------------------------+------------------+
 lower chain (LMIN + K registers, smallest first)
 +---------------------------+------------------+
 | minimum subset  (LMIN)    |  block copy (K)  |
 +---------------------------+------------------+
```

* **Init.** The maximum subset is filled with the smallest possible value
  (0). The minimum subset is filled with the largest (0xFFFF_FFFF). Any real
  item therefore displaces a fill value.
* **Per block.** All K items of the block are copied, in parallel, into the
  block part of both chains. Unused positions of a short block get the
  chain's fill value. Both networks then run until nothing moves. Large
  items rise into the maximum subset and small ones sink into the minimum
  subset. Whatever is left in the block part is discarded when the next
  block is copied in. Such an item was never among the L largest or the L
  smallest, so discarding it loses nothing.
* **End.** After the final block, `max_set[0..LMAX-1]` holds the LMAX largest
  items of the set in descending order, and `min_set[0..LMIN-1]` holds the
  LMIN smallest in ascending order.

Each chain has its own copy of the block, so one item can be a candidate for
both subsets at once. This matters when the set is small, and it keeps the
fill values of one subset from leaking into the other.

### The sorting network (`transposition_net`)

Each chain is an **even-odd transposition network**. Every neighbouring pair
of registers has a comparator that swaps the pair when it is out of order.
One clock applies two comparator levels:

* first the even pairs (0,1), (2,3), ...
* then the odd pairs (1,2), (3,4), ...

Only two comparators lie between register stages, so the logic stays shallow
and the clock can be fast. The same comparators are reused on every clock.

The network also gives a `moved` flag. It is computed combinationally and
says whether the next step would swap anything. When `moved` is low, every
pair is in order, so the chain is sorted. The merge therefore ends as soon
as the block has settled, and not after a fixed worst-case count.

Worst case: an item at the far end of the block must travel the whole chain,
two positions per clock. A merge thus takes at most about (L + K)/2 + 1
clocks. At the defaults this is 257 clocks for 256 new items.

A single request serves any subset size up to the capacity. The first L
entries of a sorted window of 256 are the L extremes of the set, so `LMAX`
and `LMIN` are capacities. The sizes Lmax and Lmin that software asks for
only select how many entries are written back.

## Filtering and the distributor (`block_loader`, `bound_filter`)

The HP port delivers 64-bit beats. The **distributor** splits each beat into
two 32-bit items, with the first item in bits 31:0. Each item passes a
**bound filter**:

* `item >= l` when the lower bound is enabled;
* `item <= u` when the upper bound is enabled;
* with neither bound enabled, every item passes.

Both bounds are inclusive and the comparison is unsigned.

An admitted item is written, with its write enable, into the input register
chosen by an **address counter**. The counter then advances by the number of
items admitted from that beat. Rejected items leave no gap, so filtering
happens on the fly while the data stream in, and the sorter only ever sees
admitted items.

A block is handed to the sorter in three cases:

* when K items are present;
* when the next beat would not fit (that beat is held back and starts the
  next block);
* after the final beat of the set.

The sorter copies the input registers in the cycle it accepts the block. The
loader therefore fills the next block while the sorter merges the previous
one, and data transfer overlaps with sorting. When the loader has a full
block and the sorter is still busy, the loader drops `in_ready`, and the HP
read channel waits.

## Moving data: the HP and GP ports

**`hp_control`** is an AXI3 master for one 64-bit HP port.

* **Reads.** It reads ceil(N/2) beats as INCR bursts of up to 16 beats. A
  burst never crosses a 128-byte line, and so never crosses a 4 KB page.
  Address requests run ahead of the data. R-channel beats go straight to the
  loader. `out_keep` masks the missing upper item of an odd-sized set.
* **Writes.** For each beat index the master asks the top level for the beat
  data, then writes it. A burst does not wait for the previous burst's
  response. `wr_done` pulses once every response has arrived.
* **Errors.** A response other than OKAY sets a sticky `error` bit, which
  software reads in STATUS.

**`gp_control`** is the register bank on the AXI GP port (AXI4-Lite). All
registers are 32 bits wide, at these byte offsets:

| offset | name      | meaning |
|-------:|-----------|---------|
| 0x00 | CTRL     | write bit 0 = start (ignored while busy), bit 1 = clear done / interrupt |
| 0x04 | STATUS   | bit 0 busy, bit 1 done, bit 2 bus error |
| 0x08 | MODE     | bit 0 apply lower bound l, bit 1 apply upper bound u, bit 2 copy mode |
| 0x0C | SRC      | DDR byte address of the set (8-byte aligned) |
| 0x10 | DST      | DDR byte address of the result (4-byte aligned) |
| 0x14 | NWORDS   | number of 32-bit items in the set |
| 0x18 | LMAX     | items of the maximum subset to return (clamped to `LMAX`) |
| 0x1C | LMIN     | items of the minimum subset to return (clamped to `LMIN`) |
| 0x20 | LOWER    | bound l |
| 0x24 | UPPER    | bound u |
| 0x28 | ADMITTED | items that passed the filter in the last operation |
| 0x2C | IRQEN    | bit 0 enables the completion interrupt |
| 0x30 | CYCLES   | clock cycles the last operation was busy |

**Result format.** Lmax words of the maximum subset (largest first) followed
directly by Lmin words of the minimum subset (smallest first), as consecutive
32-bit little-endian words at DST. When fewer items pass the filter than a
subset's size, the remaining words hold the fill values: 0 in the maximum
part and 0xFFFF_FFFF in the minimum part. ADMITTED tells software how many
words are real.

**Copy mode** (MODE bit 2) skips the subsets. It writes every admitted item,
in arrival order, as consecutive words from DST, so the accelerator acts as
a streaming filter between two memory buffers. ADMITTED gives the number of
words written. The FSM writes each block as soon as the loader has formed
it, directly after the previous block. A block can hold an odd number of
items, so the HP write side works at word granularity: when the address is
not 8-byte aligned, the first word goes to the upper lane of the first beat,
and the byte strobes protect the neighbouring words.

**`accel_fsm`** sequences one operation: INIT (one cycle: fill both subsets,
clear the loader), READ (stream and merge until the last block's merge
ends; in copy mode, write each block back and then release it), WRITE
(subset mode: write the result, wait for all responses), DONE (one-cycle
pulse that sets STATUS.done and the interrupt). An empty set skips READ.

**`pci_control`** is the mailbox between host and processor (AXI4-Lite):

* DOORBELL (0x0): the host writes 1 after copying the data. This raises
  `irq_doorbell` to the processor.
* IRQ_ACK (0x8): the processor writes 1 to drop the doorbell interrupt.
* FLAG (0x4): the processor sets it when the result is in memory. The host
  polls it, fetches the result, and writes 0 to clear it.
* MESSAGE (0xC): a free word the host can use to pass the requested
  operation at run time.

### One operation, end to end

1. The host copies the set into DDR memory and writes DOORBELL.
2. The processor takes the doorbell interrupt, writes IRQ_ACK, programs
   SRC/DST/NWORDS/LMAX/LMIN/bounds/MODE, and writes CTRL = 1.
3. The accelerator streams, filters and merges the set, then writes the
   result to DST.
4. The accelerator raises `irq_done`. The processor clears it (CTRL = 2) and
   sets FLAG.
5. The host sees FLAG, reads the result and clears FLAG.

## Performance at the default sizes

Defaults: K = 256, LMAX = LMIN = 256.

In simulation, one pass over 65,536 random items (256 KB, 256 blocks) takes
about 50,100 to 50,500 clock cycles from start to interrupt. That is roughly
200 cycles per block. Each block needs 128 beats from the HP port and at most
257 clocks of merging, and the two overlap. At 200 MHz this is about 0.25 ms
in the logic. Processor software and the PCIe transfer are not modelled.

The time hardly depends on the requested Lmax/Lmin (32 to 256 words). The
chains always have their full capacity of 256, and only the write-back
grows with L. The set stays in memory between operations, so several
extractions can run on one copy of the data. With the bounds set so that
half the items pass, the same pass takes about 43,700 cycles. Only half as
many blocks need merging, but every beat must still be read.

Cost grows with the subset capacity. Each chain has LMAX + K (or LMIN + K)
32-bit registers and the same number of comparators. The merge time grows
with (L + K)/2, which is why asking for larger subsets lowers the speed-up
over software. Larger blocks (K up to 2048) amortise the per-block overhead
better, at the price of longer chains. K is a parameter.

## Where this design makes its own choices

The following points are this implementation's decisions. They are not given
by the original description of the system:

* The network is an even-odd transposition network with two levels per clock
  and an early stop. The source only says the network is iterative, shallow
  and fast.
* Each subset chain gets its own copy of the block.
* Short blocks are padded with fill values. A block is cut short when a beat
  would overflow it.
* Bounds are inclusive and items are unsigned 32-bit.
* The register maps, the result layout, clamping of Lmax/Lmin, the CYCLES
  and ADMITTED counters, and the mailbox's acknowledge and message
  registers are all this design's own.
* One HP port is used, with one read stream and one write stream. Using
  several HP ports in parallel is a possible extension and is not built.
* Of the uses of the filtered stream, subset extraction and copy-back to
  memory are built. Complete sorting of the filtered items is not built.

## Files

| file | content |
|------|---------|
| `rtl/ssa_pkg.sv` | item and beat types, AXI4-Lite and AXI3 HP bundles (packed structs), GP register map |
| `rtl/sorted_subset_accel.sv` | top level; parameters `K`, `LMAX`, `LMIN` |
| `rtl/subset_sorter.sv` | the two subset chains and the merge control |
| `rtl/transposition_net.sv` | iterative even-odd transposition network |
| `rtl/block_loader.sv` | distributor, filters, address counter, input registers |
| `rtl/bound_filter.sv` | the l/u admission test |
| `rtl/hp_control.sv` | AXI HP master, read and write sides |
| `rtl/gp_control.sv` | GP register bank and completion interrupt |
| `rtl/accel_fsm.sv` | operation sequencer |
| `rtl/pci_control.sv` | host/processor mailbox |
| `rtl/axil_reg_port.sv` | AXI4-Lite slave front end shared by the register banks |
| `tb/tb_*.sv` | one self-checking testbench per module, the end-to-end test, and the full-size test |
| `tb/axi_hp_mem_model.sv` | behavioural DDR model behind an HP port, with random stalls |
| `tb/axil_bfm.sv` | AXI4-Lite master tasks |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. Example with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/ssa_pkg.sv rtl/*.sv tb/axil_bfm.sv tb/axi_hp_mem_model.sv \
  tb/tb_sorted_subset_accel.sv --top-module tb_sorted_subset_accel
./obj_dir/Vtb_sorted_subset_accel
```

* **`tb_sorted_subset_accel`** runs ten operations on a small instance
  (K = 8, LMAX = 6, LMIN = 5) through the full host/processor sequence. The
  runs cover every filter mode, odd and empty sets, sets smaller than the
  subsets, clamped sizes and copy mode, against a memory that stalls at
  random. It
  checks the result words against a reference computed in the testbench. It
  also counts each mechanism and fails if one never occurred: rejected
  items, short blocks, loader waiting for the sorter, loading overlapping
  merging, fill values, clamping, interrupts, and copy writes that start at
  an odd word.
* **`tb_sorted_subset_accel_full`** runs the top at its default parameters
  on 65,536 random items loaded into memory once. It extracts the L largest
  and L smallest for L = 32, 64, ... 256, then runs a filtered extraction.
  Every result is checked against a full sort. It takes under a minute.

The testbenches rely on a two-state simulator that starts undriven state at
random values. Everything the design reads is reset or initialised before
use. The sorter's data registers have no reset: INIT fills them.
