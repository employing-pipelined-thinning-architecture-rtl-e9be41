# Pipelined Zhang–Suen thinning processor

Thinning (skeletonisation) strips the outer pixels from the ridges of a
binarised fingerprint until each ridge is one pixel wide, without breaking
or shortening it. The skeleton is what the minutiae extractor of a
fingerprint verifier works on. This RTL implements a hardware thinning
engine built around the Zhang–Suen parallel thinning algorithm, after the
pipelined architecture published by P.Y. Hsiao, X.Z. Chen, C.C. Lin, C.H. Hua
and C.C. Chang ("Employing pipelined thinning architecture for real-time
fingerprint verifier").

The main idea is to stream the image. The image is never fetched as 3×3
windows. Each image byte (eight adjacent pixels) is read from main memory
once per pass. It enters a three-line rolling buffer, and its window is
assembled in three 10-bit registers. Eight identical combinational
*modification units* then decide the eight pixels at once, and the
result is written back to the same address. One byte takes a fixed six
clocks, so one pass over a 512 × 512 image takes 6 × 64 × 512 = 196,608
clocks (4.9 ms at 40 MHz). A full thinning needs several passes; a typical
print needs 8 to 14, which is 40 to 70 ms.

## The algorithm

Pixels are 1 for ridge (object) and 0 for background. For a centre pixel
P1, the neighbours are numbered clockwise from the pixel above:

```
P9 P2 P3
P8 P1 P4
P7 P6 P5
```

P1 is deleted when it is 1 and all of the following hold:

* (a) 2 ≤ N ≤ 6, where N is the number of neighbours that are 1;
* (b) S = 1, where S is the number of 0→1 steps in the cyclic sequence P2, P3, …, P9, P2;
* with Step = 1 (first sub-iteration): P2·P4·P6 = 0 and P4·P6·P8 = 0;
* with Step = 0 (second sub-iteration): P2·P4·P8 = 0 and P2·P6·P8 = 0.

Each sub-iteration is *parallel*. Every decision in a pass must see the
image as it was before that pass. One iteration is a Step = 1 pass
followed by a Step = 0 pass. Thinning stops after an iteration that
deletes nothing. Pixels outside the image count as background.

`modification_unit` evaluates all of this in one block of combinational
logic. It has a 4-bit adder for N and another for S (eight "not Pi and
Pi+1" terms). Both pairs of product conditions are formed, and Step picks
one pair with a multiplexer. The unit outputs the new pixel and a
"deleted" flag.

## Image layout

The image is stored line after line, W/8 bytes per line (64 for 512
pixels). Each byte is one *column* of eight horizontally adjacent pixels.
**Bit 7 is the leftmost pixel.** Main memory is 8 bits wide, with one
address bus and separate read and write data buses. The default is 32,768
bytes, for 512 × 512.

## Datapath: how a window is built

```
 main memory ──8──► RAM3 ──► RAM2 ──► RAM1        (RAM bank: 3 × 64 × 8, one line each)
                     │        │        │
                     ▼        ▼        ▼
                   set L    set M    set H         (register sets: {l, m[7:0], r})
                     └────────┴────┬───┘
                                  30
                                   ▼
                     modification unit array (8 units) ──8──► temporal register ──8──► main memory
                                   │
                                   └── OR of 8 "deleted" flags ──► continue register ──► controller
```

**RAM bank (`ram_bank`, three `ram_module`s).** When the centre line y
is being processed, RAM1 holds line y−1, RAM2 line y and RAM3 line y+1,
one column per address. Column k is first read from all three RAMs. It
is then *loaded* with a chained shift: RAM1[k] ← RAM2[k], RAM2[k] ←
RAM3[k], and RAM3[k] ← main memory byte (y+2, k). The load reuses the
values that were just read, so it needs no second read. After a whole
line has gone through, the buffer has moved down one image line.

**Register sets (`register_sets`).** There are three 10-bit registers:
H for the line above, M for the centre line and L for the line below.
Each is split into l (1 bit), m (8 bits) and r (1 bit). m holds column
k. l is the rightmost pixel of column k−1; it is shifted in from the old
m[0] before m is reloaded. r is the leftmost pixel of column k+1 (bit 7);
it is read from the RAM bank separately. The 30 bits together hold the
3×3 windows of all eight pixels of column k. Pixels outside the image
are forced to 0 as the registers load:

* l at the first column;
* r at the last column;
* all of H on the first line;
* all of L on the last line.

**Modification unit array (`modification_unit_array`).** This is eight
units. Unit *i* (i = 1…8) takes m bit 8−i of M as its centre pixel. Its
window is word bits b, b+1 and b+2 of H, M and L, where the words are
packed `{l, m[7:0], r}` and b = 8−i. The eight output pixels form the new
column byte. The eight flags are ORed for the continue register.

**Why writing back in place is safe.** The RAM bank is filled from main
memory two lines ahead of the centre line. Results for line y go back to
main memory only after line y has been copied into the RAM bank. So
every window sees the image from before the current pass, which is what
a parallel sub-iteration requires. Results are written to the addresses
they were read from.

## The six-clock execution cycle

One column k of centre line y takes six clocks. The phases are
`thinning_pkg::phase_e`:

| clock | register sets      | RAM bank                      | main memory (one address bus)           |
|-------|--------------------|-------------------------------|-----------------------------------------|
| 1     | l ← m[0]           | read column k                 | read byte (y+2, k)                      |
| 2     | m ← column k       |                               | read byte (y+2, k), second clock        |
| 3     |                    | load column k (chained shift) |                                         |
| 4     |                    | read column k+1               | write result of previous column         |
| 5     | r ← bit 7 of k+1   |                               | write result, second clock              |
| 6     | *execute*: array → temporal register, flags → continue register | | |

Main memory accesses are held for two clocks. The memory is assumed to
be a synchronous RAM with one clock of read latency, whose output holds
between reads. A read therefore issued in clocks 1–2 is valid in clock 3,
when RAM3 takes it. The write in clocks 4–5 stores the column that was
executed in clock 6 of the *previous* cycle; the temporal register holds
it until then. Fetch and store addresses are different lines, so the
single address bus is time-shared and never carries both at once. The
controller asserts this.

The RAM column address advances at the end of clock 3. It points at k+1
for the r read in clock 4 and stays there as the next cycle's k.

## Runs, passes and stopping

The published architecture does not describe what happens between passes.
This implementation does the following (`controller`):

1. **Priming.** `start` clears all pointers. Two *priming lines* (2 × COLS
   cycles) load image lines 0 and 1 into RAM2 and RAM3. They execute
   nothing and store nothing, because the temporal register's valid bit
   stays low.
2. **Passes.** Centre lines 0 … H−1 follow, column by column. The fetch
   pointer simply keeps counting two lines ahead and wraps at the end of
   the image. During the last two lines of a pass it therefore reads lines
   0 and 1, which are already fully written back, for the *next* pass. So
   only the first pass is primed.
3. **Step.** Step is 1 for the first pass and toggles after every pass.
4. **Stopping.** The continue register is cleared at the start of each
   iteration and set by any deletion. It is tested at the end of every
   Step = 0 pass, together with the flag of the final execute step. If
   nothing was deleted, one *flush* cycle stores the last column. `done`
   pulses in the last clock of the flush, and `busy` drops.

A run of P passes keeps `busy` high for exactly

    6 × COLS × (2 + P × H) + 6 clocks,

and every testbench checks this figure.

## Address generation and the systolic counter

`address_generator` keeps three pointers: the RAM column (wraps at
COLS), the main memory fetch pointer and the store pointer (both wrap at
COLS × H). The controller advances each with a one-clock strobe, once per
execution cycle. `sel_store` puts the store pointer on the shared address
bus in clocks 4–5.

The published design uses a *systolic* counter, whose speed does not
depend on its length, but its cells are not given. `systolic_counter` is
this design's own version. The count is cut into 4-bit segments. A
segment increments when `inc` is high and a registered flag says that
all lower segments are all ones. Each flag is computed from its
neighbour's flag and its neighbour segment only. The critical path is
therefore one 4-bit incrementer, and a change ripples through the flags
one segment per clock. The cost is a minimum spacing between increments
of NSEG clocks, where NSEG is the number of segments: 4 for the 15-bit
main memory pointers. An assertion checks the spacing. The controller
increments at most once every six clocks.

## Top level

`thinning_system` connects `thinning_processor` to `main_memory` and adds
a host port. The host port stands in for the embedded processor that
supplies the binarised print. It is this design's own interface.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `start` | in | 1 | begin thinning the image in memory (taken while `busy` is low) |
| `busy` | out | 1 | run in progress; the processor owns the memory |
| `done` | out | 1 | one-clock pulse at the end of a run |
| `host_addr` | in | log2(W/8·H) (15) | memory address for the host |
| `host_wr`, `host_wdata` | in | 1, 8 | host write (ignored while `busy`) |
| `host_rd` | in | 1 | host read; `host_rdata` is valid the next clock |
| `host_rdata` | out | 8 | read data |

Parameters: `IMG_W` (default 512; a multiple of 8, at least 16) and
`IMG_H` (default 512; at least 3). The number of modification units is
fixed at eight, whatever the image size. Image sizes need not be powers
of two; a 40 × 7 image is tested.

`thinning_processor` can also be used on its own, with an external
memory. Its port is `mem_addr`, `mem_read`, `mem_write`, `mem_wdata` and
`mem_rdata`. It expects `mem_rdata` one clock after a read, holding
afterwards.

## Choices this design makes

The architecture itself follows the published design:

* the blocks and their connections;
* the three-line RAM bank with its chained load;
* the 10-bit l/m/r register sets;
* the eight modification units and the Step multiplexer;
* the continue and temporal registers;
* the six-step schedule;
* the 64 × 8 line buffers, 15-bit memory addresses and 8-bit data.

The following are this design's own choices:

* **Borders:** pixels outside the image are treated as background.
* **Pass sequencing:** priming, the wrap-around prefetch, when the
  continue flag is tested, and the flush cycle (see above). The stopping
  rule is Zhang and Suen's usual one: stop after an iteration with no
  deletion.
* **Addresses:** two main memory pointers (fetch and store) and an
  address select, where the published block diagram shows a single
  "address increment" line.
* **RAM bank load clock:** one passage of the published description
  places it in the sixth step; its schedule tables place it in the
  third. The tables are followed.
* **Memory timing:** one clock of read latency, outputs that hold between
  reads, and no reset of memory contents. Every location is written
  before it is read.
* **Valid bit:** the valid bit in the temporal register.
* **Counter:** the internal structure of the systolic counter.
* **Host port:** the host port and memory multiplexer of the top level.

## Size and speed

With the defaults, the processor without its memory has about 560
word-level cells, 108 flip-flops and 3 × 512 bits of line buffer. The
main memory is 262,144 bits. In simulation the design reproduced the
reference thinning bit for bit:

| image (512 × 512, synthetic print) | passes | clocks | at 40 MHz |
|---|---|---|---|
| ridges 4 px wide | 8 | 1,573,638 | 39.3 ms |
| ridges 7 px wide | 14 | 2,753,286 | 68.8 ms |
| batch of five prints, ridges 4–8 px | 8–14 each | 11,407,134 | 0.285 s |

The published figures are about 0.07 s per print and 0.341 s for five
prints, on an FPGA at 40 MHz.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/zs_ref_pkg.sv` is
an independent reference: it thins whole images pixel by pixel and
generates test images (random blobs and synthetic fingerprints).

| testbench | what it checks |
|---|---|
| `modification_unit_tb` | all 512 windows × both Steps against the reference rule |
| `modification_unit_array_tb` | 4,000 random 3 × 10 blocks, eight outputs and the OR |
| `register_sets_tb`, `ram_module_tb`, `ram_bank_tb` | storage against bit-level models |
| `systolic_counter_tb` | 15-bit counter through a full wrap, and a 7-bit / 2-bit-segment one |
| `address_generator_tb`, `continue_register_tb`, `temporal_register_tb`, `main_memory_tb` | against models |
| `controller_tb` | every strobe of the six-step schedule each clock, Step, border flags, run length for 1 and 2 iterations |
| `thinning_processor_tb` | 32 × 16 and 40 × 7 images against the reference, with exact cycle counts |
| `thinning_system_tb` | 64 × 32 end to end through the host port; counts priming, both Steps, continued and stopped iterations, fetch wrap, flush, deletions on all four borders and ignored host writes |
| `thinning_system_full_tb` | one complete 512 × 512 run at default parameters |
| `thinning_workload_tb` | five 512 × 512 prints back to back |

To run one with Verilator (5.x), from the directory that holds `rtl/`
and `tb/` (the two packages are named first; `-y` finds the modules):

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/thinning_pkg.sv tb/zs_ref_pkg.sv tb/thinning_system_tb.sv \
    --top-module thinning_system_tb -o sim
./obj_dir/sim
```

The full-size testbenches take a few seconds each (the workload one
about 15 s). To change the image size, set `IMG_W` and `IMG_H` on
`thinning_system` or `thinning_processor`. All internal widths follow
from them.

## Files

* `rtl/thinning_pkg.sv`: shared constants, the phase enum and the
  controller strobe struct `ctl_t`.
* `rtl/thinning_system.sv`: the top level.
  * `rtl/thinning_processor.sv`
    * `rtl/controller.sv`
    * `rtl/address_generator.sv` → `rtl/systolic_counter.sv`
    * `rtl/ram_bank.sv` → `rtl/ram_module.sv`
    * `rtl/register_sets.sv`
    * `rtl/modification_unit_array.sv` → `rtl/modification_unit.sv`
    * `rtl/continue_register.sv`
    * `rtl/temporal_register.sv`
  * `rtl/main_memory.sv`
