# PERT: a pipelined engine for ray tracing

Ray tracing spends nearly all its time on two questions per ray: which parts
of the scene the ray might touch, and which surface it actually hits first.
PERT splits the work of tracing one ray into three tasks and gives each task
its own processor. The three processors are joined in a ring, so three rays
are in progress at once:

```
          rays                      sorted leaf-shell lists
 Shade ---------> FIFO ---> Shell ----------> dual buffer ---> Prim
   ^                                                            |
   +------------------------ FIFO <------ hits -----------------+
```

* **ShadeTask** (ShadeProcessor) makes primary rays, shades each hit and
  spawns secondary rays. It also keeps the frame buffer.
* **ShellTask** (ShellProcessor) tests a ray against the bounding-volume
  hierarchy ("shells"). It makes a list of the leaf shells the ray enters,
  sorted by entry distance.
* **PrimTask** (PrimProcessor) intersects the ray with the primitives of
  those leaf shells in that order. It stops as soon as the nearest hit so far
  is closer than the next shell.

The scene is split the same way. Each processor holds only its own data set:
shading data, shell hierarchy or primitives. Several PERTs can work in
parallel on different scan lines. They then share the three data sets over
three broadcast buses instead of holding copies.

This repository is the hardware around the three CPUs, in synthesizable
SystemVerilog. It contains:

* the stage datapath (local memory, floating-point unit, channel registers
  and the broadcast interface);
* the links between the stages;
* the broadcast processors;
* the top level for one or many PERTs.

It does not contain the processor cores or their microprograms. Each stage's
16-bit processor bus (SJBUS) comes out of the top as ports. The testbenches
drive these ports with behavioural bus masters that run the three tasks.

## Hierarchy

```
pert_system        N_PERT engines + ShadeBP, ShellBP, PrimBP (broadcast_proc)
  pert             one engine: three stages in a ring
    pert_node x3   one stage: everything on its SJBUS except the CPU
      stream_mem     local memory with streaming controller (frame buffer in the Shade stage)
      fpu            floating-point unit
        fpu_alu        add/sub/compare/convert (fp_addsub, fp_cmp, fp_cvt) and divide (fp_div_seq)
        fpu_mul        multiplier (fp_mul_core)
      bic            broadcast interface controller
    sync_fifo x2   Shade->Shell and Prim->Shade
    dual_buffer    Shell->Prim
pert_pkg           shared types, FPU command encoding, SJBUS I/O map, broadcast bus struct
```

All three stages use one module, `pert_node`. In the original machine the
stages differ only in their microcode.

## The stage and its bus

A stage is a 16-bit bus with four parts on it: the CPU, local memory, an FPU
and a BIC. A bus cycle works like this:

* The master raises `sj_req` and holds `sj_we`, `sj_io`, `sj_addr` and
  `sj_wdata` until `sj_ack`.
* Read data is valid in the cycle where `sj_ack` is high.
* A cycle that cannot complete yet just waits. This is how stalls happen, and
  software never polls:
  * an FPU result is not ready;
  * the output channel is full;
  * the input channel is empty;
  * the BIC has no packet;
  * the memory row is not open.

The stage's `stall` output is high in every waiting cycle.

`sj_io=0` addresses local memory: 64K words, the full address space.
`sj_io=1` addresses the I/O space:

| address | access | meaning |
|---|---|---|
| 0x00–0x0E | r/w | FPU registers (below) |
| 0x10 | w | write a word at the output pointer; the pointer then advances. Waits while the output is not ready |
| 0x10 | r | read back the word at the output pointer (dual buffer only). Used to sort in place |
| 0x11 | r | bit 0: the output can accept |
| 0x12 | w | commit: hand the filled bank to the reader. Waits for a free bank. Pointer = 0 |
| 0x13 | w | set the output pointer |
| 0x14 | r | read the word at the input pointer (FIFO: pop); the pointer then advances. Waits while the input is empty |
| 0x15 | r | bit 0: input has data |
| 0x16 | w | release: give the input bank back. Pointer = 0 |
| 0x17 | w | set the input pointer |
| 0x20–0x27 | w | BIC ID register *i*: bit 15 arms it, bits 14:0 are the packet ID |
| 0x28 | r | next data word of the captured packet. Waits while empty |
| 0x29 | r | BIC status: bit 0 data ready, bits 15:8 words left (saturating at 255) |
| 0x2A | r | ID of the packet being read |

The channel registers are the same on every stage. On a FIFO link, writes
push and reads pop. On the dual buffer, the pointers are word addresses into
the bank.

## Floating-point unit

The FPU has two subunits. The ALU does add, subtract, compare, divide and
int↔float. The MUL does multiply. Each subunit has:

* 32-bit operand registers A and B;
* a result register C.

Every 32-bit register is accessed as two 16-bit halves, low half first.

| reg | | reg | |
|---|---|---|---|
| 0/1 | A_ALU | 8/9 | C_ALU (read) |
| 2/3 | B_ALU | 10/11 | C_MUL (read) |
| 4/5 | A_MUL | 12 | command (write); busy flags (read) |
| 6/7 | B_MUL | 13 | status; 14 extended status |

**Command word.** One 16-bit write to register 12 starts both subunits. The
low byte is the ALU command and the high byte the MUL command. In each byte,
bits 5:0 are the function:

* ALU: 1 add, 2 sub, 3 compare, 4 divide, 5 int→float, 6 float→int.
* MUL: 1 multiply.
* 0 leaves that subunit alone.

Bits 7:6 of each byte copy the result into another register when the
operation finishes. These result transfers let a chain of operations run
without bus traffic:

| byte | bit 6 | bit 7 |
|---|---|---|
| ALU | C_ALU → A_ALU | C_ALU → B_MUL |
| MUL | C_MUL → A_MUL | C_MUL → B_ALU |

A transfer wins over a bus write to the same register in the same cycle.

**Status.** A compare writes a code to status bits 1:0:

| code | meaning |
|---|---|
| 0 | = |
| 1 | < |
| 2 | > |
| 3 | unordered (NaN) |

Status bits 7:4 hold the ALU flags and bits 11:8 the MUL flags. Each flag
field is {underflow, overflow, divide-by-zero, invalid}.

The extended status (register 14) decodes the compare code into separate bits
that branch logic can test directly:

| bit | condition |
|---|---|
| 0 | = |
| 1 | < |
| 2 | > |
| 3 | ≠ |
| 4 | ≤ |
| 5 | ≥ |

**Timing.** An add, subtract, compare, convert or multiply takes 6 cycles. A
divide takes 31. These are the original parts' 360 ns and 1.86 µs at a 60 ns
clock. The two subunits run concurrently.

**Interlock.** The interlock makes the bus wait instead of returning stale
data:

* A read of C, of status, or of a register a running operation will write
  back into waits until the result lands.
* A command waits while its subunit is busy.
* A command also waits while a transfer is still on its way into that
  subunit's operand register.

**Arithmetic.** The arithmetic is IEEE-754 single precision with these
differences:

* results are truncated toward zero;
* denormals are flushed to zero;
* NaN results are the quiet NaN 0x7FC00000;
* float→int truncates and saturates.

## Local memory and streaming

Sequential access is the common case: ray records, shell records and
primitive records are all read word after word. `stream_mem` keeps the next
word prefetched, so every access to the address after the previous one
completes in one cycle. Any other address waits `FIRST_LAT` (2) extra cycles.

A second port serves the host. The host loads the data sets before a frame
and reads the frame buffer afterwards. This port has one cycle of read
latency and no waits.

In the Shade stage, the frame buffer is simply a region of local memory.
Each PERT owns the pixels of its own scan lines.

## Links between the stages

**Shade→Shell and Prim→Shade** are 64-word FIFOs (`sync_fifo`). A record is
a run of words; the program knows the record layout.

**Shell→Prim is a dual buffer** (`dual_buffer`), two banks of 256 words. A
FIFO would not do here, because the ShellTask needs random access to the
record it is building:

1. It writes the ray header and a (shell ID, entry distance) triple for every
   leaf shell the ray enters.
2. It sorts those triples in place, reading back through register 0x10.
3. It commits the bank.

The PrimTask reads its bank in any order, following the sorted list, and
releases the bank when it is done. The writer waits only when both banks are
full. The reader waits only when neither is.

A bank of 256 words holds a 22-word header plus up to 50 leaf shells of
3 words each.

## Broadcasting (multi-PERT)

With `N_PERT > 1`, scene data is not copied into every PERT. Each data set
lives in the global memory of one broadcast processor (`broadcast_proc`).
That processor sends the set round and round as packets:
`[ID][LEN][LEN data words]`. Each packet goes out in three steps:

1. The processor puts the ID on the bus with `sync` high.
2. It waits one cycle for the ORed `hit` line.
3. If any PERT raised `hit`, it sends the data words (`valid`, with `eop` on
   the last word). If not, it skips straight to the next ID.

Skipping data nobody asked for keeps the cycle short.

A BIC (`bic`) sits on each stage's bus:

* The program arms one of its ID registers with the packet it needs.
* The BIC latches every ID that appears with `sync` and compares it against
  all armed registers at once.
* On a match it raises `hit` in the following cycle and captures the data
  into one half of a double buffer of FIFOs. The matched register is disarmed.
* The CPU then pops the words through register 0x28, while the other half
  can capture the next packet.

The BIC does not raise `hit` while its capture half is still occupied. So a
broadcast is never sent to a BIC that cannot take it. The packet simply comes
round again.

One broadcast can serve several PERTs that ask for the same packet. The hit
lines are ORed per bus in `pert_system`.

The BICs and broadcast processors also exist when `N_PERT = 1`. A program may
use them, or read its data from local memory.

## Parameters

The defaults are sized for the workloads the machine was evaluated on:
512-sphere scenes at 64×48 with 2–20 primitives per leaf shell, and scenes
of 1,093 and 2,754 primitives.

| parameter | default | where |
|---|---|---|
| `N_PERT` | 1 | number of engines |
| `MEM_AW` | 16 | local memory, 64K words per stage |
| `BP_AW` | 16 | broadcast processor memory, 64K words |
| `FIRST_LAT` | 2 | extra cycles of a non-sequential memory access |
| `ALU_LAT`, `MUL_LAT`, `DIV_LAT` | 6, 6, 31 | FPU latencies |
| `N_ID` | 4 | BIC ID registers |
| `BIC_DEPTH` | 256 | words per BIC buffer half. A 20-sphere packet is 181 words |
| `FIFO_DEPTH` | 64 | ray FIFOs |
| `DBUF_DEPTH` | 256 | words per dual-buffer bank |

A 512×384 frame buffer does not fit in one Shade stage's 64K words: it needs
393,216 words. With 8 PERTs, each holds 49,152 words and it fits.

## Departures and choices

These follow the original description:

* the three-task ring and its link types;
* identical stages;
* the FPU register set, the command byte layout and the four transfer paths;
* the compare codes and the subunit latencies;
* single-cycle streamed memory access;
* the BIC's ID latch, comparator, hit flag and FIFO double buffer;
* hit-gated broadcasting;
* the shared broadcast buses and ORed hit lines;
* a split frame buffer.

These are this design's own:

* The CPU core (SJ16) and its microcode are not included. They are
  replaced by a bus port.
* One clock for everything. The original CPU ran at 200 ns and the FPU at
  60 ns. Latencies here are counted in FPU clocks.
* The FPU function codes, the unordered compare code, the flag positions,
  and the layout of the extended status.
* Truncating arithmetic with flush-to-zero, in place of the vendor
  floating-point chips.
* The bus interlock on the FPU, the channels and the BIC.
* The whole SJBUS I/O map, and the pointer-style channel registers.
* All memory, FIFO and buffer sizes, and the memory's first-access latency.
* The packet format `[ID][LEN][data]`, the one-cycle hit window, the `eop`
  line, disarming an ID register on a match, and withholding `hit` while the
  capture half is busy.
* The latency figure for the FPU. The original text gives both 360 ns and
  400 ns; 360 ns (6 cycles) is used.
* The control unit that loads and starts the broadcast processors is not
  included. Its signals are the `bp_*` ports.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog if it hangs.
Any one of them can be built with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_pert_system \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/pert_pkg.sv tb/tb_fp_ref_pkg.sv tb/tb_pert_system.sv
obj_dir/Vtb_pert_system
```

| testbench | what it covers |
|---|---|
| `tb_fpu_alu`, `tb_fpu_mul` | random operands against a real-number reference; exact latencies (6, 31) |
| `tb_fpu` | register access, all four transfer paths, concurrent subunits, interlock |
| `tb_stream_mem` | one-cycle streamed access, first-access wait, host port |
| `tb_sync_fifo` | random push/pop against a queue model, full/empty |
| `tb_dual_buffer` | random-access writes, commit/release, writer and reader waits |
| `tb_bic` | ID match, hit timing, capture, hit withheld while the buffer is busy |
| `tb_broadcast_proc` | packet order, data only on hit, skipping shortens the cycle |
| `tb_pert_node` | one stage through its bus: memory, FPU chain, channels, stall, BIC |
| `tb_pert` | the ring: FIFO order and back-pressure, bank hand-over, three FPUs at once |
| `tb_pert_system` | end to end at full default size (below) |
| `tb_pert_system_multi` | the same with two PERTs sharing all three broadcast buses |
| `tb_pert_scenes` | three 512-primitive scenes (binary, quad and oct shell trees, 8 primitives per leaf shell) rendered at 64×48, every pixel checked, frame time reported |
| `tb_pert_sweep` | the same benchmark at the ends of the leaf-size range: binary and quad trees with 2 primitives per leaf, a binary tree with up to 20 (leaves of 16) |

The end-to-end tests render a small scene (8×6 pixels, 4 leaf shells of 8
primitives) and compare every frame-buffer word exactly with a picture the
testbench traces itself:

* `tb/ray_programs.sv` holds the three task programs.
* The primitives reach the PrimTask through the BIC from the PrimBP.
* In the two-PERT test nothing of the scene is in local memory, as in the
  multi-PERT machine. The ShellTask takes the shell set from the ShellBP for
  every ray, and the ShadeTask takes the reflectance table from the ShadeBP
  once per frame. Both copy what their BIC captures into local memory. The
  test requires traffic on all three buses and counts the broadcasts that
  served both PERTs at once.

The tests also count each mechanism and fail if one never occurs:

* stalls on an empty FIFO or dual buffer;
* the ShellTask waiting for a free bank;
* bank swaps;
* streamed and non-streamed memory accesses;
* FPU interlock waits and all four transfer paths;
* BIC captures and waits;
* broadcast packets sent and skipped, and broadcast cycles completed;
* secondary rays, the adaptive-depth cut-off, sort moves and the PrimTask's
  early stop;
* with two PERTs, a broadcast captured by both.

In `tb_pert_scenes` the ShellTask walks a real shell tree (depth first,
entering only the shells the ray hits), and the tree is built by the
testbench with recursive median splits. It reports each frame's length in
cycles and how long each processor waited for input. With these simple
task programs the ShadeProcessor waits most (over 90% of the frame), the
PrimProcessor less, and the ShellProcessor hardly at all. So the ShellTask
sets the pace, and a heavier shading model would cost little extra time.

`tb_pert_sweep` shows how the leaf size trades shell testing against
primitive testing. Frames take about 8.0M cycles for a binary tree with 2
primitives per leaf, 5.9M for a quad tree with 2, and 7.2M for a binary
tree with 16. For the binary tree both ends are slower than the 6.8M it
takes with 8 per leaf. For the quad tree, 2 per leaf is a little faster
than the 6.1M it takes with 8. Small leaves load the ShellProcessor with many more shell tests.
Large leaves load the PrimProcessor, which then hardly waits.

The scenes are deliberately simple, so that all values are exact in single
precision:

* rays all run along +z;
* shells are boxes;
* primitives are squares facing the viewer.

The hardware does not depend on this. It only sees bus cycles.
