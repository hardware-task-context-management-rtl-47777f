# Scan-chain context switching for hardware tasks

An operating system can stop a software task at any moment because the
task's whole state sits in a few processor registers and in memory. A
hardware task on an FPGA can be stopped the same way only if its state can
be read out and written back. Setting memories aside, that state is simply
the content of every flip-flop in the task. This RTL makes that content
movable. Each flip-flop of the task becomes a *CSB cell*: one flip-flop with
a 2:1 multiplexer in front. A single mode line turns all the cells into a
shift register, a *scanpath*. A small controller, the **Context Management
Unit (CMU)**, shifts the task's state into an on-chip block RAM (save) or
back out of it into the task (restore). A processor starts a transfer by
writing one 16-bit register.

There are two ways to organise the scanpaths:

* **CSB**: all flip-flops form one chain, and one bit moves per scan clock.
* **PCS8**: the flip-flops form eight chains that shift together, and one
  byte moves per scan clock. A transfer is eight times shorter, and the
  memory is byte-wide.

The evaluation task is a 7th-order, fully pipelined FIR filter with unit
coefficients. The top level, `ctx_mgmt_top`, holds two copies of this
filter side by side. One copy uses CSB, the other PCS8, and each has its own
CMU.

## The CSB cell and the scanpaths

`csb_dff` is the cell. When `cs_rs` is 0 it loads `d`, the task's own next
state. When `cs_rs` is 1 it loads `cs_in`, the output of the previous cell.
The flip-flop output is both the task's `q` and the next cell's input. The
cell adds one multiplexer and one control line per flip-flop. There is no
reset in the cell: a task's state comes from running it or from a restore.

`csb_chain` holds a whole task's state vector as CSB cells and wires them
into `CHAINS` chains of equal length `LEN = ceil(N_BITS / CHAINS)`:

* Chain `j` holds state bits `j*LEN` to `j*LEN+LEN-1`.
* The lowest of these bits sits next to the chain input `cs_in[j]`.
* The highest drives `cs_out[j]`.

When `N_BITS` is not a multiple of `CHAINS`, the last chain is padded with
cells that only hold their value in run mode. The padding keeps every chain
the same length, so one shift count moves the whole context. The filter has
123 state bits. With PCS8 that gives 8 chains of 16 cells, 5 of them
padding. With CSB it gives one chain of 123 cells.

Bit order matters when the memory is read: **the word written at shift `k`
is cell `LEN-1-k` of each chain**. During a restore, the word read for shift
`k` enters at cell 0 and, after `LEN` shifts, lands in cell `LEN-1-k`, which
is where it came from. A save followed by a restore of the same slot with
the same `nb` therefore returns every flip-flop to its old value.

## The CMU

`cmu` joins three parts:

| part | module | job |
|---|---|---|
| control register | `cmu_reg` | holds the processor's request and reports completion |
| counter / sequencer | `cmu_counter` | counts the shifts, drives `cs_rs`, the memory's low address and write enable |
| context memory | `cmu_bram` | `2^4` slots of `2^10` words, one word per shift, `CHAINS` bits wide |

The context identifier is the high part of the memory address and the shift
count is the low part. The chain outputs are the memory's write data, and
the memory's read data feeds the chain inputs.

### Register map (16 bits, read/write)

| bits | field | meaning |
|---|---|---|
| 15 | `run` | write 1 to start; reads 1 until the transfer is finished, then returns to 0 by itself |
| 14 | `S/R` | 1 = save (task → memory), 0 = restore (memory → task) |
| 13:10 | `CID` | context slot, 0 to 15 |
| 9:0 | `nb` | number of shifts; 0 means 1024 |

A processor writes `{run=1, S/R, CID, nb}` and polls until `run` reads 0.
While `run` is 1, writes are ignored, so a transfer in progress cannot be
disturbed. For the filter, `nb` is 123 with CSB and 16 with PCS8. A slot
holds up to 1024 shifts: 1024 flip-flops with CSB, 8192 with PCS8.

The bus is kept minimal. `bus_we` and `bus_wdata` are sampled at the rising
edge of the scan clock, and `bus_rdata` is the register itself, with no
read latency.

## A transfer, cycle by cycle

`cmu_counter` steps through these states, one per scan-clock cycle:

1. **IDLE**: waits for `run`.
2. **CLK_WAIT**: requests the scan clock for the task (`clk_sel` = `run`).
   It stays here until the clock multiplexer reports that the task now runs
   from the scan clock (`clk_ack`).
3. **PREFETCH** (restore only): reads word 0. The memory has one cycle of
   read latency, so word 0 must be fetched before the first shift.
4. **SHIFT**: `cs_rs` is 1 for exactly `nb` cycles.
   * In a save, shift `k` writes word `k` with the chain outputs.
   * In a restore, the memory output (word `k`) enters the chains at shift
     `k` while word `k+1` is read.
5. **DONE**: pulses `done` for one cycle. This clears `run`, which releases
   the clock multiplexer.

The scan itself therefore costs `nb` scan cycles. At a 200 MHz scan clock
that is 615 ns for the CSB filter (123 shifts) and 80 ns for the PCS8 filter
(16 shifts). Around the scan come three overheads:

* about two cycles of register write and state entry;
* the clock switch, a few cycles that depend on the ratio of the two clocks;
* one prefetch cycle on a restore.

During a save the memory's read data still drives the chain inputs, so a
save leaves the task holding scrambled bits, not its old state. After a save
the task must be restored or restarted before its outputs mean anything.

## Switching the task's clock

The task may run from its own clock (`clk_run`) at a frequency different
from the scan clock. The CMU and its memory always run on `clk_scan`.
`clk_mux` is a glitch-free clock switch:

* Each clock has an enable, synchronised first on that clock's rising edge
  and then on its falling edge.
* An enable may rise only after the other clock's enable has fallen.
* While the switch happens, the output stays low for a few cycles.
* `scan_on` changes on a falling edge of the scan clock, so the CMU can
  sample it as `clk_ack`.

One consequence needs care. Between the moment the scan clock reaches the
task and the first shift, the task sees a few scan-clock edges with `cs_rs`
low. The same happens after the last shift, until the run clock takes over
again. On these edges the task simply keeps running. A save therefore
captures the task a few cycles later than the request, and a restored task
resumes a few cycles before the run clock returns. No state is lost or
corrupted: every edge is either a normal run step or a shift. A source or
sink of the task's data stream must, however, follow the task's own clock
(`task_clk`, brought out by `ptask`) and count only the edges at which
`cs_rs` is low.

## The evaluation task: FIR7

`fir7_csb` sums the last eight 8-bit samples (all coefficients are 1). It is
fully pipelined:

| stage | registers | bits |
|---|---|---|
| delay line | x[n-1] … x[n-7] | 7 × 8 = 56 |
| stage 1 | 4 pairwise sums | 4 × 9 = 36 |
| stage 2 | 2 sums | 2 × 10 = 20 |
| output | y | 11 |

That makes 123 flip-flops, all CSB cells. After the run edge that samples
x[n], y holds x[n-2] + … + x[n-9].

`ptask` is one complete preemptable task: the filter, its CMU and its clock
multiplexer. `ctx_mgmt_top` instantiates `ptask` twice, once with
`CHAINS = 1` and once with `CHAINS = 8`. The two copies share the clocks and
the reset, and each brings out its own register port and filter stream.

## Sizes and what to expect on an FPGA

After generic synthesis of each module:

* The CMU has 31 flip-flops: 16 in the register, 15 in the counter.
* Each clock multiplexer adds 4 flip-flops.
* The CSB filter has 123 cells and the PCS8 filter 128 (5 of them padding).
* Each cell costs one 2:1 multiplexer on top of the plain flip-flop.

The original measurements on a Virtex-II Pro are a useful yardstick but
cannot be reproduced here:

* a CMU of about 37 flip-flops (CSB) or 33 (PCS8);
* run-mode Fmax falling from 350 MHz (plain filter) to 300 MHz (CSB) and
  250 MHz (PCS8);
* a scan Fmax of 200 MHz for both.

In those measurements, saving the 128 flip-flops of the original filter took
640 ns with CSB and 80 ns with PCS8.

The PCS8 context memory is 16 × 1024 × 8 bits = 128 Kbit. That is several
FPGA block RAMs (eight 18-Kbit Virtex-II blocks), not one. To fit a single
block RAM, reduce `NB_W` or `CID_W` in `ctx_pkg`.

## Where this RTL goes beyond or departs from the original description

* **Taken from the original:** the cell (one multiplexer, one flip-flop,
  one mode line), the one- and eight-chain organisations, the CMU's
  register, counter and block RAM and how they are wired, the register map,
  the self-clearing `run` bit, the 16 slots of 1024 shifts, the global
  clock multiplexer, and the FIR test case (8 taps, unit coefficients,
  8-bit samples, fully pipelined).
* **Own choices:**
  * the sequencer's states, including the restore prefetch;
  * `S/R` = 1 meaning save;
  * `nb = 0` meaning 1024 shifts;
  * writes ignored while a transfer runs;
  * asynchronous active-low reset of the register, counter and clock switch;
  * a read-first synchronous memory;
  * the glitch-free clock switch and its handshake with the CMU;
  * equal-length chains with padding;
  * the filter's exact pipeline (123 flip-flops rather than the original
    128).
* **Mode line:** in the original block diagram the mode line comes straight
  from the register's control field. Here it is high only during the `nb`
  shift cycles, because the task must see exactly `nb` scan edges.
* **Not built:**
  * the plain, non-preemptable filter (a baseline only);
  * the tool flow that converts an existing design's flip-flops into CSB
    cells, and its cell library;
  * the host processor;
  * a "critical section" flag announced for a later version.

## Simulating

Every testbench in `tb/` is self-checking and prints one line
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ctx_pkg.sv tb/tb_ctx_mgmt_top.sv --top-module tb_ctx_mgmt_top
./obj_dir/Vtb_ctx_mgmt_top
```

| testbench | what it exercises |
|---|---|
| `tb_ctx_mgmt_top` | both tasks at default sizes. Three filter streams share each task over ten save/restore rounds, and every output is checked. Every transfer must take exactly 123 (CSB) or 16 (PCS8) scan edges. Saves, restores, new streams, outputs right after a restore and refused writes must all occur. |
| `tb_ptask` | the CSB task with a run clock slower than the scan clock |
| `tb_task_agent` | helper for the two above: plays the processor and the filter's data source and checker |
| `tb_cmu` | PCS8 CMU against a modelled task: stored words, bit order, transfer length; all 16 slots filled with 1024-shift contexts |
| `tb_cmu_counter` | the shift sequence cycle by cycle, including nb = 0 (1024) |
| `tb_cmu_reg`, `tb_cmu_bram`, `tb_csb_dff`, `tb_csb_chain`, `tb_clk_mux`, `tb_fir7_csb` | each block alone |

To make another design preemptable, keep its combinational next-state logic
and store its registers in a `csb_chain`, as `fir7_csb` does. Then set `nb`
to the chain length.
