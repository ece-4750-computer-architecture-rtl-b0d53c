# From in-order to out-of-order: five single-issue pipelines and a dual-issue one

This RTL builds the same small processor five times. Each version adds one
idea on the way from a plain in-order pipeline to an out-of-order machine with
precise exceptions. All five run the same three instructions (`addu`, `addiu`,
`mul`). All five have a one-cycle integer pipe X and a four-cycle pipelined
multiplier Y0..Y3, and all issue at most one instruction per cycle. What
changes between them is when an instruction may issue, when it may write its
result, and where the point of no return (commit) sits:

| version | fetch/decode | issue        | write-back    | commit           | structures added               |
|---------|--------------|--------------|---------------|------------------|--------------------------------|
| I3L     | in order     | in order     | in order      | late, in W       | none: X padded to X0..X3        |
| I2OE    | in order     | in order     | out of order  | early, in D      | scoreboard (SB)                |
| I2OL    | in order     | in order     | out of order  | late, in C       | SB, future file (PRF), reorder buffer (ROB) |
| IO2E    | in order     | out of order | out of order  | early, in D      | SB, issue queue (IQ)           |
| IO2L    | in order     | out of order | out of order  | late, in C       | SB, IQ, PRF, ROB               |

`proc_core` builds any of the five. Its `ARCH` parameter selects the version
and defaults to IO2L, the most complete one. A sixth pipeline, `dual_core`,
widens IO2L to two instructions per cycle in every stage. `ooo_top` places
all six side by side so that one program can be run on each and their timing
compared.

## Instruction set and core interface

The encodings are MIPS32:

* `addu rd, rs, rt`: SPECIAL, funct 0x21.
* `addiu rt, rs, imm`: opcode 0x09, sign-extended immediate.
* `mul rd, rs, rt`: SPECIAL2, funct 0x02. It returns the low 32 bits of the product.

The all-zero word is a nop; D drops it. Any other word is an illegal
instruction, which is the only exception source. There are no branches or
loads. The program counter only steps by 4, except when an exception redirects
it to `EXC_VECTOR`.

Ports of `proc_core`; `ooo_top` has the same ports as arrays indexed by core
number, 0 = I3L … 4 = IO2L, plus `dual_`-prefixed copies for the
dual-issue pipeline (two fetch ports and two register-update slots, slot 0
the older):

| port | dir | meaning |
|------|-----|---------|
| `imem_addr` / `imem_data` | out / in | Instruction fetch. The read is combinational: `imem_data` must hold the word at `imem_addr` in the same cycle. |
| `dbg_addr` / `dbg_data` | in / out | Read port on the architectural register file. |
| `arf_we`, `arf_waddr`, `arf_wdata` | out | Every architectural register update, in the cycle it happens. |
| `exc_taken`, `exc_epc` | out | One-cycle pulse with the pc of the excepting instruction. |
| `busy` | out | An instruction other than a nop is past F, or the PRF is being restored. |
| `events` | out | `core_events_t` flags, one per mechanism: issue, RAW / write-port / WAW stall, bypass from X, Y3, W or X0..X2, ROB full, IQ full, out-of-order issue, out-of-order completion, commit, exception, PRF copy cycle. |

Reset (`rst`, synchronous, active high) clears the register files, all valid
bits and all pointers. Fetch starts at `RESET_VECTOR` (default 0).

## Pipeline timing

```
F  D  I  X                W  (C)       X-pipe: addu, addiu
F  D  I  Y0 Y1 Y2 Y3      W  (C)       Y-pipe: mul
```

F, D, I and W are one cycle each. An X instruction issued in cycle t writes
back in t+2. A multiply issued in cycle t writes back in t+5. There is one
write-back port. In the late-commit versions, C follows W, so the earliest
commit is the cycle after write-back.

A result can be forwarded into I from three places: the end of X, the end of
Y3, and W. I3L has instead six sources: X0, X1, X2, X3, Y3 and W. The value
is always forwarded in the cycle it is produced, so a dependent add can issue
right behind an add. A multiply that depends on a multiply issues four cycles
after it.

## The scoreboard (I2OE, I2OL, IO2E, IO2L)

Hazards are found in one central table, with one entry per architectural
register. Each entry holds:

* **P**: a write to this register is in flight.
* **FU**: which pipe will produce it, X or Y.
* **WA**: a one-hot "when available" field, columns 4..0. Column c means the
  producer reaches W in c cycles.

An issuing instruction sets its destination's entry. For the X pipe the bit
goes into column 1 as of the next cycle, when the instruction is in X. For a
multiply it goes into column 4, when the multiply is in Y0. Every cycle the
WA fields shift right by one. P clears when the bit shifts out of column 0.

For each source, the I stage looks up the entry:

| lookup result | action |
|---------------|--------|
| P clear | Read the register file. |
| bit in column 1 | Bypass from the end of X or the end of Y3, chosen by FU. |
| bit in column 0 | Bypass from W. |
| bit in columns 2..4 | Stall. |

An X-pipe instruction also stalls while any column-2 bit is set. A bit in
column 2 means a multiply now in Y2, which would reach W in the same cycle:
this is the structural hazard on the single write-back port.

The same information can be kept per functional unit instead
(`scoreboard_fu`, used by the dual-issue pipeline). Each pipe has a row of
five cells, one per column, and each cell holds a valid bit and a destination
register. The cells shift right every cycle. A lookup compares the register
with every valid cell and reports the column of the youngest match. That
costs 32 x 10 comparators, but each pipe enters instructions into its own
row, so two can be entered in one cycle.

I3L has no scoreboard. Its I stage compares the source registers with the
destination of every pipeline register, youngest first. Because every
instruction takes five cycles from I to W, I3L has no write-port hazard.

## Out-of-order issue: the issue queue (IO2E, IO2L)

D writes each instruction into a 3-entry circular buffer instead of handing it
to I. An entry holds:

* the opcode and the immediate;
* the destination and two source specifiers, each with a valid bit;
* a **pending** bit per source.

Each cycle I picks the **oldest** entry that satisfies all of the following:

* Both of its pending bits are clear.
* It is a multiply, or no write-port hazard is present.
* Its destination has no write still more than one cycle from W.

The selected entry reads its operands and uses the same scoreboard bypass
rules as in-order issue. It leaves the queue at the end of the cycle. The
queue is a true circular buffer. Entries leave out of order, but a freed slot
can be reused only after the head pointer has moved past it. So a hole behind
a stalled old instruction still counts toward "full".

A pending bit must be cleared one cycle *before* its value can be bypassed.
Otherwise a dependent instruction would lose a cycle. This is why wakeup is
not done at W. Two broadcast ports carry the registers that become
bypassable in the next cycle:

* the destination of an X-pipe instruction issuing now;
* the destination of the multiply now in Y2.

A matching source clears its pending bit. When an instruction enters the
queue, a source starts pending if:

* its producer is still in the queue;
* its producer is a multiply issuing now; or
* its producer is a multiply in Y0 or Y1, according to the scoreboard.

An assertion in `proc_core` checks that every instruction the queue offers
passes the scoreboard's stall rules.

## Late commit: future file, reorder buffer and precise exceptions

In I2OL and IO2L, W does not write the architectural register file (ARF).
W writes a second register file, the PRF. The PRF is indexed by
architectural register and holds results not yet committed (a future file).
The I stage reads its operands from the PRF.

D allocates each instruction an entry at the tail of a 4-entry reorder buffer.
An entry holds:

* valid;
* pending;
* destination-valid and the destination register;
* an exception flag and the pc of the excepting instruction.

The instruction carries its ROB index down the pipe. W clears the pending
bit, in any order. C looks at the head: once it is not pending, C copies
`PRF[rdest]` into the ARF and frees the entry. So the ARF changes strictly in
program order. D stalls while the ROB is full. Full is judged on the
occupancy at the start of the cycle.

Exceptions are handled differently in each version:

* **Early commit (I2OE, IO2E):** D is the commit point. An illegal
  instruction found in D redirects fetch to `EXC_VECTOR` at once. The older
  instructions, already past D, finish normally.
* **I3L:** the instruction travels to W, which is in program order. W
  squashes everything younger and redirects fetch.
* **I2OL, IO2L:** the flag travels through X into the ROB entry. When that
  entry reaches the head, the core does the following:
  1. It clears the whole pipeline, the IQ, the scoreboard and the ROB.
  2. It copies the ARF back into the PRF, one register per cycle (r1..r31,
     31 cycles). This discards the younger, uncommitted results.
  3. It fetches from `EXC_VECTOR`; the handler's first fetch is 32 cycles
     after the exception.

  Older instructions have all committed by then, and no younger one has. The
  state the handler sees is therefore precise.

## Worked example

The seven-instruction sequence below is run on all five versions. Its inputs
are preloaded with r2=1, r3=2, r4=3, r6=4 and r10=21.

```
a: mul   r1,  r2,  r3        e: addiu r12, r11, 1
b: addiu r11, r10, 1         f: addiu r13, r12, 1
c: mul   r5,  r1,  r4        g: addiu r14, r12, 2
d: mul   r7,  r5,  r6
```

The table gives the cycle, counted from the fetch of a (cycle 0), in which
each instruction updates the ARF. That is W for I3L, I2OE and IO2E, and C for
I2OL and IO2L. The testbenches check these numbers, which were worked out by
hand from the rules above.

| version | a | b | c | d | e | f | g | what shapes it |
|---------|---|---|---|---|---|---|---|----------------|
| I3L  | 7 | 8 | 11 | 15 | 16 | 17 | 18 | Every instruction spends five cycles from I to W. |
| I2OE | 7 | 5 | 11 | 15 | 13 | 14 | 16 | b and e..g overtake; g waits one cycle for the write port. |
| I2OL | 8 | 9 | 12 | 16 | 17 | 18 | 19 | Same execution as I2OE, committed in order; g waits for a ROB entry. |
| IO2E | 7 | 5 | 11 | 15 | 9 | 10 | 14 | e and f issue around the stalled d; the 3-entry IQ fills. |
| IO2L | 8 | 9 | 12 | 16 | 17 | 18 | 19 | The 4-entry ROB fills while a waits, so out-of-order issue gains nothing here. |

With an 8-entry issue queue, IO2E finishes g in cycle 13 instead of 14. The
other instructions keep their cycles (a 7, b 5, c 11, d 15, e 9, f 10).
With an 8-entry IQ and an 8-entry ROB, IO2L still commits in cycles
8, 9, 12, 16, 17, 18, 19. In this sequence the in-order commit of d, the
long multiply chain, bounds everything behind it. `ooo_benefit_tb` checks
these numbers.

## Two per cycle: the dual-issue pipeline

`dual_core` is IO2L made two wide: it fetches, decodes, issues, writes back
and commits up to two instructions per cycle. It keeps IO2L's structures and
rules (scoreboard columns, bypass points, wakeup one cycle ahead, future file,
ARF-to-PRF recovery) and changes only the widths:

* **F** reads the words at pc and pc+4 and steps pc by 8.
* **D** drops nops and puts the remaining zero, one or two instructions into
  the IQ and the ROB in the same cycle. If either structure lacks room for
  the whole group, the group waits. The younger instruction's sources are
  marked pending if the older one in the same group produces them.
* **I** still feeds one X pipe and one multiplier. Each cycle it picks the
  oldest ready add for X and the oldest ready multiply for Y. So two
  instructions issue together only when one of them is a multiply.
* **W** has a slot per pipe. X and Y can complete in the same cycle, so the
  write-port stall of the single-issue versions disappears. Both slots write
  the PRF and clear ROB pending bits.
* **C** commits the head and, if it is also done, the next entry. An
  exception in that second entry is taken one cycle later, once it is the
  head.

The scoreboard is the unit-indexed one described above, so the X and the Y
instruction issued in one cycle each enter their own row. The IQ (4 entries)
is kept compacted, oldest first, instead of being a
circular buffer; the ROB has 8 entries. The PRF has six read ports (four
operands, two commits) and two write ports; the ARF has two write ports.

On the worked example, the ARF updates come in cycles 8, 8, 12, 16, 16, 17
and 17 for a..g (IO2L: 8, 9, 12, 16, 17, 18, 19). a and b commit together,
as do d and e, and f and g. f and g wait one cycle in D because the 4-entry
IQ is full. The multiply chain a → c → d still sets the pace.

## Where this design makes its own choices

* **Illegal instructions:** they are the only exception, and they are
  detected in D.
* **WAW hazards:** the I stage stalls an instruction whose destination still
  has a write more than one cycle from W. This keeps one scoreboard entry per
  register. Beyond that, programs are assumed free of WAW and WAR
  dependences. Out-of-order issue does not order such writes, and the random
  tests generate only dependence-free code.
* **Multiplier:** each of Y0..Y3 adds one byte-wide partial product into a
  running sum.
* **Reorder buffer:** the exception flag and pc fields are additions to the
  valid / pending / dest-valid / rdest entry.
* **Sizes:** the ROB has 4 entries and the IQ 3 (`ROB_ENTRIES`,
  `IQ_ENTRIES`), matching the worked example. A 7-entry ROB is an equally
  plausible reading.
* **ARF-to-PRF copy:** it takes one register per cycle. The alternative is
  available as `RECOVERY_BITS = 1`. I then keeps one bit per register saying
  whether the newest value is in the PRF (set when W writes it) or in the ARF
  (all cleared at the exception), and reads the operand from the file the
  bit names. This costs two more ARF read ports and a 32-bit register, and
  the handler is fetched in the cycle after the exception instead of 32
  cycles later.
* **Vectors:** the reset and exception vectors (0x0 and 0x100) are
  parameters.
* **Dual issue:** only the two-per-cycle rate is given. The split of the
  issue slots between X and Y, the all-or-nothing group allocation, the
  compacted IQ and the sizes (IQ 4, ROB 8) are this design's own.

## Not built

* **Distributed issue queues** (reservation stations): one queue per
  functional unit instead of the central IQ. Only named as an alternative;
  its organisation is not worked out.
* **Instruction memory:** the testbenches model it as an array.

## Files

| file | contents |
|------|----------|
| `rtl/ooo_pkg.sv` | Types (`uop_t`, `arch_e`, `core_events_t`) and the decoder. |
| `rtl/proc_core.sv` | The configurable pipeline: fetch, decode, issue with bypass network, W, C, exception recovery. |
| `rtl/scoreboard.sv` | The register-indexed scoreboard. |
| `rtl/scoreboard_fu.sv` | The scoreboard indexed by functional unit (dual-issue pipeline). |
| `rtl/issue_queue.sv` | The issue queue with wakeup and oldest-first select. |
| `rtl/reorder_buffer.sv` | The reorder buffer. |
| `rtl/x_pipe.sv` | The integer pipe, one stage or padded to four. |
| `rtl/mul_pipe.sv` | The four-stage multiplier. |
| `rtl/regfile.sv` | The 32 x 32 register file, used as both ARF and PRF, with `NREAD` read and `NWRITE` write ports. |
| `rtl/dual_core.sv` | The dual-issue pipeline, with its IQ and ROB written inline. |
| `rtl/ooo_top.sv` | All five versions and the dual-issue pipeline side by side. |
| `tb/tb_prog_pkg.sv` | Program builder (example, exception sequence, random WAW/WAR-free programs) and a reference instruction-set model. |
| `tb/*_tb.sv` | One self-checking testbench per module. Each prints `TB_RESULT checks=N failures=M`. |
| `tb/exceptions_tb.sv` | Replaces each of a..g in turn with an illegal word. All six pipelines must end in the reference model's precise state. |
| `tb/ooo_benefit_tb.sv` | The example with an 8-entry IQ, so that out-of-order issue is not limited by queue size (see below). |
| `tb/dual_core_tb.sv` | The dual-issue pipeline alone: example timing, a fault at each of a..g, random programs with and without an exception. |
| `tb/recovery_tb.sv` | I2OL and IO2L with `RECOVERY_BITS = 1`: precise state after exceptions, handler fetched one cycle after the exception, no copy cycles. |
| `tb/waw_tb.sv` | Writes to the same register from a multiply and a younger add, on the three in-order-issue versions. |

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ooo_pkg.sv tb/tb_prog_pkg.sv tb/ooo_top_tb.sv --top-module ooo_top_tb
./obj_dir/Vooo_top_tb
```

Replace `ooo_top_tb` with any other testbench name to run it. `ooo_top_tb`
runs all six pipelines at their default sizes, in well under a second. It
runs the example with cycle checks and an exception, then 40 random programs
and 30 random programs with an illegal instruction at a random place. Each
run is compared register by register against the reference model. It then
reports how often each mechanism occurred, and it fails if a version never
used one of its mechanisms.

To try another organisation, set `proc_core #(.ARCH(ooo_pkg::ARCH_I2OE))`.
To try other queue sizes, set `ROB_ENTRIES` (up to 16) and `IQ_ENTRIES`.
The expected cycle numbers in the testbenches hold only for the default
sizes.
