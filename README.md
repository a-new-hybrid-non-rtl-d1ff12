# Dual control-flow hardware monitor

A radiation-induced upset in a processor's program counter (PC) or instruction register can hit
any pipeline stage. When it does, the processor executes something other than what it fetched.
A monitor that watches only the memory bus sees a correct fetch. A monitor that watches only the
trace port sees an executed instruction but has nothing to compare it with. This design watches
both ends of the pipeline and compares them:

* **Upstream**, on the instruction fetch bus, it records the address and code of every fetched
  instruction.
* **Downstream**, on the processor's instruction trace port, it sees every executed instruction
  with its PC, opcode, time tag and trap/error-mode flags.

Each executed instruction must match its fetched copy. A corruption anywhere between fetch and
execution therefore shows up as a difference.

One kind of error looks the same at both ends: a wrong fetch address produced by the fetch stage
itself. A **PC prediction** check on the trace stream catches it, by checking that each executed
PC follows from the previous instruction. Two further checks cover hangs and fault-induced
exceptions. One uses the processor's **time tag** to spot a processor that has stopped
executing. The other uses the **trap and error-mode flags** to spot traps that normal execution
would not take.

The monitor is non-intrusive. It drives nothing on the processor side. It needs no change to the
software and no signatures or tables prepared at compile time. The target is a LEON3-class
SPARC V8 processor with a 7-stage pipeline, and that is where the default sizes come from.

```
          fetch bus (A, I)                         trace port (128-bit entries, time tag)
               |                                                |
        +------v------+                                  +------v------+
        | hm_fetch_if |                                  | hm_trace_if |
        +------+------+                                  +--+---+---+--+
               | (PC, opcode)                              |   |   |
        +------v----------+   entries / retire   +---------v-+ |   |
        | hm_input_buffer |<-------------------->| hm_pc_    | |   |
        |  7 entries      |                      | compare   | |   |
        +-----------------+                      +-----+-----+ |   |
                                   +-----------------+ |       |   |
                                   | hm_pc_predict   |<+-------+   |
                                   +--------+--------+ |           |
                      +------------+        |          |   +-------v------+
                      | hm_timeout |<-------+----------+---| hm_trap_check|
                      +-----+------+        |          |   +-------+------+
                            +---------------+----+-----+-----------+
                                                 v
                                           hm_control --> error, cause
```

`hardware_monitor` is the top level. Its ports are plain signals and packed structs.

## The two observation points

**Fetch bus (`hm_fetch_if`).** The bus is modelled as a pipelined read bus with separate address
and data phases, like AMBA AHB:

* An address is accepted in a cycle where `bus_avalid` and `bus_ready` are both high.
* Its instruction word is on `bus_rdata` in the next cycle where `bus_ready` is high.
* `bus_ready` low inserts wait states.

The interface holds the address of the fetch in its data phase and pairs it with the returned
word. Each completed fetch becomes one `fetch_t` record `{pc[31:2], inst}`. If your bus differs
(a cache-side interface, one instruction per cycle), this is the only block that must change.

**Trace port (`hm_trace_if`).** Entries use the LEON3 128-bit instruction-trace layout:

| bits    | field                                              |
|---------|----------------------------------------------------|
| 126     | continuation of a multi-cycle instruction          |
| 125:96  | time tag                                           |
| 63:34   | PC[31:2]                                           |
| 33      | instruction trapped                                |
| 32      | processor in error mode                            |
| 31:0    | opcode                                             |

A multi-cycle instruction, such as a store, produces two or three entries. Only the first
describes the instruction, so the continuations are dropped. The processor's free-running time
tag is a separate input (`trace_ttag`), because the timeout must see it advance while no entry
arrives.

## Matching executed instructions to fetched ones

This is the part of the design that needs the most care.

The input buffer (`hm_input_buffer`) holds fetch records in fetch order. It is a 7-entry shift
register, one entry per pipeline stage. The fetch side always runs ahead of the trace side, so
the buffer holds the instructions currently in flight.

The difficulty is that **not every fetched instruction is executed**. After a taken branch or a
trap, the processor has already fetched one or two words from the wrong path and then squashes
them. Those words appear on the fetch bus but never on the trace port. The rule used here still
keeps the "in order of appearance" comparison:

* When an executed instruction arrives, `hm_pc_compare` searches all buffer entries in parallel.
  The *oldest* entry with the same PC is the fetched copy of this instruction.
* That entry and every older one are retired in the same cycle (`pop_n`). The older entries can
  only be squashed fetches. Their number is reported on `ev_skipped`.
* **No entry has the PC:** the PC was corrupted after fetch, or an instruction ran that was never
  fetched. This is a compare error, and nothing is retired.
* **The entry's opcode differs from the trace opcode:** the instruction register was corrupted.
  This is also a compare error.

Loops bring the same PC back, but the oldest-first rule picks the right copy. A squashed fetch
can have the same PC as the instruction that really executes. The squashed copy is then matched
instead. Both copies hold the same code, and the real copy is retired with the next instruction.

A PC corrupted into the PC of a *younger* in-flight instruction with the same code would pass the
compare. The prediction check still catches it, because the PC does not follow from the previous
instruction.

If a push finds the buffer still full after retirement, the oldest entry is discarded and
`ev_overflow` pulses. At a run-ahead no deeper than the pipeline, this does not happen: the tests
check this. A deeper run-ahead drops a live entry, which later shows as a compare error.

**Start-up.** When monitoring starts (`enable` rising, or `clear` after an error), the buffer is
empty. Up to 7 instructions already in the pipeline were fetched before recording began. The
control block therefore keeps compare errors masked until 7 instructions have been traced
(state `SYNC`; `ev_synced` pulses when it ends). The other three checks run from the first
instruction.

## PC prediction on a SPARC V8 instruction stream

`hm_pc_predict` looks at consecutive executed instructions. The condition codes are not visible,
so for a conditional branch both outcomes are accepted: the branch offset (taken) or the
instruction size (not taken). SPARC branches are *delayed*: the instruction after a branch, its
delay slot, executes before the target. The annul bit can cancel that slot.

In the table, P is the previous instruction and C is the transfer whose delay slot P occupies.
The allowed next PCs (byte offsets) are:

| previous instruction P                            | allowed next PC                   |
|---------------------------------------------------|-----------------------------------|
| ordinary instruction, CALL, JMPL/RETT, branch a=0 | P+4                               |
| branch always, a=1                                | target                            |
| branch never, a=1                                 | P+8                               |
| conditional branch, a=1                           | P+4 (taken) or P+8 (not taken)    |
| delay slot of CALL or branch always               | target of C                       |
| delay slot of branch never                        | C+8                               |
| delay slot of conditional branch, a=0             | target of C or C+8                |
| delay slot of conditional branch, a=1             | target of C                       |
| delay slot of JMPL/RETT                           | not checked (register target)     |
| a trapped instruction                             | not checked here (see trap check) |
| a transfer inside a delay slot                    | not checked, nor the one after it |

A wrong fetch address that follows a checked instruction is therefore detected immediately.
A jump to a register-held address is not checked.

## Hangs and exceptions

**Timeout (`hm_timeout`).** The time tag counts cycles while the processor runs. If it advances
more than `TIMEOUT` cycles (default 1024) past the time tag of the last executed instruction,
`cause.timeout` is raised. A halted processor freezes the time tag and is not reported. Tag
differences are taken modulo 2^30.

**Trap check (`hm_trap_check`).** Entry into error mode is always an error. A trap, though, may
be one the software uses on purpose (a system call, a register-window spill) or one caused by a
fault (an illegal or corrupted instruction, a bad address). The two are told apart by the
*next* traced instruction, which is the first instruction of the handler at
`TRAP_BASE + 16*tt`:

1. The trap type `tt` is read back from bits 11:4 of that PC.
2. The trap is accepted only if the PC lies in the trap table and on a slot boundary.
3. It must also have its bit set in `ALLOWED_TT`.

The default mask allows:

* window overflow and underflow (0x05, 0x06);
* interrupts (0x11–0x1F);
* software traps (0x80–0xFF).

Set the mask to the traps your software really implements.

## Control and error reporting

`hm_control` runs four states:

* `IDLE`: `enable` is low; the buffer is held empty.
* `SYNC`: start-up (see above).
* `MONITOR`: all four checks run.
* `ERROR`: a check has fired.

`error` is the OR of the four check outputs. It is latched, and `cause` (`cause_t`:
`{trap, timeout, predict, compare}`) records which checks fired. In `ERROR` the checks stop.
`clear` restarts through `SYNC` with an empty buffer. Dropping `enable` returns to `IDLE`.
`trap_type` holds the trap type of the last trap checked.

**Latency.** Both interfaces, each check and the control block are registered. `error` therefore
rises 3 clock cycles after the trace entry of a faulty instruction is presented, for the compare,
prediction and error-mode checks. An unexpected trap is reported 3 cycles after its handler's
first instruction. A hang is reported `TIMEOUT`+4 cycles after the trace entry of the last instruction.

## Parameters

| parameter (top) | default | meaning                                                          |
|-----------------|---------|------------------------------------------------------------------|
| `DEPTH`         | 7       | input buffer entries; set to the processor's pipeline length     |
| `TIMEOUT`       | 1024    | cycles of time-tag advance without an instruction before an error |
| `TRAP_BASE`     | 0       | trap table base address (only bits 31:12 are used)               |
| `ALLOWED_TT`    | see above | 256-bit mask of implemented trap types                         |

Shared types (`fetch_t`, `trace_t`, `cause_t`), the trace-entry bit positions and the SPARC
decode helpers are in `rtl/hm_pkg.sv`.

## What follows the original description, and what is this design's own

These parts follow the original description:

* the two observation points;
* an input buffer as deep as the pipeline, compared in order of appearance;
* PC prediction from opcode and PC, accepting the branch offset or the instruction size;
* a timeout on the time tag;
* unexpected traps told apart from implemented ones by the next traced instruction;
* error mode as an error;
* one Error signal formed from the compare, prediction, timeout and trap outputs;
* a control block.

These are this design's own choices:

* the fetch-bus protocol;
* the trace-entry layout, taken from LEON3;
* skipping squashed fetches by retiring up to the oldest PC match;
* the overflow policy;
* the synchronisation phase and its length;
* the SPARC delay-slot and annul rules and what is left unchecked;
* the timeout value;
* the trap-table test and the default trap mask;
* the latched error with a cause vector.

In the original description the time-tag and trap checks belong to the control block. Here they
are separate modules beside it, which changes nothing functionally.

For comparison, the original implementation is reported at about 399 flip-flops and 512 bits of
memory. This RTL holds the buffer (7 × 62 bits) and the check state in flip-flops, about 850 bits
after generic synthesis. The difference comes mostly from the registered interfaces, the full
30-bit time-tag compare and the 256-bit trap mask. None of these were tuned for area.

## Files

* `rtl/hardware_monitor.sv`: top level.
* `rtl/hm_fetch_if.sv`, `rtl/hm_trace_if.sv`: the two observation interfaces.
* `rtl/hm_input_buffer.sv`, `rtl/hm_pc_compare.sv`: fetch/trace comparison.
* `rtl/hm_pc_predict.sv`, `rtl/hm_timeout.sv`, `rtl/hm_trap_check.sv`: the other three checks.
* `rtl/hm_control.sv`: sequencing and Error.
* `rtl/hm_pkg.sv`: types and helpers.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
* `tb/tb_hardware_monitor.sv`: end-to-end scenarios.
* `tb/tb_hm_workloads.sv`: benchmark programs.

## Simulating

Every testbench is self-checking and ends with a line `TB_RESULT checks=N failures=M`. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/hm_pkg.sv tb/tb_hardware_monitor.sv \
          --top-module tb_hardware_monitor -Mdir obj_tb
./obj_tb/Vtb_hardware_monitor
```

Substitute any other `tb/tb_*.sv` and its module name. Lint the RTL with
`verilator --lint-only -Wall -Irtl -y rtl rtl/hm_pkg.sv rtl/hardware_monitor.sv`.

**End-to-end (`tb_hardware_monitor`).** This test uses the top-level defaults. A behavioural
processor model runs a random SPARC program that contains:

* branches of every kind, with and without annul;
* CALL and JMPL;
* stores, which give two trace entries each;
* software traps with handlers.

The model drives the fetch bus with wait states and squashed wrong-path fetches, and the trace
port with at least 5 cycles of pipeline delay. Eight scenarios run:

1. a 4000-instruction clean run, which must raise no error and no overflow;
2. an opcode corrupted in the pipeline;
3. a PC corrupted in the pipeline, after `clear`;
4. a wrong fetch address, which must be caught by prediction and not by the compare;
5. a hang;
6. an illegal-instruction trap, which must report trap type 0x02;
7. error mode;
8. a run-ahead deeper than the buffer.

Each fault must set `error` with the right cause, within 4 cycles where the latency is fixed.
Every mechanism is counted and must occur: synchronisation, squashed-fetch skipping, overflow,
continuation dropping, wait states, annulled slots, implemented traps, and each of the four
checks.

**Benchmark programs (`tb_hm_workloads`).** The evaluation programs are:

* bubble sort of 15 values;
* 5x5 matrix multiplication;
* AES-128 (key expansion and 10 rounds).

Each is laid out as SPARC code. The branch outcomes come from running the real algorithm on its
data. Each program runs once fault-free, then through 30 runs that each hold one PC or
instruction-register fault: an opcode corrupted in flight, a PC corrupted in flight, or a wrong
fetch address. All faults must be detected. In the last run all 90 were detected, matching the
full detection reported for PC and instruction-register faults.

The model is simpler than a real LEON3: it has no cache misses and a fixed minimum pipeline
delay. Its run lengths (about 2,400–4,400 cycles) are therefore not those of the real processor.

**Not verified.** The design has not been run against a real LEON3 trace or fetch bus. The
fault campaigns are sampled at instruction level, not exhaustive per flip-flop and cycle.
Upsets inside the monitor itself are not tested.
