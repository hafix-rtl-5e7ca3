# HAFIX backward-edge control-flow integrity in RTL

Return-oriented programming works by overwriting return addresses so that
`ret` instructions jump into short code fragments chosen by the attacker.
HAFIX (Hardware-Assisted Flow Integrity eXtension) closes that door with a
simple rule enforced in hardware: **a function return may only land on a call
site that belongs to a function which is currently executing.**

To make "currently executing" visible to the processor, every function gets a
unique label and the compiler adds four instructions:

| instruction   | placed                                        | effect in hardware                                   |
|---------------|-----------------------------------------------|------------------------------------------------------|
| `CFIBR L`     | first instruction of every function           | mark label L active                                  |
| `CFIREC L`    | instead of `CFIBR` in a recursive function    | mark L active once, count the instances              |
| `CFIDEL L`    | at function exit (before `ret`, or in the SPARC `retl` delay slot) | mark L inactive (or count one instance down) |
| `CFIRET L`    | at every call site, i.e. every return target  | check that L is active; violation otherwise          |

In addition the processor follows a small state model: after a call the next
instruction must be `CFIBR`/`CFIREC`, after a return the next instruction must
be `CFIRET`. A return therefore cannot land in the middle of code, and it can
only reach a `CFIRET` whose function is still live. The active labels live in
a memory that software cannot address.

This repository holds SystemVerilog for the two hardware implementations of
that scheme: one for the **Siskiyou Peak** core (a 32-bit, 5-stage embedded
core running a subset of x86) and one for the **LEON3** core (SPARC V8,
7-stage pipeline). The cores themselves are not included; each CFI unit
exposes the signals it needs from its core as ports.

## Instrumented code

The same two functions, `funct_a` (label 0x15) calling `funct_b` (label 0x16),
look like this on the two cores:

```
Siskiyou Peak                      SPARC (LEON3)
funct_a: cfibr  0x15               funct_a: cfibr  0x15
         push   %ebp                        save   %sp, -96, %sp
         mov    %ebp, %esp                  ...
         call   funct_b                     call   funct_b
         cfiret 0x15                        nop                (delay slot)
         mov    %esp, %ebp                  cfiret 0x15
         pop    %ebp                        restore
         cfidel 0x15                        retl
         ret                                cfidel 0x15        (delay slot)
funct_b: cfibr  0x16               funct_b: cfibr  0x16
         ...                                ...
         cfidel 0x16                        retl
         ret                                cfidel 0x16        (delay slot)
```

On SPARC `call` and `retl` are delayed control transfers: the instruction
after them executes before the jump takes effect. That is why `CFIRET` sits
after the `nop`, and why `CFIDEL` can replace the `nop` normally found after
`retl` at no cost.

## Siskiyou Peak unit: a label bitmap in the execute stage

`sp_cfi_ctrl` watches the instructions the execute stage completes. The label
state is `sp_label_state_mem`, a 16384 x 1 memory with one bit per label,
addressed directly by the 14-bit label: `CFIBR` writes 1, `CFIDEL` writes 0,
`CFIRET` reads the bit and raises an exception if it is 0. Any active label is
a valid return target, so a return into the call site of *any* live function
(for example an outer caller) is accepted; a return to a function that has
already exited, to a label never activated, or to code that is not a `CFIRET`
is refused.

**Single-cycle timing.** The label goes straight from the instruction to the
memory address with no logic in between, which leaves time to clock the
memory on the falling edge:

```
          rising edge          falling edge           next rising edge
  execute: label/op presented  memory reads/writes    exception taken
                                rdata valid ------->  exception_o valid
```

Every CFI instruction completes in its own cycle and never stalls, and a
`CFIRET` sees the write of a `CFIBR`/`CFIDEL` in the cycle right before it.
`exception_o` and `cause_o` are combinational and valid before the rising
edge that ends the offending instruction's cycle; that instruction changes no
state.

**Recursion (`CFIREC` and `CFIREC_CNTR`).** A recursive function would write
its label many times and clear it at the first return, breaking the still
active outer instances. `cfirec_cntr` is a hidden counter bound to one label:

1. `CFIREC L` with the counter at 0: set bit L, bind the counter to L, count = 1.
2. `CFIREC L` with the counter bound to L: count + 1 (the bit is already set).
3. `CFIDEL L` with count > 1 and the counter bound to L: count - 1 only.
4. `CFIDEL L` with count = 1: count = 0 and clear bit L.

One counter means one recursive function at a time (non-nested recursion). A
`CFIREC` for a different label while the counter is in use acts as a plain
`CFIBR`. A `CFIREC` that would wrap the 16-bit counter raises an exception.

**After reset** the memory clears itself, one entry per cycle (16384 cycles);
`stall_o` is high during that time and instructions offered then are ignored.
A block RAM that powers up at zero would not need this; the sweep makes a
warm reset safe as well.

## LEON3 unit: a label stack beside the fetch stage

On SPARC the unit is a state machine, `sparc_cfi_fsm`, running in parallel to
the fetch unit, fed by `sparc_cfi_decode` and backed by `label_lifo`, a
1024 x 13 last-in-first-out stack of labels with a counter beside each entry.
Its rule is stricter than the bitmap's: a `CFIRET` must match the label **on
top of the stack**, i.e. the function that made the call.

| instruction     | LIFO action                                                                    |
|-----------------|--------------------------------------------------------------------------------|
| `CFIBR`/`CFIREC L` | if L equals the top label: top counter + 1; otherwise push L with counter 0 |
| `CFIDEL`        | if the top counter is non-zero: counter - 1; otherwise pop                     |
| `CFIRET L`      | fault unless L equals the top label                                            |

Note the two counter conventions: on Siskiyou Peak the count is the number of
live instances (the label goes at 1 -> 0); on LEON3 it is the number of
*extra* instances (the entry goes when a `CFIDEL` finds 0). Both are as
specified for their core. With counters on every entry, any function that is
re-entered directly from itself uses one stack entry however deep it goes.

**The state machine** has to follow SPARC delay slots:

```
RUN --call--> CALL_DS --any non-CTI--> EXP_BR --CFIBR/CFIREC--> RUN
RUN --ret/retl--> RET_DS --any non-CTI (CFIDEL)--> EXP_RET --CFIRET, label = top--> RUN
any violation --> HALT (until reset)
```

CFI instructions met in RUN or in a delay slot act on the stack in the same
way (this is how the `CFIDEL` in the `retl` delay slot pops before the
`CFIRET` checks). A cycle with `valid_i` low (stall, bubble, annulled slot)
leaves the state alone. `flush_i` (a trap flush) returns the sequencing to
RUN without touching the stack. A fault pulses `fault_o` with a cause in the
cycle of the offending instruction and raises `halt_o`, which stays high
until reset.

Faults: wrong instruction after a call or return, `CFIRET` label not on top,
a push into a full stack, a top counter already at 255, a `CFIDEL` with an
empty stack, and a control transfer in a call or return delay slot.

**Decoding.** `sparc_cfi_decode` is combinational. Calls are `CALL` and
`JMPL` writing `%o7`; returns are `JMPL %o7+8` (`retl`) and `JMPL %i7+8`
(`ret`), also `+12`, into `%g0`; branches, other `JMPL`, `RETT` and `Ticc`
count as other control transfers. The CFI instructions need an encoding, and
this design defines one in the format-3 opcode space that SPARC V8 leaves
unused:

```
 31 30 | 29 27 | 26 25 | 24    19 | 18  14 | 13 | 12        0
  1  0 |  000  |  fn   | 00 1001  | 00000  |  1 |   label
 fn: 0 CFIBR, 1 CFIDEL, 2 CFIRET, 3 CFIREC
```

The 13-bit `simm13` field carries the label, which matches the 13-bit stack
entries. `hafix_pkg::sparc_cfi_word()` builds such a word. An assembler and
compiler that emit these encodings are needed to use the unit; change the
package constants to match another encoding.

## Files and interfaces

| file | contents |
|------|----------|
| `rtl/hafix_pkg.sv` | instruction classes `cfi_op_e`, violation causes `cfi_cause_e`, sizes, SPARC field constants and the CFI encoding |
| `rtl/hafix_top.sv` | both units side by side, each with its own ports, sharing `clk` and `rst_n` |
| `rtl/sp_cfi_ctrl.sv` | Siskiyou Peak CFI control unit (state model, recursion, exceptions) |
| `rtl/sp_label_state_mem.sv` | 16384 x 1 falling-edge label bitmap with clear-after-reset |
| `rtl/cfirec_cntr.sv` | `CFIREC_CNTR` and its bound label |
| `rtl/sparc_cfi_fsm.sv` | LEON3 HAFIX state machine |
| `rtl/label_lifo.sv` | 1024 x 13 label stack with per-entry counters, asynchronous read |
| `rtl/sparc_cfi_decode.sv` | SPARC V8 instruction classifier |

All sequential logic uses the rising edge of `clk` and a synchronous
active-low `rst_n`, except the label bitmap, which uses the falling edge.

The Siskiyou Peak side takes **decoded** instruction classes (`sp_op_i`) and a
14-bit label: the x86 encodings of the CFI instructions are left to the
core's decoder. The LEON3 side takes raw 32-bit instruction words.

Violation causes (`cfi_cause_e`): `CAUSE_NO_CFIBR`, `CAUSE_NO_CFIRET`,
`CAUSE_LABEL`, `CAUSE_OVERFLOW`, `CAUSE_UNDERFLOW`, `CAUSE_DELAY_SLOT`.

Top-level parameters and their defaults:

| parameter | default | meaning |
|-----------|---------|---------|
| `SP_LABEL_BITS` | 14 | label width on Siskiyou Peak; memory has 2^14 = 16384 entries |
| `SP_REC_CNT_W` | 16 | width of `CFIREC_CNTR` (own choice) |
| `LIFO_DEPTH` | 1024 | label stack depth on LEON3 |
| `LIFO_CNT_W` | 8 | width of each stack entry's counter (own choice) |

Synthesis (generic yosys) of the top gives about 65 flip-flops beside the
memories: 16384 bits of label bitmap and 1024 x (13 + 8) bits of stack.

## What is specified and what is chosen here

Taken from the HAFIX design: the four instructions and the state model; the
16384 x 1 bitmap indexed by the label, clocked on the opposite edge for
single-cycle operation, and its exception; `CFIREC`/`CFIREC_CNTR` and its
1 -> 0 rule; the 1024 x 13 stack with its push/increment, decrement/pop and
top-of-stack check; the halt on a SPARC fault; delay-slot placement of the
SPARC instructions.

Chosen here because the design leaves it open: the SPARC encoding of the CFI
instructions; the widths of both counters; the exact set of extra FSM states
and how stalls, annulled slots and flushes are signalled; faults for stack
overflow/underflow, counter saturation and control transfers in delay slots;
`CFIREC` treated as `CFIBR` on SPARC; `CFIDEL` not comparing its label on
either core; the clear-after-reset sweep and its stall; and the return to
normal sequencing after a Siskiyou Peak exception so that the handler can run.

Limits to keep in mind:

- The Siskiyou Peak policy accepts a return into the call site of any live
  function, not only the caller. The LEON3 policy accepts only the caller, but
  a function calling itself through another function (A -> B -> A) gets a new
  entry each time.
- Only one recursive function can be tracked by `CFIREC_CNTR` at a time.
- A trap flush on SPARC resets the sequencing state. If a trap can arrive
  between a call and its `CFIBR`, the core must arrange for the check to be
  repeated after the trap.
- Forward edges (indirect calls and jumps) are not checked at all; the scheme
  relies on software for them. Code injection must be prevented separately
  (non-executable data), otherwise an attacker could plant CFI instructions.
- Neither label store is saved or restored on a context switch; the units
  protect a single bare-metal program.

## Simulation

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv -Irtl \
    rtl/hafix_pkg.sv tb/tb_hafix_top.sv --top-module tb_hafix_top -o sim
./obj_dir/sim
```

Replace `tb_hafix_top` by any other testbench name. The testbenches are:

- `tb_hafix_top`: both units at full default size. Runs a program with a
  call tree and a recursive function on both cores at once, with random
  pipeline bubbles and SPARC trap flushes, then a series of attacks (return to
  a live non-caller, to an exited function, to a label never used, into
  non-`CFIRET` code, call into a function body, control transfer in a delay
  slot, empty-stack `CFIDEL`, 1025 nested functions, recursion past both
  counters). It counts every mechanism and fails if one never happens.
- `tb_sp_cfi_ctrl`, `tb_sparc_cfi_fsm`: directed examples plus long random
  instruction streams checked each cycle against a reference model of the
  rules.
- `tb_sp_label_state_mem`: clear-sweep length and same-cycle read timing.
- `tb_cfirec_cntr`, `tb_label_lifo`, `tb_sparc_cfi_decode`: unit checks
  against small models.

All testbenches finish in seconds. The unit testbenches shrink the counters
(and the LEON3 stack to 16 entries) so that the saturation and full cases are
reached quickly; the top-level test uses the defaults throughout.
