# LC-3 with vectored interrupts, exceptions and RTI

This is a multi-cycle LC-3 processor in SystemVerilog. It can be interrupted
by I/O devices and can trap its own faults, and it returns to the interrupted
program with `RTI`. A device does not wait to be polled. It raises a
request. The processor takes the request at an instruction boundary and saves
the interrupted program's PSR and PC on the supervisor stack. It then jumps
through a vector table entry to a handler. The handler ends with `RTI`, which
restores both, so the interrupted program does not notice the interruption.

The same machinery handles two exceptions:

- executing `RTI` in user mode (privilege exception, vector x0100);
- executing the reserved opcode `1101` (illegal-opcode exception, vector x0101).

The design comes with a keyboard interface (KBSR at xFE00, KBDR at xFE02),
whose interrupt request sits at priority level 4 and is vectored through
x0180. It also has 64K words of memory.

## Where the state is saved: PSR, two stacks and the Vector register

| Register | Meaning |
|---|---|
| `PSR[15]` | privilege: 0 supervisor, 1 user |
| `PSR[10:8]` | running priority, 0..7 |
| `PSR[2:0]` | condition codes N, Z, P |
| `R6` | the stack pointer of whichever mode is running |
| `Saved_SSP` | the supervisor stack pointer, kept while a user program runs |
| `Saved_USP` | the user stack pointer, kept while the supervisor runs |
| `Vector` | the 16-bit vector table address of the event being taken |

All other PSR bits read as 0.

The user and supervisor stacks are separate. Interrupt state always goes on
the supervisor stack, so a user program cannot corrupt it or read it. The
stack switch happens only when the processor leaves or re-enters user mode:

- Entering from user mode: `Saved_USP <- R6`, then `R6 <- Saved_SSP`.
- Entering from supervisor mode (a handler being interrupted): `R6` is
  already the supervisor stack, and nothing is switched.
- `RTI` back to user mode: `Saved_SSP <- R6`, then `R6 <- Saved_USP`.
- `RTI` back to supervisor mode: nothing is switched.

### Worked example

A user program runs at PSR x8004 (user mode, priority 0, N set) with `R6` =
x4000, and `Saved_SSP` = x2FF5. The keyboard interrupts the fetch of x3001,
after PC has already been incremented to x3002. After the entry sequence:

- `Saved_USP` = x4000 and `R6` = x2FF3.
- Memory x2FF4 holds x8004 (the old PSR) and x2FF3 holds x3001 (PC-1).
- PSR = x0704: supervisor mode, priority 7, condition codes unchanged.
- PC = the contents of x0180 (x12A0 in the example).

After the handler's `RTI`:

- PC = x3001 and PSR = x8004.
- `R6` = x4000 and `Saved_SSP` = x2FF5.

`tb/tb_kb_example.sv` checks every one of these numbers.

### Why PC-1 is saved

The interrupt test sits in fetch state 18, which already does `PC <- PC+1`.
When INT is seen, the fetch is abandoned. The address of the instruction
that was not fetched is therefore PC-1. The datapath has a decrementer on
the PC output for this (`GatePC-1`). An exception saves PC-1 as well, which
is the faulting instruction itself. A handler that wants to skip that
instruction adds 1 to the saved PC on the stack before its `RTI`. The
end-to-end testbench does this.

## The microsequencer (`lc3_control`)

States carry the standard LC-3 state numbers. The sequences specific to this
design:

```
fetch       18 MAR<-PC, PC<-PC+1      --INT=1--> 49
            33 MDR<-M (wait R)  35 IR<-MDR  32 decode (BEN)
interrupt   49 Vector<-INTV, PSR[10:8]<-prio, MDR<-PSR, PSR[15]<-0
               old PSR[15]=1 -> 45, =0 -> 37
            45 Saved_USP<-SP, SP<-Saved_SSP
            37 MAR,SP<-SP-1   41 write (old PSR)
            43 MDR<-PC-1      47 MAR,SP<-SP-1   48 write (PC-1)
            50 MAR<-Vector    52 MDR<-M         54 PC<-MDR   -> 18
privilege   8 (RTI) with PSR[15]=1 -> 44 Vector<-x0100, MDR<-PSR, PSR[15]<-0 -> 45
opcode 1101 32 -> 13 Vector<-x0101, MDR<-PSR, PSR[15]<-0, -> 45 or 37
RTI         8 MAR<-SP  36 MDR<-M  38 PC<-MDR  39 MAR,SP<-SP+1
            40 MDR<-M  42 PSR<-MDR  34 SP<-SP+1
               restored PSR[15]=1 -> 59 Saved_SSP<-SP, SP<-Saved_USP
               restored PSR[15]=0 -> 51 (nothing)          -> 18
```

In state 49, the branch on `PSR[15]` uses the value from before the state.
The same clock edge clears the bit.

The other instructions use the usual LC-3 states: ADD, AND, NOT, LEA, LD,
LDR, LDI, ST, STR, STI, BR, JMP/RET, JSR/JSRR and TRAP. Two details:

- `TRAP` saves the return address in R7 and loads PC from
  `Mem[ZEXT(IR[7:0])]`. It does not change privilege, and the service routine
  returns with `RET`.
- `LEA` does not set the condition codes.

Each memory state waits for the ready signal R. MDR is loaded only in the
cycle where R is high.

### Timing

All numbers below use the default of one memory wait cycle.

| Sequence | Cycles |
|---|---|
| Instruction fetch (18, 33, 33, 35, 32) | 5 |
| Interrupt entry from user mode, states 49 to 54 | 13 |
| Interrupt entry from supervisor mode (no state 45) | 12 |
| `RTI`, states 8 to 59 or 51, after fetch and decode | 10 |

Each memory access takes `WAIT_CYCLES + 1` cycles. In general, with W =
`WAIT_CYCLES`:

| Sequence | Cycles |
|---|---|
| Fetch and decode | 4 + W |
| Entry from user mode | 10 + 3W |
| RTI | 8 + 2W |

`tb/tb_mem_latency.sv` checks these formulas for W = 0, 1 and 3.

## Interrupt requests, priority and the vector

`bus_logic` takes eight request lines, one per priority level. The keyboard
is on line 4. The other lines are brought out of the top as `ext_irq`.

1. **Daisy chain** (`irq_daisy_chain`): a request blocks every device below
   it in the chain. Only the highest requester is granted and drives the
   shared IRQ line. The tri-state drivers of a bus implementation are
   modelled as a one-hot grant and an OR.
2. **Priority encoder** (`priority_encoder`): turns the grant into the 3-bit
   IntPriority.
3. **INT** goes to the microsequencer only when `IntPriority > PSR[10:8]`. A
   handler therefore cannot be re-entered by a request at or below its own
   priority. Without this check, the keyboard would re-interrupt its handler
   before the handler could read KBDR.
4. **Vector** (`intv_vector`): the vector is `{x01, low byte}`. VectorMUX
   chooses the low byte:

   | VectorMUX | Source | Low byte |
   |---|---|---|
   | 00 | hardware interrupt | `INTV_ROM[IntPriority]` |
   | 01 | privilege exception | x00 |
   | 10 | illegal opcode | x01 |
   | 11 | unused | x00 |

   The 8-entry INTV_ROM holds x80 for the keyboard's level 4. The other
   levels get `x80 + ((p - 4) mod 8)`, which keeps every hardware vector
   inside x0180–x0187. The ROM is computed, not stored.

`vector_rom32` builds the same mapping as one 32-word lookup, addressed by
`{VectorMUX, Priority}`. Of its 32 words, 22 are duplicates; the payoff is
that it needs no separate mux and prefix. Setting `VECTOR_ROM32 = 1` makes
`bus_logic` load the Vector register from this lookup. Both forms give the
same addresses. `tb_bus_logic` compares them directly, and `tb_nested_int`
runs the whole processor on the lookup.

### Priority on entry: `LOAD_MAX_PRIORITY`

The parameter sets what state 49 writes into `PSR[10:8]`:

- `1` (default): 7. No hardware interrupt can interrupt a handler. The
  worked example above uses this setting.
- `0`: the interrupting device's own level, as in the textbook LC-3. A
  higher-level device can then interrupt a running handler. The nested entry
  comes from supervisor mode, so it does not switch stacks. Its `RTI` ends in
  state 51 and resumes the outer handler. `tb/tb_nested_int.sv` runs this
  case.

## Keyboard (`kb_device`)

| Bit | Name | Behaviour |
|---|---|---|
| `KBSR[15]` | RDY | set when a character arrives; cleared when KBDR is read |
| `KBSR[14]` | EN | interrupt enable; written by software; the only writable bit |

The request is `IRQ = RDY & EN`. KBDR holds the character in bits 7:0.

A handler reads KBDR, which drops the request, and ends with `RTI`. The
vector entry at x0180 must hold the handler's address. Software fills it at
boot.

## Datapath (`lc3_datapath`)

One 16-bit system bus has one driver per cycle. The possible drivers are:

- PC
- MDR
- ALU
- MARMUX
- Vector
- PC-1
- PSR
- the stack unit

It is a multiplexer rather than tri-states.

The register file's muxes can force R6 or R7 as operands:

| Code | DRMUX (destination) | SR1MUX (first source) |
|---|---|---|
| 00 | `IR[11:9]` | `IR[11:9]` |
| 01 | R7 | `IR[8:6]` |
| 10 | R6 | R6 |

The stack unit (`stack_ops`) takes R6 through SR1 and produces one of four
values:

| SPMUX | Output |
|---|---|
| 00 | SP+1 |
| 01 | SP-1 |
| 10 | Saved_SSP |
| 11 | Saved_USP |

The PSR (`psr`) has separate loads for the privilege, priority and condition
code fields. PSRMUX chooses where they load from:

- `0`: the bus. `RTI` uses this when it pops the saved PSR.
- `1`: control. This takes SetPriv, the interrupt priority, and N/Z/P
  computed from the bus value.

## Files

| File | Content |
|---|---|
| `rtl/lc3_pkg.sv` | control word struct, mux encodings, state and opcode enums |
| `rtl/lc3_top.sv` | processor + memory + keyboard |
| `rtl/lc3_control.sv` | microsequencer |
| `rtl/lc3_datapath.sv` | bus, PC/IR/MAR/MDR/BEN, links the units below |
| `rtl/reg_file.sv`, `alu.sv`, `addr_arith.sv` | register file with DRMUX/SR1MUX, ALU, address adder |
| `rtl/psr.sv`, `rtl/stack_ops.sv` | PSR, saved stack pointers |
| `rtl/bus_logic.sv` | request resolution, INT, vector |
| `rtl/irq_daisy_chain.sv`, `priority_encoder.sv`, `intv_vector.sv` | its parts |
| `rtl/vector_rom32.sv` | 32-word vector lookup, chosen with `VECTOR_ROM32` |
| `rtl/memory_unit.sv`, `rtl/kb_device.sv` | memory with address decode and R; keyboard registers |
| `tb/tb_<module>.sv` | self-checking unit tests, one per module |
| `tb/tb_lc3_top.sv` | end-to-end run at default parameters |
| `tb/tb_kb_example.sv` | the worked example with exact numbers |
| `tb/tb_nested_int.sv` | nesting with `LOAD_MAX_PRIORITY = 0` |
| `tb/tb_kb_driver.sv` | interrupt-driven keyboard driver with an 80-word ring buffer and a TRAP x33 read service |
| `tb/tb_mem_latency.sv` | fetch, entry and RTI cycle counts for three memory latencies |
| `tb/tb_stack_bounds.sv` | PUSH/POP with overflow (x3F00) and underflow (x4000) checks under keyboard interrupts |
| `tb/lc3_asm_pkg.sv` | instruction-encoding helpers for the test programs |

### Top parameters

| Parameter | Default | Meaning |
|---|---|---|
| `ADDR_BITS` | 16 | memory size is 2^ADDR_BITS words |
| `WAIT_CYCLES` | 1 | memory wait cycles before R |
| `PC_INIT` | x0200 | reset PC |
| `SSP_INIT` | x3000 | reset value of Saved_SSP |
| `LOAD_MAX_PRIORITY` | 1 | see above |
| `VECTOR_ROM32` | 0 | 1 = vector from the 32-word lookup |

After reset the processor is in supervisor mode at priority 0. The PSR
condition codes are Z. The registers are 0. Memory is not initialised.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. To build and run one with Verilator 5:

```
verilator --binary --timing --top-module tb_lc3_top -y rtl -y tb +libext+.sv \
    rtl/lc3_pkg.sv tb/lc3_asm_pkg.sv tb/tb_lc3_top.sv -o sim
./obj_dir/sim
```

Replace `tb_lc3_top` with any other `tb_*` name.

The test programs are written into the memory array through hierarchical
references (`dut.u_mem.mem[...]`). `lc3_asm_pkg` provides functions that
encode each instruction.

### What `tb_lc3_top` covers

`tb_lc3_top` boots a small OS, which takes a keyboard interrupt while in
supervisor mode. The OS then enters a user program with `RTI`. During the
user program:

- a level-6 request and a keyboard request arrive in the same cycle, and the
  level-6 request is served first;
- the program calls a `TRAP x33` keyboard service;
- it causes both exceptions;
- it pushes and pops through R6.

The testbench counts each mechanism and fails if any did not occur: entries,
stack switches, returns to user and to supervisor mode, both exceptions,
TRAP, and memory waits. It runs about 850 cycles.

Two longer programs exercise the design as software sees it. Both run at the
default parameters.

- **`tb_kb_driver`** is a keyboard driver:
  - Its init routine writes the handler address into x0180 and the TRAP
    x33 service address into x0033.
  - The handler stores each key into an 80-word ring buffer.
  - The TRAP x33 service waits for a key and returns it.

  The testbench types 100 keys, in bursts that fill the buffer up to 60
  characters. It checks that every key reaches the user program in order
  and that both buffer pointers wrap.
- **`tb_stack_bounds`** runs a user program that pushes until the stack is
  full at x3F00, then pops until it is empty at x4000. Keyboard interrupts
  keep switching R6 between the two stacks while it runs. It checks every
  popped value, the overflow and underflow flags, and memory words just
  outside the stack.

## Departures and open points

- The interrupt scheme specifies only the interrupt, exception and `RTI`
  states. The ordinary instruction states are filled in from the standard
  LC-3.
- Only the keyboard's INTV_ROM entry (x80 at level 4) is fixed. The other
  seven entries follow the rule above.
- The devices behind `ext_irq` are not modelled. A display controller was
  part of the surrounding system but has no defined registers here, so it is
  left out.
- The PSR priority set on entry has two readings: 7 (the default here), or
  the device's own level. Both are available through `LOAD_MAX_PRIORITY`.
- The INT condition `IntPriority > PSR[10:8]`, the reset values, the memory
  latency, the decode of unused I/O addresses (they read 0), and the rule
  that a key arriving during a KBDR read keeps RDY set are all this design's
  choices.
- The tri-state buses and drivers are modelled as multiplexers.
- There is no memory protection. Privilege affects only `RTI` and the stack
  switch, and user-mode code can read and write every address, including
  the I/O page and the supervisor stack.
