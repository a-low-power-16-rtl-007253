# Low-power 16-bit RISC microcontroller

A small microcontroller meant to sit at the heart of a battery-powered
sensor, such as a gas, heat or water meter. Such a device spends almost all its life
waiting. The design therefore saves power in three ways:

- **Operating modes.** Two bits in the CPU's status register switch off the
  CPU clock, or the CPU clock and the low-frequency oscillator. Only an
  interrupt switches them back on.
- **Two clock sources and dividers.** A 32768 Hz watch crystal (LFXT) and a fast
  crystal (HFXT, 450 kHz to 8 MHz) feed the clocks. Software picks the slowest
  clock that is fast enough.
- **Hand-placed clock gating.** Every register of the CPU's register file and
  every operand latch sits behind its own latch-based clock gate. A register
  that is not written in a cycle sees no clock edge.

The CPU is a 16-bit RISC machine: 27 instructions, sixteen 16-bit registers
(PC, SP, SR and thirteen general-purpose), byte and word operations, and
memory-to-memory moves. Program ROM, data RAM and peripheral registers share
one byte address space. Everything is written in synthesizable
SystemVerilog, one module per file in `rtl/`. A self-checking testbench for
each module is in `tb/`.

## Block structure

```
mcu_top
├── clock_module     MCLK / ACLK generation, SELM/DIVM/DIVA, mode gating, scan muxes
│   └── clock_gate ×2
├── reset_sync ×2    one per clock domain, bypassed in scan mode
├── cpu
│   ├── decode_unit  instruction register, instruction + execution state machines
│   ├── exec_unit    operand latches (5 gated groups), data requests
│   │   ├── regfile  16 × 16 bit, one clock gate per register
│   │   └── alu
│   ├── bus_arbiter  decode (fetch) vs. execution (data) unit
│   └── addr_decode  address arithmetic + ROM/RAM/peripheral mapping
├── rom              4 KiB program memory
├── ram              512 B data memory
├── int_judge        interrupt enables, priority, vector, wake-up
├── timer            interval timer counting ACLK
└── gpio             8-bit port with edge interrupts
```

`mcu_pkg.sv` holds the shared types: the instruction-field enums, the CPU
state enum, the decoded control word `ctrl_t`, the bus request `bus_req_t`,
the peripheral request `per_req_t`, and the register offsets.

Top-level ports of `mcu_top`:

| port | dir | meaning |
|---|---|---|
| `rst_n` | in | general reset, active low, asynchronous |
| `hfxt_clk`, `lfxt_clk` | in | the two oscillator clocks (the oscillators themselves are not part of the RTL) |
| `lfxt_en` | out | asks the LFXT oscillator to run (low while OSCOFF) |
| `scan_mode`, `scan_enable` | in | test controls (see *Scan*) |
| `p1_in`, `p1_out`, `p1_dir` | in/out/out | the I/O port; the pad drivers are outside |

Parameters: `ROM_BYTES` (4096), `RAM_BYTES` (512), `RAM_BASE` (0x0200),
`PER_BYTES` (256), and `ROM_INIT` (a `$readmemh` file for the program, empty by default).

## Instruction set and encoding

The architecture fixes 27 instructions, four addressing modes, byte/word
operation and an orthogonal instruction set. It does not fix an encoding.
This RTL uses the classic three-format layout of that family of 16-bit
machines:

| format | bits | instructions |
|---|---|---|
| two operands | `[15:12]` op, `[11:8]` Rs, `[7]` Ad, `[6]` B/W, `[5:4]` As, `[3:0]` Rd | MOV 4, ADD 5, ADDC 6, SUBC 7, SUB 8, CMP 9, DADD A, BIT B, BIC C, BIS D, XOR E, AND F |
| one operand | `[15:10]`=000100, `[9:7]` op, `[6]` B/W, `[5:4]` As, `[3:0]` R | RRC 0, SWPB 1, RRA 2, SXT 3, PUSH 4, CALL 5, RETI 6 |
| jump | `[15:13]`=001, `[12:10]` cond, `[9:0]` signed word offset | JNE, JEQ, JNC, JC, JN, JGE, JL, JMP |

That gives 12 + 7 + 8 = 27 instructions. A jump goes to PC + 2·offset, where PC
already points past the jump.

Source addressing modes (As):

| As | mode | address | special cases |
|---|---|---|---|
| 00 | `Rn` | – | |
| 01 | `X(Rn)` | Rn + X, where X is the next word | `&X` with R2 as base (absolute); `X(PC)` is PC-relative, with the base being the address of the word after X |
| 10 | `@Rn` | Rn | |
| 11 | `@Rn+` | Rn, then Rn += 1 (byte) or 2 (word) | `@PC+` is an immediate; PC and SP always step by 2 |

Destination modes (Ad): 0 = `Rn`, 1 = `X(Rn)` (with the same `&X` and
`X(PC)` cases).

Status register R2: C bit 0, Z bit 1, N bit 2, GIE bit 3, CPUOFF bit 4,
OSCOFF bit 5, V bit 8. MOV, BIC and BIS leave the flags alone. CMP and BIT do
not write their result. DADD is a four-digit BCD add. Words that decode to no
instruction execute as no-operations.

## CPU: one bus access per state

The CPU is a multi-cycle machine. The decode unit holds two state machines
that call each other:

- The *instruction machine* has three working states: fetch, source index
  fetch and destination index fetch.
- The *execution machine* has ten working states: operand reads, execute,
  write, stack and interrupt states.

Exactly one machine is active at a time. The active one hands over by naming
the state the other one starts in, then waits until it is called back.
Together they form the 13 states of `state_e` in `mcu_pkg.sv`. This combined
state goes to the execution unit.

Each state does at most one memory access. The memories answer in the same
cycle, so every state takes one MCLK cycle.

```
S_FETCH ──► S_SRC_EXT ──► S_SRC_RD ──► S_DST_EXT ──► S_DST_RD ──► S_EXEC ──► S_WRITE
   │            (index)     (operand)     (index)      (old dst)   (ALU/jump)  (store)
   ├──► S_PUSH / S_CALL
   ├──► S_RETI_SR ──► S_RETI_PC
   └──► S_IRQ_PC ──► S_IRQ_SR      (instead of a fetch when an interrupt is judged)
```

States an instruction does not need are skipped. `first_state` and
`after_src` in `decode_unit.sv` make the choice, from the fetched word.
Examples:

| instruction | states | cycles |
|---|---|---|
| `MOV R5,R6`, any jump | FETCH, EXEC | 2 |
| `PUSH R5`, `CALL R5` | FETCH, PUSH/CALL | 2 |
| `ADD @R5+,R6` | FETCH, SRC_RD, EXEC | 3 |
| `RETI` | FETCH, RETI_SR, RETI_PC | 3 |
| `MOV 2(R5),4(R6)` | FETCH, SRC_EXT, SRC_RD, DST_EXT, EXEC, WRITE | 6 |
| `ADD 2(R5),4(R6)` | … as above plus DST_RD | 7 |
| interrupt entry | IRQ_PC, IRQ_SR, then the vector's JMP | 2 + 2 |

A MOV to memory skips the read of the old destination.

The decode unit and the execution unit share the work in this way:

- The decode unit owns the instruction register and the state. It issues the
  fetch requests for instruction words and index words.
- It hands the decoded fields and the current state to the execution unit
  as one `ctrl_t` word.
- The execution unit does that state's data work. It increments PC, latches
  index words and operands, and forms addresses. It runs the ALU, writes the
  result and flags back, and handles the stack and the vector.
- Index words and operands are held in five latch groups, each with its own
  clock gate.

Both units put requests on the bus arbiter. The arbiter grants the execution
unit first. The address decode cell then handles the granted request in two
steps:

1. It forms the address from `base`, `ofs` and the address control code:
   DIRECT (base), INDEX (base + offset) or ABS (offset alone).
2. It maps that address onto ROM, RAM or the peripheral page. It steers write
   data and byte enables, and returns read data aligned to bit 0 and
   zero-extended for byte accesses.

Unmapped addresses read as 0 and ignore writes.

## Memory map and vectors

| range | block |
|---|---|
| 0x0000–0x00FF | peripheral registers (word registers, see below) |
| 0x0200–0x03FF | RAM |
| 0xF000–0xFFFF | ROM |

Each region is sized by a top-level parameter. Reset starts execution at the
first word of ROM. The interrupt vectors are the next words of ROM, and each
holds a jump to its handler:

| address | content |
|---|---|
| 0xF000 | reset entry: the first instruction, normally a `JMP` past the vectors |
| 0xF002 | `JMP timer_handler` |
| 0xF004 | `JMP io_handler` |

To take an interrupt, the CPU loads PC with the vector's address and
executes the jump found there.

## Interrupts and low-power modes

This is the part of the design where most of the interactions are, so it is
described in order.

**Judging.** `int_judge` sits outside the CPU, so peripherals can be added
without changing it. It raises `irq` when three things hold: SR.GIE is set, a
source's flag is set, and that source's enable bit in IE is set. It also
supplies the vector address. The timer wins if both sources are pending.

**Entry.** The CPU finishes the current instruction. Then, instead of
fetching, it runs two states:

- `S_IRQ_PC` pushes PC and acknowledges the interrupt. The timer flag is
  cleared by this acknowledge; I/O flags are cleared by software.
- `S_IRQ_SR` pushes SR, clears SR, and loads the vector into PC.

Clearing SR also clears CPUOFF and OSCOFF, so every handler runs in active
mode.

**Return.** `RETI` pops SR, then PC. The mode bits come back with SR. A
handler returns to the mode that was interrupted, unless it changed the saved
SR on the stack. For example, `BIC #0x10, 0(SP)` makes the program continue
in active mode.

**Modes.**

| mode | SR bits | MCLK | ACLK | LFXT |
|---|---|---|---|---|
| active | CPUOFF=0 | running | running | on |
| real-time clock | CPUOFF=1 | stopped | running | on |
| sleep | CPUOFF=1, OSCOFF=1 | stopped | stopped | `lfxt_en`=0 |

Setting CPUOFF takes effect at the next instruction boundary:

1. The decode unit's instruction machine reaches its fetch state, sees
   CPUOFF, and stops issuing fetches.
2. It raises `halted`.
3. Only then does the clock module close the MCLK gate.

Waiting for the boundary matters. Suppose MCLK were gated directly from
SR.CPUOFF. The handler of an interrupt taken from a low-power mode would stop
half-way through the entry sequence: the wake request drops when the flag is
acknowledged, but the cleared SR is not written yet.

**Waking.** With MCLK stopped, nothing clocked by MCLK can notice an event.
Every source therefore also gives an asynchronous "pending" signal. The
judge combines these with the enables and GIE into `wake`, which reopens the
MCLK gate at once. Once MCLK runs, the synchronised flag raises `irq` and the
normal entry follows.

In sleep mode ACLK is stopped too. The timer cannot wake the CPU then, but
the I/O port can, because its edge detectors need no clock (next section).

## Clock domains and event crossing

MCLK (CPU, bus, all peripheral registers) and ACLK (the timer counter) are
asynchronous to each other. The I/O pins are asynchronous to both. Each event
crosses into MCLK through `event_sync`, which works by toggling:

- The source flips a toggle bit `tgl` once for each event:
  - the timer counter wraps, in the ACLK domain;
  - a pin shows its selected edge, in a flip-flop clocked by `p_in ^ P1IES`, so
    it works with every clock stopped.
- A two-flop synchroniser carries `tgl` into MCLK as `s2`. A `seen` register
  remembers the value of `s2` at the last clear.
- The flag is `s2 ^ seen`. Writing 1 to the flag sets `seen <= s2`.
- The asynchronous pending signal is `tgl ^ seen`. It rises as soon as the
  event occurs, before any clock has seen it. This is what `wake` is built
  from.

Each clock domain has its own reset synchroniser: reset is asserted at once
and released on the domain's clock.

## Clock module

```
          SELM                DIVM            CPU halted & no wake
HFXT ──►┐                     ┌──┐                 │
        ├─ mux ─► ÷1/2/4/8 ─► │  ├─ scan mux ─► clock gate ─► MCLK
LFXT ──►┘                     └──┘
LFXT ───────────► ÷1/2/4/8 (DIVA) ─── scan mux ─► clock gate ─► ACLK
                                                     │
                                                   OSCOFF
```

Register BCSCTL is at offset 0x30: bit 0 SELM (0 = HFXT, 1 = LFXT), bits 2:1
DIVM, bits 4:3 DIVA. It resets to 0, which gives HFXT undivided. Each divider
is a 3-bit counter clocked by its source, and the divided clock is one of its
bits.

The source multiplexer is a plain multiplexer, not a glitch-free switch.
Changing SELM can produce one short or long MCLK cycle. Software should
switch while both sources are stable, or accept that one cycle.

## Clock gating

`clock_gate` is a latch plus an AND gate. The latch is transparent while the
clock is low, so the gated clock never carries a shortened pulse. The design
has 23 such gates:

- 2 in the clock module, for MCLK and ACLK;
- 16 in the register file, one per register;
- 5 in the execution unit, for the operand and result latch groups.

The 21 gates inside the CPU are also held open while reset is asserted, so
reset values load the same way with or without gating. `scan_enable` forces
every gate open. Synthesis reports one latch bit per gate: this is the cell's
intended latch, not an inferred one.

## Peripheral registers

All registers are 16-bit words at even offsets in the peripheral page; use
word accesses.

| offset | name | bits |
|---|---|---|
| 0x00 | IE | [0] timer interrupt enable, [1] I/O interrupt enable |
| 0x10 | P1IN | pin levels (synchronised to MCLK) |
| 0x12 | P1OUT | output values |
| 0x14 | P1DIR | 1 = output |
| 0x16 | P1IFG | edge flags; write 1 to clear |
| 0x18 | P1IES | edge select: 0 rising, 1 falling |
| 0x1A | P1IE | per-pin interrupt enable |
| 0x20 | TCTL | [0] run |
| 0x22 | TCCR | period − 1 (the counter counts 0 … TCCR) |
| 0x24 | TR | counter value |
| 0x26 | TIFG | [0] timer flag; write 1 to clear |
| 0x30 | BCSCTL | [0] SELM, [2:1] DIVM, [4:3] DIVA |

Cautions:

- TR is read across clock domains without a handshake. While the timer runs,
  a read that coincides with an ACLK edge can return a mix of the old and
  new count. Read TR until two consecutive reads agree.
- TCTL and TCCR should be changed only while the timer is stopped.
- Changing P1IES flips the clock of a pin's edge detector. This can itself
  register an edge, so clear P1IFG after changing it.

## Scan

There are two test inputs:

- `scan_mode` replaces MCLK and ACLK by the HFXT input, which is the tester's
  clock. It also bypasses both reset synchronisers, so every internal reset
  is the `rst_n` pin.
- `scan_enable` opens every clock gate.

Scan-chain stitching is left to a DFT tool.

## Where this RTL departs from, or adds to, the architecture description

The published architecture fixes these points, and this RTL follows them:

- the three blocks CPU, memory and peripherals;
- the split into decode unit, execution unit and bus arbitration;
- an instruction state machine and an execution state machine that call
  each other;
- the address decode cell;
- two clock sources with a source select and two dividers;
- hand-placed clock gates, more than twenty of them;
- two interrupt sources behind an external judge, with the vectors at the
  start of ROM, each holding a JMP;
- the interrupt sequence: finish the instruction, push PC, push SR, clear SR,
  jump; RETI returns;
- three operating modes set by CPUOFF and OSCOFF in SR;
- 27 instructions, four addressing modes, byte/word operation;
- the two scan controls.

The following are this design's own choices:

- **Encoding, opcodes, flag rules and DADD.** The classic encoding of this
  16-bit RISC family was chosen.
- **Memory map, sizes and register layout.** ROM 4 KiB, RAM 512 B,
  peripheral page 256 B, and every register offset and bit assignment above.
- **Timer and I/O port.** One interval timer and one 8-bit port stand in for
  "timers and some other peripherals".
- **Interrupt details.** The timer has priority, and the timer flag is
  cleared automatically when its vector is taken.
- **When the modes take effect.** CPUOFF acts at the next instruction
  boundary. OSCOFF gates ACLK and drives `lfxt_en`. The HFXT oscillator is
  not switched off, because MCLK is already gated in both low-power modes.

These parts are not in the RTL:

- **Debug unit.** Its function is not described.
- **Comparator.** It is an analog block.
- **Crystal oscillators.** They are analog. Their clocks enter as ports and
  `lfxt_en` leaves as a port.
- **"Other peripherals".** They are named only.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M` and has a watchdog. To build and run one with
Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps \
    -Irtl -Itb -y rtl -y tb +libext+.sv --top-module tb_mcu_top \
    rtl/mcu_pkg.sv tb/asm_pkg.sv tb/tb_mcu_top.sv -Mdir obj_top
./obj_top/Vtb_mcu_top
```

Replace `tb_mcu_top` with any other `tb/tb_*.sv`.

A note on reset in a two-state simulator that starts every register at a
random value. An asynchronous reset acts only on a falling edge of `rst_n`,
so the testbenches start `rst_n` high and pull it low after 1 ns. The
internal resets come out of the reset synchronisers, and those can start at
0. The flip-flops clocked by the I/O pins then see their first reset edge
only on a second reset pulse, so `tb_mcu_top` applies reset twice. Real
hardware, where reset is a level, needs none of this. Add
`+verilator+rand+reset+2 +verilator+seed+N` to the run to start every
register at random values.

Three testbenches cover the whole design or the whole CPU:

- **`tb_mcu_top`** runs the full chip at its default sizes. It assembles a
  program with `tb/asm_pkg.sv`, a tiny instruction encoder, and puts it in ROM.
  The program:
  - switches MCLK to ÷2 and to LFXT;
  - enters the real-time-clock mode and is woken by three timer interrupts;
  - enters sleep mode with ACLK and LFXT stopped, and is woken by a pin edge;
  - returns from handlers into a low-power mode;
  - exercises scan clocking.

  It counts each of these mechanisms and fails if one never happened.
- **`tb_cpu`** runs the CPU alone against a behavioural memory. It covers all
  27 instructions, every addressing mode, byte operations, an interrupt
  taken while polling and one taken while the CPU is off, and checks that
  the bus stays silent while the CPU is off.

- **`tb_mcu_isa`** runs 150 random programs of 40 instructions each on the
  full chip. It compares the registers, the flags and all of RAM with an
  instruction-set model in the testbench. The programs use every source mode,
  both destination modes, byte and word operations, and forward conditional
  jumps. DADD, CALL and RETI are left to `tb_cpu`. The model also predicts
  the clock cycles of every instruction. The total must equal the hardware's
  exactly, which checks the cycle table above.

The remaining testbenches check one module each. Most use a large number of
random stimuli from `$urandom` against a model written in the testbench.

To run your own program, write it as a `$readmemh` file of 16-bit words
starting at ROM address 0xF000. Pass the file as `ROM_INIT`, for example with
`-GROM_INIT='"prog.hex"'`. Alternatively, write `u_rom.mem` from a testbench,
as `tb_mcu_top` does.

Timing notes for changes:

- All memories are read combinationally. A synchronous RAM macro would need
  one wait state per access, for example a fetch that is not granted for one
  cycle.
- The bus arbiter already supports a fetch that is not granted.
- The assertions in `cpu.sv` and `bus_arbiter.sv` state the bus rules.
