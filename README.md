# nod4: an 8-bit accumulator processor with one vectored exception mechanism

nod4 is a small teaching processor: 8-bit data, an 8-bit address bus, and a
Von Neumann memory of 256 bytes. Its point is interrupts. One mechanism handles
both device interrupts and the `swi` software trap:

* the processor saves only PC and the condition-code register C;
* it jumps to a single handler address;
* the handler reads a 5-bit identifier (IID) from C and dispatches in software.

This RTL gives the processor, a periodic real-time clock that raises
interrupts, an interrupt priority encoder for several devices, and a complete
system that counts ticks on eight LEDs. Every part is cycle-accurate and
synthesizable.

## Programmer's model

| Register | Width | Use |
|---|---|---|
| A  | 8 | accumulator |
| X  | 8 | index register |
| S  | 8 | stack pointer; points at the last byte pushed |
| PC | 8 | fetch counter (see *Prefetch* below) |
| C  | 8 | `{Z, C, I, IID[4:0]}`: zero flag (bit 7), carry/borrow flag (bit 6), interrupt enable (bit 5), identifier of the last exception (bits 4..0) |

Two bytes in memory are fixed:

* `$00` holds the program start address (PSA), read at reset.
* `$01` holds the programmer interrupt address (PIA), the single exception vector.

The stack grows downwards. A push decrements S and then writes. A pop reads
and then increments S. For example, after `lds $FC` the first push lands at
`$FB`, just below the I/O registers.

## The exception mechanism

An interrupt is taken **at the end of an instruction**, when the I flag is set
and `irq` is high. The I flag is read as that instruction leaves it, so the
instruction right after `orc $20` can already be interrupted. The processor
then does the following, one bus cycle per step:

| State | Action |
|---|---|
| `intx2` | un-prefetch: `PC <= PC - 1` (only after a prefetching implied instruction) |
| `intx1` | assert `ira`; the acknowledged device puts its IID on `di`; latch it; `S <= S - 1` |
| `intx3` | `M[S] <= PC`; `S <= S - 1` |
| `intx4` | `M[S] <= C`; `C <= IID & $1F` |
| `intx5` | read the PIA from `$01` |
| `jmp`   | `PC <= PIA`; the next cycle fetches the handler's first opcode |

`swi` follows a parallel path of the same length, entered straight from
`fetch2`:

* `swi1`: un-prefetch and `S--`.
* `swi2`: push PC.
* `swi3`: push C.
* `swi4`: `C <= 0`, so the IID is 0.
* `swi5`: read the PIA.
* then the shared `jmp` state.

`swi` is not masked by I.

Loading C with the masked IID also clears I. The handler therefore starts with
interrupts off, and it cannot be re-entered until `rti` restores C. `rti` pops
C first, then PC. The handler must save any other register it uses. It must
also make the device drop its request before `rti`, or the same interrupt is
taken again at once.

Latency: from the end of the interrupted instruction to the first fetch of the
handler takes 6 cycles on the `intx2` path and on the `swi` path, and 5 cycles
on the `intx1` path.

### Prefetch, and why the return address needs fixing

Every instruction fetches two bytes, in `fetch1` and `fetch2`, before the
processor knows what it needs. Immediate, direct, indexed and jump instructions
use the second byte as their operand. Implied instructions are one byte long,
so their second byte is already the next opcode. When such an instruction
finishes, that byte moves into the instruction register and execution
continues at `fetch2`. Each implied instruction therefore saves one cycle.

The cost is that PC is a fetch counter rather than "the next instruction".
After a prefetching implied instruction, PC is one past the next opcode. An
interrupt at that point must first undo the prefetch (`intx2`), or the stacked
return address would skip an instruction. `swi` is implied too, so `swi1` makes
the same correction. `rts`, `rti` and `swi` load PC themselves, so they do not
prefetch.

## Controller

The controller steps through these states (`state_e` in `nod4_pkg`):

    init -> fetch1 -> fetch2 -> (access EA) -> execute -> fetch1 | fetch2 | intx1 | intx2

* `init` loads PC from `$00`.
* "Access EA" is `S_EA`, which forms `EA = operand`, `operand + X` or
  `operand + S`, followed by `S_MEM` for loads, which reads `M[EA]`.
* A store writes `M[EA]` in `S_EXEC`.
* `S_EXEC2` is a second execute cycle for `jsr`, `push` and `rti`.

The `jmp` state is shared: the `jmp` instruction uses it, and so do both
exception paths.

Cycles per instruction:

| Instruction | Cycles |
|---|---|
| prefetching implied | 2 |
| `push` | 3 |
| immediate | 3 |
| `jmp`, conditional jumps, `rts` | 3 |
| direct or indexed store | 4 |
| `jsr`, `rti` | 4 |
| direct or indexed load or ALU | 5 |

## Instruction encoding

The opcode byte is `{mode[2:0], op[4:0]}`. Two-byte instructions follow the
opcode with their operand byte. Mnemonics marked *named* are part of the
nod4 instruction set; the others were added here to cover what nod4 has
without a published mnemonic (conditional branching, the X register, reading
the IID out of C). The binary encoding is also this implementation's. Treat
both as a working choice, not as the original machine's binary code.

Addressing modes:

| Mode | Value | Meaning |
|---|---|---|
| IMP  | 0 | implied, one byte |
| IMM  | 1 | immediate |
| DIR  | 2 | direct, `[addr]` |
| IDXX | 3 | indexed, `EA = offset + X` |
| IDXS | 4 | stack relative, `EA = offset + S` |

Operations:

| op | Mnemonic | Modes | Effect |
|---|---|---|---|
| 0 | `nop` | IMP | none |
| 1 | `lda` *(named)* | IMM, DIR, IDX | A <= v; Z |
| 2 | `ldx` | IMM, DIR, IDX | X <= v; Z |
| 3 | `lds` *(named)* | IMM, DIR, IDX | S <= v |
| 4 | `sta` *(named)* | DIR, IDX | M[EA] <= A |
| 5 | `stx` | DIR, IDX | M[EA] <= X |
| 6 | `adda` *(named)* | IMM, DIR, IDX | A <= A + v; Z, C = carry |
| 7 | `suba` | IMM, DIR, IDX | A <= A - v; Z, C = borrow |
| 8 | `anda` | IMM, DIR, IDX | A <= A & v; Z |
| 9 | `ora` | IMM, DIR, IDX | A <= A \| v; Z |
| 10 | `cmpa` | IMM, DIR, IDX | flags of A - v |
| 11 | `orc` *(named)* | IMM | C <= C \| v (`orc $20` enables interrupts) |
| 12 | `andc` | IMM | C <= C & v (`andc $DF` disables them) |
| 13 | `jmp` *(named)* | IMM | PC <= target |
| 14 | `jsr` *(named)* | IMM | push return address; PC <= target |
| 15–18 | `jz`, `jnz`, `jc`, `jnc` | IMM | conditional jump on Z or C |
| 19 | `rts` *(named)* | IMP | pop PC |
| 20 | `rti` *(named)* | IMP | pop C, then pop PC |
| 21 | `swi` *(named)* | IMP | trap with IID 0 |
| 22 | `push` *(named)* | IMP | push A |
| 23 | `pop` *(named)* | IMP | pop A; Z |
| 24 | `tca` | IMP | A <= C; Z (the handler reads the IID this way) |
| 25 | `tac` | IMP | C <= A |

Unused codes behave as `nop`: one byte if the mode is implied, two bytes
otherwise.

## Peripherals and the interrupt bus

Every device has three signals:

* `irq`: request, held until the handler services the device.
* `ira`: acknowledge, one cycle long, sent by the processor in `intx1`.
* `di`: in the acknowledge cycle the device drives its IID onto the
  processor's data input.

In this RTL each device outputs its IID while acknowledged and zero
otherwise. `nod4_sysbus` ORs these outputs onto `di` during `ira`.

**Real-time clock (`nod4_rtc`, RTCTL at `$FD`).** A counter sets the flag RTF
once every `PERIOD` cycles. It does this whether or not the last tick was
cleared. The default period is 5,000,000 cycles: 100 ms, a 10 Hz tick at
50 MHz.

* Read: `{000000, RTIE, RTF}`.
* Write: bit 1 sets RTIE. Writing 1 to bit 0 (RTFC) clears RTF.
* `irq = RTIE & RTF`.
* If a tick and a clear happen in the same cycle, the tick wins.
* The acknowledge itself does not clear anything.

**Interrupt priority encoder (`nod4_ipe`).** ORs N device requests into the
processor's `irq`. It sends `ira` back only to the requesting device with the
lowest index, so device 0 has the highest priority. The system uses N = 2. The
5-bit IID allows up to 31 sources, because IID 0 is taken by `swi`.

**LED port** at `$FC`. A write latches the byte. A read returns it.

## The system (`nod4_system`)

`nod4_system` connects the blocks as follows:

* `nod4_cpu` and `nod4_mem` share one bus through `nod4_sysbus`.
* The real-time clock is interrupt device 0.
* Device 1 is left to the user. Its `dev1_irq` and `dev1_di` are inputs and
  `dev1_ira` is an output.

Memory is loaded through `ld_we`, `ld_addr` and `ld_data` while `rst` is high:

1. Write the PSA at `$00`, the PIA at `$01`, and the program.
2. Release `rst`.

Reset is synchronous and active high. It clears all processor registers, so
interrupts start disabled. Memory contents survive reset.

Bus timing: one access per clock. The processor drives `addr`, `dout` and `we`
combinationally from its state, and samples `di` at the next rising edge. For
this reason the memory read is asynchronous; on an FPGA it maps to distributed
RAM.

Example: the LED counter. The main program enables the clock and spins on
`jmp`. The handler clears RTF, adds one to a count and writes it to the LEDs.
In this encoding:

    $00: 02 10                 PSA=$02, PIA=$10
    $02: lds #$FC ; lda #$00 ; sta [$C0] ; lda #$03 ; sta [$FD] ; orc #$20
    $0E: jmp $0E
    $10: lda #$03 ; sta [$FD] ; lda [$C0] ; adda #$01 ; sta [$C0] ; sta [$FC] ; rti

## Files

| File | Content |
|---|---|
| `rtl/nod4_pkg.sv` | flag positions, fixed addresses, mode, operation, ALU and state enums, the `opcode()` helper |
| `rtl/nod4_alu.sv` | unsigned add, subtract, and, or, pass; zero and carry/borrow outputs |
| `rtl/nod4_cpu.sv` | registers and controller |
| `rtl/nod4_mem.sv` | 256 × 8 memory |
| `rtl/nod4_rtc.sv` | real-time clock |
| `rtl/nod4_ipe.sv` | priority encoder |
| `rtl/nod4_sysbus.sv` | address decoder, LED register, `di` multiplexer |
| `rtl/nod4_system.sv` | top level |
| `tb/*_tb.sv` | one self-checking testbench per module, plus `nod4_system_full_tb` |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself.
Verilator 5:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
        rtl/nod4_pkg.sv tb/nod4_system_tb.sv --top-module nod4_system_tb
    ./obj_dir/Vnod4_system_tb

What each testbench covers:

* **`nod4_cpu_tb`** runs a program that uses every addressing mode, `jsr`/`rts`,
  `push`/`pop`, carry and conditional jumps, and `swi`. A model device
  interrupts it at random moments. The testbench checks:
  * the final memory image;
  * the handled-interrupt count;
  * the 5-bit IID masking;
  * for every exception entry: the stacked PC and C, and the entry cycle
    count (6, 5 or 6);
  * that a request raised with interrupts enabled is acknowledged within
    5 cycles (the longest instruction), and that this worst case occurs.
* **`nod4_system_tb`** runs the LED counter with a 97-cycle clock period. It
  then runs a dispatching handler with the clock and a random device 1 both
  active. It counts RTC and device-1 interrupts, simultaneous requests
  (device 0 must win), `swi` traps, `intx2` and `intx1` entries, and LED
  updates. It fails if any of these never happens.
* **`nod4_system_full_tb`** uses the default parameters (100 ms clock, 20 ns
  cycle) and checks that the LEDs read 0, 1, 2, 3 around the first three
  ticks. It simulates 15 million cycles in about ten seconds.

## Where this design fills gaps

The exception sequence, its states and cycle count, the C register layout,
the fixed vector addresses, the RTCTL register and the IPE behaviour are
specified for nod4. These parts were chosen here and are not nod4 facts:

* the binary encoding and the non-*named* instructions;
* the flag rules for each instruction;
* the work done in each execute cycle, and which step of the exception
  sequence falls in which of the intx/swi states;
* the 5-cycle entry on the `intx1` path (nod4 quotes six cycles, which this
  design meets on the un-prefetch and `swi` paths);
* the stack direction;
* the set-wins rule in the clock;
* the IID of the clock (1);
* the loader port.

The two vectors live in RAM written by the loader, not in ROM.
