# Pacman: a 128x8 interrupt controller with a microcoded core and run-control debug

Pacman takes interrupt handling off a primary CPU. Any of 128 interrupt lines can be
routed to one of 8 vectors. For each vector, a small secondary processor runs a
microcode routine straight out of system memory. Pacman fetches that microcode over
its own AHB master. The core can set and wait on a few pins, and it can load, store
and compute with an accumulator and eight registers. When the routine executes END,
the next pending vector is served.

Three debug features sit on top:
- a halt mode;
- two hardware address break points;
- single stepping.

A host drives them over JTAG. It can stop the microcode, inspect the PC, the
accumulator, the flag and R0-R7, and resume it.

This repository holds synthesizable SystemVerilog for:
- the Pacman controller;
- the subsystem it sits in: a multi-master AHB with arbiter and decoder, an 8 KB
  SRAM, a System Register that raises interrupts from software, and a JTAG-to-AHB
  bridge with its TAP controller.

It also has a self-checking testbench for every block and for the whole subsystem.

## The subsystem (`soc_top`)

```
 TCK/TMS/TDI/nTRST ──► jtag_tap ─► jtag2ahb ══ AHB master 1 ══╗
                                                             ║   ahb_arbiter (16 masters)
             pacman_top (AHB master side) ══ AHB master 2 ═══╣
                                                             ▼
                          ahb_decoder (16 slaves, default slave = ERROR)
          ┌──────────────────┬────────────────────────┬──────────────────────┐
     slave 1: sram_8k   slave 2: pacman_top     slave 3: sys_reg
     0x0000-0x1FFF      (register slave)        0x3000-0x3FFF
                        0x2000-0x2FFF           irq_o[127:0] ──► pacman_top.irq_i
```

Top-level ports:
- `hclk`, `hresetn`: one AHB clock and a synchronous, active-low reset.
- The JTAG pins.
- Pacman's four wait-for-event inputs `event_i`, its four `gpo_o` outputs, and `error_o`.

Interrupts come from the System Register. Word n at 0x3000+4n drives lines 32n to
32n+31 as levels. Writing 1 to 0x3000 raises line 0.

Bus details:
- The arbiter gives fixed priority to the lowest master number. It does not pre-empt:
  a master keeps the bus while it holds HBUSREQ or HLOCK.
- Unused master and slave slots are tied off.
- A transfer to an address outside the three windows gets a two-cycle ERROR response
  from the decoder's default slave.

## Pacman (`pacman_top`)

```
 irq_i[127:0] ─► int_router ─ Active_Int[7:0] ─► priority_resolver ─ start, base ─► exec_unit ◄─► debug_unit
                    ▲                                   ▲                             │   ▲
                    └──── enable / routing ──── pacman_regs (AHB slave) ──────────────┘   │
                                                                                          ▼
                                               pacman_ahb_master ◄─► prefetch_buffer ◄── byte stream, load/store
```

### Interrupt router and priority resolver

Each line has a configuration word with an enable bit and three routing bits.
- A line that is high and enabled is sent to the vector its routing bits name.
- All lines routed to a vector are ORed into `Active_Int[v]`.

When the controller is enabled (control bit 0) and the core is idle, the resolver
picks one active vector:
- **Round robin (the default):** the search starts at the vector after the last one
  served.
- **Fixed priority (control bit 1):** vector 0 is highest.

The resolver passes the vector's base address to the core with a one-cycle start.
The vector stays "in service" until END.

The lines are levels. A routine must remove its cause before END, for example by
storing to the System Register, or it will be selected again.

### Execution unit and instruction set

The core has:
- a 32-bit accumulator;
- a one-bit flag, which is the carry, borrow or compare result;
- R0-R7;
- a PC.

Instructions are 8 bits: `opcode[7:3]` and `operand[2:0]`. MOVI, LDI and STI are 5
bytes: a 32-bit little-endian immediate follows the opcode. JUMP and JUMPC are 2
bytes: a signed word offset follows. All others are 1 byte. `n` is the operand.

| op | mnemonic | action |
|---:|---|---|
| 0 | NOP | — |
| 1 | END | routine finished, next vector may start |
| 2 | SETB | GPO[n[1:0]] = n[2] |
| 3 | WAIT | wait until event input n[1:0] is high |
| 4 | LD | acc = mem32[Rn] |
| 5 | ST | mem32[Rn] = acc |
| 6 | SUBA | acc = Rn − acc, flag = borrow |
| 7 | MOVI | (n==0 ? acc : Rn) = imm32 |
| 8 | STI | mem32[imm32] = (n==0 ? acc : Rn) |
| 9 | LDI | (n==0 ? acc : Rn) = mem32[imm32] |
| 10 | JUMP | PC = (PC & ~3) + 4·sext(off8) |
| 11 | JUMPC | same, if flag |
| 12–16 | ADD SUB AND OR XOR | acc = acc op Rn; ADD/SUB set flag to carry/borrow |
| 17–20 | GT LT EQ EQZ | flag = acc > Rn, acc < Rn, acc == Rn, acc == 0 (unsigned) |
| 21–22 | LS RS | rotate acc left/right through the flag |
| 23–24 | MOVF MOVT | acc = Rn / Rn = acc |
| 25 | CLR | acc = 0 |
| 26–27 | ADDI SUBI | acc ±= 2^n, flag = carry/borrow |
| 28–31 | — | undefined: the core enters its error state |

The unit has a five-state FSM:
- **idle**;
- **busy:** waits for enough bytes in the prefetch buffer;
- **fetch:** decodes and executes; ALU operations finish here in one cycle;
- **wait:** waits for a load or store, or for a WAIT event;
- **error.**

The error state is left only through the soft reset bit. It is entered on:
- an undefined opcode;
- a bus error on an instruction fetch;
- a bus error on a load or store.

The cause and the PC of the faulting instruction can be read back.

### Prefetch buffer and AHB master

Microcode is fetched ahead into an 8-word FIFO. The core sees it as a byte stream:
the number of bytes available, the next five bytes, and a consume count.

The controller is a seven-state FSM: idle, ready, 8-beat, 4-beat, 1-beat, busy and
wait. From ready it chooses:
- a **1-beat** transfer when a load or store is pending. These come first.
- an **INCR8** burst when eight words are free and the fetch address is 32-byte
  aligned.
- an **INCR4** burst when four words are free.

Busy collects read data. A store then moves on to wait until its write completes.

A start or a taken jump flushes the FIFO. Fetching restarts at the 16-byte block
holding the target, and the leading bytes are dropped. Beats still in flight from
before the flush are discarded. Because fetches start aligned, a burst never crosses
a 1 KB boundary.

The AHB master drives NONSEQ and then SEQ beats. It keeps HBUSREQ up until its last
address phase is accepted. After an ERROR it cancels the rest of a burst.

### Debug unit

Debug control takes effect only at instruction boundaries. An instruction that has
started, including its bus transfer, always completes. The core is stopped:
- while Halt_bit is 1;
- when the PC equals an armed break point address. This is checked before the
  instruction there executes. The hit sets Clear BP Enable. Writing 0 to it resumes,
  and the instruction at the break point runs once without matching again.
- in single-step mode, until SStep_go is written. Each write of SStep_go = 1 lets
  exactly one instruction execute. SStep_ack is set when it has completed.

Break point registers reset to 0xFFFFFFFF. Writing 0 or 0xFFFFFFFF disables a break
point.

Halted (halt register bit 1) reads 1 while the core sits stopped.

## Register map (Pacman slave, base 0x2000)

| offset | register | bits |
|---|---|---|
| 0x000 + 4n | IRQ n config (n < 128) | [3] enable, [2:0] vector |
| 0x200 + 4v | vector v base address (v < 8) | 32-bit byte address of the routine |
| 0x220 | status (RO) | [0] in service, [3:1] vector, [4] ERROR, [5] core busy, [15:8] Active_Int |
| 0x224 | control | [0] start (controller enabled), [1] fixed priority, [2] soft reset (self-clearing, reads 0) |
| 0x228 | error cause (RO) | 0 none, 1 undefined opcode, 2 fetch bus error, 3 load/store bus error |
| 0x22C | error PC (RO) | |
| 0x230 | PC (RO) | address of the next instruction |
| 0x234 / 0x238 / 0x23C | accumulator / flag / GPO (RO) | |
| 0x240 + 4n | Rn (RO), n < 8 | |
| 0x2C0 | halt | [0] Halt_bit, [1] Halted (RO) |
| 0x2EC | break point 1 | address |
| 0x2F0 | clear break point enable | [0] set on a hit; write 0 to resume |
| 0x2F4 | break point 2 | address |
| 0x2F8 | single step | [0] SStep_en, [1] SStep_go, [2] SStep_ack (RO) |

The soft reset clears:
- the core, the prefetch buffer and the AHB master;
- the resolver's state.

It keeps the configuration, base address and debug registers. An error can therefore
be cleared without reprogramming.

## Using it over JTAG

The TAP has a 4-bit instruction register:
- IDCODE `0001`, selected after reset. The ID is 0x149511C3.
- BYPASS `1111`.
- `1000`, which selects the bridge's 66-bit command register.

A command is shifted LSB first as `{valid, write, addr[31:0], data[31:0]}`, with
`data` in bits 31:0. On Update-DR a set valid bit starts one single-word AHB transfer.

The next DR scan captures `{32'b0, error, busy, read_data}`. A read therefore takes
two scans: the command, then any scan to collect the data. The second scan may carry
the next command.

TCK, TMS, TDI and nTRST are sampled in the HCLK domain. HCLK must run at least 8
times faster than TCK.

A typical debug session:
1. Load the routine into the SRAM with word writes.
2. Write the IRQ config (for example 0x9 at 0x2000: line 0 enabled, to vector 1).
3. Write the vector base address and the break point addresses.
4. Write 1 to 0x2224 to start the controller.
5. Write 1 to 0x3000 to raise the interrupt.
6. Poll the halt register until Halted is set. Then read the PC at 0x2230 and the
   registers.
7. Write 0 to 0x22F0 to resume.

For single stepping, write 1 to 0x22F8, then 3 once per step.

## How closely this follows the original design

Taken from the original description:
- the block structure;
- 128 lines, 8 vectors, 4 GPO, 4 events and the ERROR output;
- round robin by default, fixed priority with vector 0 highest;
- the prefetch FSM's seven states and the execution FSM's five states;
- the instruction list, its 5/3 bit split and the 5/2/1 byte lengths;
- the debug register addresses (0x22C0, 0x22EC, 0x22F0, 0x22F4, 0x22F8);
- their fields, the SStep_en/SStep_go values 0x1 and 0x3, and the break point reset value;
- the control start bit at 0x2224 and the PC at 0x2230;
- the address map and master/slave numbering of the subsystem;
- the IDCODE.

Choices made here, where the description is silent:
- **Opcode numbers:** table order, NOP = 0, END = 1.
- **Operand meaning** for each instruction, as in the table above.
- **Register offsets** not listed above.
- **Bit positions** of the enable, fixed-priority, soft-reset and SStep_ack bits.
- **JTAG:** the bridge's command format and the TAP instruction codes.
- **Buffer:** its depth and the burst-selection rule.
- **Arbitration:** the policy.
- **Error handling:** the cancel-on-error behaviour. A bus error on a prefetch is
  reported as soon as it occurs, even if the core would never have reached those bytes.

Deliberate departures:
- **Halt timing.** The original halts "immediately". Here the core stops at the next
  instruction boundary, so no bus transfer is ever left half done.
- **Pacman's AHB master.** It is connected as master 2. The subsystem description
  lists only the JTAG bridge as a master, but Pacman needs its master to fetch
  microcode from the SRAM.
- **Disabling a break point.** Both the reset value 0xFFFFFFFF and the value 0 mean
  "disabled", as the original uses both. A break point at address 0 therefore
  cannot be set.

Not built:
- the board-level host (JTAG adapter and debugger software);
- a boundary-scan chain for EXTEST/INTEST.

The ASIC gate counts and the FPGA utilisation reported for the original were not
reproduced.

## Files

- `rtl/ahb_pkg.sv`: AHB types: `ahb_m2s_t` and `ahb_s2m_t` structs, and HTRANS/HBURST/HRESP enums.
- `rtl/pacman_pkg.sv`: opcodes, instruction lengths, register offsets, core state struct.
- `rtl/soc_top.sv`: the subsystem.
- `rtl/pacman_top.sv`: the controller.
- `rtl/<block>.sv`: one block per file, each opening with a description of its interface and timing.
- `tb/tb_<block>.sv`: self-checking testbench per block; each prints `TB_RESULT checks=… failures=…`.
- `tb/tb_ahb_mem.sv`, `tb/tb_ahb_bfm.sv`, `tb/tb_jtag_drv.sv`, `tb/tb_asm_pkg.sv`: testbench
  helpers:
  - a memory model with random wait states and burst-rule checks;
  - an AHB bus model;
  - a JTAG host;
  - a microcode assembler.

The testbenches:
- `tb_exec_unit` runs random microcode programs against a reference model of the
  instruction set.
- `tb_prefetch_buffer` checks the byte stream against memory across random jumps,
  loads and stores.
- `tb_debug_session` replays the original bring-up session over JTAG: break points at
  0x10 and 0x14 inside a loop, then single stepping through it.
- `tb_soc_top` runs the whole subsystem at its default size, driven only through the
  JTAG pins. It covers a break point session, halt, single step, errors and soft
  reset, and counts each mechanism.

## Simulating

With Verilator 5 (two-state, timing enabled), from the repository root:

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ahb_pkg.sv rtl/pacman_pkg.sv tb/tb_asm_pkg.sv rtl/*.sv \
  tb/tb_ahb_mem.sv tb/tb_ahb_bfm.sv tb/tb_jtag_drv.sv tb/tb_soc_top.sv \
  --top-module tb_soc_top -Mdir obj_soc
./obj_soc/Vtb_soc_top
```

Replace `tb_soc_top` with any `tb_<block>` to run a block's testbench. The packages
must come first on the command line. Every testbench has a watchdog and ends with
`$finish`. The full subsystem test takes well under a second of wall time.
