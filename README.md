# A micro-programmed 8-bit teaching CPU

This is a small CPU of the kind built from TTL parts: 74LS85 comparators,
74LS374 registers, 74LS193 counters, multiplexers, one RAM and one ROM.
Every machine instruction is carried out by a short micro-program stored
in the ROM. Each micro word raises a set of control lines (C0..C14) and
select lines (S0..S6) for one clock cycle, and says how the micro program
counter moves on.

The machine has:

- an 8-bit address bus and 16-bit instruction/memory words;
- four 8-bit general registers, A to D;
- nine instructions;
- one output port, the OUT register, written by storing to address 80H;
- a "manual DMA" path. While the CPU is held in reset, switches and
  keypads write programs and data straight into RAM.

The RTL is written in SystemVerilog for one clock with a synchronous
reset. It runs the bubble-sort program the machine was designed to
demonstrate.

## Instruction set

An instruction is one 16-bit word:

| bits  | 15..12 | 11..10 | 9..8 | 7..0 |
|-------|--------|--------|------|------|
| field | OP     | R1     | R2   | OPND |

Register codes are 00 = A, 01 = B, 10 = C, 11 = D.

| OP | mnemonic       | effect                                           | cycles |
|----|----------------|--------------------------------------------------|--------|
| 1  | MOVEI R1, n    | R1 <- n                                          | 5      |
| 2  | LOAD R1, [R2]  | R1 <- low byte of M[R2]                          | 7      |
| 3  | STORE [R2], R1 | M[R2] <- R1 (zero-extended); to 80H: OUT <- R1   | 6      |
| 4  | INC R1         | R1 <- R1 + 1 (mod 256)                           | 6      |
| 5  | DEC R1         | R1 <- R1 - 1 (mod 256)                           | 6      |
| 6  | COMPR R1, R2   | FLAG1 <- R1 > R2, FLAG2 <- R1 < R2 (unsigned)    | 6      |
| 7  | JGT n          | if FLAG1: PC <- n                                | 7      |
| 8  | JLT n          | if FLAG2: PC <- n                                | 7      |
| 9  | HALT           | stop (the micro-program loops)                   | 4      |

The cycle counts include the 4-cycle fetch. The encoding and the meaning
of each opcode were reconstructed from the machine code of the sort
program. For example, `2300` is `LOAD A,[D]` and `6100` followed by
`800C` skips a swap when A < B. Codes 0 and A..F are not defined by the
original design and execute here as 5-cycle no-ops. Only the flags
carry information between instructions, and only COMPR changes them.

## Micro-programmed control

This is the part to read first when changing anything.

### Sequencer

```
            +-----------+   mpc_next    +-----+   +-----+  CS NA S C
  OP ------>| MPC-MUX   |--+----------->| MPC |   | ROM |--> MIR --> datapath
  NA ------>| (S2)      |  |            +-----+   +-----+
            +-----------+  +---------------------->^
  LD-MUX: CS = 0 -> count up, 1 -> load, 2 -> load if FLAG1, 3 -> load if FLAG2
```

- `mpc` computes `mpc_next`:
  - reset gives 10H;
  - LD = 1 gives `{0000, OP}` when S2 = 1, or NA when S2 = 0;
  - LD = 0 gives MPC + 1.
- MPC and MIR both load on the same clock edge, with `mpc_next` and
  `ROM[mpc_next]`. So the MIR always holds the word at the MPC's address,
  and that word controls the current cycle.
- The original machine is clocked by hand, one step at a time. In this
  RTL the ROM read and the MIR load fit in one clock cycle.

### Micro word (32 bits, `cpu_pkg::uword_t`)

| bits  | 31..30 | 29..22 | 21..15 | 14..0  |
|-------|--------|--------|--------|--------|
| field | CS     | NA     | S6..S0 | C14..C0|

| line | action in this design                  | line | action in this design                  |
|------|----------------------------------------|------|----------------------------------------|
| C0   | internal bus drives memory data bus    | S0,S1| MADR-MUX: 00 OPND, 01 register, 10 PC  |
| C1   | AC <- bus                              | S2   | MPC-MUX: 1 = opcode dispatch           |
| C2   | flags <- compare(AC, bus)              | S3   | Inc/Dec: 1 = decrement                 |
| C3   | MDR <- memory                          | S4   | R-MUX: 0 = R1, 1 = R2                  |
| C4   | IR <- MDR                              | S5   | Inc/Dec drives bus                     |
| C5   | PC <- PC + 1                           | S6   | MDR low byte drives bus                |
| C6   | PC <- OPND                             |      |                                        |
| C7   | MADR <- MADR-MUX                       |      |                                        |
| C8   | OPND drives bus                        |      |                                        |
| C9   | memory write                           |      |                                        |
| C10  | selected register <- bus               |      |                                        |
| C11  | selected register -> MADR-MUX          |      |                                        |
| C14  | selected register drives bus           |      |                                        |

C12 and C13 are not used.

The original design names these lines and shows which unit each one
belongs to. Within a group it does not always say which line does what:
C10/C11/C14 at the registers, S3/S5 at Inc/Dec and C3/S6 at the MDR.
Those assignments, and C0, C8 and C9, are this design's own choices.

### Micro-program map (`microcode_rom`)

| address | content                                                                        |
|---------|--------------------------------------------------------------------------------|
| 00-0F   | Dispatch entries, one per opcode. MOVEI finishes here; the others jump on.     |
| 10-13   | Fetch: MADR <- PC; MDR <- M; IR <- MDR with PC++; dispatch.                    |
| 20-21   | LOAD: MDR <- M[R2]; R1 <- MDR.                                                 |
| 24      | STORE: bus <- R1, C0, write.                                                   |
| 28, 2A  | INC, DEC: R1 <- AC +/- 1. The dispatch entry has already copied R1 into AC.    |
| 2C      | COMPR: compare AC (R1) with R2 on the bus.                                     |
| 30-32   | JGT: branch on FLAG1 to 32 (PC <- OPND); else 31 returns to fetch.             |
| 34-36   | JLT: the same, on FLAG2.                                                       |
| 09      | HALT: jumps to itself. The `halted` output is `MPC == 09H`.                    |

The ROM contents are built in SystemVerilog by a `case` statement. The
original design's micro-program is not reproduced: this one was written
for the instruction set above.

## Datapath

- **Internal bus (8 bits).** Up to four sources can drive it: OPND (C8),
  the selected register (C14), Inc/Dec (S5) and the MDR's low byte (S6).
  The original used tri-state buffers. Here each source is forced to 0
  when it is not enabled, and the bus is the OR of the sources
  (`data_bus`). An assertion flags two drivers enabled in the same cycle.
- **AC and comparator.** COMPR and INC/DEC first copy a register into AC.
  - The comparator is two chained 4-bit magnitude comparators.
    `mag_comp4` behaves like a 74LS85.
  - The comparator compares AC with the bus. While C2 is high, each
    clock edge stores A>B in FLAG1 and A<B in FLAG2. A=B is not stored.
- **Registers** (`reg_file`). R-MUX picks the register code. It sits in
  `ir` and selects R1 or R2 with S4. The register file has two
  combinational read ports, one to the bus and one to the address path.
- **Addresses.** MADR-MUX chooses OPND, a register or the PC, and MADR
  holds the result. There is no path from the bus to MADR.
- **PC** resets to 00H, counts on C5 and loads OPND on C6.

## Memory, output and program entry

- **RAM** (`ram`): 128 x 16 bits, addressed by A6..A0. Writes are
  synchronous and reads are asynchronous.
- **Address bit 7** disables the RAM. A write with A7 = 1 goes to the
  OUT register (`out_port`), so 80H..FFH all reach it. Reads there
  return 0. `out_strobe` pulses once for each OUT write.
- **Manual DMA** (`dma_bypass`). Hold `rst = 1` and set `bypass = 1`.
  Put the address on `kp_addr` and the word on `kp_data`. Set
  `kp_oe_n = 0` (keypads drive the data bus) and `kp_rw_n = 0` (write),
  then clock once. Return both to 1, set `bypass = 0`, then release
  `rst`. The CPU starts at 00H. An assertion in `cpu_top` reports
  `bypass` raised while the CPU runs.

## Simulating

Files: `rtl/cpu_pkg.sv` holds the shared types and constants. Each other
file in `rtl/` holds one module, and `tb/tb_<module>.sv` is its
self-checking testbench. Each testbench prints
`TB_RESULT checks=N failures=M`.

```
verilator --binary --timing --assert -Irtl rtl/cpu_pkg.sv tb/tb_cpu_top.sv \
          -y rtl --top-module tb_cpu_top -o sim && ./obj_dir/sim
```

For another block, substitute its testbench and top-module name.

`tb_cpu_top` does the following at the default sizes:

1. Enters the bubble-sort program (29 words at 00H-1CH) through the DMA
   path, together with five data values at 40H-44H.
2. Runs the CPU to HALT. Six data sets are used: reversed, sorted, with
   duplicates, and three random.
3. Checks that the five OUT writes come out in ascending order and that
   RAM holds the sorted values.
4. Checks the instruction count and cycle count against an
   instruction-level reference model inside the testbench.
5. Checks that every opcode ran, both outcomes of each conditional jump
   occurred, both flags were set, and DMA and OUT writes happened.

The sort takes 214-258 instructions, or 1328-1592 cycles, depending on
the data.

`tb_sort_large` runs the same program with three constants changed so
that it sorts 64 values. That is the most the RAM holds above 40H. The
sort takes 287501 cycles.

## How far to trust it, and where it departs from the original

These parts follow the original design:

- the block structure and the comparator's internal structure;
- the widths;
- the register codes;
- the 10H micro reset address and the 00H program start;
- the LD-MUX inputs;
- the output port at 80H;
- the DMA procedure;
- the instruction encoding and the sort program.

These parts are this design's own:

- The micro-program, the micro word's field widths, and the meaning
  given to each control line where the original did not state it.
- The dispatch mapping `{0000, OP}`.
- The single-clock timing. The original is stepped by hand, and a
  gated clock (CLK AND C2, as in the comparator) is written here as a
  clock enable.
- Zero reset of all registers and flags.
- Zero-extension of stored bytes.
- Treating undefined opcodes as no-ops.

The listing's comment on its first line gives the pass counter as 9.
The encoded value 4 is used, which is also the number of passes five
values need.

The original quotes wall-clock times from its interactive simulator
(about 3 s per instruction and about 20 minutes per sort). They are not
cycle counts, and nothing here is checked against them.

Nothing analog or process-specific is involved. All modules are
synthesizable; the RAM and the ROM map onto memory cells.
