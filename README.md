# H8/300 processor with cycle-level timers

This is a small multi-cycle implementation of the Renesas H8/300 8/16-bit
instruction set, written as synthesizable SystemVerilog. It adds one
feature to the standard architecture: three 8-bit hardware timers and two
instructions that use them. A program can pace a loop to an exact number of
clock cycles. The core has no pipeline and no cache, so every instruction
takes a fixed number of cycles.

Around the core sits a small system:

- a 256 x 16-bit on-chip RAM;
- a clock divider from the 50 MHz board clock to the 25 MHz core clock;
- a 9.6 kHz bit-clock divider;
- a transmit-only serial port (the "UAT") for printing results on a
  9600-baud terminal;
- a capture register for board LED displays.

The design targets a small FPGA (a Spartan-IIE class part with 4-Kbit block
RAMs). It uses only generic RTL.

## System

```
 clk (50 MHz) ──┬─ div_clk ───── core_clk (25 MHz) ─┬─ controller ─ ctrl ─┐
                │                                   │                     │
                └─ divclk_uat ── 9.6 kHz ─┐         ├─ h8_datapath ◄──────┘
                                          │         │    │ MA, to_mem ▲ from_mem
                                          └─► uat ◄─┤    ▼            │
                                                    ├─ ram256x16 ─────┘
                                                    └─ led (captures bus + state)
```

`h8_top` has these ports:

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | 50 MHz board clock |
| `reset` | in | 1 | synchronous reset, active high (hold it for a few board clocks) |
| `LED_in`, `LED_out`, `LED_add` | in | 1 each | buttons that pick what the display shows: memory write data, read data, or address |
| `halt_req` | in | 1 | stops the core at the next instruction boundary while high |
| `sr` | in | 16 | switch word; a program can read it through the bridge |
| `UAT_out` | out | 1 | serial line: 8 data bits, no parity, 1 stop bit, idle high |
| `data_out`, `state_out` | out | 16, 8 | captured word and controller state for the displays |
| `DClk_UAT_OUT` | out | 1 | the 9.6 kHz bit clock |

Parameters:

- `UAT_HALF_PERIOD` (default 2604): 50 MHz / (2 × 2604) = 9600.6 Hz.
- `UAT_ADDR` (default H'FFF0): the memory-mapped address of the transmitter.

The RAM, the UAT and the LED module run on the core clock. The UAT
synchronises the bit clock into the core clock domain.

## Datapath

The datapath (`h8_datapath`) is a collection of registers joined by
combinational multiplexers. Every register loads on the same clock edge
under one control word, `h8_ctrl_t` (defined in `h8_pkg`). One control
word is one register-transfer step.

- **General registers.** Sixteen 8-bit halves, R0H–R7L (`register_half`).
  Each half loads from one of three sources:
  - the ALU byte result;
  - its own byte of the ALU word result;
  - the shifter.

  A word register is simply a pair of halves.
- **Three operand paths** leave the register file:
  - `mux_rs` feeds the ALU source port. It also selects MA, IR, tmp and the
    immediate byte.
  - `mux_rd` feeds the ALU destination port. It also selects PC, MD, the CCR
    and the concatenator word.
  - `mux_rn` feeds the *bridge*. It also selects the memory read word, MA,
    PC, IR, tmp, the CCR and the switch word.
- **`mux_acc` and `acc`.** `mux_acc` picks one register byte for the
  shifter `acc`. The shifter implements all eight shifts and rotates. It
  also produces their flags.
- **`alu`.** Byte, word and single-bit operations with the H8 flag rules
  (H, N, Z, V, C):
  - add and subtract, with and without carry;
  - increment and decrement;
  - compare and negate;
  - decimal adjust;
  - AND, OR, XOR, NOT;
  - 8×8 multiply;
  - the bit set, clear, invert, test, load, store and the logic operations
    on the carry;
  - pass-through modes for plain moves.
- **`bridge`.** Carries a `mux_rn` value into the 16-bit special registers.
  It can pass a word, or widen a byte in one of three ways: zero-extend,
  copy the byte into both halves, or sign-extend. It can also set N and Z
  from the value it carries, which is how word moves update the flags.
- **Special registers:**
  - IR (`ir`) presents three views: the high byte, the immediate low byte,
    and that byte zero-extended as an 8-bit absolute address.
  - PC, MD and tmp are `register16` instances. Each loads from the bridge
    or from the ALU word result.
  - MA (`ma`) chooses its source through `mux_ma`: PC, the absolute address,
    the bridge, or the ALU result.
  - The CCR (`register7`) chooses its source through `mux_ccr`: ALU flags,
    bridge flags, shifter flags, or a byte loaded directly.
- **Timers.** Three `timer` instances load their period from the low byte
  of the bridge.

### Byte access to a word memory

The RAM is 16 bits wide, but the H8 addresses bytes. MA always presents an
even address (bit 0 cleared). The stored bit 0 goes to the controller as
`lower`: it says which half of the word is meant.

- **Byte read.** The controller reads the word, then routes its high or low
  half to the destination register.
- **Byte write.** This is a read-modify-write:
  1. The word is read into MD.
  2. The *concatenator* (`md_concat`) merges the new byte from the ALU into
     the high or low half of MD.
  3. `mux_md` sends the merged word to memory instead of MD.
- **Word accesses** use MD directly.

Without the concatenator, a byte store would overwrite its neighbour.

`mem_interface` drives the memory only during a write cycle (zero
otherwise). During a read it returns memory data to the datapath.

Memory is synchronous and needs two cycles:

- edge *k* loads MA;
- edge *k+1* registers the RAM output;
- the word is on `from_mem` after edge *k+1*.

## Controller

`controller` is a Moore state machine. Each state issues one control word,
decoded from the state and the instruction register.

| states | work |
|---|---|
| FETCH0, FETCH1, FETCH2 | MA ← PC, PC ← PC+2; wait for memory; IR ← word |
| DECODE | register-to-register instructions finish here; others branch off |
| EXT0–2 | fetch a second instruction word (16-bit immediate, address or displacement) |
| DISP | MA ← Rn + d:16 |
| RD1, RD2, RDX | read a word into MD, then deliver it to a register (or to PC for RTS and JMP @@aa:8) |
| MODW, WR | merge a byte into the word read (byte stores); write MD or the merged word |
| PUSH, BR, JMPT | stack push for BSR and JSR, then the branch or jump |
| X1 | register ← MD for MOV.W #xx:16 |
| BM0, BMOP | bit operation on memory: address the byte, then operate on it (decoded from the operation word in tmp) |
| TWAIT | stall until the selected timer is done |
| EE0–EE7, EEW | EEPMOV, per byte: stop if R4L is 0; read the source byte; read the destination word; merge; write; R4L ← R4L−1 |
| HALT | after SLEEP, until reset |

Instruction timing in core cycles:

- **Register-to-register:** 4 cycles (fetch plus decode). This covers
  - ALU operations, shifts and bit operations on registers;
  - LDC, STC, ANDC, ORC, XORC;
  - Bcc, taken or not: the new PC is computed in the decode cycle.
- **Each further step adds cycles:**
  - a second instruction word adds EXT0–2 (3 cycles);
  - a memory read adds RD1, RD2, RDX (3 cycles);
  - a memory write adds WR (1 cycle).
- **Byte store:** needs both a read and a write, plus the merge step MODW.

Nothing depends on data values, so a given instruction always takes the
same time.

The numeric state codes appear on `state_out`, and the LED module captures
them.

### Instruction coverage

Implemented:

- **Moves.** MOV.B and MOV.W in every addressing mode:
  - register;
  - #imm;
  - @Rn, @Rn+, @-Rn;
  - @(d:16,Rn);
  - @aa:8 (bytes);
  - @aa:16.

  PUSH and POP are included.
- **Arithmetic:**
  - ADD, ADDX, ADDS, SUB, SUBX, SUBS;
  - INC, DEC, CMP (byte, and word for ADD, SUB and CMP);
  - NEG, DAA, DAS, MULXU.
- **Logic:** AND, OR, XOR, NOT.
- **Shifts and rotates:** SHAL, SHAR, SHLL, SHLR, ROTL, ROTR, ROTXL, ROTXR.
- **Bit operations on registers:**
  - BSET, BCLR, BNOT, BTST, each with an immediate or a register bit
    number;
  - BAND, BIAND, BOR, BIOR, BXOR, BIXOR;
  - BLD, BILD, BST, BIST.

  All of these also work on a memory byte through @Rd or @aa:8 (prefixes
  H'7C–H'7F). These use a read-modify-write, with the operation word held
  in tmp.
- **CCR:** LDC, STC, ANDC, ORC, XORC.
- **Flow control:**
  - Bcc with all sixteen conditions, and BSR;
  - JMP and JSR through @Rn, @aa:16 or @@aa:8;
  - RTS;
  - NOP and SLEEP.
- **Block move:** EEPMOV copies R4L bytes from @R5+ to @R6+, one byte at a
  time, through the same byte-merge path as MOV.B stores.

Not implemented:

- DIVXU (the ALU has no divider) and RTE;
- interrupts.

The `I` flag resets to 1 but has no effect.

**Departure from the standard H8/300: @aa:8.** The 8-bit absolute address
is zero-extended. `MOV.B @H'20,R0L` reads address H'0020, not H'FF20 as on
the original H8/300.

## Timer extension

Each timer is an 8-bit down counter with a reload register:

- Loading value N sets both the count and the reload value.
- From then on the count falls by one per core cycle.
- In the cycle the count is zero, `done` is high. The next edge reloads N.

So `done` recurs exactly every N+1 cycles. The timing does not depend on
when software looks at it.

Two opcodes that the H8/300 leaves unused drive the timers:

| instruction | encoding | action |
|---|---|---|
| TLD Rs,t | H'58, then `{00, t[1:0], rs[3:0]}` | load timer t from byte register rs (rs uses the usual 4-bit byte-register field) |
| TWAIT t | H'57, then `{000000, t[1:0]}` | stall in state TWAIT until timer t is done |

The pattern is: load a timer once, then start each pass of a loop with
TWAIT. Every pass then starts exactly N+1 cycles after the previous one,
provided the loop body is shorter than that. Neither the data nor the
branch outcome changes this.

The system test relies on this property. It sends each character through
a two-level loop (an inner TWAIT loop of 256 timer periods). The gap
between consecutive characters must be exactly DELAY × 256 core cycles.

## Peripherals

- **`uat`.** A nine-bit shift register clocked by the 9.6 kHz bit clock.
  1. A memory write to `UAT_ADDR` (bit 0 ignored) latches the low byte of
     the written word.
  2. At the next bit-clock edge, the register loads {byte, start bit 0}.
  3. Each further edge shifts one bit out, LSB first, and shifts a 1 in.
     The line therefore ends at the stop/idle level.

  There is no busy flag. Software must space its writes by at least ten
  bit times, which is what the timers are for. The RAM does not decode
  high address bits, so a write to the UAT address also lands in the RAM
  word it aliases: byte H'01F0 when `UAT_ADDR` is H'FFF0.
- **`led`.** On every instruction decode (the controller's trigger), it
  captures the controller state and one bus. The `LED_*` buttons choose
  the bus: memory write data, memory read data, or the address (the
  default). The choice stays until another button is pressed. The
  outputs are raw values; seven-segment decoding is left to the board.
- **`div_clk`** is a toggle flip-flop. It ignores reset on purpose: the
  core's registers reset synchronously on the divided clock, so that clock
  must run during reset.
- **`divclk_uat`** is a counter that toggles its output every
  `HALF_PERIOD` board cycles.

## Choices this design makes

The original implementation fixes the block structure, the register set
and most multiplexer codes. This RTL fills in the rest. Each point below
is also stated in the file concerned.

**Controller**

- The whole controller state sequence, and the encodings of TLD and TWAIT.
- The `lower` signal from MA to the controller.

**Datapath operations and codes**

- The four bridge operations (word, zero-extend, duplicate, sign-extend)
  and their codes.
- Shifter code 0111 is SHLR.
- ALU codes 41–57 (BAND, BILD, BLD, BIST, BST and the register-numbered and
  word forms of the bit operations).
- Word bit operations act on bit n+8 of the word.
- On the immediate path, `mux_rs` code 27 sign-extends the byte for branch
  displacements. Code 28 zero-extends it.

**Register and peripheral behaviour**

- Reset values: the CCR starts at H'80; everything else starts at 0.
- A timer's period is N+1. Timers are loaded from the low byte of the
  bridge.
- The UAT address is H'FFF0, and the UAT sends the low byte of the written
  word.
- The RAM decodes only address bits 8..1.
- `halt_req` is a top-level input.

**Omitted**

- No interrupt input.
- No display decoding.

**Where the original material is inconsistent, this design follows:**

- the datapath drawing for which ALU port the source and destination
  registers reach (source to `sport`, destination to `dport`);
- the drawing and signal list for `mux_ma` code 10: the bridge, not the
  concatenator;
- the concatenator's operation table: it merges into MD. One description
  has the unchanged byte held in tmp instead.

## Files

- `rtl/h8_pkg.sv` — codes, the control-word struct, and flag helpers.
- `rtl/h8_top.sv` — the system.
- `rtl/h8_datapath.sv`, `rtl/controller.sv` — the core.
- One file per datapath unit:
  - `alu`, `acc`, `bridge`;
  - `mux_*`;
  - `register_half`, `register16`, `register7`;
  - `ir`, `ma`, `md_concat`;
  - `mem_interface`, `timer`.
- Peripherals: `ram256x16`, `div_clk`, `divclk_uat`, `uat`, `led`.
- `tb/tb_<module>.sv` — a self-checking testbench for each module.
- `tb/h8_prog_pkg.sv` — the system test program.

## Simulation

Each testbench:

- prints `TB_RESULT checks=N failures=M` and calls `$finish`;
- has a watchdog.

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/h8_pkg.sv tb/h8_prog_pkg.sv \
    tb/tb_h8_top.sv --top-module tb_h8_top -o sim && ./obj_dir/sim
```

Replace `tb_h8_top` with any other testbench name. The package files must
come first on the command line. The other modules are found by name in
`rtl/` through `-y rtl`, or can be listed explicitly.

### What the testbenches check

**`tb_h8_top`** runs the whole system at its default parameters, with the
real 50 MHz clock and 9600 baud.

- The program in `h8_prog_pkg`:
  1. builds the string "Hello Columbia" in memory using additions,
     subtractions, shifts and bit operations;
  2. sends it over the serial line through a BSR subroutine paced by a
     timer;
  3. counts the ones and zeros of a data word (the bit counter) and sends
     the count;
  4. sets a bit of a memory byte with BSET and copies five bytes of the
     string with EEPMOV;
  5. finishes with SLEEP.
- A serial receiver model decodes the line. The testbench checks:
  - the text;
  - the bit time (104 160 ns);
  - the exact character spacing produced by the timer;
  - the memory and register results;
  - the LED capture and the halt input.
- It also counts twenty-two mechanisms and fails if any of them never
  happened:
  - second-word fetches;
  - byte stores into each half and byte loads from each half;
  - word stores;
  - taken and untaken branches;
  - subroutine calls and returns;
  - timer stalls and reloads;
  - shifts;
  - bridge-set flags;
  - post-increment;
  - UAT loads;
  - LED triggers;
  - halt stalls;
  - read-modify-write bit operations on memory;
  - block-move bytes (exactly five).
- It simulates about 17 ms of time in a few seconds.

**`tb_controller`** runs hand-assembled programs on the core alone, then
checks registers and memory against hand-worked results.

- Program A covers the addressing modes.
- Program B covers arithmetic, bit operations, calls and CCR access.
- Program C checks that a TWAIT loop takes exactly N+1 cycles per pass.
- Program D covers all sixteen branch conditions under random flags.
- Program E covers bit operations on memory bytes.
- Program F covers EEPMOV.

**`tb_h8_datapath`** drives control words directly and keeps a reference
model of the registers.

**The unit testbenches** compare against independently written reference
arithmetic. Several use exhaustive or random inputs:

- `tb_alu`: about 138 000 operations;
- `tb_acc`: every input, operation and carry.

### How far to trust it

- Every module has a testbench. Each testbench has been shown to catch a
  deliberately injected bug in its module.
- The instruction set was checked against hand-computed results, not
  against a reference H8/300 simulator.
- Flag behaviour matches the H8/300 programming manual rules as
  implemented in `alu` and `acc`. Undefined flags (for example V after
  DAA) may differ from real silicon.
- Timing closure at 25 MHz has not been checked with this RTL.
