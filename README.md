# Icicle: a small RISC-V system for an iCE40 FPGA

This is a complete, small computer meant for a low-cost FPGA board, such as an
iCEBreaker with a Lattice iCE40UP5K. Its processor, Icicle, is a six-stage,
in-order pipeline that runs the 32-bit RISC-V base integer instruction set
(RV32I). Around it sit the parts a program needs:

- the program boots from the board's serial flash;
- its variables and stack live in 128 KiB of on-chip RAM;
- it talks to the outside through GPIO pins and a UART.

The processor reaches all of these over a single Wishbone bus.

Next to the system, the top level also holds the three small teaching circuits
it grew from. Each has its own pins:

- a 22-bit counter that blinks two LEDs;
- a two-input AND gate;
- a D flip-flop.

The RTL is SystemVerilog 2017 and is synthesizable. It uses a package for
shared types, an interface for the Wishbone bundle, and assertions for the bus
handshake rules. Every module has a self-checking testbench that runs under
plain Verilator.

## The pipeline

```
 PC Gen ─▶ Fetch ─▶ Decode ─▶ Execute ─▶ Mem Access ─▶ Writeback
   ▲         │ ibus    │RF read    │ALU, flags  │dbus, branch   │RF write
   └──── branch target, taken ◀──────────────────┘
```

| Stage | What happens | Module(s) |
|---|---|---|
| PC Gen | Holds the PC and steps it by 4 whenever Fetch takes the address. A taken branch loads the branch target instead. Reset puts the PC at the reset vector minus 4, so the first step lands on the reset vector. | `pc_gen` |
| Fetch | Reads the instruction word over the instruction bus (`ibus`). Up to two fetched instructions wait in a small buffer for Decode. | `fetch_unit` |
| Decode | The control unit turns the instruction into a control record. The immediate decoder extracts the I/S/B/U/J immediate. The register file is read. Operands are bypassed (see below). | `control_unit`, `imm_decoder`, `register_file` |
| Execute | The A mux picks rs1, PC or 0; the B mux picks rs2, the immediate or 4. The ALU computes the result and four flags. A separate adder computes the branch or jump target. | `operand_mux`, `alu`, `branch_target` |
| Mem Access | Loads and stores go out on the data bus (`dbus`). Branches are decided here from the flags registered in Execute. | `load_store_unit`, `branch_unit` |
| Writeback | The result mux picks the ALU result or the load data, and the register file is written. | `wdata_mux` |

Each stage passes a record with a valid bit to the next through a pipeline
register. Those records are the `dx_t`, `xm_t` and `mw_t` structs in
`icicle_pkg`. An instruction whose valid bit is clear is a bubble: it writes
nothing and touches nothing.

### How the ALU is used

A single 33-bit adder does both addition and subtraction. Bit 32 of `a - b` is
the borrow, so the four flags are:

- zero;
- carry, which is the borrow on a subtraction;
- sign;
- overflow.

From the flags alone:

- SLT takes sign XOR overflow;
- SLTU takes the borrow;
- the branch unit evaluates all six branch conditions, such as BLT from
  sign ^ overflow and BGEU from !borrow.

The link value of JAL and JALR is PC + 4. It is made by feeding PC and the
constant 4 through the operand muxes, so no second adder is needed. LUI is
computed as 0 + imm.

### Branches and jumps

Branches are predicted not taken: PC Gen keeps fetching sequentially. A branch
or jump is resolved when it reaches Mem Access. If it is taken:

- the PC is loaded with the target;
- the three younger instructions, in Fetch, Decode and Execute, are flushed;
- an instruction read still outstanding on the bus is marked to be thrown away
  when it completes.

A taken branch therefore costs three cycles. JALR clears bit 0 of its target.

### Data hazards: where an operand comes from

This is the least obvious part of the design. Operands are fixed when an
instruction leaves Decode: the values latched into the Decode→Execute register
are final. At that moment, up to four older instructions may still owe a
value. The bypass network (the `bypass` function in `icicle_cpu`) picks the
youngest source that has the register. In priority order:

1. the ALU output of the instruction now in **Execute**;
2. the result of the instruction in **Mem Access**, or its load data once the
   bus answers;
3. the value being written in **Writeback**;
4. the value written to the register file on the **previous clock edge**;
5. the **register file** itself.

Source 4 exists because the register file's read ports are synchronous and
not transparent. The address is presented one cycle ahead: `next_insn` from
Fetch supplies it. A write on the same edge as the read is therefore not seen
by the read, so the last write is kept in a register and bypassed.

Reading x0 always gives 0, whatever an instruction claims to write.

Two situations cannot be bypassed and stall Decode instead:

- **Load-use interlock.** A load in Execute whose destination is a source of
  the instruction in Decode: Decode holds, and a bubble enters Execute.
- **Waiting load in Mem Access.** A load in Mem Access that has not yet been
  answered, with the same dependence. Its data does not exist yet, so Decode
  keeps waiting until the bus answers.

### Stalls and bubble collapse

A bus access in Mem Access holds Mem Access and every stage behind it until the
slave answers. One exception keeps the pipeline full: if Execute holds a bubble
it still takes the next instruction, so during a long memory access the
instructions behind it close up. In the code this is
`x_stall = m_stall && dx.valid`.

Fetch waiting for its own bus never stalls the stages in front of it. They
simply receive no new instruction.

### Fetch

A fetch is a combinational Wishbone request. The request is raised in the
same cycle the PC is valid and is held, with its address latched, until ack or
err.

A two-entry buffer decouples the bus from Decode. Its two effects:

- With a zero-wait memory and no stalls, one instruction enters Decode every
  cycle.
- Fetch stops asking for the bus when the buffer is full. The testbench checks
  this one-per-cycle rate.

The second effect is why the data port can never starve under the arbiter
described below. While a load or store waits, Decode is stalled, the buffer
fills, and the instruction port goes quiet.

### Counters

The counters are read with `CSRRS rd, csr, x0`. This is the RDCYCLE, RDTIME
and RDINSTRET family, including the upper halves. There are two 64-bit
counters:

- `cycle` counts clock cycles since reset;
- `instret` counts instructions that leave Writeback.

`time` reads the same value as `cycle`. Other SYSTEM instructions, FENCE and
FENCE.I execute as no-ops. There are no traps or interrupts. An opcode outside
RV32I raises an `illegal` flag in the control record and otherwise behaves as
a no-op.

## The system on a chip

```
 Icicle ibus ─┐
              ├─ Arbiter ── Wishbone ──┬── Block RAM (128 KiB)
 Icicle dbus ─┘                        ├── Flash controller ── SPI pins
                                       └── Bridge ── peripheral bus ──┬── GPIO
                                                                      └── UART
```

### Bus

The bus is Wishbone classic (`wb_if`) with:

- 32-bit data;
- word address `adr[29:0]` (byte address bits 31:2);
- byte selects `sel[3:0]`;
- `cyc`, `stb` and `we`;
- an `ack` or `err` answer.

A master holds its request unchanged until it is answered. Assertions in the
two masters check this rule.

### Arbiter

The arbiter connects the granted port straight through, so arbitration costs no
cycle. On a free bus the instruction port wins. The grant is then kept until
ack or err.

### Memory map

| Address | Size | Contents |
|---|---|---|
| `0x0000_0000` | 16 MiB | flash, read only. The program starts at `0x0010_0000` (reset vector). |
| `0x4000_0000` | 128 KiB | block RAM, byte writable, one-cycle read |
| `0x8000_0000` | 4 KiB | GPIO: `+0x0` output register (read/write), `+0x4` input pins (read) |
| `0x8000_1000` | 4 KiB | UART: `+0x0` write sends a byte, read returns the last byte received (and clears rx_valid); `+0x4` status `{rx_valid, tx_ready}` |
| anything else | | answered with `err` one cycle later |

A load answered with `err` writes the bus data to its register and carries on.

### Flash controller

For each word read, the controller sends the standard SPI READ command (`0x03`)
and a 24-bit byte address, then shifts in four bytes. The first byte goes in
bits 7:0, so the word is little-endian as RISC-V expects.

- The SPI is mode 0, with `sck` at half the system clock.
- A read takes 2·64 + 2 = 130 cycles.
- Writes are acknowledged and dropped.

There is no cache. Code running from flash therefore takes roughly 130 cycles
per instruction, while code copied into RAM runs at close to one instruction
per cycle.

### Bridge and peripherals

The bridge decodes `adr[13:10]` into one select line per peripheral slot. It
passes a 12-bit register offset, the write flag and the write data, and
registers the answer, so a peripheral access takes two cycles. An access to
an empty slot gets `err`.

**GPIO.** The output register is 8 bits wide by default and resets to 0. The
inputs pass through a two-flop synchroniser.

**UART.** It sends and receives 8N1 frames at `UART_DIV` clocks per bit. The
default, 104, gives 115200 baud from the iCEBreaker's 12 MHz clock. The
receiver samples each bit in its middle.

### Software contract

The system is laid out for a freestanding C program:

- **Memory regions.** `.text` and `.rodata` sit in flash at `0x0010_0000`
  (up to 15 MiB). `.data` and `.bss` sit in RAM at `0x4000_0000` (128 KiB),
  with `.data` loaded from flash.
- **Start-up code.** It does four things:
  - zero `.bss`;
  - copy `.data` from flash to RAM;
  - set `sp` to `0x4002_0000`, the top of RAM;
  - call `main`, then spin.

Both memories at their default sizes hold exactly this layout: the flash window
ends at `0x00FF_FFFF`, which is the end of the 15 MiB program region.

## The small examples

- `blinky`: a 22-bit counter incremented every clock. The red LED is its top
  bit and the green LED its inverse. At 12 MHz each LED blinks with a period
  of about 0.35 s.
- `and_gate`: `y = a & b`.
- `d_flip_flop`: a rising-edge D flip-flop with synchronous set and reset
  (reset wins) and an inverted output.

## Parameters

| Module | Parameter | Default | Meaning |
|---|---|---|---|
| `icicle_soc`, `icicle_cpu`, `pc_gen` | `RESET_VECTOR` | `0x0010_0000` | first instruction address |
| `icicle_soc` | `RAM_WORDS` | 32768 | RAM size in 32-bit words (128 KiB) |
| `block_ram` | `DEPTH` | 32768 | same, on the RAM itself |
| `icicle_soc`, `fpga_cpu_top` | `GPIO_WIDTH` | 8 | GPIO pins each way |
| `icicle_soc` / `uart` | `UART_DIV` / `CLK_DIV` | 104 | clocks per UART bit |
| `wb_bridge` | `NPERIPH` | 2 | peripheral slots |
| `blinky` | `WIDTH` | 22 | counter width |

## Files

`rtl/`:

- `icicle_pkg.sv`: opcodes, funct3 codes, CSR numbers, the control record, the
  flags and the pipeline-register structs, and the memory map.
- `wb_if.sv`: the Wishbone interface.
- Processor: `icicle_cpu.sv` plus the stage modules listed in the pipeline
  table.
- System: `icicle_soc.sv`, `wb_arbiter.sv`, `block_ram.sv`,
  `spi_flash_ctrl.sv`, `wb_bridge.sv`, `gpio.sv`, `uart.sv`.
- Examples: `blinky.sv`, `and_gate.sv`, `d_flip_flop.sv`.
- `fpga_cpu_top.sv`: the top level with everything side by side.

`tb/`: one `<module>_tb.sv` per module, plus these helpers:

- `rv_asm_pkg.sv`: RV32I instruction encoders, so testbenches can write
  programs as function calls.
- `rv32i_ref_pkg.sv`: an instruction-set reference model (a class) used to
  check the core instruction by instruction.
- `spi_flash_model.sv`: a behavioural SPI flash that answers READ commands and
  counts them.

## Simulating

Any testbench builds the same way. List the packages first and let Verilator
find the rest by module name:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/icicle_pkg.sv tb/rv_asm_pkg.sv tb/rv32i_ref_pkg.sv tb/fpga_cpu_top_tb.sv \
    -y rtl -y tb --top-module fpga_cpu_top_tb -o sim
./obj_dir/sim +verilator+rand+reset+2
```

`-Wno-fatal` keeps Verilator's width and lifetime warnings on testbench code
(random numbers assigned to narrow signals, for instance) from stopping the
build; they are still printed. The RTL itself lints clean of errors with
`verilator --lint-only -Wall`.

Every testbench prints a single line, `TB_RESULT checks=N failures=M`, and has
a watchdog that counts a failure if the simulation hangs.
`fpga_cpu_top_tb` also accepts `+trace`, which prints each retired PC.

What the main testbenches do:

- **`icicle_cpu_tb`** runs the bare core on a random RV32I program of 300
  instructions, looped four times. The program mixes ALU operations, loads and
  stores of every width, and taken and untaken branches and jumps. Each
  memory answers after a random 0 to 2 cycles. Every instruction that leaves
  Writeback is compared with the reference model: its PC, destination register
  and value. At the end it also compares the registers, data memory and
  instret.

  The testbench also counts how often each hazard path was used. That covers
  flush, interlock, memory stall and all four bypass sources.

- **`icicle_soc_tb`** boots a small program from the flash model with a 1024-word RAM and an
  8-clock UART. The program exercises:
  - RAM;
  - halfword and byte accesses;
  - GPIO;
  - polled UART output;
  - an unmapped load;
  - the counters;
  - a call and return.

- **`fpga_cpu_top_tb`** is the full-size end-to-end test, with every parameter
  at its default. It boots a program from flash that:
  - runs the C start-up sequence above;
  - sums an array copied into `.data`;
  - uses the GPIO and both directions of the UART at 115200 baud;
  - runs a routine from RAM;
  - touches an unmapped address.

  It also checks the blinky counter, the AND gate and the flip-flop. Every
  mechanism counted by the testbench must occur at least once, otherwise the
  run fails: flush, interlock, bypass from Execute and from Mem Access, memory
  stall, arbitration conflict, RAM write, peripheral access, bus error, GPIO
  write, UART transmit and receive.

  A run takes about 44,000 cycles, with 334 flash reads. Most of that time is
  flash fetches.

The unit testbenches use random stimulus against models written independently
in the testbench. Where a latency is part of the design, they also check it:

- one cycle for the block RAM;
- 130 cycles for a flash read;
- one instruction per cycle from fetch;
- the UART frame timing.

## What follows the original design and what does not

**Kept from the original Icicle design:**

- the six stage names and the blocks in each stage;
- the reset value "reset vector minus 4" and branch-over-stall priority in
  PC Gen;
- the format-based rules for which registers an instruction reads and
  writes;
- the immediate bit layouts;
- the non-transparent register file;
- the adder with a borrow-style carry;
- the result mux and the Writeback write enable;
- predict-not-taken with a flush;
- bypassing and interlocking as the hazard cures;
- the Wishbone port signals;
- the system's block structure, with an arbiter, block RAM, flash, and a
  bridge to GPIO and UART;
- the flash and RAM addresses and sizes of the C memory layout;
- the 22-bit blinky.

**This design's own choices.** The original names these parts or says what
they do, but not how; each is built in the simplest way that works:

- the fetch buffer;
- the bypass order and the load-use interlock;
- bubble collapse during stalls;
- the zero and 4 inputs of the operand muxes;
- the arbiter priority;
- the flash protocol details;
- the peripheral bus, the register maps and the peripheral addresses;
- the UART frame and baud rate;
- the GPIO width;
- the error response for unmapped addresses;
- synchronous active-high reset everywhere;
- synchronous set/reset on the flip-flop.

**Not implemented or not checked here:**

- No exceptions, traps, interrupts or privileged CSRs. ECALL/EBREAK do nothing.
- Misaligned loads and stores are not detected. The address is simply
  truncated to the access size.
- FENCE.I is a no-op. Code that a store writes to RAM is fetched correctly
  only if it lies more than four instructions beyond that store. Up to four
  younger instructions can already have been fetched: two in the fetch buffer,
  one in Decode and one in Execute.
- No instruction cache, so execution from flash is slow (about 130 cycles per
  instruction).
- The design has not been placed and routed on an iCE40 device. Its LUT count
  and maximum clock rate are therefore unknown. The 128 KiB RAM matches the
  UP5K's four 256 Kbit SPRAM blocks in size, but mapping `block_ram` onto them
  is left to the synthesis flow.
- The original was also checked formally against the RISC-V formal
  specification. This RTL has no formal interface; it is checked instead
  against the reference model in simulation.
