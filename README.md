# A pipelined Apollo Guidance Computer for an FPGA

This is a recreation of the Apollo Guidance Computer (AGC) processor as a
modern four-stage pipeline. It is meant for an exhibit: the FPGA runs
programs written in the original AGC assembly language. A display-and-keyboard
unit (DSKY) sends the processor verb/noun commands and shows its answers over
a serial link. The processor keeps the AGC's programmer-visible machine:

- 15-bit one's complement words;
- a 12-bit banked address space;
- the central registers A, L, Q, EBANK, FBANK and Z;
- I/O channels instead of memory-mapped devices;
- a subset of the instruction set (36 named orders counting aliases), with
  no interrupts.

Under that sits a plain Fetch/Decode/Execute/Writeback pipeline with stall-based
hazard handling.

The RTL covers everything on the FPGA:
- the CPU;
- its erasable (RAM) and fixed (ROM) memory;
- the I/O unit with the byte-level serial logic;
- the clock enable;
- two performance counters.

These parts are not included: the bit-level UART transceiver, the DSKY board
and its microcontroller, the PC that draws the orbit display, and the
assembler. The byte-level serial interface is brought out as ports on the top.

## Words and arithmetic

A word is 15 bits: bit 14 is the sign, and a negative number is the bitwise
complement of its magnitude. So there are two zeros, +0 (`00000`) and −0
(`77777`). Addition adds the words as unsigned numbers and adds a carry out of
bit 14 back in at bit 0 (the end-around carry). Negation is inversion, and
subtraction adds the inverted operand. All numbers here are octal, as is usual
for the AGC.

Multiplication (`MP`) works on magnitudes. It multiplies two 14-bit
magnitudes into a 28-bit product. The high 14 bits go to A and the low 14 bits
to L, and both words carry the product's sign. A zero product is always +0.
With fractional operands, A then holds the product as a fraction. Division is
not implemented. Programs multiply by precomputed reciprocals instead.

## Memory map and banks

Addresses in instructions are 12 bits wide (octal 0000-7777):

| logical range | what it reaches |
|---|---|
| 0000-0017 | central registers: A=0, L=1, Q=2, EBANK=3, FBANK=4, Z=5, BBANK=6, ZERO=7 |
| 0020-1377 | unswitched erasable memory (physical 0020-1377) |
| 1400-1777 | switched erasable: bank `EBANK[10:8]`, physical `1400 + bank*400 + offset` (banks 0-4 fill 1400-3777) |
| 2000-3777 | switched fixed: bank `FBANK[12:10]`, physical `10000 + bank*2000 + offset` (banks 0-7 fill 10000-27777) |
| 4000-7777 | fixed-fixed memory (physical 4000-7777) |

This gives 2048 words of erasable memory (physical 0000-3777) and 10240 words
of fixed memory (physical 4000-7777 and 10000-27777). The ROM is indexed by physical address
minus 4000. EBANK values 5-7 wrap around the 2048-word RAM. `addr_translator` does this mapping. The CPU uses two copies of it:
- one for the operand address in Decode;
- one for the program counter in Fetch.

The ZERO register reads as zero and ignores writes. Z is the program counter:
reading it gives the address of the next instruction, and writing it is a jump.
That is how the alias `TCAA` (`TS Z`) works. Instructions are fetched only from
fixed memory.

## The instruction subset

The binary encodings are the original machine's: order code in bits 14:12 and
address in bits 11:0. Orders that address erasable memory have a quarter code
in bits 11:10. `EXTEND` switches the next word to the extended order table.

| kind | orders |
|---|---|
| control | `TC` (Q ← return address), `TCF`, `RETURN`, `BZF`, `BZMF` |
| loads and stores | `CA`, `CS`, `TS`, `XCH`, `LXCH`, `QXCH`, `XLQ` (swap L and Q) |
| arithmetic | `AD`, `SU`, `ADS`, `INCR`, `AUG`, `DIM`, `MP`, `MASK` |
| I/O channels | `READ`, `WRITE`, `RAND`, `WAND`, `ROR`, `WOR`, `RXOR` |
| prefixes | `EXTEND`, `INDEX` (adds its operand to the next instruction word) |

`COM`, `DOUBLE`, `SQUARE`, `ZL`, `ZQ`, `TCAA` and `NOOP` are the original
aliases (`CS A`, `AD A`, `MP A`, `LXCH 7`, `QXCH 7`, `TS Z`, `CA A`). They need
no hardware of their own.

The remaining AGC orders execute as one-cycle no-ops, and the CPU pulses
`illegal` when one of them retires. They are `CCS`, `DAS`, `DXCH`, `DV`, `MSU`,
`DCA`, `DCS`, `EDRUPT` and `RESUME`. The two-word transfers are left out
because the RAM has only one write port. A 28-bit product is stored with two
single-word stores.

## The pipeline

This is the hardest part to follow when reading `rtl/agc_cpu.sv`. All state
advances only on cycles where the clock enable `ce` is high.

```
 F: PC -> translate -> ROM port A
 D: instruction word (+ INDEX addend, EXTEND flag) -> decoder
    operand K -> translate -> RAM read / ROM port B / register file; channel read
 E: operand arrives (synchronous memories) -> ALU + branch decision
 W: register file, RAM write port, output channel registers
```

**Memory timing.** RAM and ROM are synchronous: the address goes in on one
cycle and the data comes out on the next. Decode sends the operand address, so
the operand reaches Execute just as the instruction does. Writeback does all
writes. So a load-compute-store instruction such as `ADS` takes one pass
through the pipeline and needs no memory stage.

**Read-after-write hazards.** There is no forwarding. Decode holds its
instruction while an older instruction in Execute or Writeback will still write
a location it reads. That location can be a register, a RAM word or an I/O
channel, and the comparison uses translated physical addresses. A dependent
instruction directly after its producer waits two cycles, and one two
instructions later waits one. `EXTEND` takes a pipeline slot of its own, so an
extended order sits further from its producer and stalls less.

**Branches.** `TC`, `TCF`, `RETURN`, `BZF`, `BZMF` and writes to Z resolve in
Execute. A taken branch squashes the one instruction in Decode, so it costs two
cycles. A branch to the next sequential address squashes nothing. Fetch
follows the sequential path, so untaken branches cost nothing. `TC` puts the
return address (its own address + 1) in Q.

**Bank switching.** A write to EBANK or FBANK changes how younger instructions
translate their addresses. When such a write reaches Writeback, the CPU
squashes the instructions in Decode and Execute. It then refetches from the
address after the writer, and the new FBANK is forwarded straight to the fetch
translator. A bank switch therefore costs two bubbles.

**EXTEND and INDEX.** Each is an instruction of its own that takes one slot.
`EXTEND` sets a flag consumed by the next decoded word. `INDEX` reads its
operand in Decode like any load. Its value is added, one's complement, to the
next instruction word before that word is decoded, so it changes both the
address field and the order code. The sum is kept if that instruction stalls.
`INDEX` of an extended order keeps the EXTEND flag alive.

**Interrupts.** There are none, so programs poll the input channels.

The CPU's status outputs each pulse once per enabled cycle for the test benches
and counters. They are `retired`, `illegal`, `stall`, `redirect` (branch
squash), `serialize` (bank-switch squash), `indexed` and `extended`.

## I/O channels and the serial link

There are 15 channels:
- **Channels 0-7 are outputs.** They live in the CPU (`io_regfile`) and can be
  read back.
- **Channels 8-14 are inputs.** They live in the I/O unit and are written only
  from the serial link.
- **Channels 15 and up** read as 0 and ignore writes.

`IN_BASE` sets the split.

Each channel word crosses the link as a three-byte frame:

```
byte 0: 1  w[14]  0 0  ch[3:0]     header (top bit set)
byte 1: 0  w[13:7]
byte 2: 0  w[6:0]
```

Only the header has its top bit set, so the receiver can resynchronise.

**Sending (`uart_tx_framer`).** Each CPU write to an output channel marks that
channel. The framer sends the lowest marked channel, latching its value when the
frame starts. The CPU may write the same channel again while it is being
sent. That write marks it again, so the newest value always follows.

**Receiving (`uart_rx_parser`).** The receiver drops these bytes and pulses
`rx_dropped`:
- data bytes where a header is expected;
- frames addressed to an output channel.

A header in the middle of a frame starts a new frame.

Both sides talk to the bit-level transceiver by byte:
- transmit uses valid/ready, and the data is held while not accepted;
- receive uses one `rx_valid` pulse per byte.

The I/O unit runs at the full board clock, so no byte is missed while the CPU's
clock enable is low.

## Clocking and counters

The board clock is 50 MHz, and the CPU runs at 5 MHz. `clk_enable` makes a
one-cycle enable every `CLK_DIV` = 10 board cycles, which the CPU, RAM and ROM
use. Everything is in one clock domain. `perf_counters` counts enabled cycles
and retired instructions (32-bit, saturating, clearable), so IPC is
`perf_instrs / perf_cycles`.

## Files

| module | role |
|---|---|
| `agc_pkg` | word and address types, register numbers, operation enum, control word, one's complement helpers |
| `agc_top` | the FPGA: clock enable, ROM, RAM, CPU, I/O unit, counters |
| `agc_cpu` | the pipeline; contains `agc_regfile`, `io_regfile`, `agc_decoder`, `agc_alu`, `agc_branch`, two `addr_translator`s |
| `agc_ram`, `agc_rom` | synchronous memories (one read and one write port; two read ports) |
| `io_unit` | input channel registers, `uart_tx_framer`, `uart_rx_parser` |
| `clk_enable`, `perf_counters` | clock enable and IPC counters |

Every module has a test bench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M`.

- **`tb_agc_cpu`** checks the pipeline against an instruction-level reference
  model (`tb/tb_agc_model_pkg.sv`, which also holds the assembler helpers). It
  runs directed programs, random programs and programs with random clock
  enables. It also checks the cycle cost of back-to-back loads, stalls and
  taken branches.
- **`tb_agc_isa_suite`** is an instruction acceptance suite. It runs one
  test per instruction name, 36 in all counting the aliases. Each name runs
  with eight operand sets that include ±0, ±1 and the largest magnitudes. The
  final state is compared with the reference model.
- **`tb_agc_top`** runs the whole design at its default parameters, acting as
  the DSKY side of the link at 115200-baud byte spacing. It sends verb/noun
  commands to a small polling program and checks the answers: a lamp test, a
  clear, a multiply through an `INDEX` jump table, and a running sum in banked
  erasable memory updated by a subroutine in banked fixed memory. It checks
  that every pipeline mechanism occurred, and that the performance counters
  match its own count. The program measures an IPC of about 0.69. Its polling
  loops stall on every `BZF` after a `READ`.

## Simulating

With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps --top-module tb_agc_top -y rtl -y tb +libext+.sv \
    rtl/agc_pkg.sv tb/tb_agc_model_pkg.sv tb/tb_agc_top.sv
obj_dir/Vtb_agc_top
```

For another test bench, use its name in place of `tb_agc_top`. Keep the
`--timescale` option, because the register-file benches use 0.1 ns settling
delays. Only `tb_agc_cpu`,
`tb_agc_isa_suite` and `tb_agc_top` need `tb/tb_agc_model_pkg.sv`. `tb_agc_rom` reads
`tb/tb_agc_rom.hex`, with word *i* = (37·*i* + 5) mod 2¹⁵. Run it from the
directory that holds `tb/`.

To run your own program, pass a `$readmemh` file through `agc_top`'s
`ROM_INIT` parameter. Line *n* of that file is physical address 4000 + *n*, so
execution starts at line 0 (address 4000). The test benches instead write
`u_rom.mem` directly.

## How this relates to the source design, and what to trust

These parts follow the source design:
- the four stages and their duties;
- memory read in Decode and written in Writeback;
- stalling on read-after-write distance;
- banked memory with the logical layout above;
- the instruction subset;
- a two-word product written with single stores;
- no interrupts and no divide;
- input registers in the I/O unit, with output registers inside the CPU;
- the byte-level serial logic in front of a bit-level transceiver;
- 5 MHz operation from a 50 MHz clock;
- cycle and instruction counters.

These are this implementation's own choices:
- **Encodings and registers:** the binary encodings and the register layout
  (taken from the original AGC).
- **Bank selection:** the EBANK/FBANK bit positions and the physical bank
  placement.
- **Pipeline details:** the branch and bank-switch squash rules, the hazard
  check on physical addresses, reset at 4000 and the clock-enable style.
- **I/O:** the 8/7 split of the 15 channels and the serial frame format.
- **Unsupported orders:** they run as no-ops.

Where the source's own instruction summary disagrees with the original machine,
the original wins:
- `DIM` moves a value one step toward zero. The summary repeats `AUG`'s text.
- `TC` saves the return address in Q.
- `BZF`/`BZMF` jump to their address K.

The source quotes an IPC of 0.81 for one of its demonstration programs, which
is not available. The IPC this pipeline reaches depends on the program's
spacing between dependent instructions.
