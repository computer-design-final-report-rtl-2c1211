# A 16-bit CR16-style computer with memory-mapped video, serial and keyboard I/O

This is a small complete computer built around a multicycle 16-bit RISC
processor that executes the baseline CR16 instruction set. The processor
has sixteen 16-bit registers, a 16-bit ALU (add, subtract, AND, OR, XOR,
one-bit shifts) and a word-addressed 16-bit address space. Program and data
live in an external SDRAM that sits behind a simple request/done handshake.
The top quarter of the address space is also decoded as memory-mapped I/O:

- a seven-segment display;
- a bidirectional parallel port;
- a 19.2 kbit/s UART;
- a PS/2 keyboard receiver;
- a 3 KB frame buffer that a VGA core shows as a 128 x 96 picture with
  2 bits per pixel, each pixel drawn as a 2 x 2 block.

Everything runs from one 50 MHz clock. The video logic advances on a
divide-by-four clock enable, which gives 12.5 MHz.

The main idea is simplicity over speed. Every instruction is fetched
through the same SDRAM handshake, and every load or store takes the same
time whatever its address. A store to an I/O register is also written to
the SDRAM. A load from an I/O register runs a full SDRAM read, and the
device's value replaces the SDRAM's. So the CPU only ever sees one kind of
memory access.

## Block map

| Module | Role |
|---|---|
| `cr16_system` | Top level. It wires the CPU, memory interface, address decoder, I/O devices and video. |
| `controller` | 19-state Moore control state machine and instruction decoder. |
| `datapath` | PC, IR, immediate unit, register file, ALU, ALU result register, PSR, MAR and MDR. |
| `alu` | Logic unit, adder/subtractor and one-bit shifter, behind a 4-way output mux. |
| `regfile` | 16 x 16 registers with two read ports. It is built from two 16 x 8 dual-port RAMs (`dpram16x8`). |
| `sdram_if` | Handshake between the controller's read/write requests and the external SDRAM controller. |
| `addr_decoder` | Device selects for the I/O space. |
| `sevenseg_io`, `ppi`, `uart`, `ps2_kbd` | Memory-mapped devices. |
| `vga_core` | Video timing, frame-buffer address generation and pixel colour. |
| `vga_bram` | Six 512 x 8 block RAMs (`ramb512x8`) that form the 3 KB frame buffer. |
| `clk_div4` | Divide-by-four counter: the 12.5 MHz square wave and its clock enable. |
| `cr16_pkg` | Shared types: opcodes, control word, flags, states, condition test. |

The SDRAM chip and its controller are not part of the RTL. The top level
brings their signals out as ports. `tb/sdram_model.sv` is a behavioural
model of the pair, for simulation only.

## Instruction set

Every instruction is one 16-bit word. Assembler operand order is
`op Src Dst`, for example `add r1 r2` means r2 = r2 + r1.

| Bits | 15:12 | 11:8 | 7:4 | 3:0 |
|---|---|---|---|---|
| Register form | 0000 (or 0100, 1000) | Dst / condition / link | extended opcode | Src / target / address |
| Immediate form | opcode | Dst / condition | imm[7:4] | imm[3:0] |

| Instruction | Encoding | Operation |
|---|---|---|
| AND OR XOR ADD SUB CMP MOV | `0000 d ext s`, ext = 1 2 3 5 9 B D | d = d op s; MOV: d = s. CMP only sets flags. |
| ANDI ORI XORI | opcode 1 2 3, immediate zero-extended | d = d op imm |
| ADDI SUBI CMPI | opcode 5 9 B, immediate sign-extended | d = d +/- imm; CMPI only sets flags |
| MOVI | opcode D, immediate zero-extended | d = imm |
| LUI | opcode F | d = imm << 8 |
| LSH | `1000 d 0100 s` | d shifted by one bit: left if s >= 0, right if s < 0 |
| LSHI | `1000 d 000x iiii` | as LSH; bit 4 of the amount is its sign |
| LOAD | `0100 d 0000 a` | d = mem[a] |
| STOR | `0100 s 0100 a` | mem[a] = s |
| Jcond | `0100 c 1100 t` | if condition c holds: PC = t |
| JAL | `0100 l 1000 t` | l = PC + 1; PC = t |
| Bcond | `1100 c disp8` | if condition c holds: PC = PC + 1 + disp (signed) |

Shifts are logical and move one bit per instruction.

### Flags and conditions

The program status register has four flops:

- C: carry, or borrow after a subtraction. It is also read as L.
- F: signed overflow.
- Z: zero.
- N: signed "less than". It is computed as the carry out XORed with the
  sign bits of both ALU inputs.

As in the CR16 baseline:

- ADD, ADDI, SUB and SUBI load C and F only.
- CMP and CMPI compute Dst - Src. They load C (as L), Z and N.
- Nothing else changes the flags.

This split matters. A common loop is `cmpi 0 r13; subi 1 r13; bne loop`.
It branches on the Z flag left by the compare, across the subtract.

The sixteen condition codes are the CR16 ones:

| Code | Name | Test |
|---|---|---|
| 0 | EQ | Z |
| 1 | NE | !Z |
| 2 | CS | C |
| 3 | CC | !C |
| 4 | HI | L |
| 5 | LS | !L |
| 6 | GT | N |
| 7 | LE | !N |
| 8 | FS | F |
| 9 | FC | !F |
| A | LO | !L & !Z |
| B | HS | L \| Z |
| C | LT | !N & !Z |
| D | GE | N \| Z |
| E | UC | always |
| F | never | never |

After `cmp rX rY`:

- HI holds when rX > rY unsigned.
- GT holds when rX > rY signed.

## The controller

The controller is a Moore machine with states S0 to S18. Each state drives
a fixed set of the named control signals. The only exceptions are the
opcode-dependent ALU settings in S2 and S4, the write-back suppression for
compares, and the condition test in S11.

```
fetch:   S0  ALU result <- PC
         S16 MAR <- PC
         S14 read; wait for rddone
         S15 IR <- data
decode:  S1  PC <- PC + 1; choose a path
R-type:  S2  ALU(Dst, Src)        -> S3 write back
I-type:  S4  ALU(Dst, imm)        -> S3 write back
LOAD:    S5 address -> S6 MAR -> S18 read, wait -> S8 write back
STOR:    S5 address -> S7 MAR, MDR -> S17 write, wait
Jcond:   S10 ALU result <- target -> S11 load PC if condition holds
Bcond:   S12 ALU result <- PC + disp -> S11
JAL:     S9  PC <- target, ALU result <- return address -> S13 link register
```

Every path returns to S0. An encoding that names no instruction goes
straight back to S0.

The datapath registers the ALU output in the ALU result register, which
the graph calls G. MAR is loaded from that register. MDR is loaded from the
Dst register read port. Register write-back selects either the ALU result
or the memory read data.

### Timing

Timing depends on the SDRAM controller. With the latency of the model in
`tb/` (read answered 8 clocks after the request, write after 5):

| Operation | Clocks |
|---|---|
| Load access (S6 to S8) | 13 |
| Store access (S7 to S17) | 9 |
| Fetch | 14 |
| ALU, immediate, branch, jump or JAL instruction, from fetch to the next fetch | 17 |
| LOAD instruction | 29 |
| STOR instruction | 25 |

The 13 and 9 clocks match the access times measured on the board the
design was built for.

## Memory and I/O

The memory holds 16-bit words with 16-bit word addresses.

| Address | Device | Read | Write |
|---|---|---|---|
| 0x0000-0xbfff | SDRAM (96 KB) | data | data |
| 0xc000 | seven-segment display | last value | bits 6:0 drive segments 1-7 |
| 0xc100 | parallel port | the 8 data lines | bits 2:0 drive the 3 status lines |
| 0xc200 | UART data | received byte | byte to send |
| 0xc300 | UART status/control | bit0 byte received, bit1 send acknowledged | bit0 receive acknowledge, bit1 send request |
| 0xc400 | PS/2 keyboard | last scan code | any store clears it to 0 |
| 0xd000-0xdbff | frame buffer | 0 (write-only) | low byte = four pixels |

A device is selected by the upper address byte, so 0xc000 to 0xc0ff all
reach the display.

### When I/O registers change

I/O registers are written in the clock the memory interface reports that
the (shadow) SDRAM write has finished. Device read data is captured at the
end of the read handshake.

### UART handshakes

Receiving:

1. When a frame arrives, the byte is stored and status bit 0 rises.
2. The program reads 0xc200.
3. The program writes 1 to control bit 0.
4. The hardware then clears status bit 0 and the control bit.

While a byte is waiting, further frames are dropped.

Sending uses a four-phase handshake:

1. The program writes the byte.
2. It raises control bit 1.
3. It waits for status bit 1.
4. It lowers control bit 1.
5. Status bit 1 falls.

The line format is 8N1. At 50 MHz one bit is 2604 clocks.

### PS/2 keyboard

The receiver samples the 11-bit PS/2 frame on falling keyboard-clock edges
and checks start, odd parity and stop. It keeps only the last byte. Make
and break prefixes (F0, E0) arrive as bytes of their own.

## Video

`clk_div4` produces a one-in-four clock enable. At that rate `vga_core`
runs a 640 x 480, 60 Hz frame at half horizontal resolution:

- 400 counts per line: 320 visible, 8 front porch, 48 sync, 24 back porch.
- 525 lines: 480 visible, 10 front porch, 2 sync, 33 back porch.
- Both syncs are active low.

The picture fills the top-left 256 x 192 of the visible area. Each
frame-buffer pixel covers two counts by two lines. The rest of the screen
is black.

Each frame-buffer byte holds four pixels. The first pixel on screen is in
bits 7:6. The byte address is `{line[7:1], count[7:3]}`. So a row of 128
pixels is 32 bytes, and the whole picture is 96 x 32 = 3072 bytes.

Pixel codes map to colours as follows:

| Code | Colour |
|---|---|
| 00 | red |
| 01 | blue |
| 10 | green |
| 11 | white |

The core has a two-step pipeline:

1. Address the buffer.
2. Register the byte and select the pixel.

Sync and blanking are delayed to match, so rgb, hsyncb and vsyncb change
together.

The six 512-byte banks share one port. The top three address bits select
the bank. The CPU takes the port for the single clock of a frame-buffer
write. If the screen was fetching a byte in that clock, that byte is
wrong for one frame. The design accepts this small glitch rather than
stall either side.

## What follows the original design and what does not

Taken from the original design:

- The block structure.
- The 19 controller states and their paths.
- The named control signals.
- The ALU organisation.
- The memory map.
- The shadow-write I/O scheme.
- The UART and keyboard handshakes.
- The frame-buffer size and pixel format.
- The 2 x 2 pixel blocks.
- The clock rates.

Choices made here where the original is silent:

- Flag updates per instruction (CR16 rules, described above).
- The condition test in S11.
- The logic-mux "pass A" input, which is used to copy the PC.
- Synchronous active-high resets.
- One clock domain with clock enables instead of a divided clock.
- The exact VGA timing numbers, pixel order and colour codes.
- Hardware clearing of the UART receive acknowledge, and dropping of
  excess frames.
- PS/2 frame checking, and clearing the scan code on a store.
- Decoding I/O on the upper address byte.
- Reads of the frame buffer return 0.

There are no interrupts.

Two details of the original programs are worth knowing when writing
software for this machine:

- The original animation program calls its delay routine with
  `movi 0x80 r14; jal r15 r14`, while its animation header is read from
  0x0100. Here the delay routine is placed at 0x0080.
- The original seven-segment test program always jumps back to the
  instruction that clears its table index. So it keeps showing the
  pattern for digit 0, whatever the parallel port reads.

## Simulating

Every testbench is self-checking and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb rtl/cr16_pkg.sv tb/tb_cr16_system.sv \
          -y rtl -y tb --top-module tb_cr16_system -Mdir build
./build/Vtb_cr16_system
```

Replace `tb_cr16_system` with any other testbench name.

| Testbench | What it covers |
|---|---|
| `tb_alu`, `tb_regfile`, `tb_datapath`, `tb_controller`, `tb_sdram_if`, `tb_addr_decoder`, `tb_sevenseg_io`, `tb_ppi`, `tb_uart`, `tb_ps2_kbd`, `tb_vga_core`, `tb_vga_bram`, `tb_clk_div4` | The blocks one at a time. `tb_uart` uses a short bit time. |
| `tb_cr16_system` | The whole computer at its default parameters. See below. |
| `tb_workloads` | Three complete programs on the whole computer. See below. |

`tb_cr16_system` assembles a program that uses every instruction class
and every device. It then checks:

- the stored results;
- the UART line, in both directions;
- a PS/2 frame;
- the load and store times;
- the first VGA pixels.

It also counts each mechanism, for example every controller state,
taken and untaken branches, and frame-buffer port steals.

`tb_workloads` runs three programs:

- A hand-assembled bring-up program.
- The seven-segment/parallel-port test.
- The keyboard-controlled animation player, twice: on two small frames
  drawn at an offset, and on two full-screen 128 x 96 frames. After each
  frame it compares the whole frame buffer, then one complete video frame
  of VGA output, position by position. It also checks that the delay loop
  runs 65280 passes of 51 clocks with no key pressed, and twice as many
  after a key whose scan code ends in 1.

The SDRAM model's latencies are parameters (`RD_LAT`, `WR_LAT`). The
UART's clock and bit rate are the `CLK_HZ` and `BAUD` parameters of
`uart` and `cr16_system`.
