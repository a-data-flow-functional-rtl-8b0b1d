# Data-flow functional computer in SystemVerilog

This is a synthesizable SystemVerilog model of the data-flow functional
computer for real-time image processing. The machine is a 3-D mesh of small
data-flow processors (DFPs), with two DFPs per chip. Each processor performs
one operator of an image algorithm on pixel flows, or routes flows on to
other processors. An operator fires as soon as its input words are there and
its outputs have room. There is no global control.

The top module is `dffc_top`. Its defaults give the experimental system:
256 DFPs in 128 biprocessor chips, arranged as an 8 × 8 × 4 mesh. The mesh
also has:

- four digital video inputs and four digital video outputs,
- a programming and test interface and a low-bandwidth I/O interface, both
  on a host bus,
- four links towards the high-level (transputer) network.

## Files

| File | Contents |
|---|---|
| `rtl/dfp_pkg.sv` | word, command, scan and microinstruction types |
| `rtl/dfp_fifo.sv` | 8 × 9 synchronous stack (FIFO), also reused for small buffers |
| `rtl/dfp_port_rx.sv`, `rtl/dfp_port_tx.sv` | receiving and sending part of a port |
| `rtl/dfp_crossbar.sv` | input and output full crossbars, with route-through |
| `rtl/dfp_control.sv` | 64 × 32 program RAM, firing rule, decode stage, sequencer |
| `rtl/dfp_datapath.sv` | stage 2 (multiply or shift) and stage 3 (2901-type ALU, abs/min/max, shift, clip or threshold) |
| `rtl/dfp_data_ram.sv` | 256 × 9 data RAM |
| `rtl/dfp_scan.sv` | COM3-0 decoder, scan register, configuration registers |
| `rtl/dfp.sv` | one data-flow processor |
| `rtl/dfp_chip.sv` | biprocessor chip |
| `rtl/prog_test_if.sv`, `rtl/lowbw_io_if.sv` | host-bus interfaces |
| `rtl/video_in.sv`, `rtl/video_out.sv` | video subsystems |
| `rtl/dffc_top.sv` | the machine |
| `tb/tb_<module>.sv` | self-checking testbench for each module |
| `tb/tb_dffc_bench.sv` | shared end-to-end bench |
| `tb/tb_dffc_top.sv` | end-to-end bench on a 2×2×2 mesh |
| `tb/tb_dffc_full.sv` | end-to-end bench on the default 8×8×4 mesh |

## The port protocol

Each port has 10 lines: 9 data lines and 1 acknowledge line. A port is
either sending or receiving, as its configuration register sets:

- A sending port drives the data lines.
- A receiving port drives the acknowledge line.

The code `9'h1FF` on the data lines means "no word". A word moves at the
clock edge where a word other than `9'h1FF` is on the lines and the
acknowledge is high.

- A receiving part raises its acknowledge while its two-word buffer has room
  and its processor is running.
- A sending part shows the idle code while it is empty or its processor is
  held.

With these rules one word moves per clock. At 25 MHz that is 25 Mbytes/s per
port.

Bit 8 of a word is its type bit:

- `0`: the word is a pixel.
- `1`: the word is a control word.

Control words travel inside the data flows. By convention `9'h100` marks the
end of a line. When an operator's input word is a control word, the word
passes through that operator unchanged.

## Inside a DFP

A DFP has the following parts:

- Six ports: N, S, E, W, U, D.
- An input crossbar. Each input stack A, B and E takes words from any one
  receiving part.
- Three output stacks C, D and F.
- An output crossbar. Each sending part takes from one output stack, or from
  a receiving part when the processor is routing.
  - A flow that feeds several consumers is forked.
  - A word leaves its source only when all of its consumers can take it.

The pipeline has three stages:

1. **Decode** (`dfp_control`). An instruction fires when both of these hold:
   - every stack it pops has a word;
   - every stack it pushes has room, counting the results still in stages 2
     and 3.

   When the first popped word is a control word, the instruction becomes a
   pass.
2. **8-bit stage**. Operand R may be multiplied by a constant K or shifted
   left. The data RAM word is read here. Writes still in flight are
   forwarded to it.
3. **16-bit stage**. A 2901-type ALU with a Q register computes one of:
   `R+S`, `S-R`, `R-S`, `OR`, `AND`, `~R&S`, `XOR`, `XNOR`. Then come
   abs/min/max and an arithmetic right shift. Last, the result is either
   clipped to 0..255 or turned into a flag (1 if result > 0). The output is
   pushed to the output stacks and may be written to the data RAM.

The 32-bit microinstruction (`uinstr_t` in `dfp_pkg`):

| Bits | Field | Meaning |
|---|---|---|
| 31:30 | seq | next, tag-jump, jump, repeat-until-control-word |
| 29:28 | ram | none; LINE (delay line at pointer P, length PLEN); HIST (address = A word, read-modify-write); TABLE |
| 27 | tag | set the type bit of the results |
| 26 | qwe | Q := result |
| 25 | flag | output 1 if result > 0, else 0 |
| 24:21 | shr | output right shift |
| 20:19 | post | none, abs, min, max |
| 18:16 | alu | ALU function |
| 15:14 | shl | left shift of R |
| 13 | mul | R := R × K |
| 12:11 | ksel | which of K0..K3 |
| 10:8 | ssel | S operand: A, B, E, K, Q, RAM, 0 |
| 7:6 | rsel | R operand: A, B, E, RAM |
| 5:3 | push | output stacks C, D, F |
| 2:0 | pop | input stacks A, B, E |

Each useful instruction does two operations per clock, a multiply or shift
and an ALU operation. That gives the "2 arithmetic operations per pixel" per
processor.

## Programming

All processors share the lines COM3-0 and form one scan chain (SCANA in,
SCANB out).

The commands are HOLD=0, RUN=1, SHIFT=2, WRITE=3, CLEAR=4 and READ=5.

The 42-bit scan word is `{target[1:0], address[7:0], data[31:0]}`. Its
targets are:

- 1: program RAM;
- 2: a configuration register;
- 3: the data RAM.

The configuration registers are:

| Address | Register | Contents |
|---|---|---|
| 0 | INSEL | source port of A, B, E; 7 means none |
| 1 | OUTSEL | 4 bits per port: 0 receive, 1–3 stack C/D/F, 4–9 route from port N..D |
| 2 | K | four 8-bit constants |
| 3 | SEQ | LAST, JT, PLEN |

To program the mesh:

1. Shift one word into every processor of the chain.
2. Issue WRITE. Every processor commits its word at the same time.
3. Issue RUN.

READ loads the scan registers back for testing.

The host drives all of this through `prog_test_if`:

| Address | Register |
|---|---|
| 0x00 | COM |
| 0x01 | data to shift |
| 0x02 | start shift of n bits |
| 0x03 | status |
| 0x04 | captured bits |

`lowbw_io_if` is at 0x10 (TX), 0x11 (RX, popped on read) and 0x12 (status).

## Mesh map

The DFP number is `id = (z*NY + y)*NX + x`. The ports point to these
neighbours:

| Port | Neighbour |
|---|---|
| N | y−1 |
| S | y+1 |
| W | x−1 |
| E | x+1 |
| D | z−1 |
| U | z+1 |

Chip `c` holds layers `2*(c / (NX*NY))` and `2*(c / (NX*NY)) + 1`. Its U/D
link is inside the chip.

All interfaces attach to layer z=0:

- video input v: the W port of `(0, v*NY/NVIDEO)`;
- video output v: the E port of `(NX-1, v*NY/NVIDEO)`;
- low-bandwidth I/O: sends into the N port of `(0,0)` and receives from the N
  port of `(NX-1,0)`;
- high-level link h: the S port of `(h*NX/NHL, NY-1)`.

The scan chain runs chip by chip, lower processor first.

## Simulation

There are no extra tools or scripts. Plain Verilator 5 is enough. For example:

```
verilator --binary --timing --assert --top-module tb_dffc_top -y rtl -y tb +libext+.sv \
  rtl/dfp_pkg.sv tb/tb_util_pkg.sv tb/tb_dffc_bench.sv tb/tb_dffc_top.sv
obj_dir/Vtb_dffc_top
```

Every testbench ends with `TB_RESULT checks=N failures=M`.

The end-to-end bench runs these steps:

1. It programs every processor through the host bus.
2. It runs the horizontal edge operator `|x(n-1) - x(n)| > th`. The operator
   uses the data RAM as a one-pixel delay. Its flow is routed across the
   upper layer and forked to a video output and to the low-bandwidth
   interface.
3. It runs a scaled second video channel, `3x/2` clipped.
4. It sends host words to a high-level link through route-through
   processors.
5. It holds the machine and resumes it.
6. It floods a video input until the input overflows.

The bench counts each mechanism: stalls, fork words, routed words,
end-of-line words kept, holds and overflow. Both sizes pass:

- 2×2×2 (`tb_dffc_top`), 317 checks. It finishes in seconds.
- The default 8×8×4 (`tb_dffc_full`, with no parameter override on
  `dffc_top`), 411 checks. It takes about five minutes.

## Departures from the document, and choices it leaves open

- **Not built.** The T800 transputer network, the link adaptors and the host
  workstation are outside the RTL. Their connection points are top-level
  ports.
- **Own choices.** The document does not give these, so they are this
  design's own:
  - the port protocol and its idle code;
  - the microinstruction format;
  - the command codes and the scan word layout;
  - the configuration registers;
  - the host-bus register maps;
  - the placement of the interfaces on the mesh faces.
- **Chip coupling.** The two DFPs of a chip are coupled through U/D. The
  document says only "Two coupled DFPs have been included in a single chip".
- **Interface counts.** Four video channels and four high-level links are
  counted from the arrows of the system diagram. The text gives no number.
- **Arithmetic width.** The ALU arithmetic is 16-bit two's complement. A
  product R × K of 32768 or more reads as negative, because the 8 × 8 bit
  multiplier feeds the 16-bit stage unsigned.
- **Delay operator.** The delay operator (RAM mode LINE) keeps end-of-line
  words in place, so lines stay aligned. The first delayed pixel of a line
  is therefore the last pixel of the previous line, not 0.
- **Edge detection macro-function.** Only part of it is tested. The bench
  runs the horizontal derivative, abs and threshold. The full macro-function
  has four directions and 14 operations. Its vertical directions need a
  512-pixel line delay, which needs two processors' 256-word data RAMs in a
  chain. It was not mapped.
- **1024-processor extension.** Setting `NZ=16` builds it. It was not
  simulated.
- **Clock rate.** Timing at 25 MHz is not checked. There is no synthesis
  timing result.
