# UDSP: a dynamically reconfigurable DSP array

A DSP algorithm drawn as a data-flow graph (multipliers, adders, delays and
constants joined by wires) can be mapped directly onto hardware. An FPGA does
this at bit level and pays for it in routing area. A processor runs the graph
one instruction at a time and pays in energy per operation. The UDSP ("universal"
DSP) sits between the two. It is a grid of identical coarse-grained 16-bit
cores, one graph cluster each, joined by a word-wide programmable routing
fabric. Every core and every routing box holds eight instructions, and one
program counter picks the active instruction everywhere at once. The whole
array can therefore change function in a single clock cycle. This gives
spatial flexibility like an FPGA and temporal flexibility like a processor.

This RTL describes the array as built for a 9 x 9 chip (81 cores). It includes
the control module that programs the array and helps debug it over JTAG, a
serial test port, or an on-chip eFPGA.

```
              ext_in_top[1:0] / ext_out_top[1:0]
                    |   |
 ext_in_left  +-----------------+----------------+-------+
   [3:0] ---->|  I/O box (0,0)  |  I/O box (0,1) |  ...  |----> ext_out_right
              |  4x4 stacks     |                |       |       (layer 4, registered)
              +-----------------+----------------+-------+
                      |  one wire per stack
              +--------------+  layer 3 box  (reach 3 stacks)
              | vertical     |  layer 2 box  (reach 2 stacks)
              | stack (r,c)  |  layer 1 box  (reach 1 stack, 4 wires/side)
              |              |  core
              +--------------+
 JTAG / serial / eFPGA -> control module -> configuration bus, program counter,
                                            soft reset, observer
```

## The vertical stack

The tile that repeats across the array is the *vertical stack*
(`udsp_vstack`). It holds one core and three routing switch boxes stacked
above it, one per routing layer. Its layer-1 box reaches the four nearest
neighbours. The layer-2 box reaches the stacks two positions away in the same
row or column, and the layer-3 box reaches the stacks three positions away.
The layers are chained vertically: core <-> layer 1 <-> layer 2 <-> layer 3
<-> the I/O layer. A signal can therefore climb to a longer-reach layer, hop,
and come back down. The routing layers have no registers: a route through any
number of layer-1..3 boxes arrives in the same cycle. All timing lives in the
cores, and that is what lets a mapper retime a graph exactly.

## The core (`udsp_core`)

Resources:

- two multiplier/shifters, MS0 and MS1;
- two add/subtract units, A0 and A1;
- two banks of eight 16-bit constants, C0 and C1;
- four inputs and four outputs.

Each sink port (MS0.p1, MS0.p2, ..., Out3) chooses its source from a short
fixed list. The choice is a 1- or 2-bit field of the instruction. The lists
are in the comment of `udsp_pkg.sv`; in short, each unit can take inputs,
constants and the other units' results, but not every pair is connected.
This *connectivity matrix* keeps the core small while still covering FIR and
IIR sections, butterflies and complex multiplies inside one core.

Each sink port also has a programmable delay line, and its legal range depends
on the source (the *delay matrix*):

| route                              | delay (cycles) |
|------------------------------------|----------------|
| input -> multiplier                | 1..2           |
| input -> adder                     | 0..1           |
| In0 -> Out0, In3 -> Out3 (long)    | 1..16          |
| In1 -> Out1, In2 -> Out2           | 1..2           |
| multiplier -> adder / output       | 0..1           |
| adder -> anything                  | 1..2           |
| constant -> unit                   | 0              |

A programmed value outside the range is clamped into it. As a result every
input-to-output path of a core has at least one register, and no program can
build a loop without a register inside a core.

Arithmetic:

- The multiplier is a Q1.15 fractional multiply: `(a*b) >>> 15`. The only
  overflow, -1 x -1, saturates to 0x7FFF.
- In shift mode, the unit shifts port 1 by a signed 4-bit amount: positive
  shifts left, negative is an arithmetic shift right.
- Adders add or subtract and wrap around in two's complement.
- Accumulate mode replaces an adder's port 2 with its own previous result,
  which gives a single-cycle multiply-accumulate.
- An instruction may also write In1 into C0 and In2 into C1, so the constant
  banks can serve as a small data cache.

**Temporal states.** The 74-bit instruction is 38 bits of delays and constant
addressing, 20 of selection, 14 of operation and 2 of state. The 2-bit state
field picks one of four copies of every delay register and accumulator. The
copies not selected keep their contents. Two or more algorithms can therefore
share a core in time: each keeps its own pipeline contents while the other
runs. `udsp_dline` implements one delay line with its four copies.

## Routing boxes (`udsp_switchbox`, `udsp_io_switchbox`)

A routing box is a two-level crossbar. The first level picks the box's
*tokens* (internal wires) from the inputs. The second level connects every
output to any token. An output that is not in use points at a token fed with
zero, so idle wires do not toggle. While the chip reset is asserted, all
outputs are forced to zero.

**Layer 1** has 21 ports per side:

- 4 for the core;
- 4 wires for each of the 4 directions (16);
- 1 for the link to layer 2.

It has 8 tokens and a 90-bit instruction. The instruction holds eight 3-bit
token codes and twenty-one 3-bit output codes (87 bits used). A full first
level would need a 5-bit code per token. Instead, the first level is sparse:
token `t`, choice `s` (1..7), reads input `(t + 8*(s-1)) mod 21`. Each input is
then reachable from two or three tokens. The stride of 8 was picked because it
gives the lowest mean and variance of the overlap between inputs' token sets.
Inputs that share few tokens rarely block each other.

**Layers 2 and 3** have 6 ports (4 directions, down, up), 4 tokens and a full
first level in a 24-bit instruction. Layers 2 and 3 have fewer tokens than
layer 1 because a good placement leaves far more short connections than long
ones.

**Layer 4** (the I/O layer) is registered and has one instruction. There is
one box per 4 x 4 block of stacks, so a 9 x 9 array has 3 x 3 boxes. Each box
has 24 ports:

- one per stack under it (16);
- two wires for each direction (8).

Every output can take any input, and every output is registered. Layer 4 is
the only path to the chip pins. It is also the intended way to cross long
distances, one cycle per box. Chip pins:

- 4 inputs on the left edge;
- 2 inputs and 2 outputs on the top edge;
- 1 output on the right edge.

The `udsp_top` header comment gives which box and wire each pin uses.

**Combinational loops.** Layers 1-3 are delay-less and joined in every
direction. The netlist therefore contains combinational loops, as any
FPGA-style fabric does: for example, east out -> neighbour's west in ->
neighbour's west out -> back. A valid program never closes one. Lint and
synthesis tools report them (verilator reports UNOPTFLAT). After reset all
routing drives zero, so the array powers up with no loop active. Whatever
generates programs must reject routes that form a cycle without passing
through a core.

## Control module (`udsp_control`)

Three sources can deliver 32-bit words at the same time:

- JTAG (`udsp_jtag_if`): a standard TAP with a 4-bit IR.
  - IR 1 is IDCODE (`0x1D5B0001`).
  - IR 2 (FRAME) takes one word per Update-DR.
  - IR 3 (OBSERVE) captures the observer word.
  - Any other code selects BYPASS.
- The serial test pins (`udsp_serial_if`): `sdi` is shifted in MSB first
  while `sen` is high, 32 bits per word. While a word shifts in, `sdo` shifts
  out the observer word sampled at the end of the previous word.
- The eFPGA port: a plain valid/ready word port.

The priority checker (`udsp_priority`) takes JTAG first, then serial, then
the eFPGA. It holds a grant until the current frame has ended, so frames never
interleave. A word that arrives while its interface still holds an untaken
word sets that interface's `overrun` flag.

The distributor (`udsp_distributor`) reads a header word
`{type[31:28], target[27:20], arg[19:0]}`:

| type | frame | payload | handled by |
|------|-------|---------|------------|
| 1 | program vertical stack `target` | 64 words (2048 bits) | `udsp_vs_prog` |
| 2 | program I/O box `target` | 4 words (120 bits used) | `udsp_l4_prog` |
| 3 | program counter: `arg[17:16]` mode, `[14:12]` first, `[10:8]` last, `[7:0]` dwell | - | `udsp_pc` |
| 4 | soft reset of stack `target` (0xFF = all), `1+arg[3:0]` cycles | - | `udsp_soft_reset` |
| 5 | observe stack `target`, output `arg[1:0]` | - | `udsp_observer` |
| 0 | no operation | - | - |

**Stack frame layout** (bit offsets inside the 2048-bit frame; word k carries
bits 32k+31..32k):

| bits        | content                         |
|-------------|---------------------------------|
| 0..591      | 8 core instructions, 74 bits each |
| 592..719    | 8 constants of bank C0          |
| 720..847    | 8 constants of bank C1          |
| 848..1567   | 8 layer-1 instructions, 90 bits each |
| 1568..1759  | 8 layer-2 instructions, 24 bits each |
| 1760..1951  | 8 layer-3 instructions, 24 bits each |
| 1952..2047  | unused                          |

The stack programmer buffers the frame and then makes 48 writes on the shared
configuration bus, one per cycle. It does not accept the next frame's payload
while it writes. The whole 9 x 9 array takes 81 frames; its program memory is
81 x 2 Kb = 162 Kb. The 8-bit stack number allows up to 256 stacks.

**Program counter modes** (`udsp_pc`):

| mode | behaviour |
|------|-----------|
| hold | stay at `first` |
| loop | `first`..`last`, then repeat |
| once | `first`..`last`, then stop and raise `pc_done` |
| ping-pong | `first`..`last`..`first`, back and forth |

In every mode each value is held for `dwell+1` cycles. The counter drives
every core and every layer-1..3 box.

**Soft reset** clears every delay line, every state copy and every
accumulator of the selected stacks. It keeps the instructions and constants.
Use it to restart an algorithm from a clean state.

**Observer.** The observer samples one core output every cycle. It also
counts the cycles in which that output changed, saturating at 255, which shows
a stuck or dead path. It returns `{stack, toggles, sample}` through JTAG
(IR 3) or the serial pins.

## Worked example: what the end-to-end test maps

`tb/tb_udsp_top.sv` programs everything through the control module and maps
this chain:

```
ext_in_left[0] -> I/O box 0 (reg) -> layer 3 -> layer 2 -> layer 1 of stack (0,0)
core (0,0): y = c0*x[n-1] + c1*x[n-2]          MS0, MS1 from In1/In2, A0, Out1
layer 1 east -> core (0,1): z = g*y            MS0 x constant, Out1
layer 1 up, layer 2 east (2 stacks) -> stack (0,3) -> core In0 -> Out0, delay 4
layer 2 up, layer 3 south (3 stacks) -> stack (3,3) -> I/O box 0 (reg) -> ext_out_top[0]
```

From an input sample to its first appearance at the output takes 10 cycles:
2 in the I/O registers, 2 in the FIR core (1-cycle input delay, registered
output), 2 in the gain core and 4 in the delay line. The second FIR tap adds
one more cycle for the older sample.

The test then:

1. Switches the program counter to instruction 1, where stack (0,1) takes
   another constant and another state copy.
2. Reads the observer over the serial pins, then reads IDCODE and the
   same probe over JTAG.
3. Soft-resets every stack and checks that the program survives.

It counts each of these mechanisms and fails if any of them never happened.

## Simulating

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M`
and stops itself with a watchdog. With verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/udsp_pkg.sv tb/tb_udsp_core.sv --top-module tb_udsp_core -Mdir obj -o sim
obj/sim
```

| testbench | covers |
|-----------|--------|
| `tb_udsp_core` | single-cycle MAC, 2-tap FIR, 16-cycle long delay, shift-subtract, two algorithms time-shared on one core, soft reset, data cache, saturation |
| `tb_udsp_switchbox` | random programs against a model (layer-1 and layer-2 sizes) |
| `tb_udsp_io_switchbox`, `tb_udsp_vstack` | random routing through the I/O box and all ports of a stack |
| `tb_udsp_jtag_if`, `tb_udsp_serial_if` | TAP states, IDCODE, frame words, observer read-back, overrun |
| `tb_udsp_priority`, `tb_udsp_distributor` | arbitration order and grant holding, frame decode |
| `tb_udsp_pc` | all four counter modes against a model |
| `tb_udsp_vs_prog`, `tb_udsp_l4_prog` | frame unpacking |
| `tb_udsp_soft_reset` | frame timing and pulse length |
| `tb_udsp_observer` | sample and toggle count |
| `tb_udsp_control` | frames from each source through the whole control module |
| `tb_udsp_cmul_workload` | complex multiply on two cores, one result per cycle, 2-cycle latency |
| `tb_udsp_iir_workload` | recursive filters y[n] = x[n] + a*y[n-D], D = 1 and 2, closed inside one core at one sample per cycle |
| `tb_udsp_top` | the example above on a 5 x 5 array |
| `tb_udsp_top_full` | the same on the 9 x 9 default array |

The full-size array is a large netlist for verilator's C++ back end. Building
`tb_udsp_top_full` takes several minutes, most of it in the C++ compiler;
`-j` helps. The 5 x 5 build takes about a minute and a half. The top's
parameters `ROWS` and `COLS` must be at least 5, so that the edge pins land
on distinct I/O wires.

## Where this RTL departs from, or goes beyond, the reference design

- **Long delay lines.** One source gives the long lines a reach of 16 cycles;
  a delay table of an earlier core revision gives 8. This RTL uses 16.
- **Delay position.** Adder delays are placed on the adder inputs and on the
  output ports, as the delay table lists them. The reference's general rule
  puts them at the adder outputs. The latencies are the same.
- **Encodings are this design's own.** This covers:
  - the bit order inside the 74-, 90- and 24-bit instructions;
  - the frame layout and the control word formats;
  - the JTAG instruction codes and the serial protocol;
  - the program-counter modes;
  - the observer word;
  - the soft-reset targeting.

  The reference gives the sizes and roles, not these layouts.
- **Layer-4 details.** Layer 4 has one instruction rather than eight, and
  2 wires per side between boxes. The reference gives neither number.
- **The eFPGA** is not part of this design. It appears only as a word port
  on the top.
- **Not modelled.** Physical properties are outside this RTL:
  - the 1 GHz target, ultra-low-Vt cells and clock gating;
  - the 16 nm implementation;
  - the energy claims.
- **Arithmetic choices.** Saturation only on -1 x -1, wrap-around adders and
  accumulate mode are choices made here, since the reference does not specify
  overflow behaviour.
