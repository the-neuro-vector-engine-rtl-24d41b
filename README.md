# NVE: a 16-lane SIMD convolution engine with VLIW control

This is synthesizable SystemVerilog for one compute cluster of the Neuro
Vector Engine (NVE). The NVE is a small accelerator for convolutional
networks in wearable vision devices. It does not use a fixed systolic array
for one kernel size. Instead it has one vector multiply-accumulate
instruction, `y <- y + x * w`, over 16 neighbouring output neurons. A VLIW
program repeats that instruction once per kernel tap. The cost of the
flexibility is an instruction fetch per cycle. What it buys is a high MAC
utilisation for any kernel size, stride or number of input maps, and a
*tile-strip* loop order that keeps most data reuse inside a 1024-word local
buffer and a few vector registers.

The published design reaches 32 operations per cycle in the MAC stage, plus
8 activation lookups per cycle: 40 GOp/s at 1 GHz. It sustains about 30 GOp/s
on real networks. The RTL here keeps all the published sizes. The
instruction encoding, the bus handshakes, the stall rule and the
loading/configuration ports are its own choices, listed under
[Departures and own choices](#departures-and-own-choices).

## Data path

```
 in_data 64b ──► Scratchpad ─A─► read ─► W Reg 0-3 ───(W0 broadcast)──┐
      ▲          1024 x 64b      reg     IMG Reg 0-7 ─┐                ▼
      │          port A r/w  ─B─► read ─► IMG Reg 8-15 ├─► 16 x PE (MACC) ─► Saturate ─► WB Sgm ─► out_data 64b
      │          port B read     reg     IMG Reg 16-22 ┘    17-bit acc       O Reg 0-15   8 LUTs
      └──────────────────────── activation feedback (layer merging) ◄───────────────────────┘
```

| Stage | Module | What it holds / does |
|---|---|---|
| DataBuffer | `nve_scratchpad` | 1024 x 64-bit local buffer (8 kB). Port A reads **or** writes in a cycle; port B only reads. |
| Reg Op | `nve_wreg` | Four 16-bit weights, loaded as one word and shifted down one per cycle. Entry 0 is broadcast. |
| Reg Op | `nve_imgreg` | 16 input lanes (bytes of two words, one per port), shifted one lane per cycle. A 7-entry shift-in register (loaded from port B) supplies lane 15. |
| Vector MACC | `nve_vmacc`, `nve_pe` | 16 lanes, each a two-stage multiply-accumulate. |
| Saturate | `nve_saturate` | Converts each accumulator to a 10-bit potential (O Reg 0-15). |
| WB Sgm | `nve_wb_sgm`, `nve_act_lut` | Looks up O Reg 0-7 or 8-15 in eight 1024 x 8 tables. Puts 8 activations on the output bus and on the feedback path. |
| Control | `nve_ctrl`, `nve_ibuf`, `nve_agu` | 512 x 54-bit instruction buffer, fetch with a zero-overhead hardware loop, modulo address generation and the global stall. |

`nve_top` wires all of this together. `nve_pkg` holds the sizes, the slot
enums and the instruction struct.

## Fixed-point arithmetic

| Word | Bits | Format | Range |
|---|---|---|---|
| Weight, bias | 16 | `SIIIIIII.FFFFFFFF` (signed) | [-128, 128) |
| Input / activation | 8 | `.FFFFFFFF` (unsigned) | [0, 1) |
| Accumulator | 17 | sign + 8 integer + 8 fraction | [-256, 256) |
| Potential | 10 | `SIII.FFFFFF` (signed) | [-8, 8) |

- **Multiply.** The PE forms the full 16 x 8 product, which has 16 fraction
  bits. It keeps 8 of them by an arithmetic right shift, so the product
  rounds towards minus infinity (a truncated multiplier).
- **Accumulate.** If a sum leaves the 17-bit range, the accumulator saturates
  to the nearest limit and sets a sticky overflow bit. All lanes are ORed
  into the `ovf` output, which clears at `start`.
- **Saturate.** This stage drops two more fraction bits (floor) and clamps
  the result to [-512, 511].
- **Look up.** The 10-bit potential, read as an unsigned number, indexes the
  activation table. Whoever loads the table chooses its contents. The
  testbenches use a sigmoid: entry `i` = `min(255, floor(256 / (1 + exp(-p))))`
  with `p = signed(i) / 64`.

## Pipeline timing a program must respect

Every instruction word has one slot for each stage. All slots act **in the
cycle the word executes**, each on its own stage. The hardware inserts no
interlocks between stages. The program is software-pipelined, and its
schedule must account for these latencies:

| From | To | Distance |
|---|---|---|
| scratchpad read (port A or B) in cycle t | data usable by a Reg Op slot | t+2 |
| Reg Op update in t | seen by the MACC slot | t+1 |
| MACC op (`EX_BIAS`, `EX_MAC`) in t | accumulators updated | end of t+1, so Saturate may read them in t+2 |
| Saturate in t | WB slot may read O Regs | t+1 |
| WB slot in t | `out_data` / `out_valid` and the feedback word | t+1 |
| fetch of word n | word n executes | one cycle later |

Because the MACC stage is pipelined, back-to-back `EX_MAC` ops run at one per
cycle. An `EX_BIAS` issued right after the last MAC of the previous output
does not disturb that output if Saturate reads it two cycles after that MAC.
The end-to-end test relies on exactly this.

## Instruction word (54 bits, `nve_pkg::instr_t`)

| Bits | Field | Meaning |
|---|---|---|
| 53:38 | `rsv` | reserved, not decoded |
| 37:36 | `ctl` | `CTL_NEXT`; `CTL_ADV` advances the modulo offset; `CTL_HALT` ends the program |
| 35:34 | `wb` | `WB_LO` / `WB_HI`: look up O Reg 0-7 / 8-15 |
| 33 | `sat` | capture the saturated accumulators in O Reg 0-15 |
| 32:31 | `ex` | `EX_BIAS` (acc <- W0) / `EX_MAC` (acc += img[lane] * W0) |
| 30 | `si_set` | load shift-in register from the port B read register |
| 29:28 | `img` | `IMG_SET` (lanes 0-7 from A, 8-15 from B) / `IMG_SHIFT` |
| 27:26 | `w` | `W_SET` (from the port A read register) / `W_SHIFT` |
| 25 | `pb_en` | port B read |
| 24 | `pb_mod` | port B modulo addressing |
| 23:14 | `pb_addr` | port B address field |
| 13:12 | `pa` | `PA_READ` / `PA_WRITE` |
| 11 | `pa_mod` | port A modulo addressing |
| 10 | `pa_src` | write data: 0 = input bus, 1 = activation feedback |
| 9:0 | `pa_addr` | port A address field |

If `si_set` and `IMG_SHIFT` come in the same word, byte 0 of the new port B
word goes straight into lane 15. Bytes 1-6 go into the shift-in register.
This lets a new kernel row start without a wasted cycle.

**Modulo addressing.** With the mode bit set, an address field becomes
`img_base + ((field + iter_off) mod img_len)`. `iter_off` advances by
`img_stride` (mod `img_len`) at the end of each loop pass and at each
`CTL_ADV`. The same instruction therefore writes the newest image row and
reads the three current rows of a circular region, pass after pass. The
field and `img_stride` must be below `img_len`.

**Hardware loop.** The loop repeats words `loop_start..loop_end`
`loop_count` times. The branch is decided at fetch, so it costs no cycle.
There is one loop level.

## Example: the 3x3 steady state

`tb/tb_nve_top.sv` builds a complete program, which shows how the slots work
together. A 3x3 convolution moves down an 18-column strip. Each 10-cycle
pass produces 16 outputs, which is 144 MACs, so the MAC stage is busy in 9
of every 10 cycles. Image rows live in a 4-row circular region of 12 words
(3 words per row: columns 0-7, 8-15, 16-17). Weights are in three absolute
words: `[b,w0,w1]`, `[w2,w3,w4]`, `[w5..w8]`.

| # | Port A / B | Reg Op | MACC | Sat / WB |
|---|---|---|---|---|
| 3 | A: weights word 1 | IMG set (row c0), W shift | bias | |
| 4 | A,B: row c1 cols 0-15 | SI set, IMG shift, W shift | MAC w0, row c0 | Sat (previous row) |
| 5 | A: **write** new row word 0; B: row c1 cols 16-17 | IMG shift, W set | MAC w1 | WB lo |
| 6 | A: weights word 2 | IMG set (row c1), W shift | MAC w2 | WB hi |
| 7 | A,B: row c2 cols 0-15 | SI set, IMG shift, W shift | MAC w3, row c1 | |
| 8 | A: write new row word 1; B: row c2 cols 16-17 | IMG shift, W set | MAC w4 | |
| 9 | – | IMG set (row c2), W shift | MAC w5 | |
| 0 | A: weights word 0 | SI set, IMG shift, W shift | MAC w6, row c2 | |
| 1 | A,B: next row c0 cols 0-15 | IMG shift, W shift | MAC w7 | |
| 2 | A: write new row word 2; B: next c0 cols 16-17 | W set | MAC w8 | (loop end) |

The prolog loads the weights and three rows and runs a first pass with
Sat/WB off. The epilog runs Sat, WB lo and WB hi once more for the last row.
It also writes one result word back into the scratchpad through the feedback
path.

## Buses, stalls and configuration

- **Input bus.** `in_data`, `in_valid`, `in_ready`. A word is taken when
  both `in_valid` and `in_ready` are high. `in_ready` is high while the
  executing word writes from the input bus.
- **Output bus.** `out_data`, `out_valid`, `out_ready`. A result is held
  until `out_ready` takes it.
- **Stall.** There is one global stall. The whole pipeline (PC, registers,
  memories, accumulators) holds while the executing word needs an input
  word that is not there, or while an output word waits for `out_ready`.
- **Program and tables.** `prog_we/addr/data` writes the instruction buffer.
  `lut_we/addr/data` writes all eight activation tables at once.
  `cfg_we/addr/wdata` writes the controller registers: 0 `loop_start`,
  1 `loop_end`, 2 `loop_count`, 3 `img_base`, 4 `img_len`, 5 `img_stride`.
- **Running a program.** `start` (while idle) runs the program from word 0.
  `busy` stays high until `CTL_HALT`, which pulses `done`.
- **Reset.** `rst_n` is an asynchronous active-low reset for all control and
  datapath registers. Memory contents are not reset.

## Running the benchmark layers

`tb/tb_nve_layers.sv` shows how a general layer maps onto the cluster. It
runs one 16-column strip, three output rows deep, of each of the eight layers
of the two benchmark networks (face detection and speed-sign recognition).
Each layer takes two programs:

1. **A loader.** Its body is one word: a modulo write with stride 1, which
   acts as a post-incrementing pointer. The hardware loop repeats that word
   once per data word, streaming weights and image rows from the input bus
   into the scratchpad.
2. **A compute program.** A small list scheduler in the testbench builds it.
   - Each loop pass sets the bias, then runs all N_i x N_k x N_l MACs of one
     output row, then Saturate and two lookups.
   - Every weight-word load, image-row load and shift-in load goes in the
     latest cycle whose scratchpad port is free. Its read is issued two
     cycles earlier.
   - Modulo addressing moves each pass S rows down the image.

Stride-2 layers run in polyphase form. Even and odd input columns are stored
as separate maps, so the kernel becomes two kernels of half the width.

| Layer | N_i | kernel | S | cycles per 16 outputs | MAC stage busy |
|---|---|---|---|---|---|
| face 1 | 1 | 6x6 | 2 | 47 | 78% |
| face 2 | 2 | 4x4 | 2 | 40 | 82% |
| face 3 | 1 | 6x6 | 1 | 44 | 84% |
| face 4 | 14 | 1x1 | 1 | 25 | 60% |
| speed 1 | 1 | 6x6 | 2 | 47 | 78% |
| speed 2 | 3 | 6x6 | 2 | 125 | 87% |
| speed 3 | 16 | 5x5 | 1 | 428 | 93% |
| speed 4 | 80 | 1x1 | 1 | 108 | 75% |
| speed 3, full | 40 | 5x5 | 1 | 1204 (30 per input map) | 83% |

The test checks every output. It also checks that passes come out exactly
one body length apart, so the hardware adds no hidden cycles.

- **Overhead.** The lost MAC cycles come from this simple schedule: each
  pass drains the pipeline before the next starts. The hand-pipelined 3x3
  program reaches 90%.
- **1x1 layers.** These are limited by port A. Every tap needs a new image
  word, and weight words need port A too.
- **Buffer fit.** Every layer fits the 1024-word scratchpad.
- **The 40-map 5x5 layer.** Its 1000 taps do not fit in one 512-word loop
  body. The "full" row therefore uses a second program form. The bias is set
  before the loop, and the hardware loop runs once per input map. Each map's
  5 image rows and 7 weight words are stored as one 22-word block, so a
  single modulo offset steps through both. The lookup follows the loop. The
  data fills 1008 of the 1024 words.
- **Pooling.** Max pooling has no hardware. Average pooling is folded into a
  strided convolution.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module against a reference model written independently in the testbench and
prints `TB_RESULT checks=<n> failures=<n>`. `tb_nve_top` runs the 3x3
program above twice, with all parameters at their defaults:

- **Run 1.** Moderate weights, no bus stalls. It checks every output byte
  and that rows come out exactly 10 cycles apart in steady state.
- **Run 2.** Large positive weights, which overflow the accumulators, with
  random input and output stalls.

The test also checks that each mechanism actually happens: input stall,
output stall, loop branch, modulo wrap, shift-in bypass, potential clamp,
accumulator overflow and feedback write. `tb_nve_layers` (above) covers
general kernel sizes, strides and many input maps.

Simulate any testbench with Verilator 5, for example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/nve_pkg.sv tb/tb_nve_top.sv --top-module tb_nve_top -o sim
./obj_dir/sim
```

Lint a module with `verilator --lint-only -Wall -Irtl rtl/nve_pkg.sv rtl/<module>.sv`.

## Departures and own choices

- **Instruction encoding.** The published design states only the width
  (54 bits) and the depth (512). The layout above is this design's own; 16
  bits are left unused.
- **Port roles.** Port A is read/write and port B is read-only. The 3x3
  schedule never reads port A in a cycle that writes, and that schedule is
  what this reading follows.
- **Scratchpad read latency.** It is two cycles: the memory read plus one
  register. This is chosen to reproduce the published 3x3 schedule's
  read-to-register distance.
- **Potential format.** It is read as `SIII.FFFFFF`. Input words are read as
  purely fractional and unsigned.
- **Overflow check.** It is implemented as saturation plus a sticky flag.
- **Stalls and handshakes.** The stall causes and the valid/ready handshakes
  are this design's own. So are the ports that load programs, tables and
  configuration.
- **Shift-in bypass.** Its behaviour (new word and shift in the same cycle)
  is inferred from the 3x3 schedule. In the first word of that schedule
  (the one that uses the third kernel row), the image register also shifts,
  as it does in the two equivalent words for the first two kernel rows.
- **Memories.** The SRAMs are plain arrays. A chip would use macros with the
  same ports.
- **Not included.** The DMA and external memory that feed and drain the
  buses, and the network compiler.
