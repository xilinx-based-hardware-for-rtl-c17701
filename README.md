# Binary image smoothing on a PC-AT FPGA card

This is SystemVerilog RTL for a PC-AT plug-in card that smooths binary
(black/white) images in hardware. Smoothing is a clean-up step that comes
before character recognition. The card has its own DRAM. The PC loads a
packed image into it, and the card filters it and writes the result into
another part of the same memory. Two classic 3x3 smoothing rules are
provided:

* **Dineen**: count the black pixels in the 3x3 window. The new pixel is
  black when the count is **greater than** a threshold θ. θ = 2..4 fattens
  strokes; θ = 5..7 thins them a little. Any θ removes isolated noise
  pixels.
* **Unger**: a fixed logic rule on four groups of neighbours. The centre
  pixel itself is not an input:

  ```
   (a)  . A A     (b)  C C .      black = (any A and any B)
        B . A          C . D            or (any C and any D)
        B B .          . D D
  ```

  The rule removes one-pixel spurs and fills one-pixel holes in strokes.

The main idea is word-parallel processing. The image is stored packed, one
bit per pixel and 16 pixels per memory word. The datapath turns three
words (the same column of rows n-1, n and n+1) into 16 result pixels at
once. The card's speed is therefore set by memory bandwidth, not by logic.

The design follows a published early-1990s card built from Xilinx XC3090
FPGAs and a DP8422A DRAM controller. That description gives the block
structure, the datapath, the access schedule and the microprogrammed
controller. It does not give port lists, encodings, the microprogram, the
register map or how the image borders are handled. Those are this design's
own choices; the list is under [Where this design departs or fills
gaps](#where-this-design-departs-or-fills-gaps).

## Block structure

```
xilinx_card                         top: one interface FPGA + one processor FPGA
├── xilinx0_interface               PC-AT side ("XILINX0")
│   ├── io_decoder                  I/O address -> port select, DMA acknowledge
│   ├── io_ports                    control/status/page/programming/pointer regs
│   ├── mem_decoder                 64 KB upper-memory window -> card address
│   └── drc_mux                     picks who drives the DRAM controller
└── smoothing_unit                  processor FPGA ("XILINX1")
    ├── control_unit                microprogrammed sequencer
    │   ├── microprogram_rom        32-word program
    │   └── delay_logic             stall counter
    ├── address_generator           row / displacement / word counters
    └── data_processor
        ├── line_register  x3       16+2 bit row registers
        ├── dineen_filter           16 cells, column-count based
        ├── unger_filter            16 cells
        └── output_register         assembles the result words
```

The packages are `smooth_pkg` (microinstruction format) and `card_pkg`
(I/O port map). The DRAM controller and its memory are outside the RTL.
`xilinx_card` brings out the controller port:

* `drc_req`: one-clock start strobe,
* `drc_we`: the access is a write,
* `drc_addr`, `drc_wdata`: word address and write data,
* `drc_rdata`: read data,
* `drc_ml`: mode-load strobe.

`tb/drc_dram_model.sv` is a behavioural model of that port, for
simulation only.

## The word boundary: 16+2 bit registers and the one-word lag

This is the part that takes the most care.

Pixel order: **bit 15 of a memory word is the left-most pixel.** To produce
result pixel *i* of a word, the filter needs input pixels *i-1* and *i+1*.
For the first pixel of a word, *i-1* is the last pixel of the word to the
left. For the last pixel, *i+1* is the first pixel of the word to the
right.

Each `line_register` is 18 bits wide. When a new word is loaded, the
register keeps the two right-most pixels of the word it held before:

```
 q[17:16]            q[15:0]
 prev word px14,15   current word px0 .. px15
```

The filters compute 16 outputs, centred on bits 16..1 of the 18-bit
strips:

* output bit 15 (centre q[16]) is the **last pixel of the previous word**,
* output bits 14..0 (centres q[15..1]) are **pixels 0..14 of the current
  word**.

Pixel 15 of the current word cannot be computed yet, because it needs the
next word.

So after the three words of column *w* are loaded, the filter output
finishes word *w-1* and starts word *w*. `output_register` keeps the 15
leading results from each load. At the next load it outputs
`{kept[14:0], new[15]}`, which is the complete word *w-1*. The written
result therefore always lags the reads by one word column:

```
 memory:  rd A(w) | rd B(w) | rd C(w) | wr D(w-1) | rd A(w+1) | ...
                              ^ filter settles during C's precharge,
                                output register loads, then D(w-1) is written
```

At each end of a row:

* **Left border**: the row registers are cleared at the start of the row,
  so the pixels left of the image read as white. Column 0 is read, but
  nothing is written for it.
* **Right border**: the word counter runs one step past the last word.
  That step reads nothing from memory and feeds white words, which
  finishes the last word of the row.
* **Top and bottom border**: rows -1 and 2^ROW_BITS are not read, and
  white words are used instead.

In every case a pixel outside the image counts as white.

## Memory schedule and timing

Every memory access takes `ACT_CLKS + PRE_CLKS` clocks:

* `ACT_CLKS` for the active (RAS) phase, after which read data is valid,
* `PRE_CLKS` for the precharge, during which the loaded data is used.

The defaults of 4 + 4 assume a 20 ns clock. That gives 80 ns of access and
80 ns of precharge, and the 80 ns precharge also covers the filter's
settling time. Accesses follow each other without gaps. No refresh is
issued: while the card is processing, the continuous sweep over the image
keeps the DRAM rows refreshed.

One output word costs 3 reads and 1 write, which is 32 clocks. A full run
takes

```
clocks = 1 + ROWS * (2 + (ACT+PRE) * (3 + 4 * WORDS_PER_ROW))
```

For the default 1024 x 1024 image (64 words per row) that is 2,123,777
clocks, or 42.5 ms at 20 ns. The original hardware was reported to take
19 ms for this job. That figure is below what its own 3-reads-plus-1-write
schedule allows at 150 ns per access (about 39 ms). It may have used a
different image size or access mode; this RTL follows the published
schedule.

## The microprogrammed controller

`control_unit` is built like the original sequencer:

* a loadable forward **address counter** (5 bits),
* a **conditional jump multiplexer** with four inputs: constant 0 (next
  instruction), constant 1 (jump), `more_words` and `more_rows`. Its
  output drives the counter's load input,
* a **delay logic** down-counter that holds the address counter,
* the **microprogram ROM**.

A microinstruction (`smooth_pkg::uinstr_t`, 25 bits) holds:

```
jsel[1:0]  jaddr[4:0]  delay[3:0]  ctrl: row_clr row_inc word_clr word_inc
                                         disp_m1 disp_up regs_clr ld_a ld_b ld_c
                                         ld_out mem_rd mem_wr done
```

An instruction with delay *d* lasts *d+1* clocks. Its control bits are
driven in the **first** clock only, so every strobe acts exactly once. Its
jump decision is taken in the **last** clock. While `run` is low, the
address counter is held at 0 and no control bits are driven.

The program (`microprogram_rom`, with DA = ACT-1 and DP = PRE-1):

| addr | actions | delay | next |
|---|---|---|---|
| 0 | row := 0 | 0 | 1 |
| 1 | word := 0, disp := -1, clear row registers | 0 | 2 |
| 2-7 | 3 × (read; load A/B/C, disp+1) | DA / DP (DP-1 last) | — |
| 8 | load output, disp := -1, word+1 | 0 | 9 |
| 9-14 | 3 × (read; load A/B/C, disp+1) | DA / DP (DP-1 last) | — |
| 15 | load output | 0 | 16 |
| 16 | write previous column's word | DA | 17 |
| 17 | word+1, disp := -1 | DP | 9 if more_words |
| 18 | row+1 | 0 | 1 if more_rows |
| 19 | done | 0 | 19 |

Addresses 2-8 are the first column of a row, which has no write.

## Address generation

`address_generator` forms word addresses by concatenating fields, because
the image dimensions are powers of two:

```
source      = {src_page, row + disp, word[5:0]}
destination = {dst_page, row,        word - 1  }
```

* `row` is the output row (10 bits).
* `disp` is an up/down displacement of -1/0/+1 that selects the three
  source rows.
* `word` is a 7-bit counter that runs 0..64, the extra step being the
  right-border flush.

`src_valid` is low outside the image. The jump conditions are:

* `more_words = word <= 64`,
* `more_rows = row != 1023`.

## PC interface (XILINX0)

The PC bus is modelled with separate signals for the bidirectional
data bus: `sd_in`, `sd_out` and `sd_oe`. The strobes are taken as
synchronous to the card clock.

**I/O ports** are 16-bit, at `IO_BASE` (default 300h), with port number =
SA[3:1]:

| port | addr | R/W | contents |
|---|---|---|---|
| 0 CTRL | 300h | R/W | [0] run, [1] Unger (0 = Dineen), [7:4] θ, [11:8] source page, [15:12] destination page |
| 1 STATUS | 302h | R | [0] done, [1] busy |
| 2 PAGE | 304h | R/W | memory window page |
| 3 PRG_LO | 306h | R/W | DRAM controller programming word [15:0] |
| 4 PRG_HI | 308h | R/W | programming word high bits; writing it also loads the controller mode |
| 5 PTR_LO | 30Ah | R/W | data port word address [15:0] |
| 6 PTR_HI | 30Ch | R/W | data port word address, high bits |
| 7 DATA | 30Eh | R/W | memory word at the pointer, then pointer + 1 |

**Memory window**: the 64 KB at D0000h (`WIN_BASE`) maps 32 K words of
card memory. The word address is `{PAGE, SA[15:1]}`.

**DMA**: a DMA acknowledge (`dack_n` low) selects the data port whatever
the address, so a DMA channel can stream an image into or out of the card.

**Wait states**: every window or data port access becomes one DRAM access.
`iochrdy` is held low until a write has been issued or the read data has
been latched. Accesses are spaced at least ACT+PRE clocks apart.

**Ownership while running**: while `run` is set, `drc_mux` gives the DRAM
controller to the processor FPGA. PC memory accesses are refused in that
time: writes are dropped and reads return FFFFh, without stalling the bus.
Software polls STATUS for `done` and then clears `run`. A mode load always
has priority over both sources.

Typical use:

1. Program the controller through PRG_LO and PRG_HI.
2. Load the image into the source page through the window or the data port.
3. Write CTRL with run = 1, the filter, θ and the pages.
4. Poll STATUS until done is set.
5. Write CTRL with run = 0.
6. Read the destination page.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `ROW_BITS` | 10 | log2 of image rows (1024) |
| `COL_BITS` | 10 | log2 of pixels per row (1024 = 64 words) |
| `MEM_AW` | 18 | word address width: 2^18 × 16 bit = 512 KB, the smallest memory fit of the original card (up to 24 bits / 32 MB) |
| `ACT_CLKS`, `PRE_CLKS` | 4, 4 | clocks of the DRAM active and precharge phases |
| `IO_BASE`, `WIN_BASE` | 300h, D0000h | PC addresses |

`PAGE_BITS = MEM_AW - ROW_BITS - (COL_BITS-4)` image pages (4 by
default). CTRL carries 4-bit page numbers. `ACT_CLKS` and `PRE_CLKS` must
each be at least 2, and their delay values must fit the 4-bit delay field.

## Simulation

Every testbench is self-checking. It ends with the line
`TB_RESULT checks=N failures=M` and has a watchdog. Example with plain
Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/smooth_pkg.sv rtl/card_pkg.sv tb/tb_xilinx_card_full.sv \
    --top-module tb_xilinx_card_full -Mdir obj
./obj/Vtb_xilinx_card_full
```

| testbench | what it shows |
|---|---|
| `tb_xilinx_card_full` | default size. Loads a random 1024×1024 image through the window, data port and DMA, runs Dineen (θ=2) and Unger, and checks all 65,536 result words of each run. Also checks the access schedule, the refused PC accesses during a run, wait states and the mode load. Takes a few seconds. |
| `tb_xilinx_card` | the same sequence on a 16×64 image with four runs and varying θ |
| `tb_smoothing_unit` | the smoothing circuit alone on 8×64 images, both filters, exact clock count, only the destination page written |
| `tb_data_processor`, `tb_*_filter`, `tb_line_register`, `tb_output_register` | the datapath against pixel-level references |
| `tb_control_unit`, `tb_microprogram_rom`, `tb_delay_logic`, `tb_address_generator` | sequencing, strobe counts, delays, addressing |
| `tb_xilinx0_interface`, `tb_io_ports`, `tb_io_decoder`, `tb_mem_decoder`, `tb_drc_mux` | the PC interface |

The RTL also carries concurrent assertions for the memory port rules,
which run with `--assert`. A read and a write never start together. A new
access never starts within `ACT_CLKS+PRE_CLKS` clocks of the last one. A
mode load never coincides with an access. The PC never reaches the
controller during a run.

Helpers used by the testbenches:

* `tb_card_body`: stimulus and checks shared by the two card tests,
* `pc_bus_master`: PC-AT bus cycles,
* `drc_dram_model`: the DRAM controller and memory. It counts accesses
  that come too close together.

The reference model used everywhere works on a pixel array with a white
border. It does not use the word-packed method.

## Where this design departs or fills gaps

**Choices made here.** The original description does not specify these:

* pixel order in a word,
* black = 1,
* white image borders,
* the clear of the row registers,
* the split of the output register,
* the microinstruction format and the program,
* the d+1 delay rule and first-clock strobes,
* the run/done handshake,
* the displacement form of the "up/down counter pairs",
* page-based placement of the source and destination images in one
  memory,
* the I/O map, the window address, the data port and DMA hookup,
* the refusal of PC accesses while running,
* the 20 ns clock.

**Both filters are built in.** The original loads one filter at a time as
an FPGA configuration. Here both filters are built, and a CTRL bit
selects one.

**Not built:**

* the DRAM controller and SIMM memory (a behavioural model is used in the
  testbenches),
* FPGA configuration loading,
* processor FPGAs 2-4 with their ring links, and the second DRAM
  controller. These would allow 32/64-bit processing or pipelining across
  FPGAs, but no function for them is described,
* bus transceivers and the clock oscillator.

**Run time**: see the timing section. The RTL follows the published
three-reads-plus-one-write schedule, and so does not reach the reported
19 ms.
