# FE4D: data-push readout for a 320 x 256 hybrid pixel matrix

A pixel detector for a high-rate collider layer sees about 100 MHz of hits per
cm². The readout must give every hit the number of the beam-crossing (BC)
period it belongs to and send the hits off the chip in time order, without a
trigger. This design does that with *macro pixels* that freeze at each BC edge.
Each of four sub-matrices sweeps its frozen macro pixels column by column,
compresses each active column into 8-pixel zones, and queues the resulting words
through two levels of FIFOs ("barrels") to one output bus. The time-stamp word
goes in front of each period's hits, not into every hit word.

The RTL is SystemVerilog (`rtl/`), one module per file, and all parameters have
defaults. At the defaults the top module `fe4d_top` is the full target chip:
4 sub-matrices of 80 columns x 256 rows, i.e. 81920 pixels. Every module has a
self-checking testbench in `tb/`.

## Data flow

```
 hit_i ─► pixel_matrix ──bus(256)──► 4 x zone_sparsifier ─► 4 x barrel_l2 ─► concentrator ─► barrel_l1 ═╗
          (macro_pixel rows)   ▲            ▲ (mark: TS word)                                    (rd_clk │ fast_clk)
   fast-OR/frozen ─► sweep_logic ◄── scan_buffer ◄── freeze events                                     ║
                          ▲ time_counter ◄── bc_clk                     output_stage ◄═ 4 x barrel_l1 ═╝
                                                                              │
                                                                         data_out_o / data_valid_o
 scl_i/sda_i ─► i2c_slave ─► slow_control_regs ─► MP masks, ACQ_EN; ◄─ flags, counters
```

All four sub-matrices (`submatrix_readout`) work in parallel and independently
on `rd_clk`. They meet only in `output_stage`, which runs on `fast_clk`.

## Macro pixels, freezing and the sweep

A macro pixel (MP) is 2 columns x 8 rows of binary pixels. Each pixel has a
hit latch. The MP ORs its 16 latches into a *fast-OR* line and has a *freeze*
input that stops it from taking new hits. `macro_pixel` models a whole row of
MPs (40 at 80 columns) with vector operations. `pixel_matrix` stacks 32 such
rows.

`time_counter` brings `bc_clk` into `rd_clk` through two flops and makes a
one-cycle tick on each rising edge. During the tick cycle `ts_o` still holds the
number of the period that is ending, and it increments afterwards.

At the tick, `sweep_logic` does three things:

1. It takes every MP that has its fast-OR set and is not frozen yet. It freezes
   them and pushes an event `{time stamp, bitmap of those MPs}` into
   `scan_buffer`.
2. If the scan buffer is full, the edge freezes nothing and the `sb_ovf` flag
   is raised. Those MPs go on collecting hits and are read at a later edge under
   a later time stamp.
3. If no MP is new, nothing is pushed.

The sweep takes the oldest event:

- **Marker cycle.** It writes the time-stamp word into all four level-2 barrels.
  It waits until each barrel has at least one free slot, so the marker is
  never lost.
- **Column scan.** Then, for every MP column that holds an MP of this event,
  lowest first, it reads the two pixel columns on two consecutive clocks.
  `out_en` is set only for the MP rows in the event, so MPs frozen by a later
  edge stay out of this event even in the same column.
- **Clear.** On the second column the event's MPs are cleared. They take hits
  again from the next clock.

An event with k MP columns takes 1 + 2k read clocks. Hits that reach a frozen
MP are lost; this is the "frozen-MP inefficiency" of the architecture.

Pixel latches here are flip-flops clocked by `rd_clk`, so a hit must be high at
one rising edge. In the chip the latch is asynchronous.

## Zones and word format

The 256 pixels of the active column are split into 32 zones of 8 pixels.
Four `zone_sparsifier`s each handle 64 pixels (8 zones). A sparsifier emits one
hit word for each zone that has a hit, in one clock. The zone pattern is sent as
it is, not coded.

| word | MSB | fields (80 columns, W = 21) |
|---|---|---|
| time stamp | 1 | [19:10] 0, [9:8] sub-matrix, [7:0] time stamp |
| hit | 0 | [19:18] sparsifier, [17:15] Y zone, [14:8] X column, [7:0] pattern |

The width is `W = 1 + 2 + 3 + $clog2(COLS) + 8` (`fe4d_pkg::word_w`). The
original 20-bit format has a 6-bit X field at [13:8]. That field is too narrow
for 80 columns, which need 7 bits. This RTL keeps the field as wide as the
column count needs. At 80 columns the words are therefore 21 bits, and at 64
columns they are exactly the 20-bit layout. A pixel at row `r`, column `x`
appears as sparsifier `r/64`, Y zone `(r/8)%8`, bit `r%8` of the pattern,
X = `x`.

## Barrels and time order

- **`barrel_l2`** is a circular FIFO (depth 8) that accepts 0 to 8 words per
  clock from its sparsifier and gives one word per clock. If more words arrive
  than it has room for, it keeps what fits and drops the rest (`drop_o`).
- **`concentrator`** merges the four level-2 barrels of a sub-matrix into one
  stream:
  - When all four heads are time-stamp words, it writes *one* time-stamp word
    and pops all four. It waits if the level-1 barrel is full, so the marker is
    never dropped.
  - Otherwise it takes hit words round-robin from the barrels whose head is a
    hit.

  So one period's hits never pass the marker of the next period. A hit word that
  finds level 1 full is dropped (`b1_drop`).
- **`barrel_l1`** (depth 128) is a dual-clock FIFO with Gray-coded pointers. It
  is written on `rd_clk` and read on `fast_clk`.

## Output queue

`output_stage` serves the four level-1 barrels on `fast_clk` and puts out one
word per clock, with `data_valid_o`:

- It stays on one barrel while that barrel has hit words.
- It moves on at a time-stamp word if another barrel has data, or when its
  barrel runs empty.
- When it comes back to a barrel whose head is a hit word (a sequence it left
  in the middle), it first sends that barrel's last time-stamp word again
  (`ts_repeat_o`).

A receiver therefore always knows the sub-matrix and the time stamp of every hit
word from the last time-stamp word before it. The output is registered.

## Slow control

`i2c_slave` oversamples SCL and SDA with `rd_clk`. SDA is split into `sda_i`
and the open-drain enable `sda_oe_o`; the pad and the pull-up are outside.

- **Device address:** `{4'b0101, chip_addr_i}`, where `chip_addr_i` is three
  hard-wired pins.
- **Write:** `S dev+W A ptrH A ptrL A data A ... P`.
- **Read:** `S dev+W A ptrH A ptrL A Sr dev+R A data A ... data N P`.

The pointer increments after each data byte.

`slow_control_regs` holds the register map:

| address | access | content |
|---|---|---|
| 0x0000 | RW | CTRL: bit0 ACQ_EN (reset 1), bit1 CLR (write 1: clear counters and flags) |
| 0x1000 + i | RW | MP masks, 8 MPs per byte, MP index = sub x 1280 + MP row x 40 + MP column |
| 0x8000 | RO | bit s: sub-matrix s busy; bit 4+s: its fast-OR |
| 0x8001 | RO | sticky: bit s scan-buffer overflow, bit 4+s level-2 drop |
| 0x8002 | RO | sticky: bit s level-1 drop |
| 0x8010 + 2s, +1 | RO | 16-bit count of hit words written by sub-matrix s (low, high byte) |

A masked MP takes no hits. With ACQ_EN = 0 every MP is masked. Unmapped
addresses read 0.

## Parameters and configurations

| parameter (fe4d_top) | default | meaning |
|---|---|---|
| N_SUB | 4 | sub-matrices (at most 4: 2-bit address) |
| COLS | 80 | pixel columns per sub-matrix |
| ZPS | 8 | zones per sparsifier; rows = 4 x 8 x ZPS = 256 |
| SB_DEPTH | 8 | scan-buffer entries |
| B2_DEPTH | 8 | level-2 barrel words |
| B1_DEPTH | 128 | level-1 barrel words |

- **Target chip:** the defaults.
- **Test chip:** a 128 x 32 matrix with two readout blocks is `N_SUB=2, COLS=64,
  ZPS=1`.
- **Deeper scan buffer:** `SB_DEPTH=16` is the variant that was studied for
  short BC periods.

The intended clocks are:

- `rd_clk` about 67 MHz;
- `fast_clk` about 200 MHz;
- `bc_clk` period 0.1 to 2 µs.

The RTL only requires `bc_clk` to be slow compared with `rd_clk`.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For
example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fe4d_pkg.sv tb/tb_fe4d_top.sv --top-module tb_fe4d_top
obj_dir/Vtb_fe4d_top +verilator+rand+reset+2
```

| testbench | what it covers |
|---|---|
| `tb_macro_pixel` … `tb_slow_control_regs` | each module against a reference model with random stimulus |
| `tb_submatrix_readout` | one sub-matrix end to end, exact words per BC period |
| `tb_fe4d_top` | test-chip size: exact words per period, I2C masks and ACQ_EN, overflows of all three buffers, TS repetition; each mechanism must occur |
| `tb_fe4d_top_full` | the full 320 x 256 chip at default parameters: one BC period with hits in every sub-matrix, exact output words, one I2C read |

`tb/i2c_master_tasks.svh` is a behavioural I2C master used by two testbenches.

The full-size build produces a large C++ model, a few minutes of compilation.
Yosys synthesis of the full-size top is slow for the same reason: 327680 pixel
latches.

## Where this design departs from the original or fills gaps

- **Hit-word X field.** It is 7 bits at 80 columns, so the word is 21 bits.
  See the word-format section.
- **Silent parts.** The original architecture names these blocks but does not
  describe them, so their behaviour is this design's own:
  - the scan-buffer entry format and the overflow behaviour (skip the edge, set a flag);
  - the marker cycle that waits for free level-2 space;
  - the concentrator's TS merging;
  - the output stage's switching and TS repetition;
  - the I2C protocol details, the device ID and the whole register map.
- **Bits [18:10] of the time-stamp word.** They are unused in the original
  (shown as X); here they are 0.
- **Clock domains.**
  - Each sub-matrix has its own time counter fed by the common `bc_clk`.
  - The level-1 barrel is the only place where data crosses from `rd_clk` to
    `fast_clk`.
  - The slow-control status bits are sampled by `rd_clk`.
- **Not modelled.**
  - The analog front end: `hit_i` stands for the discriminator outputs.
  - The pads: `sda_oe_o` drives an external open-drain pad.
  - Serialisation of the output bus.
- **Efficiencies.** The efficiency and overflow figures of the original
  simulations (for example 98-99 % at 100 MHz/cm²) are not reproduced by these
  testbenches. The testbenches check function, and they check that each
  overflow path behaves as described.
