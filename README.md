# 1:4 DEMUX on a multiplexer-based SiGe FPGA fabric

This is RTL for a small demultiplexer test chip built on a high-speed FPGA
fabric. In the original chip the fabric is current-mode logic (CML) in a SiGe
BiCMOS process and runs at about 10–12 GHz. A 4-row by 2-column array of FPGA
basic cells is configured as a 1:4 DEMUX:

* the left column is a 2:4 decoder that raises one select line per clock;
* the right column holds four select-hold circuits that latch the input bit
  when their select line is high and keep it for the other three clocks.

An on-chip voltage-controlled oscillator (VCO) makes the clock. A 4-bit LFSR
makes a 15-bit pseudorandom input, so the chip can test itself. Each output
channel runs at a quarter of the clock rate. The four channels together carry
one bit per clock: 11.6 Gb/s was measured on the original chip, so 2.9 Gb/s
per channel.

The fabric is the main content. It is a multiplexer-based cell descended from
the XC6200 cell. Every signal in it passes through one-hot CML multiplexers,
and every multiplexer, latch and driver is a current tree that configuration
can switch off to save power. This RTL models that logic at gate level, with
configuration bits. It includes a count of the trees that are switched on, so
the power-saving mode ("multimode routing") can be seen in simulation.

```
                 vco_ctrl
                    |
                +---v---+  sys_clk (to every register)
                |ffi_vco|--------------------------------------------+
                +-------+                                            |
  +------------+   A (col 0 FastLANE, north)   +--------+--------+   |
  |freq_divider|------------------------------>| dec    | s/h    |--> Z1
  | {A,B} = 2b |   B (col 0 FastLANE, south)   | SEL1   |        |
  |  counter   |------------------------------>+--------+--------+
  +------------+                               | dec    | s/h    |--> Z2
  +------+  data (col 1 FastLANE, north)       | SEL2   |        |
  |lfsr4 |------------------------------------>+--------+--------+
  +------+                                     | dec    | s/h    |--> Z3
     |                                   SEL <-| SEL3   |        |
     +--> lfsr_out, trig                       +--------+--------+
                                               | dec    | s/h    |--> Z4
  config_memory --(cfg of all 8 cells)-------->| SEL4   |        |
                                               +--------+--------+
                                                gate_array (4 x 2 bcii_cell)
```

## The basic cell (`bcii_cell`)

Each cell talks to its four neighbours (N, E, S, W). It sends three signals
to each neighbour:

| signal | meaning                                                   |
|--------|-----------------------------------------------------------|
| `comb` | the function unit output (combinational)                  |
| `seq`  | the same value after the master-slave latch (registered)  |
| `redir`| a neighbour signal relayed unchanged by a redirection mux |

In the older XC6200-style cell, one output per direction was chosen by two
more multiplexer levels. Here all three go out, so a signal crosses only
three multiplexers per cell and a neighbour has more signals to choose from.

Inside the cell:

* **L1 multiplexers (`l1_mux`).** Three of them choose the function-unit
  inputs `a`, `b` and `c`. Each has 16 candidates: 3 signals from each
  neighbour, plus one FastLANE (a longer line) per direction. They are built
  in two levels. Four 4:1 front-end muxes each take one direction. A back-end
  mux then picks one front end. For `a` and `b` the back end has a fifth
  input, the cell's own latch output, which makes them 17:1 multiplexers.
  That feedback lets a single cell hold state (select-hold, toggle).
* **Function unit (`function_unit`).** One 2:1 multiplexer,
  `y = c ? B : A`. `A` and `B` are `a` and `b` passed, inverted or forced to
  0/1. A single multiplexer like this gives every two-input AND/OR-type
  function with optional inversions, and also a 2:1 mux.
* **Master-slave latch (`ms_latch`).** An edge-triggered register on `y`.
* **Redirection multiplexers (`redirect_mux`).** There are four, one per
  output direction. Each is a 9:1 mux over the 3 signals of each of the 3
  other neighbours.
* **Output drivers.** Each direction has one enable for `comb` and one for
  `seq`.

Index conventions, all defined in `fpga_pkg`:

* directions are `N=0, E=1, S=2, W=3`;
* a neighbour bundle is `{redir, seq, comb}`;
* L1 input `4*dir + k` is signal `k` of the neighbour in direction `dir`,
  with `k = 3` the FastLANE seen from that direction;
* index 16 is the latch feedback.

`fpga_pkg::l1_route(idx)` and `fpga_pkg::redir_index(...)` turn a route into
configuration bits.

### Current trees and power-down

Every multiplexer (`onehot_mux`) has one select bit per input. Its tree is on
when any of those bits is set. All zeros switches it off, and its output then
reads 0. The function unit and the latch have their own enable bits, and each
output driver has one too. The `trees_on` outputs (cell, array, chip) count
the trees that are on. This count stands in for static current, since a CML
tree draws constant current whatever it switches. Some examples:

* a decoder cell with a constant FU input leaves that L1 mux off;
* a relay cell has only its redirection mux on;
* a cell whose configuration is all zero is fully off.

The DEMUX configuration uses 60 trees:

* each decoder cell has 7 on: the `c` mux (2), one data mux (2), the FU
  (1) and the east and west comb drivers (2);
* each select-hold cell has 8 on: the `c` mux (2), the `a` feedback mux
  (1), the `b` mux (2), the FU (1), the latch (1) and the east seq
  driver (1).

The trees are counted only; how much current each one draws is not modelled.

## The DEMUX configuration (`demux_cfg_pkg`)

Counter bits `A` (MSB) and `B` (LSB) come from `freq_divider`. `B` toggles
every clock, and `A` is `B` divided by two. They arrive on column 0's two
FastLANEs. Decoder cell `k` (row `k`) uses `c = A`, and `a` and/or `b` are
`B`:

| A B | SEL1 | SEL2 | SEL3 | SEL4 | FU setting in row k          |
|-----|------|------|------|------|------------------------------|
| 0 0 | 1    | 0    | 0    | 0    | SEL1 = A ? 0 : ~B            |
| 0 1 | 0    | 1    | 0    | 0    | SEL2 = A ? 0 : B             |
| 1 0 | 0    | 0    | 1    | 0    | SEL3 = A ? ~B : 0            |
| 1 1 | 0    | 0    | 0    | 1    | SEL4 = A ? B : 0             |

SEL goes east to the select-hold cell in the same row and west to the chip
edge. Each select-hold cell is set up as:

* `c` = the west neighbour's `comb` (SEL);
* `b` = the LFSR data on column 1's FastLANE;
* `a` = its own latch output.

So the latch computes `q <= SEL ? DATA : q`, and its `seq` output leaves at
the east edge as channel `Z`.

### Timing

Cycles are counted from the release of reset, `t = 0, 1, 2, ...`:

| cycle `t`            | `{A,B}`   | SEL high        | at the clock edge ending cycle `t` |
|----------------------|-----------|-----------------|------------------------------------|
| `t`                  | `t mod 4` | `SEL(t mod 4+1)`| `Z(t mod 4+1) <= d(t)`             |

* `d(t)` is the LFSR bit of cycle `t`. Each `Z` changes once every 4 clocks
  and holds for the other 3.
* Every fourth bit of a maximal-length sequence is the same sequence,
  shifted. So each channel shows the full 15-bit pattern, in its own
  rotation.
* Channel Z1 shows `…011110101100100…`, which is the pattern seen on the
  original chip's Z1 output.

The decoder is combinational from the counter registers, and the select-hold
latch samples at the next edge. So SEL must settle within one clock period,
which in the original meant one CML gate delay.

## LFSR (`lfsr4`)

The LFSR has four stages that shift from stage 1 to stage 4. Stage 1 loads
the XNOR of stages 1 and 4, which is the XOR with the stage-4 term inverted.
With that feedback, the all-zero power-up state lies on the 15-state cycle.
The register only locks up in 1111, which is never reached from reset.

The output is the complement side of stage 4. In CML that only means taking
the other wire of the differential pair. This gives the pattern
`000111101011001` repeating every 15 clocks. Reset enters the pattern at its
fourth bit: the first bits after reset are `1111010110 01000`.

`sync` is high when the state is 0000, and the chip drives it out as the
trigger `trig`.

## VCO model (`ffi_vco`)

This is a behavioural model only, with delays; it is not synthesizable. The
real VCO is a feed-forward interpolated ring of four buffers. Each buffer
mixes the previous stage with the stage two before it. One end of the
control range makes a four-stage ring, and the other end behaves like a
two-stage ring.

The model sets the frequency linearly between `1/(8·td)` and `1/(4·td)`:

* with `td = 18.75 ps` this spans 6.67 to 13.33 GHz;
* mid-scale (`vco_ctrl = 128`) is about 10 GHz;
* `en = 0` stops the clock, held low.

The measured 11.6 GHz operating point is at about `vco_ctrl = 189`. The
12 GHz point is at about `vco_ctrl = 204`.

## Configuration memory (`config_memory`)

This holds one `cell_cfg_t` word per cell. Word `r*COLS + c` is cell
`(r, c)`, with row 0 at the north edge. Reset loads the `INIT` parameter.
In `demux_chip` that is the DEMUX configuration; by default it is all cells
off.

`we`/`waddr`/`wdata` rewrite one word per clock. The new setting takes
effect from the next cycle. This is how a cell is switched off, or given a
new function, while the chip runs.

## Top level: `demux_chip`

| port        | dir | width | meaning                                                 |
|-------------|-----|-------|---------------------------------------------------------|
| `rst_n`     | in  | 1     | asynchronous active-low reset                           |
| `vco_en`    | in  | 1     | VCO enable                                              |
| `vco_ctrl`  | in  | 8     | VCO control (0 = four-stage, 255 = two-stage end)       |
| `cfg_we`, `cfg_waddr`, `cfg_wdata` | in | 1, 3, `cell_cfg_t` | configuration write port |
| `sys_clk`   | out | 1     | system clock                                            |
| `z`         | out | 4     | channels Z1..Z4 (`z[0]` = Z1)                           |
| `sel`       | out | 4     | SEL1..SEL4                                              |
| `lfsr_out`  | out | 1     | the DEMUX input pattern                                 |
| `trig`      | out | 1     | one pulse per LFSR period                               |
| `trees_on`  | out | 16    | current trees switched on in the array                  |

## What follows the original design and what was chosen here

These parts follow the original design:

* the array size (4×2) and the column roles;
* three outputs per cell per direction;
* 16/17-input L1 multiplexers in two levels, with the latch feedback on the
  first two;
* four 9:1 redirection multiplexers;
* one-hot multiplexers that switch off when unselected;
* the decoder truth table and the select-hold behaviour;
* the 4-bit LFSR with inverted feedback and its 15-bit pattern;
* a VCO that tunes between a four-stage and a two-stage ring, centred at
  10 GHz.

These choices were made here:

* **Function unit.** The original cell has a multiplexer-based function
  unit, but its internals are not spelled out. The pass/invert/constant
  2:1 multiplexer used here is the simplest one that covers the functions
  needed.
* **Input grouping.** The L1 inputs are grouped by direction in the front
  end. The feedback enters at the back end.
* **FastLANEs.** Two per column and two per row. The counter and the data
  reach the array on them.
* **Counter.** The 2-bit counter sits outside the 4×2 array, because all
  eight cells are used by the decoder and the select-hold circuits.
* **Switched-off parts.** A part that is off drives 0, and a latch that is
  off is cleared.
* **Configuration loading.** A parallel write port loads the configuration.
  How the original chip was configured is not known.
* **LFSR output.** The LFSR output is taken from the inverted side of stage
  4, so that the stated pattern appears with the stated inverted feedback.
  A plain XOR register started from a non-zero state gives the same output
  stream.
* **Trigger.** The trigger is the LFSR's 0000 state.
* **VCO.** The VCO tuning law and the 8-bit digital control word are
  assumptions. The original has two analog control inputs.

Not modelled at all:

* pads and output swing;
* CML gate delays, so the RTL is cycle-accurate but not delay-accurate;
* the current of each tree;
* the larger 48×48 array and ADC/DAC of the faster follow-on process.
  `gate_array` takes `ROWS`/`COLS`, but only 4×2 and smaller have been
  simulated.

### Rates

* The LFSR makes one bit per clock, so the DEMUX input rate equals the clock
  frequency and each channel gets a quarter of it.
* At the 10 GHz centre that is 10 Gb/s in and 2.5 Gb/s per channel.
* The 11.6 Gb/s (2.9 Gb/s per channel) and 12 Gb/s points are within the
  model's tuning range. `tb_demux_chip` runs the DEMUX at both and measures
  the channel rate.
* The 20 Gb/s of the faster process is not: it would need a VCO with a
  shorter `td`.

## Simulating

Every testbench checks its results itself and ends by printing
`TB_RESULT checks=N failures=M`. To build and run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fpga_pkg.sv rtl/demux_cfg_pkg.sv tb/tb_demux_chip.sv \
    --top-module tb_demux_chip -Mdir obj_demux -o sim
./obj_demux/sim
```

Replace the testbench file and the top module name to run another test.
Modules are found through `-Irtl`; the two packages are listed first.

| testbench             | what it checks |
|-----------------------|----------------|
| `tb_demux_chip`       | the whole chip at default parameters. It checks three VCO frequencies, the LFSR pattern, trigger, SEL and all four channels cycle by cycle against a model. It checks that Z1 carries the 15-bit pattern, the tree count, and that switching channel Z1's cell off and back on works. It also runs at the 11.6 and 12 Gb/s operating points and measures the rate there. |
| `tb_array_4x4`        | a 4×4 array with 10 cells used and 6 switched off: the DEMUX with channel Z1 relayed two columns east, and the tree count with the unused cells off versus on |
| `tb_gate_array`       | an all-off array, relay paths across rows and columns, and the DEMUX configuration driven from the testbench |
| `tb_bcii_cell`        | random configurations against a cell model, the decoder and select-hold settings, and a relay-only cell |
| `tb_l1_mux`, `tb_redirect_mux`, `tb_onehot_mux`, `tb_function_unit`, `tb_ms_latch` | exhaustive or random checks of the cell's parts |
| `tb_config_memory`, `tb_lfsr4`, `tb_freq_divider`, `tb_ffi_vco` | the support blocks |

Verilator reports a circular-logic warning on `gate_array`. This is
expected: neighbouring cells feed each other combinationally, as in any
FPGA fabric, and a valid configuration never closes the loop.

## Files

`rtl/`:

* `fpga_pkg.sv`: types, conventions and configuration helpers.
* `demux_cfg_pkg.sv`: the DEMUX configuration.
* `onehot_mux.sv`, `l1_mux.sv`, `function_unit.sv`, `ms_latch.sv`,
  `redirect_mux.sv`: the parts of the cell.
* `bcii_cell.sv`, `gate_array.sv`, `config_memory.sv`: the fabric.
* `lfsr4.sv`, `freq_divider.sv`, `ffi_vco.sv`: the chip support blocks.
* `demux_chip.sv`: the top level.

`tb/`: one testbench per module, named `tb_<module>.sv`.
