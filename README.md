# A spatially programmable data path for image-processing kernels

Fixed-function image processors are efficient because each kernel gets its own
arithmetic units wired in a fixed order. An FPGA can be reprogrammed, but it
pays for that with bit-level lookup tables and long general-purpose routing.
This design sits between the two.

- The arithmetic units are word-wide **programmable elements (PEs)**. Each PE
  holds a short list of functions (multiply, absolute difference, compare, add,
  shift, ...) fixed when the hardware is generated. A configuration register
  picks one of them at run time.
- The wires between the units are small **crossbar switches**. Each switch
  output has a register naming the input it takes, so the order of operations
  can also change at run time.
- Data moves only locally: from a line buffer into a window, through a few PEs
  and switches, and out as one output pixel per input pixel.

Once configured, the fabric does the same operation every cycle on a stream of
pixels. Nothing is fetched or decoded per pixel.

Everything is built from PEs and switches, arranged in two ways:

- a **convolution topology**: one map-and-reduce window engine, used here for
  a 5x5 convolution or sum of absolute differences;
- a **wave pipeline**: a grid of PE columns separated by switches, which runs
  any small data-flow graph. Three of them are cascaded into an application
  pipeline.

`spa_top` instantiates both side by side, each fed by its own pixel stream.

## The programmable element (`rtl/pe.sv`)

```
 srin ──►[shift reg]──┬──────────────────────────────► srout
 a    ──►[flop]──────►├─ x (local-reg mux, sel_sr)
 scin ──►[const reg]──┤                              ┌────────┐
 b    ──►[flop]──────►└─ y (local-reg mux, sel_sc) ─►│data    │  ┌────┐
                                                     │gate →  ├─►│data├─►[flops]─► out[0], out[1]
                      cfg reg (function index) ─────►│f0..fn  │  │mux │
                                                     └────────┘  └────┘
```

- **Operands.**
  - `x` is the operand flop or the shift register, chosen by `sel_sr`.
  - `y` is the other operand flop or the constant register, chosen by `sel_sc`.
  - The shift register loads whenever `srin_valid` is 1. It passes that enable
    on to `srout_valid` in the same cycle, so a row of PEs chained through
    `srout → srin` shifts together.
  - The constant register loads on `scin_valid` and stays valid afterwards.
- **Functions.** The function list is a parameter: a bit mask over the op codes
  in `spa_pkg`.
  - The configuration register holds the function's position in that list, so
    its width is `clog2(list length)`.
  - Every function in the list is built as hardware.
  - A *data gate* holds the operands of the functions that are not selected at
    zero, so those functions do not toggle.
  - A *data mux* picks the selected result.
  - Results are `2*DATA_W` wide: only multiply fills the upper word, which
    appears on `out[1]`.
- **Valid rule.** The output valid is the AND of three terms:
  - the valid of the x source;
  - the valid of the y source, which is always 1 for one-operand functions
    (`nop`, `inv`);
  - the configured index names a function in the list.

  Upstream logic therefore needs no reset: zero valids at the inputs make the
  outputs invalid.
- **Pipeline.** `PE_PIPE_DEPTH` is the total number of flop stages. One stage
  is at the inputs (the operand, shift and constant registers) and the rest are
  at the output. The default is 2, so a result appears 2 cycles after its
  operands. At depth 1 the result leaves combinationally from the input flops.
- **Fixed variant.** With `PE_CONFIGURABLE=0` the configuration registers
  become constants (`FIXED_FUNC`, `FIXED_SEL_SR`, `FIXED_SEL_SC`). This is the
  "no PE configurability" point used to measure the cost of flexibility.

Arithmetic is signed two's complement. `rshift` is arithmetic (`x >>> y`),
`inv` is negation, `gt` and `lt` return 1 or 0, and `nop` passes `x` through.

## The switch (`rtl/sw.sv`)

The switch is a circuit-switched crossbar with **source-based routing**:

- Every output has an address register naming the input it copies, `ADDR_W`
  bits, loaded on `cfg_we`.
- One input may feed any number of outputs (broadcast).
- An address that names no input gives data 0 and valid 0.
- There is a flop stage at the inputs, then the muxes, then
  `SW_PIPE_DEPTH-1` output stages. The default latency is 2 cycles. At
  depth 1 the mux output leaves directly.
- With `SW_CONFIGURABLE=0` the routes are constants (`FIXED_ADDR`), still
  implemented with the same muxes.

## Convolution topology (`rtl/conv_topology.sv`, `rtl/reduction.sv`)

A `ROWS x COLS` window is computed as a **map** followed by a **reduce**:

- **Map.** Each window position has its own map PE that does one operation on
  one pixel and one coefficient: `mult` for a multiply-accumulate, `absDiff`
  for a sum of absolute differences, `gt`/`lt` for counting.
- **Reduce.** A separate reduction PE, a pipelined adder tree, sums the map
  results.

How the parts connect:

- **Pixels.** The map PEs of one window row form a shift chain. A window
  column enters on `pix_col`, one pixel per row, into the first PE of each row.
  Every valid column moves the whole window one place. The window is kept
  inside the PEs' shift registers, so the convolution kernel needs no separate
  stencil register.
- **Coefficients and operands.** One switch with `2N+1` inputs and `2N+1`
  outputs, where `N = ROWS*COLS`, connects everything else:

  | switch port | input side | output side |
  |---|---|---|
  | `0 .. N-1` | coefficients `coeff_in[k]` | — |
  | `N .. 2N-1` | result of map PE `k-N` | — |
  | `2k`, `2k+1` | — | operands x and y of map PE `k` (`2k+1` also feeds its constant register) |
  | `2N` | reduction result | `pix_out` |

To run a convolution:

1. Set the map PEs to `mult` with `sel_sr=1` and `sel_sc=1`.
2. Route input `k` to outputs `2k` and `2k+1`, and input `2N` to output `2N`.
3. Present the coefficients once with `coeff_valid`.
4. Stream columns.

**Run-time changes.**

- *Mode switch:* rewrite the map function (`mult` → `absDiff` → `gt`) and load
  new coefficients.
- *Bypass:* route any map PE's own result (inputs `N..2N-1`) to `pix_out`,
  skipping the reduction.

**Timing.** With the default depths, an output leaves `pix_out` 6 cycles after
its column: 2 in the map PE, 2 in the reduction and 2 in the switch. The
bypass path takes 4 cycles. One window is finished per cycle. A column with
`pix_col_valid=0` produces no output, so bubbles pass through.

The default is 5x5 and 16-bit: 25 map PEs, a 25-input reduction and a 51x51
switch.

## Wave pipeline (`rtl/wave_pipeline.sv`)

The wave pipeline runs a small acyclic data-flow graph (for example, one stage
of an edge detector: products, a sum, a shift, max, min).

- **Structure.** It is `STAGE_W` stages, each `STAGE_H` PEs followed by a
  switch.
  - Stage 0's PE `i` takes system inputs `2i` and `2i+1`.
  - The switch after stage `s` routes any of that stage's `STAGE_H` results to
    any of the `2*STAGE_H` operand ports of stage `s+1`.
  - The last switch drives the `STAGE_H` system outputs.
- **Skipping a stage.** A value passes through a PE set to `nop`. Every path
  therefore has the same length, and all values of one input set travel
  together as a "wave".
- **Constants.** A PE that needs a constant selects its constant register. The
  value is written from `pe_cfg_const` together with the configuration.
- **Timing.** Latency is `STAGE_W*(PE_PIPE_DEPTH+SW_PIPE_DEPTH)` cycles: 16 for
  the default 3x4 grid. One input set is accepted per cycle.
- **Functions.** The default list has every op code: `nop`, `sum`, `sub`,
  `mult`, `absDiff`, `gt`, `lt`, `max`, `min`, `rshift`, `inv`.
- **Fixed variant.** Whole-array parameters (`FIXED_FUNCS`, `FIXED_ADDR`) give
  the fixed version.

The PEs have two inputs, so an operation with more inputs (a five-way sum, for
instance) needs a tree of `sum` PEs spread over several stages.

## Stencil front end (`rtl/line_buffer.sv`, `rtl/stencil_reg.sv`)

Pixels arrive in raster order, one per valid cycle.

**Line buffer.**

- It keeps the previous `ROWS-1` image rows in a memory array.
- For every pixel it outputs the column of `ROWS` pixels that ends at that
  pixel (oldest row first), together with the pixel's `x`/`y` position. This
  takes one cycle.
- Rows above the top of the image read as 0.
- Positions wrap at `IMG_W`/`IMG_H`, so frames follow one another without a
  gap. An assertion checks that the position counters, which address the row
  memories, stay inside the image.

**Stencil register.**

- It is the `ROWS x COLS` shift register of the sliding window, one cycle
  later.
- `win[r][0]` is the newest column.
- `win_full` marks windows that lie wholly inside the image. At the left edge
  the window still holds the end of the previous row; the window function sees
  those pixels as they are.

## Top level (`rtl/spa_top.sv`)

- **Convolution kernel:** `line_buffer` (5 rows) → `conv_topology` (5x5). An
  input pixel's output leaves 7 cycles later.
- **Application pipeline:** three kernels in a chain. Each kernel is
  `line_buffer` (2 rows) → `stencil_reg` (2x3) → `wave_pipeline`:
  - stage height 3;
  - 4, 2 and 3 stages for kernels 1 to 3;
  - the 2x3 window's six pixels are the six system inputs, `win[r][c]` on input
    `3r+c`;
  - wave output 0 is the kernel's output pixel and the next kernel's input
    stream.

  With the default depths the three kernels take 18, 10 and 14 cycles, 42 in
  total. Every kernel produces one output pixel per input pixel.
- **Configuration:** every PE and switch register loads from plain array ports
  when `cfg_we` is 1. Nothing in the fabric decodes a program. The
  configuration is what a mapping tool would produce: a function index per PE,
  a source address per switch output, and constants.

The image source (off-chip DRAM) is outside the design; the two pixel-stream
ports stand in for it.

## Parameters and where the numbers come from

| Parameter | Default | Origin |
|---|---|---|
| `DATA_W` | 16 | 16-bit operations used for all reported results |
| window | 5x5 | the convolution workload evaluated |
| `PE_PIPE_DEPTH`, `SW_PIPE_DEPTH` | 2 | example configuration of the generator |
| map PE functions | mult, absDiff, gt, lt | the PE function list as described |
| wave grid | 3 high x 4 stages | the wave-pipeline example |
| kernel stage counts | 4, 2, 3 | the application-pipeline drawing |
| `IMG_W` x `IMG_H` | 64 x 64 | own choice (no image size given) |
| application window | 2x3 | own choice: its 6 pixels match the 6 inputs of a 3-high wave pipeline |

`DATA_W` is meant to sweep from 2 to 32 bits. The window size sets the switch
size (`2*ROWS*COLS+1` ports). The `PE_CONFIGURABLE` and `SW_CONFIGURABLE`
flags of `pe`, `sw`, `conv_topology` and `wave_pipeline` select the four
flexibility variants: none, PE only, switch only, both. The top always builds
the fully configurable fabric.

## Departures and open points

These points are this implementation's choices. The description it follows
gives block diagrams and parameters, not signal-level behaviour.

- The valid AND rule's three terms, the split of pipe depth between input and
  output flops, the shift-enable and constant-load behaviour, and the use of
  the upper result word are interpretations.
- The reduction PE takes the map results directly, not through the switch.
  The switch's `2N+1` ports leave no room for `N` more reduction inputs.
- The switch port numbering in the convolution topology, the wave pipeline's
  input pairing, the size of its last switch, and "output 0 is the kernel
  output" are own choices.
- The application kernels' window shape and the image size are own choices.
  Whole applications (Canny, Harris, FAST) need kernel sizes that are not
  known here.
  - The one edge-detector stage whose graph is known needs about 7 stages of
    height 6 with two-input PEs.
  - It therefore does not fit the default 3x4 kernels; it does fit once
    `STAGE_H`/`STAGE_W` are raised. `tb_canny_stage` runs it on a 6x7 wave
    pipeline. The graph is five pixel-times-coefficient products and one
    negated pixel, a five-input sum, an arithmetic right shift, a max
    against the negated pixel and a min against an upper bound.
- The valid bits only carry data forward. There is no ready or stall signal
  going back upstream, so a downstream block cannot hold the pipeline. A
  "pull" mode was mentioned for the valid bits but not described, and is not
  built.
- The PE supports any function list, but each topology gives all its PEs one
  list: the map functions in the convolution topology, every op code in the
  wave pipeline. Per-PE lists, for example a reduction-only `sum` PE in a
  generic grid, would need a per-PE list parameter.
- No program compiler is included. The testbenches write configurations by
  hand.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares against
an independent model and checks exact cycle latency. Random stimulus comes from
`$urandom`, and each testbench ends with
`TB_RESULT checks=N failures=M`.

| Testbench | What it covers |
|---|---|
| `tb_pe` | Three PEs against a cycle-level model class, over random configurations, operand selects and valids. The PEs are: the default PE, an all-functions PE at depth 3, and a fixed `sub` PE. A fourth PE at depth 1 must lead the default PE by one cycle. |
| `tb_sw` | 3x2, fixed 3x2, 3x2 at depth 1 and 7x5 (depth 3) switches, with random routes including broadcast and empty addresses. |
| `tb_reduction` | 25- and 6-input trees. |
| `tb_line_buffer`, `tb_stencil_reg` | Several image sizes, bubbles, frame wrap, top-edge zeros. |
| `tb_conv_topology` | 5x5, 2x2 and fixed 2x2 instances through convolution, SAD, threshold count and reduction bypass. Latency 6 and 4. |
| `tb_conv_sweep` | The convolution topology at 2, 4, 8 and 32 bits (2x2 window) and at 3x3, 4x4 and 3x5 windows (19-, 33- and 31-port switches), through the helper `conv_sweep_unit`. |
| `tb_wave_pipeline` | A directed edge-detector-style graph, random configurations and a fixed variant. Latency 16. |
| `tb_canny_stage` | The edge-detector stage graph described under "Departures" mapped onto a 6-high, 7-stage wave pipeline; latency 28. |
| `tb_spa_top` | The whole design at default parameters, with two 64x64 frames per half. See below. |

`tb_spa_top` runs end to end:

- **Convolution half.** One frame as a 5x5 convolution. Then a run-time switch
  to SAD with new coefficients, and a second frame. Every output is checked
  against a reference computed from the pixel stream, with latency 7.
- **Application half.** A box filter, then a 4-pixel max, then a threshold.
  Every output is checked, with latency 42.
- **Mechanisms.** The testbench counts each of these and fails if any never
  happened: bubbles, coefficient loads, mode switches, frame wraps, top-edge
  zero windows, left-edge wrap windows.

Simulate a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/spa_pkg.sv tb/tb_spa_top.sv --top-module tb_spa_top
./obj_dir/Vtb_spa_top
```

`tb_conv_sweep` also needs `-y tb` to find its helper module.

Each testbench runs in seconds.

## Files

| File | Contents |
|---|---|
| `rtl/spa_pkg.sv` | op codes, function lists, index and width helpers |
| `rtl/pe.sv` | programmable element |
| `rtl/sw.sv` | crossbar switch |
| `rtl/reduction.sv` | reduction PE (adder tree) |
| `rtl/conv_topology.sv` | map/reduce window engine |
| `rtl/wave_pipeline.sv` | staged PE/switch grid |
| `rtl/line_buffer.sv` | row memory, column output |
| `rtl/stencil_reg.sv` | sliding-window shift register |
| `rtl/spa_top.sv` | convolution kernel and three-kernel application pipeline |
| `tb/tb_*.sv` | one self-checking testbench per block, one for the top, the edge-detector stage and the size sweep |
| `tb/conv_sweep_unit.sv` | one sweep point: a convolution topology with its own stimulus and reference |
