# LUT-cascade programmable logic device with synchronous SRAMs

This design is a programmable logic device built almost entirely from memory.
A logic function is split into a *cascade* of look-up tables. Each stage reads
a few primary inputs plus the intermediate signals ("rails") produced by the
stage before it. It then looks up the rails for the next stage. The last stage
gives the outputs. Each stage is a plain SRAM, so a cascade of large memories
takes the place of an FPGA's sea of small LUTs and routing.

The chip modelled here has eight such stages (LUT blocks). Each is a 64 kbit
synchronous SRAM with 13 address bits and 8 data bits, giving 512 kbit of table
memory in all. Three ideas shape the design:

1. **Flexible cascade connection.** Each block can take its cascade input from
   either of two neighbours. This lets the eight blocks form one 8-stage loop,
   two 4-stage loops or four 2-stage loops, and any block of a loop can be the
   first stage.
2. **Pseudo-asynchronous, interleaved operation.** All blocks are synchronous
   SRAMs, but each one is clocked in its own phase of a multiplied clock. The
   stages of a cascade therefore fire one after another within a single I/O
   clock period, like an asynchronous chain. Each SRAM is active for only one
   phase, which saves power.
3. **Bypass redundancy.** A faulty block can be bypassed. Its input is then
   passed straight to its output register, and its SRAM is switched off.

## The LUT block (`lut_block`)

```
            EXT_IN[12:0]
             |        \______________ [12:8] column ______________
             | [7:0]                                              |
 IN1 --+     v                                                    v
       SW1 -> rail switch --[7:0] row--> SRAM 8192 x 8 (256 rows x 32 cols)
 IN2 --+  |   (c0 = rails)                          |
       (c1)|                                         v
          +-----------------bypass--------------> SW2 (c2) -> DATA REG -> cascade out
                                                                ^
                                                          LUT_CLK phase
```

- **SW1** selects IN1 or IN2 (mode bit `c1`).
- **Rail switch** builds the 8-bit row address. Its low `c0` bits are rails
  from the cascade and the rest come from `EXT_IN[7:0]` (`c0` = 0..8).
- **Column address** is `EXT_IN[12:8]`.
- **SW2** selects the SRAM word or, when bypassed (`c2` = 1), the SW1 output
  itself. A bypassed SRAM is switched off: it is never read or written.
- **DATA REG** latches at the end of the block's phase and drives the cascade
  output.
- **Mode register** (`mode_reg`) holds `c0`, `c1` and `c2` as one
  `lutc_pkg::mode_t`.

A block with `c0 = 0` is a cascade head: all 13 address bits are external
inputs. A later stage with `c0 = r` uses `r` rails from the previous stage and
`13 - r` primary inputs.

## Flexible cascade connection (`lut_cascade_lsi`)

The blocks sit in two rows. The upper row holds blocks 0 1 2 3, left to right.
The lower row holds blocks 7 6 5 4, so block 4 sits under block 3. They are
wired as a ring 0→1→2→3→4→5→6→7→0.

| input | source for block *i* |
|-------|----------------------|
| IN1   | output of block (i+7) mod 8, its ring predecessor |
| IN2   | output of block 7−i, the block facing it in the other row |

With these two links (for blocks 0 and 4 both links come from the same block):

| loop structure | loops | links that close them |
|---|---|---|
| single 8-loop | 0→1→…→7→0 | all IN1 |
| dual 4-loops  | {0,1,6,7}: 0→1→6→7→0 ; {2,3,4,5}: 2→3→4→5→2 | 1→6 and 5→2 use IN2 |
| quad 2-loops  | {0,7} {1,6} {2,5} {3,4} | one IN1/IN2 link each way |

A cascade is an open path along a loop, and it may start at any block.
Because every block's output reaches an I/O register, an intermediate stage
can also drive primary outputs. An example is the "4+2+2" mapping: 4→5→2→3
(outputs from 2 and 3), 7→0 and 6→1, which the end-to-end test runs.

## Phase timing: how one I/O period is used

This is the least obvious part of the design. It is also where it departs most
from a literal circuit description, so it is worth reading carefully.

The PLL (outside this RTL) supplies `clk` at 9×, 5× or 3× the I/O clock
frequency, and `io_clk` synchronous to it. `lut_clk_gen` shifts `io_clk`
through a chain of flip-flops. Phase *k* is high while stage *k* has seen the
new rising edge and stage *k+1* has not. Each I/O period therefore produces
one-clock pulses p0, p1, p2, … in order. `lut_clk_phase_sel` gives each block
one of p0..p7 as its LUT clock, set per block; after reset, block *i* is on
phase *i*.

Timeline for the 9× case (each column is one `clk` cycle):

```
io_clk rises  |
io_edge       #                                             #
p0..p7            p0  p1  p2  p3  p4  p5  p6  p7  (p8 idle)
I/O registers #  load EXT_IN, capture outputs                #  load, capture
```

- At the `io_edge` clock edge the I/O registers load the new `EXT_IN` values.
  At the same edge they capture every block's current output.
- Block on phase *k*: during the phase its SRAM is read at the address formed
  from `EXT_IN` and its source block's DATA REG. At the edge that ends the
  phase, DATA REG loads the result.
- A stage on phase *k+1* therefore sees the result of a stage on phase *k*
  from the same I/O period.
- The last phase of each period is left idle. A block on that phase would
  latch at the same edge at which the outputs are captured. So an *n*-stage
  cascade needs *n*+1 phases: 8 operations in 9 phases (9× clock), 4 in 5
  (5×) and 2 in 3 (3×).
- **Latency and rate:** inputs taken at one I/O edge produce outputs at the
  next I/O edge, one I/O period (9, 5 or 3 clocks) later. A new input set is
  accepted every I/O period.

With a 5× or 3× clock the chain still produces p5..p8 (or p3..p8). These
pulses coincide with the next period's p0, p1, …, so blocks must then only
be placed on p0..p3 (or p0..p1). Programming a legal phase map is the user's
job.

**Departure from the silicon.** The original circuit clocks the phase chain on
the inverted fast clock, runs each SRAM through its LUT clock's high time and
latches on the falling edge. It also clocks the I/O registers directly with
IO_CLK. Its timing margins at the I/O registers are half a fast-clock cycle
(1/18 of the I/O period at 9×). This RTL uses one clock and one edge. LUT
clocks become one-cycle enables, the I/O clock edge becomes the `io_edge`
enable, and "latch at the falling edge of the LUT clock" becomes "load at the
rising edge that ends the phase". The sequence of operations is the same, but
the half-cycle margins do not exist here. `io_clk` must change away from the
rising edge of `clk`.

## Programming

All programming is sampled on the rising edge of `clk`. The block-select bus
`bs` selects the target of each operation.

| operation | strobe | data |
|---|---|---|
| mode register of block `bs` | `mode_set` | `mode_in` (`c0` rails, `c1` IN2, `c2` bypass) |
| LUT clock phase of block `bs` | `phase_set` | `phase_in` (0..7) |
| SRAM word of block `bs` | `we` during block `bs`'s phase | `data` |

A table write goes to the address the block forms at that moment. Program the
tables with `c0 = 0` so that the address is exactly the block's 13 `EXT_IN`
bits. In the 9-phase reset state, one I/O period can write one word into each
of the eight blocks. Drive `bs = k` and `we` in the clock where phase *k* is
high. All eight tables take 8192 I/O periods.

Mode and phase changes take effect at once. Outputs are meaningful again from
the second complete I/O period after the last change.

## I/O groups

Four register groups A–D each serve a pair of blocks (A: 0,1 · B: 2,3 ·
C: 4,5 · D: 6,7):

- `in_x[25:0]` = {EXT_IN of odd block, EXT_IN of even block}
- `out_x[15:0]` = {odd block output, even block output}

Both directions are registered at `io_edge`. The original groups are also
named as pin multiplexers, but what they multiplex is not specified. Here
every pin has one fixed function.

## What is modelled and what is not

- **The SRAM** (`sram_64k`) is a memory array. Reads are combinational while
  its phase enable is high and the core is powered, and 0 otherwise. Writes
  happen at the clock edge ending the phase. Decoders, sense amplifiers and
  bitline loads are reduced to this behaviour. A powered-off core keeps its
  contents in this model.
- **The PLL** is not part of the RTL. Its output is the `clk` input.
- **The power switch** that turns off a bypassed SRAM is represented only by
  the SRAM's `pwr_on` input (`= !c2`).
- **Pads** are not modelled.
- **Choices made by this design:**
  - the code of `c0` (number of low-order rails, saturating above 8);
  - the mapping of `EXT_IN` bits to rail switch and column;
  - the programming protocol above;
  - asynchronous active-low reset, which clears every register; after reset
    block *i* is on phase *i*, with `c0 = 0`, IN1 selected and no bypass;
  - IN2 of block *i* coming from block 7−i (the reading of "adjacent
    vertically" that yields every loop structure listed above).

## Files

| file | contents |
|---|---|
| `rtl/lutc_pkg.sv` | widths, `mode_t` |
| `rtl/lut_cascade_lsi.sv` | top: interconnect, I/O groups, clocking, programming bus |
| `rtl/lut_block.sv` | one LUT stage (SW1, rail switch, SRAM, SW2, DATA REG, mode register) |
| `rtl/sram_64k.sv` | 8192 × 8 synchronous SRAM core |
| `rtl/rail_switch.sv` | rail/external-input selection |
| `rtl/mode_reg.sv` | per-block mode register |
| `rtl/lut_clk_gen.sv` | phase-pulse generator (with a phase-order assertion) |
| `rtl/lut_clk_phase_sel.sv` | per-block LUT clock phase selection |
| `rtl/io_mux_reg.sv` | I/O register group |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Every testbench is self-checking. Each ends with
`TB_RESULT checks=N failures=M` and has a watchdog. For example, the
end-to-end test at full size:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_lut_cascade_lsi rtl/lutc_pkg.sv tb/tb_lut_cascade_lsi.sv
./obj_dir/Vtb_lut_cascade_lsi
```

`tb_lut_cascade_lsi` runs the top with its default sizes: eight full
8192-word tables, all of them programmed through the write bus. It then runs
the configurations listed below. A reference model in the testbench evaluates
every block phase by phase and predicts all 64 output pins. At every clock the
testbench also checks that outputs change only at the I/O edge, one period
after their inputs. It counts each mechanism (each loop size, the 4+2+2 mix,
IN2 links, partial rail counts, bypass, cascade heads other than block 0,
table writes) and fails if one never occurs. The configurations are:

- the single 8-loop from two different starting blocks (9 phases);
- the two 4-loops with random starting points, and the two rows 0..3 and
  4..7 (5 phases);
- the four 2-loops in random directions (3 phases);
- the 4+2+2 mapping;
- single loops with one block bypassed.

The unit testbenches cover the following:

- SRAM: a full fill and read-back; writes outside the phase or while powered
  off are ignored.
- Rail switch: every rail count.
- Mode and phase registers: loading and holding.
- Phase generator: pulse order and position, and the `io_edge` position, at
  9×, 5× and 3×.
- I/O group: registers change only at `io_edge`.
- LUT block: random modes checked against a model; bypass; unselected writes
  are ignored; a bypassed core is not written.
