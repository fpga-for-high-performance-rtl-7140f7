# A bit-serial FPGA fabric in SystemVerilog

Bit-serial arithmetic streams words through a circuit one bit per clock, LSB
first. An adder is then one full adder plus a carry flip-flop, and a
multiplier is a row of such cells. Because so little travels between cells
(one wire per operand), bit-serial datapaths route easily. Inside each cell,
though, the wiring is dense: sum, carry and carry feedback all meet there.
This FPGA is built around that fact:

* **Large logic blocks.** Each block has four 4-input LUTs, six flip-flops,
  and dedicated multiplexers for carry-save arithmetic and 5-input functions.
  The dense wiring inside a cell stays inside one block.
* **Two-level routing.** Each logic block sits inside its own local
  crossbar, the *internal block routing*. This crossbar buffers every pin,
  feeds any output back to any input, and passes signals straight through the
  block. Outside, plain single-length segments run between blocks through
  C-blocks (pin to segment, and pin to facing pin) and S-blocks (segment to
  segment).
* **An 8 x 8 array.** The array has 64 logic blocks and 16 IO blocks on each
  side of the chip (64 in all).

The RTL describes the whole fabric as configurable logic. You load a
configuration over a small write bus and the array then runs the circuit. The
testbenches do exactly that, with real bit-serial circuits: 64 adders at
once, and six multipliers at once.

## Files

| file | what it is |
|---|---|
| `rtl/bsfpga_pkg.sv` | sizes, source encodings, configuration structs, block-id map |
| `rtl/logic_block.sv`, `rtl/lut4.sv` | the logic block |
| `rtl/lb_routing.sv` | internal block routing (input/output interconnect networks) |
| `rtl/lb_tile.sv` | logic block + internal routing |
| `rtl/c_block.sv`, `rtl/s_block.sv` | external routing |
| `rtl/io_block.sv` | IO block |
| `rtl/cfg_frame.sv` | configuration register of one block |
| `rtl/bsfpga_top.sv` | the chip: array, channels, IO ring, configuration |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_bsfpga_top.sv` | end-to-end test of the whole chip |
| `tb/tb_io_ring.sv` | all 64 IO blocks and edge C-blocks |
| `tb/tb_workload_add64.sv`, `tb/tb_workload_mult.sv` | whole-array workloads |

## The logic block

```
 half 0 (pins a0-a5, c2, c3)             half 1 (pins b0-b5, c4, c5)
   m   = cs ? q1 : c2                      m   = cs ? q3 : c4
   e0  = LUT(a0,a1,a2,m)                   e2  = LUT(b0,b1,b2,m)
   e1  = LUT(share ? a0,a1,a2 : a3,a4,a5, m)  e3 = LUT(share ? b0..b2 : b3..b5, m)
   f0  = mode5 & c3 ? e1 : e0              f2  = mode5 & c5 ? e3 : e2
   f1  = e1                                f3  = e3
 q[i] <= f[i], d[i] = oreg[i] ? q[i] : f[i]   (i = 0..3)
 d4 = q4 <= c0,   d5 = q5 <= c1
```

The parts and names follow the original design: LUTs e0..e3, multiplexers
f0..f3, a flip-flop after each f with a choice of registered or direct output,
and two plain flip-flops from c0/c1 to d4/d5. Exactly which pin enters which
LUT input is this design's own reading. It was chosen so that the two named
features do useful work:

* **Carry-save multiplexer.** With `cs` set, LUT input 3 of both LUTs of a
  half is the half's own odd flip-flop. A bit-serial full adder then fits in
  one half: the even LUT is the sum and the odd LUT is the carry, registered
  and fed back without touching any routing. The same trick turns the odd
  LUT into a register with load enable (`e = load ? new : q`). The
  multiplier uses this to hold its parallel operand.
* **5-input functions.** With `share` both LUTs of a half read the same four
  inputs. With `mode5`, c3 (or c5) then chooses between them, so f0 (or f2)
  is any function of five inputs.

The configuration of one logic block is 74 bits (`lb_cfg_t`). A LUT table is
indexed as `{in3,in2,in1,in0}`, where in3 is the carry-save input `m`.

## Two-level routing

This is the part that is hardest to read in the RTL, because routing built
from pass transistors has no direction but simulation needs one.

**Bidirectional pins.** Each logic block side (N, E, S, W) has `PINS = 4`
bidirectional pins. In the RTL a pin is three signals:

* `pin_in`: what the C-block delivers to the pin;
* `pin_out`: what the block drives;
* `pin_oe`: the tristate enable.

A pin drives the channel only while `pin_oe` is set. There is no `z`: an
undriven track or pin input reads 0.

**Internal block routing (`lb_routing`).** Every logic block input and every
pin output has a 5-bit source select over one table:

| index | source |
|---|---|
| 0, 1 | constants 0 and 1 |
| 2..7 | logic block outputs d0..d5 (internal feedback) |
| 8..23 | pin inputs, `8 + side*4 + pin`, sides N=0, E=1, S=2, W=3 (bypass) |

Both networks are full multiplexers. This is the simplest network with the
"any pin, any direction" symmetry the architecture asks for. The original
switch pattern was sparser.

**C-block.** One C-block sits in each channel segment between two facing
block sides: side A and side B. For a horizontal channel, side A is the
block above; for a vertical channel, side A is the block to the east. Across
the C-block run `CHANW = 8` single-length tracks. Each track takes one driver
(`t_sel`):

| t_sel | driver |
|---|---|
| 0 | none |
| 1 | S-block at end 0 |
| 2 | S-block at end 1 |
| 3..6 | side-A pin |
| 7..10 | side-B pin |

End 0 is west or south; end 1 is east or north. Each pin input takes one
source (`a_sel`/`b_sel`):

| a_sel / b_sel | source |
|---|---|
| 0 | constant 0 |
| 1..8 | track |
| 9..12 | the facing pin |

The facing-pin path is the direct neighbour connection. It costs no track,
and bit-serial pipelines use it all the time.

**S-block.** For each of its four sides and each track, `sel` picks which
other side drives that track (1, 2, 3 = the sides (s+1)%4, (s+2)%4, (s+3)%4),
or none. A track keeps its number through the S-block (a disjoint pattern).
Fan-out to several sides is allowed.

Because every connection is a configured choice, a configuration can close a
combinational loop, just as it could short pass transistors on silicon. The
structure therefore contains loops that lint reports as circular logic. A
valid configuration never activates them. While `rst_n` is low every
configuration output reads 0, so the fabric is quiet from power-up until
loaded.

## The array

```
 y=8  S--HC--S--HC--S ...        tile (x,y) = lb_tile, x,y = 0..7
      |      |      |            S(i,j), i,j = 0..8: S-blocks at every crossing
     VC tile VC tile VC          HC(x,j): horizontal channel j, between tile
      |      |      |              (x,j) above (side A) and (x,j-1) below (side B)
      S--HC--S--HC--S            VC(i,y): vertical channel i, between tile
 y=0   ...                         (i,y) east (side A) and (i-1,y) west (side B)
      x=0                        IO blocks replace the missing side of edge C-blocks
```

Each tile has one logic block, one S-block and two C-blocks. An extra row
and column of S- and C-blocks closes the ring. Pins 0 and 1 of each of the
8 edge C-blocks per side connect to IO blocks, giving 16 per side. Pad index
k is `2*x + pin` on the north and south sides and `2*y + pin` on the east
and west sides.

**IO block.** It is either an input (pad to array) or an output (array to
pad, `pad_oe` set), direct or through one flip-flop. The original design
names IO blocks but does not describe them; this is the simplest useful one.
The pads themselves are analog cells and are not modelled.

## Configuration

The original design does not say how the chip is configured. This RTL uses
a simple addressed word bus:

* `cfg_we`
* `cfg_blk`, the block id
* `cfg_word`, the 16-bit word within the block
* `cfg_wdata`

Each word is written on a rising clock edge. Block ids are listed in
`bsfpga_pkg`:

| block | id |
|---|---|
| tiles | `8*y + x` |
| S-blocks | `64 + 9*j + i` |
| HC | `145 + 8*j + x` |
| VC | `217 + 8*i + y` |
| IO | `289 + 16*side + k` |

The bit layout of each block is its packed struct (`tile_cfg_t` 260 bits,
`cb_cfg_t` 64, `sb_cfg_t` 64, `io_cfg_t` 2), word 0 holding bits 15:0. A
testbench can fill a struct and write it with a 10-line task, as all the
top-level testbenches do. Reset clears all configuration.

## What has been verified

Every testbench checks against values computed independently: integer
arithmetic, or a reference model written from the equations above. Each
testbench prints `TB_RESULT checks=N failures=M`.

* Block tests: `tb_logic_block` runs a bit-serial adder, then random
  configurations against a model. The tests for `lb_routing`, `c_block` and
  `s_block` use random selections against the source tables. `tb_io_block`
  runs all four modes and checks the register latency.
* `tb_bsfpga_top` (default size) loads a configuration and streams 200 words
  through three circuits. All paths are counted as used:
  * an 8-bit serial adder, with operands arriving by a direct pin, by a
    track, and by a track through an S-block (the word-start flag);
  * a running-parity block using the 5-input multiplexer and internal
    feedback;
  * a two-block bypass path into a registered IO block.

  It also checks that each sum takes exactly 8 clocks.
* `tb_io_ring`: every even pad is looped back to the odd pad beside it,
  through its edge C-block and a bypass in the edge logic block. Half of
  the loops are registered. This checks all 64 IO blocks, the pad numbering
  and the output enables.
* `tb_workload_add64`: all 64 blocks as adders in one serpentine chain. The
  second operand and word flag are broadcast to every block over tracks and
  S-blocks. It checks `a + 64*b` for 8-bit and 16-bit words, with one result
  every 8 or 16 clocks.
* `tb_workload_mult`: four 8-bit and two 16-bit serial-parallel multipliers
  at once, using all 64 blocks. Each checks products against `a*b` and a
  product every 2N clocks.

## Throughput against the original estimates

The original design estimates 156 MHz; the RTL carries no timing.

| workload | estimate | this fabric at 156 MHz |
|---|---|---|
| 8-bit add x64 | 1.25 GOPS | 64 blocks, 1 result / 8 clk each = 1.248 GOPS |
| 16-bit add x64 | 624.64 MOPS | 64 blocks, 1 / 16 clk = 624 MOPS |
| 8-bit mult x4 | 78 MOPS | 32 blocks, 1 / 16 clk = 39 MOPS |
| 16-bit mult x2 | 19.5 MOPS | 32 blocks, 1 / 32 clk = 9.75 MOPS |

The additions match. The multipliers here are the plainest serial-parallel
form: N operand bits, then N flush clocks. They use half the blocks and give
half the throughput of the estimate. The original does not say how its
multipliers are built. A second multiplier per
product stream, built from the unused blocks and working on alternate
operands, could make up the rate.

## Where this departs from the original or fills gaps

* The wiring of pins into LUTs, and the meaning of the carry-save and
  5-input multiplexers, are a reading of a block diagram, described above.
  Half 0 uses a0-a5; the diagram draws a5 near half 1.
* Pins per side (4), channel width (8), the C-block and S-block patterns,
  and all encodings are chosen here. They are package constants, so
  architectural variants are a one-line change, although the testbenches
  assume 2 IO blocks per edge C-block.
* Both internal networks are full crossbars, not the original sparse switch
  pattern.
* The configuration bus, the reset behaviour (asynchronous, active-low,
  clearing configuration and flip-flops alike) and the IO block contents are
  this design's own.
* Not modelled: pads, transistor-level pin buffers (they appear only as the
  split `pin_in`/`pin_out`), layout and timing.

## Simulating

With Verilator 5 (two-state; randomised initial values are fine, since
reset is applied from time 0):

```
verilator --binary --timing -Irtl -Itb -y rtl +libext+.sv \
    rtl/bsfpga_pkg.sv tb/tb_workload_mult.sv --top-module tb_workload_mult
./obj_dir/Vtb_workload_mult
```

Swap in any testbench name. The whole-chip testbenches take about 45 s to
build and under 2 s to run. Expect `UNOPTFLAT` warnings for the
configurable loops described above.
