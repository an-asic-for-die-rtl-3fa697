# Microcoded processor for die-sinking spark-erosion simulation

In die-sinking electrical discharge machining (EDM), sparks erode a workpiece into the
complementary shape of a tool electrode, and the tool wears at the same time. A common way to
predict the final shapes treats each electrode as a 2-D contour of points. It then repeats a
simulation cycle many times. Each cycle removes a thin layer from the workpiece and from the
tool, feeds the tool to keep the gap fixed, and regenerates the point sets. The time goes into
distance computations. Every point of one contour needs its distance to the nearest point of
the other, which costs a multiply-accumulate for every pair of points.

This RTL is a single-processor ASIC for those distance computations. It is built in the style
of a microcoded multi-unit signal processor. It has:

- two 16-bit ALUs;
- a 16 x 16 -> 32-bit multiplier;
- an address computation unit (ACU);
- a small constant ROM;
- two on-chip data RAMs.

These units are joined by two 16-bit buses and one 32-bit bus. Every clock cycle a controller
reads one 112-bit microinstruction, and that word sets every unit. The unit set, word lengths,
register-file sizes, memory sizes, bus widths and microcode-store size follow the
architecture this design reproduces. The microinstruction format, the operation sets, the
data layout, the host interface and the microprogram are this design's own.

## What one run computes

Load the workpiece contour into RAM_1 and the tool contour into RAM_2. Coordinates are
unsigned Q15 (0..32767). Scale real coordinates to fit. Then pulse `start`. When `done`
pulses, the RAMs hold:

| result | where | meaning |
|---|---|---|
| nearest distance | RAM_1 384+i, RAM_2 302+i | min over the opposite contour of d2(p_i, q) |
| local removal | RAM_1 768+i, RAM_2 604+i | that electrode's removal curve read at min(nearest distance, 271) |
| segment length | RAM_1 576+i, RAM_2 453+i | d2(p_i, p_i+1) for i < N-1, the point spacing used when regenerating a contour |
| gap | RAM_1 1236 | the smallest workpiece nearest distance, the electrode gap the feed keeps constant |

Here d2(p, q) = floor(dx^2 / 2^15) + floor(dy^2 / 2^15), an unsigned 16-bit squared distance
in Q15. No square root is taken. The minimum and the comparisons only need the squares.

The removal curve is the measured relation between local gap and removed volume. Each
electrode has its own curve of 272 words, which the host loads. Word k of the curve belongs
to squared distance k, and larger distances use word 271. The host chooses the scaling of
the curve to match.

Moving the points is not implemented. That covers displacing a point by its removal, the
servo feed itself, and inserting or deleting points during regeneration. No rule for those
is specified. A host can apply them between runs from the computed values.

### RAM layout

Each contour takes five words per point: x, y, nearest distance, segment length and
removal. Then comes the electrode's 272-word removal curve, and the point count sits in the
last word.

| | RAM_1 (workpiece), 1238 words | RAM_2 (tool), 1030 words |
|---|---|---|
| x,y pairs | 0 .. 2N-1 | 0 .. 2N-1 |
| nearest distances | 384 + i | 302 + i |
| segment lengths | 576 + i | 453 + i |
| removals | 768 + i | 604 + i |
| removal curve (272 words) | 960 .. 1231 | 755 .. 1026 |
| gap | 1236 | - |
| point count N | 1237 | 1029 |
| capacity | 192 points | 151 points |

N must be at least 1.

## The datapath and its timing

Every execution unit has an input register file in front of each operand. The sizes are
fixed by the architecture:

| unit | first file | second file | notes |
|---|---|---|---|
| ALU_1 | X: 11 | Y: 6 | 16 bit; ops ADD, SUB, PASX, PASY, AND, OR, XOR; flags Z, N, C |
| ALU_2 | X: 9 | Y: 7 | as ALU_1 |
| MULT | X: 2 | Y: 4 | signed 16x16 -> 32, product register loads every cycle |
| ACU | A: 7 | B: 3 | 12-bit addresses; PASS, ADD, post-increment |
| RAM_1 | address: 2 | write data: 4 | 1238 x 16 |
| RAM_2 | address: 1 | write data: 2 | 1030 x 16 |
| ROM | - | - | 21 x 16 constants, 5-bit address |

The timing rule that the whole microprogram rests on:

- **Buses are combinational.** In a cycle, the microinstruction picks one source for BUS_1
  and one for BUS_2: an ALU, a RAM, the ROM, the ACU, the Q15 product, or nothing (0). It
  also picks any register-file writes. The writes take the bus values at the end of the same
  cycle.
- **Unit outputs are registered.** An ALU, ACU or multiplier operation reads its register
  files and stores its result in its output register. The result drives a bus in the next
  cycle. ALU_NOP and ACU_NOP hold the output, and ALU_NOP also holds the flags.
- **RAMs read every cycle.** The read register loads the word at the selected address
  register. A write stores the selected data register at that address instead, and the read
  register then gets the old word. Setting an address therefore costs one cycle, and the data
  is on a bus one cycle after that.
- **The ROM is combinational.** A constant is on the bus in the cycle that names it.
- **BUS_3 carries only the multiplier product.** The ALU register files may load it in Q15
  form, bits 30:15, so dx*dx reaches an ALU as a 16-bit unsigned value.
- **Branches test registered flags.** A branch tests the flags left by an earlier ALU
  operation.

A value computed in cycle k can therefore be written into another unit's register file in
cycle k+1 and used in cycle k+2. The microprogram is scheduled by hand around these
latencies.

## The microinstruction

The `mc_t` word in `edm_pkg.sv` is 112 bits. That is the width of the microcode store, and
this layout fills it exactly:

| field group | bits | contents |
|---|---|---|
| sequencer | 13 | op (next, jump, branch, halt), condition (ALU_1 C/Z, ALU_2 Z/N, invert bit), 8-bit target |
| buses | 6 | source of BUS_1 and BUS_2 |
| ALU_1, ALU_2 | 21 each | op; X and Y write (enable, address, source); X and Y read address |
| MULT | 10 | X and Y write; operand addresses |
| ACU | 16 | op; A and B write; A and B read address |
| ROM | 5 | constant address |
| RAM_1 | 11 | write enable; address/data register writes; address/data register select |
| RAM_2 | 9 | as RAM_1 |

An all-zero word does nothing. The controller issues all-zero words while idle.

The controller is a program counter with a two-state FSM (IDLE, RUN) and the
163-word microcode ROM. `start` in IDLE sets the PC to 0. A halt word returns the controller
to IDLE and pulses `done`.

## The microprogram

`microcode_rom.sv` builds its contents from functions, one per program section. The program
fills 161 of the 163 words:

| words | section | cycles |
|---|---|---|
| 0..31 | nearest distance, workpiece against tool | 7 + M*(9 + 14N) + 2U0 |
| 32..63 | nearest distance, tool against workpiece | 7 + N*(9 + 14M) + 2U1 |
| 64..85 | workpiece segment lengths | 8 + 14(M-1) |
| 86..107 | tool segment lengths | 8 + 14(N-1) |
| 108..123 | gap | 7 + 7M + 2G |
| 124..141 | workpiece removal look-up | 6 + 11M |
| 142..159 | tool removal look-up | 6 + 11N |
| 160 | halt | 1 |

U0, U1 and G count how often a running minimum is replaced. Such a replacement costs two
extra words, which the program otherwise branches over. The whole run therefore takes
50 + 20(M+N) + 28MN + 2U + 14(M+N-2) + 7M + 2G cycles. The end-to-end testbench checks this
exactly. With full RAMs (192 x 151 points) that is about 848,000 cycles, or 0.14 s at a
160 ns cycle.

The inner loop of a nearest-distance pass is the heart of the program. It takes 14 cycles
per opposite point (16 when the minimum improves), and its schedule is:

```
 0  ACU: out <- A1, A1++                       (x address)
 1  BUS_2 <- ACU -> RAM addr;  ACU: out <- A1, A1++
 2  BUS_2 <- ACU -> RAM addr                   (x being read)
 3  BUS_2 <- RAM -> ALU_1.Y0                   (y being read)
 4  BUS_2 <- RAM -> ALU_2.Y0;  ALU_1: dx = X0 - Y0
 5  BUS_1 <- ALU_1 -> MULT.X0, MULT.Y0;  ALU_2: dy
 6  BUS_1 <- ALU_2 -> MULT.X1, MULT.Y1;  MULT: dx*dx
 7  BUS_3 -> ALU_1.X2 (Q15);              MULT: dy*dy
 8  BUS_3 -> ALU_1.Y1 (Q15)
 9  ALU_1: d2 = X2 + Y1
10  BUS_2 <- ALU_1 -> ALU_1.Y2
11  ALU_1: best - d2 (borrow => d2 larger);  ALU_2: count - 1
12  branch on ALU_1 borrow to 15;  BUS_1 <- ALU_2 -> ALU_2.X2
13  ALU_1: out <- d2
14  BUS_1 <- ALU_1 -> ALU_1.X1 (best)
15  branch on ALU_2 not zero to 0
```

When d2 equals the best so far, the update is taken. This changes no result, only the cycle
count.

## Files

| file | contents |
|---|---|
| `rtl/edm_pkg.sv` | sizes, encodings, `mc_t`, constant addresses, RAM layout, program map, cycle constants |
| `rtl/edm_asic.sv` | top: all units, buses and the host port |
| `rtl/controller.sv`, `rtl/microcode_rom.sv` | sequencer FSM and the microprogram |
| `rtl/alu.sv`, `rtl/mult.sv`, `rtl/acu.sv`, `rtl/ram_exu.sv`, `rtl/const_rom.sv`, `rtl/bus_mux.sv` | execution units and bus |
| `rtl/regfile.sv` | register file used by every unit |
| `tb/tb_*.sv` | one self-checking testbench per unit, and `tb_edm_asic.sv` end to end |

### Host port

The top's interface:

- `clk`
- `rst_n` (asynchronous, active low)
- `start`, `busy`, `done`
- `pc`, for observation
- the host port: `h_en`, `h_sel` (0 = RAM_1, 1 = RAM_2), `h_we`, `h_addr[11:0]`,
  `h_wdata[15:0]` and `h_rdata[15:0]`. Read data arrives one cycle after the address.

The host port works only while `busy` is low. An assertion flags host writes while the
processor runs.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. For example:

```
verilator --binary --timing --assert -Irtl rtl/edm_pkg.sv tb/tb_edm_asic.sv \
          --top-module tb_edm_asic -Mdir obj_top -o sim
./obj_top/sim
```

For another testbench, substitute its name. Random initial values are fine:
everything read is reset or loaded first.

`tb_edm_asic` runs the top at its default sizes, with six contour pairs and fresh random
removal curves for each:

- 1 x 1 points, where the segment loop is skipped;
- random small contours;
- repeated and extreme points;
- a contour that runs back on itself;
- distances on either side of the end of the removal curve;
- both RAMs full, 192 x 151 points.

For each pair it checks every stored distance, segment length and removal, the gap, that
the inputs are left intact, and the exact cycle count. It also counts each mechanism and
fails if one never happened:

- minimum updates and skips in both searches;
- segment loops, including an empty one;
- curve reads with and without clamping;
- both passes.

It takes a few seconds.

## Changing it

- **Sizes.** The sizes live in `edm_pkg.sv`. The RAM layout is derived from the RAM sizes,
  and the ROM constants follow it.
- **Microinstruction layout.** The address fields in `mc_t` are sized for the default
  register files. A larger register file needs a wider field there. `microcode_rom` refuses
  to elaborate a layout wider than 112 bits.
- **Microprogram.** To change the program, edit `pass_word`, `seg_word`, `gap_word` or `rem_word`, and
  keep the program map and the cycle constants in `edm_pkg` up to date. `tb_controller`
  holds an independent copy of the branch map and will flag a change.

## Where this departs from, or goes beyond, the architecture

- **Register-file sizes.** Each unit has two register-file sizes. They are read as the sizes
  of its two input register files. For the RAMs they are read as address and write-data
  registers.
- **Microcode and operations.** The microcode, the operation sets and all encodings are this
  design's own. The original program is not available, so the cycle counts here are not
  comparable with the original's.
- **Host port.** The host port, the start/done handshake and the RAM layout are added so
  that the chip can be used and tested.
- **Constant ROM.** The ROM's size is fixed, but its contents are not. It holds the 15
  constants this program uses.
- **Removal curve.** Each curve has 272 words, but how it is indexed is this design's
  choice: squared Q15 distance, clamped to the last word. Only the look-up is done. The
  points are not moved, the feed is not applied, and no points are inserted or deleted.
- **Buses.** Any unit may drive BUS_1 and BUS_2, and only the multiplier drives BUS_3. A
  real design would prune these connections to the ones the program uses.
- **Layout data.** The original timing (160 ns cycle, 1.6 um library) and areas belong to
  its layout and are not modelled.
